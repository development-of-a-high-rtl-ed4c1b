// FPGA logic of the SoC acquisition prototype.
//
// Two independent designs share the FPGA next to the hard processor: the
// bridge loop-back (two FIFOs on the high-bandwidth bridge, measuring and
// checking the processor-FPGA path) and the HSMC receiver (LVDS link from a
// converter board, driven by commands from the processor). Each keeps its
// own bridge ports.
module soc_fpga
  import pet_daq_pkg::*;
#(
  parameter int DATA_W     = 64,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic              clk,
  input  logic              ser_clk,
  input  logic              rst_n,
  // loop-back
  input  logic              lb_write,
  input  logic [DATA_W-1:0] lb_writedata,
  input  logic              lb_read,
  output logic [DATA_W-1:0] lb_readdata,
  output logic              lb_readdatavalid,
  input  logic              lb_csr_sel,
  input  logic [1:0]        lb_csr_address,
  input  logic              lb_csr_read,
  output logic [31:0]       lb_csr_readdata,
  // HSMC receiver
  input  logic [1:0]        lanes,
  input  logic              cmd_write,
  input  logic [DATA_W-1:0] cmd_writedata,
  input  logic              out_read,
  output logic [DATA_W-1:0] out_readdata,
  output logic              out_readdatavalid,
  input  logic              rx_csr_sel,
  input  logic [1:0]        rx_csr_address,
  input  logic              rx_csr_read,
  output logic [31:0]       rx_csr_readdata,
  output hsmc_state_e       rx_state,
  output logic              link_locked,
  output logic [15:0]       n_slip
);
  soc_bridge_loopback #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_lb (
    .clk, .rst_n, .h2f_write(lb_write), .h2f_writedata(lb_writedata),
    .f2h_read(lb_read), .f2h_readdata(lb_readdata),
    .f2h_readdatavalid(lb_readdatavalid),
    .csr_sel(lb_csr_sel), .csr_address(lb_csr_address),
    .csr_read(lb_csr_read), .csr_readdata(lb_csr_readdata));

  hsmc_receiver #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_rx (
    .clk, .ser_clk, .rst_n, .lanes, .cmd_write, .cmd_writedata,
    .out_read, .out_readdata, .out_readdatavalid,
    .csr_sel(rx_csr_sel), .csr_address(rx_csr_address),
    .csr_read(rx_csr_read), .csr_readdata(rx_csr_readdata),
    .state(rx_state), .link_locked, .n_slip);
endmodule
