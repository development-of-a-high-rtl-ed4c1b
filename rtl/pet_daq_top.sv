// Top level: PET acquisition chain and SoC prototype side by side.
//
// `u_iris` is the scanner's acquisition chain: 16 DAQ boards that digitize
// coincident events and a motherboard that finds coincidences, fetches the
// packets over two synchronous 16-bit buses in five-word bursts, checks them
// and streams them to the host link. `u_soc` is the FPGA logic of the
// processor-based prototype meant to replace the motherboard's host link:
// the processor-bridge loop-back and the HSMC LVDS receiver. The two are
// not connected to each other; each brings out its own ports. Parts outside
// the FPGAs (discriminators, ADCs, USB controller, hard processor, the
// converter board behind the HSMC connector) connect through ports.
module pet_daq_top
  import pet_daq_pkg::*;
#(
  parameter int N_DET       = 16,
  parameter int N_BUS       = 2,
  parameter int WINDOW      = 2,
  parameter int CONV_CYCLES = 5,
  parameter int DEPTH_LOG2  = 6,
  parameter int DATA_W      = 64
) (
  input  logic                           clk_sys,
  input  logic                           rd_clk,
  input  logic                           ser_clk,
  input  logic                           rst_n,
  // acquisition chain
  input  logic [N_DET-1:0]               det_trig,
  input  logic [4:0]                     cfg_c,
  output logic [N_DET-1:0]               adc_start,
  input  sample_t [N_DET-1:0][N_ADC-1:0] adc_data,
  output word_t                          usb_data,
  output logic                           usb_valid,
  input  logic                           usb_ready,
  output logic [31:0]                    n_coinc,
  output logic [31:0]                    n_single,
  output logic [31:0]                    n_multiple,
  output logic [N_BUS-1:0][31:0]         n_pkts,
  output logic [N_BUS-1:0][31:0]         n_stall,
  output logic [N_BUS-1:0][31:0]         n_ok,
  output logic [N_BUS-1:0][31:0]         n_err,
  output logic [N_DET-1:0][31:0]         n_acq,
  output logic [N_DET-1:0][31:0]         n_ignored,
  output logic [N_DET-1:0][31:0]         n_dropped,
  // SoC prototype: bridge loop-back
  input  logic                           lb_write,
  input  logic [DATA_W-1:0]              lb_writedata,
  input  logic                           lb_read,
  output logic [DATA_W-1:0]              lb_readdata,
  output logic                           lb_readdatavalid,
  input  logic                           lb_csr_sel,
  input  logic [1:0]                     lb_csr_address,
  input  logic                           lb_csr_read,
  output logic [31:0]                    lb_csr_readdata,
  // SoC prototype: HSMC receiver
  input  logic [1:0]                     lanes,
  input  logic                           cmd_write,
  input  logic [DATA_W-1:0]              cmd_writedata,
  input  logic                           out_read,
  output logic [DATA_W-1:0]              out_readdata,
  output logic                           out_readdatavalid,
  input  logic                           rx_csr_sel,
  input  logic [1:0]                     rx_csr_address,
  input  logic                           rx_csr_read,
  output logic [31:0]                    rx_csr_readdata,
  output hsmc_state_e                    rx_state,
  output logic                           link_locked,
  output logic [15:0]                    n_slip
);
  iris_daq_system #(.N_DAQ(N_DET), .N_BUS(N_BUS), .WINDOW(WINDOW),
                    .CONV_CYCLES(CONV_CYCLES), .DEPTH_LOG2(DEPTH_LOG2)) u_iris (
    .clk_sys, .rd_clk, .rst_n, .det_trig, .cfg_c, .adc_start, .adc_data,
    .usb_data, .usb_valid, .usb_ready, .n_coinc, .n_single, .n_multiple,
    .n_pkts, .n_stall, .n_ok, .n_err, .n_acq, .n_ignored, .n_dropped);

  soc_fpga #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_soc (
    .clk(clk_sys), .ser_clk, .rst_n,
    .lb_write, .lb_writedata, .lb_read, .lb_readdata, .lb_readdatavalid,
    .lb_csr_sel, .lb_csr_address, .lb_csr_read, .lb_csr_readdata,
    .lanes, .cmd_write, .cmd_writedata, .out_read, .out_readdata,
    .out_readdatavalid, .rx_csr_sel, .rx_csr_address, .rx_csr_read,
    .rx_csr_readdata, .rx_state, .link_locked, .n_slip);
endmodule
