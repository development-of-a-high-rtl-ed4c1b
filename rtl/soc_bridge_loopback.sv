// Processor-to-FPGA bridge loop-back.
//
// Used to measure and verify the path between the hard processor and the
// FPGA fabric: the processor writes words into the first FIFO over the
// bridge, FPGA logic moves each word into the second FIFO as soon as it is
// there and has room (one word per clock), and the processor reads them
// back and compares. Each FIFO has its own status registers on the
// lightweight bridge. The two-FIFO loop follows the original test design.
module soc_bridge_loopback #(
  parameter int DATA_W     = 64,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              h2f_write,
  input  logic [DATA_W-1:0] h2f_writedata,
  input  logic              f2h_read,
  output logic [DATA_W-1:0] f2h_readdata,
  output logic              f2h_readdatavalid,
  input  logic              csr_sel,       // 0: first FIFO, 1: second FIFO
  input  logic [1:0]        csr_address,
  input  logic              csr_read,
  output logic [31:0]       csr_readdata
);
  logic              lb_valid, lb_ready;
  logic [DATA_W-1:0] lb_data;
  logic [31:0]       csr0, csr1;
  logic              sel_q;

  hps_to_fpga_fifo #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_h2f (
    .clk, .rst_n, .avs_write(h2f_write), .avs_writedata(h2f_writedata),
    .csr_address, .csr_read(csr_read && !csr_sel), .csr_readdata(csr0),
    .m_valid(lb_valid), .m_ready(lb_ready), .m_data(lb_data));

  fpga_to_hps_fifo #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_f2h (
    .clk, .rst_n, .s_valid(lb_valid), .s_ready(lb_ready), .s_data(lb_data),
    .avs_read(f2h_read), .avs_readdata(f2h_readdata),
    .avs_readdatavalid(f2h_readdatavalid),
    .csr_address, .csr_read(csr_read && csr_sel), .csr_readdata(csr1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel_q <= 1'b0;
    else if (csr_read) sel_q <= csr_sel;
  end
  assign csr_readdata = sel_q ? csr1 : csr0;
endmodule
