// HSMC receiver of the SoC acquisition prototype.
//
// Data from a remote converter board arrives over the mezzanine connector on
// two LVDS lanes. The deserializer turns the lanes into 16-bit words in the
// serial clock; a dual-clock FIFO, whose Gray-coded pointers pass through
// two-flop synchronization registers, brings them into the system clock
// `clk`; words that arrive while it is full are dropped and counted. The
// transfer state machine takes commands from the processor through an
// HPS-to-FPGA FIFO and returns data and status words through an FPGA-to-HPS
// FIFO, both on the processor bridges (see those blocks for the register
// maps). `csr_sel` picks which FIFO's registers a lightweight-bridge read
// returns. This arrangement follows the original test design; the drop rule
// and buffer depth are choices of this design.
module hsmc_receiver
  import pet_daq_pkg::*;
#(
  parameter int DATA_W        = 64,
  parameter int DEPTH_LOG2    = 6,
  parameter int RX_DEPTH_LOG2 = 5,
  parameter int BURST         = 5
) (
  input  logic              clk,
  input  logic              ser_clk,
  input  logic              rst_n,
  input  logic [1:0]        lanes,
  input  logic              cmd_write,
  input  logic [DATA_W-1:0] cmd_writedata,
  input  logic              out_read,
  output logic [DATA_W-1:0] out_readdata,
  output logic              out_readdatavalid,
  input  logic              csr_sel,
  input  logic [1:0]        csr_address,
  input  logic              csr_read,
  output logic [31:0]       csr_readdata,
  output hsmc_state_e       state,
  output logic              link_locked,
  output logic [15:0]       n_slip
);
  // serial clock domain
  logic [15:0]            des_word;
  logic                   des_valid, des_locked, rx_full;
  logic [RX_DEPTH_LOG2:0] rx_wfree, rx_rcount;
  logic [15:0]            drops_s;

  lvds_deserializer #(.LANES(2), .FACTOR(8)) u_des (
    .ser_clk, .rst_n, .align(1'b0), .lanes, .word(des_word),
    .word_valid(des_valid), .locked(des_locked), .n_slip);

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n)                    drops_s <= '0;
    else if (des_valid && rx_full) drops_s <= drops_s + 1'b1;
  end

  // system clock domain
  logic [15:0] rx_data;
  logic        rx_empty, rx_rd;
  logic [1:0]  lock_sync;
  logic [15:0] drops_sync1, drops_sync2;

  async_fifo #(.WIDTH(16), .DEPTH_LOG2(RX_DEPTH_LOG2)) u_rxbuf (
    .wclk(ser_clk), .wrst_n(rst_n), .wr_en(des_valid), .wdata(des_word),
    .wfull(rx_full), .wfree(rx_wfree),
    .rclk(clk), .rrst_n(rst_n), .rd_en(rx_rd), .rdata(rx_data),
    .rempty(rx_empty), .rcount(rx_rcount));

  // lock flag and drop counter through synchronization registers. The drop
  // counter is a plain binary count sampled in another clock, so a read may
  // catch it mid-change; it only feeds the status word and is read again on
  // the next status command.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_sync   <= '0;
      drops_sync1 <= '0;
      drops_sync2 <= '0;
    end else begin
      lock_sync   <= {lock_sync[0], des_locked};
      drops_sync1 <= drops_s;
      drops_sync2 <= drops_sync1;
    end
  end
  assign link_locked = lock_sync[1];

  logic              cmd_valid, cmd_ready, res_valid, res_ready;
  logic [DATA_W-1:0] cmd_data, res_data, last_cmd;
  logic [15:0]       n_words, n_cmds;
  logic [31:0]       csr_c, csr_o;
  logic              sel_q;

  hps_to_fpga_fifo #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_cmdq (
    .clk, .rst_n, .avs_write(cmd_write), .avs_writedata(cmd_writedata),
    .csr_address, .csr_read(csr_read && !csr_sel), .csr_readdata(csr_c),
    .m_valid(cmd_valid), .m_ready(cmd_ready), .m_data(cmd_data));

  hsmc_ctrl_fsm #(.DATA_W(DATA_W), .BURST(BURST)) u_fsm (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_data,
    .rx_data, .rx_empty, .rx_rd, .rx_drops(drops_sync2),
    .link_locked, .out_valid(res_valid), .out_ready(res_ready),
    .out_data(res_data), .state, .last_cmd, .n_words, .n_cmds);

  fpga_to_hps_fifo #(.DATA_W(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_outq (
    .clk, .rst_n, .s_valid(res_valid), .s_ready(res_ready), .s_data(res_data),
    .avs_read(out_read), .avs_readdata(out_readdata),
    .avs_readdatavalid(out_readdatavalid),
    .csr_address, .csr_read(csr_read && csr_sel), .csr_readdata(csr_o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel_q <= 1'b0;
    else if (csr_read) sel_q <= csr_sel;
  end
  assign csr_readdata = sel_q ? csr_o : csr_c;
endmodule
