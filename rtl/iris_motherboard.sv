// Motherboard logic of the acquisition chain.
//
// The coincidence network watches the detector triggers and triggers the
// two DAQ boards of every accepted coincidence with a shared event number.
// For each of the N_BUS synchronous buses a fetch controller pulls packets
// from the boards in bursts (read-clock domain), the integrity checker
// verifies the control codes of each packet, and a dual-clock buffer takes
// the words into the system clock; a fetch waits while its buffer has no
// room for a whole packet. The merge stage then sends whole packets from the
// buffers, round robin, to the host-link stream (the USB controller).
// DAQ board i sits on bus i / (N_DAQ / N_BUS).
module iris_motherboard
  import pet_daq_pkg::*;
#(
  parameter int N_DAQ      = 16,
  parameter int N_BUS      = 2,
  parameter int WINDOW     = 2,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic                   clk_sys,
  input  logic                   rd_clk,
  input  logic                   rst_n,
  input  logic [N_DAQ-1:0]       det_trig,
  output logic [N_DAQ-1:0]       daq_trig,
  output logic [7:0]             event_id,
  input  logic [N_DAQ-1:0]       dav,
  output logic [N_DAQ-1:0]       oe,
  output logic [N_DAQ-1:0]       req,
  input  word_t [N_BUS-1:0]      bus_data,
  output word_t                  usb_data,
  output logic                   usb_valid,
  input  logic                   usb_ready,
  output logic [31:0]            n_coinc,
  output logic [31:0]            n_single,
  output logic [31:0]            n_multiple,
  output logic [N_BUS-1:0][31:0] n_pkts,
  output logic [N_BUS-1:0][31:0] n_stall,
  output logic [N_BUS-1:0][31:0] n_ok,
  output logic [N_BUS-1:0][31:0] n_err
);
  localparam int PER = N_DAQ / N_BUS;

  coincidence_unit #(.N_DET(N_DAQ), .WINDOW(WINDOW)) u_coinc (
    .clk(clk_sys), .rst_n, .det_trig, .daq_trig, .event_id,
    .n_coinc, .n_single, .n_multiple);

  word_t [N_BUS-1:0]               buf_rdata;
  logic  [N_BUS-1:0][DEPTH_LOG2:0] buf_rcount;
  logic  [N_BUS-1:0]               buf_rd;

  for (genvar b = 0; b < N_BUS; b++) begin : g_bus
    logic                wr_en, pkt_ok, pkt_err, wfull, rempty;
    word_t               wdata;
    logic [2:0]          word_idx;
    logic [DEPTH_LOG2:0] wfree;

    daqfetch_sync #(.N_DAQ(PER)) u_fetch (
      .rd_clk, .rst_n,
      .dav(dav[b*PER +: PER]), .oe(oe[b*PER +: PER]), .req(req[b*PER +: PER]),
      .bus_data(bus_data[b]),
      .space_ok(wfree >= (DEPTH_LOG2+1)'(PKT_WORDS)),
      .wr_en, .wdata, .word_idx, .n_pkts(n_pkts[b]), .n_stall(n_stall[b]));

    packet_checker u_chk (
      .clk(rd_clk), .rst_n, .valid(wr_en), .word(wdata), .word_idx,
      .pkt_ok, .pkt_err, .n_ok(n_ok[b]), .n_err(n_err[b]));

    async_fifo #(.WIDTH(WORD_W), .DEPTH_LOG2(DEPTH_LOG2)) u_buf (
      .wclk(rd_clk), .wrst_n(rst_n), .wr_en, .wdata, .wfull, .wfree,
      .rclk(clk_sys), .rrst_n(rst_n), .rd_en(buf_rd[b]), .rdata(buf_rdata[b]),
      .rempty, .rcount(buf_rcount[b]));
  end

  host_merge #(.N_BUS(N_BUS), .DEPTH_LOG2(DEPTH_LOG2)) u_merge (
    .clk(clk_sys), .rst_n, .rdata(buf_rdata), .rcount(buf_rcount),
    .rd_en(buf_rd), .out_data(usb_data), .out_valid(usb_valid),
    .out_ready(usb_ready));
endmodule
