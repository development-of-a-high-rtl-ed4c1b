// Acquisition chain: N_DAQ DAQ boards and the motherboard.
//
// Each detector has a DAQ board; the boards share N_BUS synchronous 16-bit
// buses (N_DAQ / N_BUS boards per bus), each board with its own OE, REQ and
// DAV lines and the read clock from the motherboard. On the boards the bus
// lines are tri-state; here each board drives zero unless enabled and a bus
// is the OR of its boards' outputs, with an assertion that at most one board
// drives a bus. The board clock is taken equal to the motherboard system
// clock. ADC converters are outside: `adc_start` per board and the four
// samples per board are ports.
module iris_daq_system
  import pet_daq_pkg::*;
#(
  parameter int N_DAQ       = 16,
  parameter int N_BUS       = 2,
  parameter int WINDOW      = 2,
  parameter int CONV_CYCLES = 5,
  parameter int DEPTH_LOG2  = 6
) (
  input  logic                               clk_sys,
  input  logic                               rd_clk,
  input  logic                               rst_n,
  input  logic [N_DAQ-1:0]                   det_trig,
  input  logic [4:0]                         cfg_c,
  output logic [N_DAQ-1:0]                   adc_start,
  input  sample_t [N_DAQ-1:0][N_ADC-1:0]     adc_data,
  output word_t                              usb_data,
  output logic                               usb_valid,
  input  logic                               usb_ready,
  output logic [31:0]                        n_coinc,
  output logic [31:0]                        n_single,
  output logic [31:0]                        n_multiple,
  output logic [N_BUS-1:0][31:0]             n_pkts,
  output logic [N_BUS-1:0][31:0]             n_stall,
  output logic [N_BUS-1:0][31:0]             n_ok,
  output logic [N_BUS-1:0][31:0]             n_err,
  output logic [N_DAQ-1:0][31:0]             n_acq,
  output logic [N_DAQ-1:0][31:0]             n_ignored,
  output logic [N_DAQ-1:0][31:0]             n_dropped
);
  localparam int PER = N_DAQ / N_BUS;

  logic [N_DAQ-1:0]  daq_trig, dav, oe, req, drive, busy;
  logic [7:0]        event_id;
  word_t [N_DAQ-1:0] dq;
  word_t [N_BUS-1:0] bus_data;

  for (genvar i = 0; i < N_DAQ; i++) begin : g_daq
    daq_board #(.DAQ_ID(4'(i)), .CONV_CYCLES(CONV_CYCLES), .DEPTH_LOG2(DEPTH_LOG2)) u_daq (
      .clk(clk_sys), .rd_clk, .rst_n, .trig(daq_trig[i]), .event_id, .cfg_c,
      .adc_start(adc_start[i]), .adc_data(adc_data[i]),
      .oe(oe[i]), .req(req[i]), .dav(dav[i]), .bus_drive(drive[i]),
      .bus_data(dq[i]), .busy(busy[i]),
      .n_acq(n_acq[i]), .n_ignored(n_ignored[i]), .n_dropped(n_dropped[i]));
  end

  always_comb begin
    bus_data = '0;
    for (int i = 0; i < N_DAQ; i++) bus_data[i / PER] |= dq[i];
  end

  for (genvar b = 0; b < N_BUS; b++) begin : g_chk
    assert property (@(posedge rd_clk) disable iff (!rst_n) $onehot0(drive[b*PER +: PER]));
  end

  iris_motherboard #(.N_DAQ(N_DAQ), .N_BUS(N_BUS), .WINDOW(WINDOW), .DEPTH_LOG2(DEPTH_LOG2)) u_mb (
    .clk_sys, .rd_clk, .rst_n, .det_trig, .daq_trig, .event_id,
    .dav, .oe, .req, .bus_data, .usb_data, .usb_valid, .usb_ready,
    .n_coinc, .n_single, .n_multiple, .n_pkts, .n_stall, .n_ok, .n_err);
endmodule
