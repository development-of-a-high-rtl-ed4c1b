// Firmware of one DAQ board of the acquisition chain.
//
// The acquisition controller digitizes an event on each accepted trigger and
// writes its five-word packet into a dual-clock FIFO in the board clock
// `clk`; the synchronous bus interface empties the FIFO in the read clock
// `rd_clk` that the motherboard supplies. Ports are the ADC interface, the
// trigger with its event marker from the motherboard, and the per-board bus
// signals OE, REQ, DAV plus the 16 data lines. This split (controller, dual
// clock FIFO, bus interface) follows the original board firmware.
module daq_board
  import pet_daq_pkg::*;
#(
  parameter logic [3:0] DAQ_ID      = 4'd0,
  parameter int         CONV_CYCLES = 5,
  parameter int         DEPTH_LOG2  = 6
) (
  input  logic                clk,
  input  logic                rd_clk,
  input  logic                rst_n,
  input  logic                trig,
  input  logic [7:0]          event_id,
  input  logic [4:0]          cfg_c,
  output logic                adc_start,
  input  sample_t [N_ADC-1:0] adc_data,
  input  logic                oe,
  input  logic                req,
  output logic                dav,
  output logic                bus_drive,
  output word_t               bus_data,
  output logic                busy,
  output logic [31:0]         n_acq,
  output logic [31:0]         n_ignored,
  output logic [31:0]         n_dropped
);
  logic                fifo_wr_en, fifo_rd_en, wfull, rempty;
  word_t               fifo_wdata, fifo_rdata;
  logic [DEPTH_LOG2:0] wfree, rcount;

  daq_acq_ctrl #(.DAQ_ID(DAQ_ID), .CONV_CYCLES(CONV_CYCLES)) u_acq (
    .clk, .rst_n, .trig, .event_id, .cfg_c, .adc_start, .adc_data,
    .fifo_wr_en, .fifo_wdata,
    .fifo_room(wfree >= (DEPTH_LOG2+1)'(PKT_WORDS)),
    .busy, .n_acq, .n_ignored, .n_dropped);

  async_fifo #(.WIDTH(WORD_W), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(fifo_wr_en), .wdata(fifo_wdata),
    .wfull, .wfree,
    .rclk(rd_clk), .rrst_n(rst_n), .rd_en(fifo_rd_en), .rdata(fifo_rdata),
    .rempty, .rcount);

  daq_sync_tx #(.DEPTH_LOG2(DEPTH_LOG2)) u_tx (
    .rd_clk, .rst_n, .oe, .req, .dav, .bus_drive, .bus_data,
    .fifo_rdata, .fifo_rcount(rcount), .fifo_rd_en);
endmodule
