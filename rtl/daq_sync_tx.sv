// DAQ-board side of the synchronous DAQ-to-motherboard bus.
//
// The motherboard sends every DAQ board a continuous read clock and, per
// board, an output enable (OE) and a read request (REQ); the board answers
// with data ready (DAV) and drives the shared 16-bit data lines. All of it
// runs on the read clock, so no handshake synchronization is needed.
//
// DAV is registered and is high while the board FIFO holds at least one
// complete five-word packet. While OE is high the board drives the FIFO head
// word on the bus (`bus_drive` enables the pad drivers). At each read-clock
// edge at which REQ is high the motherboard takes that word and the board
// pops it, so one REQ pulse moves one word and a run of REQ pulses moves a
// burst. Requiring a full packet for DAV is a choice of this design; the
// signal set and the sequence follow the original protocol.
module daq_sync_tx
  import pet_daq_pkg::*;
#(
  parameter int DEPTH_LOG2 = 6
) (
  input  logic                rd_clk,
  input  logic                rst_n,
  input  logic                oe,
  input  logic                req,
  output logic                dav,
  output logic                bus_drive,
  output word_t               bus_data,
  input  word_t               fifo_rdata,
  input  logic [DEPTH_LOG2:0] fifo_rcount,
  output logic                fifo_rd_en
);
  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) dav <= 1'b0;
    else        dav <= fifo_rcount >= (DEPTH_LOG2+1)'(PKT_WORDS);
  end

  assign bus_drive  = oe;
  assign bus_data   = oe ? fifo_rdata : '0;
  assign fifo_rd_en = oe && req;
endmodule
