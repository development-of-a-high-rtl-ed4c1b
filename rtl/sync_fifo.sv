// Single-clock FIFO used inside the processor-bridge FIFOs.
//
// A circular buffer with read and write pointers one bit wider than the
// address. Reads are first-word fall-through: `rdata` is the head word while
// `empty` is low, and `rd_en` pops it at the next clock edge. A push and a
// pop may happen in the same cycle. Pushing when full or popping when empty
// is ignored; `count` is the number of words held.
module sync_fifo #(
  parameter int WIDTH      = 64,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [WIDTH-1:0]    wdata,
  output logic                full,
  input  logic                rd_en,
  output logic [WIDTH-1:0]    rdata,
  output logic                empty,
  output logic [DEPTH_LOG2:0] count
);
  localparam int DEPTH = 1 << DEPTH_LOG2;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH_LOG2:0] wptr, rptr;
  logic do_wr, do_rd;

  assign count = wptr - rptr;
  assign full  = count == (DEPTH_LOG2+1)'(DEPTH);
  assign empty = count == '0;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rptr[DEPTH_LOG2-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[DEPTH_LOG2-1:0]] <= wdata;
  end
endmodule
