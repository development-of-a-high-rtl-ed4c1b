// Dual-clock FIFO.
//
// On a DAQ board the acquisition logic writes event words in its own clock
// while the motherboard reads them with the read clock it sends to the
// board, so the packet buffer is a dual-clock FIFO. The same FIFO carries
// deserialized LVDS words into the system clock of the SoC design.
//
// Binary pointers one bit wider than the address are kept in each domain and
// passed to the other one as Gray code through two-flop synchronizers, so
// only one bit changes per step and a late sample is off by at most one. The
// writer sees the free space `wfree` and the reader the fill level `rcount`;
// both are conservative (they lag the other side by the synchronizer delay).
// Reads are first-word fall-through: `rdata` shows the head word whenever
// `rempty` is low and `rd_en` pops it at the next read-clock edge.
// Pushing when full or popping when empty is ignored.
// Depth and the Gray-pointer scheme are choices of this design.
module async_fifo #(
  parameter int WIDTH      = 16,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic                  wclk,
  input  logic                  wrst_n,
  input  logic                  wr_en,
  input  logic [WIDTH-1:0]      wdata,
  output logic                  wfull,
  output logic [DEPTH_LOG2:0]   wfree,
  input  logic                  rclk,
  input  logic                  rrst_n,
  input  logic                  rd_en,
  output logic [WIDTH-1:0]      rdata,
  output logic                  rempty,
  output logic [DEPTH_LOG2:0]   rcount
);
  localparam int DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];
  ptr_t wptr, rptr, wgray, rgray;
  ptr_t rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[DEPTH_LOG2] = g[DEPTH_LOG2];
    for (int i = DEPTH_LOG2 - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  ptr_t rptr_w;
  assign rptr_w = gray2bin(rgray_w2);
  assign wfree  = ptr_t'(DEPTH) - (wptr - rptr_w);
  assign wfull  = (wptr - rptr_w) == ptr_t'(DEPTH);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wfull) begin
        wptr  <= wptr + 1'b1;
        wgray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wptr[DEPTH_LOG2-1:0]] <= wdata;
  end

  // read domain
  ptr_t wptr_r;
  assign wptr_r = gray2bin(wgray_r2);
  assign rcount = wptr_r - rptr;
  assign rempty = (rcount == '0);
  assign rdata  = mem[rptr[DEPTH_LOG2-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rempty) begin
        rptr  <= rptr + 1'b1;
        rgray <= bin2gray(rptr + 1'b1);
      end
    end
  end
endmodule
