// Merge of the per-bus packet buffers into the stream to the host link.
//
// Each bus has a buffer (dual-clock FIFO, read side in this clock) holding
// whole five-word packets. This block takes one whole packet at a time from
// a buffer that holds at least one, round robin over the buses, and sends
// its words on a valid/ready stream toward the USB controller. A packet is
// never interleaved with another; while `out_ready` is low the stream waits.
// Packet-level round robin is a choice of this design.
module host_merge
  import pet_daq_pkg::*;
#(
  parameter int N_BUS      = 2,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  word_t        [N_BUS-1:0]        rdata,
  input  logic         [N_BUS-1:0][DEPTH_LOG2:0] rcount,
  output logic         [N_BUS-1:0]        rd_en,
  output word_t                           out_data,
  output logic                            out_valid,
  input  logic                            out_ready
);
  localparam int BW = (N_BUS > 1) ? $clog2(N_BUS) : 1;
  logic          active;
  logic [BW-1:0] cur, last, pick;
  logic [2:0]    cnt;
  logic          found;

  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= N_BUS; k++) begin
      automatic int idx = (int'(last) + k) % N_BUS;
      if (!found && rcount[idx] >= (DEPTH_LOG2+1)'(PKT_WORDS)) begin
        found = 1'b1;
        pick  = BW'(idx);
      end
    end
  end

  assign out_valid = active;
  assign out_data  = rdata[cur];
  always_comb begin
    rd_en = '0;
    if (active && out_ready) rd_en[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cur    <= '0;
      last   <= BW'(N_BUS - 1);
      cnt    <= '0;
    end else if (!active) begin
      if (found) begin
        active <= 1'b1;
        cur    <= pick;
        cnt    <= '0;
      end
    end else if (out_ready) begin
      cnt <= cnt + 1'b1;
      if (cnt == 3'(PKT_WORDS - 1)) begin
        active <= 1'b0;
        last   <= cur;
      end
    end
  end
endmodule
