// Data-integrity check of received packets.
//
// Every word of a packet carries in bits 15..13 a control code fixed by its
// position (header 100, XA 000, XB 001, YA 010, YB 011). For each word the
// fetch controller hands over, this block compares the code with the one
// expected at `word_idx` and, at the last word, reports the packet as good
// (`pkt_ok`) or corrupted (`pkt_err`, one or more wrong codes), one cycle
// after the word. Counters keep the totals. The original firmware has such
// a check; its exact rule is this design's.
module packet_checker
  import pet_daq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  word_t       word,
  input  logic [2:0]  word_idx,
  output logic        pkt_ok,
  output logic        pkt_err,
  output logic [31:0] n_ok,
  output logic [31:0] n_err
);
  logic bad_q, bad_now;
  assign bad_now = word[15:13] != code_at(word_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bad_q   <= 1'b0;
      pkt_ok  <= 1'b0;
      pkt_err <= 1'b0;
      n_ok    <= '0;
      n_err   <= '0;
    end else begin
      pkt_ok  <= 1'b0;
      pkt_err <= 1'b0;
      if (valid) begin
        if (word_idx == 3'(PKT_WORDS - 1)) begin
          bad_q <= 1'b0;
          if (bad_q || bad_now) begin
            pkt_err <= 1'b1;
            n_err   <= n_err + 1;
          end else begin
            pkt_ok <= 1'b1;
            n_ok   <= n_ok + 1;
          end
        end else begin
          bad_q <= (word_idx == 3'd0) ? bad_now : (bad_q || bad_now);
        end
      end
    end
  end
endmodule
