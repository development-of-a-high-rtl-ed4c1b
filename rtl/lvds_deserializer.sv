// Two-lane LVDS receive deserializer with word alignment.
//
// The remote board sends 16-bit words over LANES serial lines, FACTOR bits
// per lane per word (lane 1 carries bits 15..8 and lane 0 bits 7..0, most
// significant bit first), one bit per lane per `ser_clk` cycle. The receiver
// shifts the lanes in and every FACTOR cycles presents a word with a
// one-cycle `word_valid` strobe.
//
// After reset the receiver does not know where a word starts. The sender
// therefore begins with a run of the training word TRAIN, whose lane bytes
// differ from all their rotations. Until `locked`, every received word is
// compared with TRAIN; on a mismatch the word boundary is moved by one bit
// (a bit slip: the bit counter holds for one cycle) and the next two words
// are skipped so the shifter refills. LOCK_COUNT matching words in a row set
// `locked`; the training words that still follow are dropped, and from the
// first other word on every word is passed. Data words then stream
// without further checks. `align` restarts the search.
// This takes the place of the vendor LVDS receiver; the lane count and
// factor follow the original test, the lane order, training word and lock
// rule are choices of this design.
module lvds_deserializer #(
  parameter int          LANES      = 2,
  parameter int          FACTOR     = 8,
  parameter logic [15:0] TRAIN      = 16'hC5C5,
  parameter int          LOCK_COUNT = 4
) (
  input  logic             ser_clk,
  input  logic             rst_n,
  input  logic             align,
  input  logic [LANES-1:0] lanes,
  output logic [LANES*FACTOR-1:0] word,
  output logic             word_valid,
  output logic             locked,
  output logic [15:0]      n_slip
);
  localparam int CW = $clog2(FACTOR);
  logic [FACTOR-1:0] shreg [LANES];
  logic [CW-1:0]     bitcnt;
  logic [1:0]        skip;
  logic [$clog2(LOCK_COUNT+1)-1:0] good;
  logic              slip;
  logic              in_data;   // first data word after training seen
  logic [LANES*FACTOR-1:0] assembled;

  // word as it stands after this cycle's bit is shifted in
  always_comb begin
    for (int l = 0; l < LANES; l++)
      assembled[l*FACTOR +: FACTOR] = {shreg[l][FACTOR-2:0], lanes[l]};
  end

  always_ff @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) shreg[l] <= '0;
      bitcnt     <= '0;
      skip       <= 2'd2;
      good       <= '0;
      slip       <= 1'b0;
      in_data    <= 1'b0;
      locked     <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
      n_slip     <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) shreg[l] <= {shreg[l][FACTOR-2:0], lanes[l]};
      word_valid <= 1'b0;
      slip       <= 1'b0;
      if (!slip) bitcnt <= (bitcnt == CW'(FACTOR - 1)) ? '0 : bitcnt + 1'b1;
      if (align) begin
        locked  <= 1'b0;
        in_data <= 1'b0;
        good    <= '0;
        skip   <= 2'd2;
      end else if (bitcnt == CW'(FACTOR - 1) && !slip) begin
        if (locked) begin
          if (in_data || assembled != TRAIN) begin
            in_data    <= 1'b1;
            word       <= assembled;
            word_valid <= 1'b1;
          end
        end else if (skip != 2'd0) begin
          skip <= skip - 1'b1;
        end else if (assembled == TRAIN) begin
          if (good == ($bits(good))'(LOCK_COUNT - 1)) locked <= 1'b1;
          good <= good + 1'b1;
        end else begin
          good   <= '0;
          slip   <= 1'b1;
          skip   <= 2'd1;
          n_slip <= n_slip + 1;
        end
      end
    end
  end
endmodule
