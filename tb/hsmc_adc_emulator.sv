// Behavioural model of the converter board on the far side of the HSMC
// connector, used only by testbenches. A counter fills a FIFO and a
// serializer sends the FIFO words on two lanes, 8 bits per lane per word,
// most significant bit first (lane 1: bits 15..8, lane 0: bits 7..0), one
// bit per serial clock. After reset it first sends TRAIN_WORDS copies of the
// training word so the receiver can find the word boundary; SKEW adds that
// many bit times of line delay so the receiver has to slip. `n_sent` counts
// the data words sent (the counter values start at START).
module hsmc_adc_emulator #(
  parameter int          TRAIN_WORDS = 16,
  parameter logic [15:0] TRAIN       = 16'hC5C5,
  parameter int          SKEW        = 3,
  parameter logic [15:0] START       = 16'h0100
) (
  input  logic       ser_clk,
  input  logic       rst_n,
  output logic [1:0] lanes,
  output int         n_sent
);
  logic [15:0] fifo[$];
  logic [15:0] counter, shword;
  int          bitn, ntrain;
  logic [1:0]  dline[SKEW+1];

  always @(posedge ser_clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo.delete();
      counter = START;
      bitn    = 0;
      ntrain  = 0;
      n_sent  = 0;
      shword  = TRAIN;
      for (int i = 0; i <= SKEW; i++) dline[i] = '0;
      lanes  <= '0;
    end else begin
      // the counter keeps the FIFO topped up
      if (fifo.size() < 8) begin fifo.push_back(counter); counter = counter + 1'b1; end
      if (bitn == 0) begin
        if (ntrain < TRAIN_WORDS) begin
          shword = TRAIN;
          ntrain++;
        end else begin
          shword = fifo.pop_front();
          n_sent++;
        end
      end
      for (int i = SKEW; i > 0; i--) dline[i] = dline[i-1];
      dline[0] = {shword[15 - bitn], shword[7 - bitn]};
      bitn = (bitn + 1) % 8;
      lanes <= dline[SKEW];
    end
  end
endmodule
