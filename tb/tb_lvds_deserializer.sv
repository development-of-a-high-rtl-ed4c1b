// Testbench for lvds_deserializer: the converter-board model sends training
// words and then counter values over two lanes with a line delay of several
// bit times. For each delay the receiver must slip into alignment, lock,
// drop the remaining training words, and then deliver the counter values in
// order, one word every 8 serial clocks.
module tb_lvds_deserializer;
  localparam logic [15:0] START = 16'h0100;
  int checks = 0, failures = 0;
  logic ser_clk = 0;
  always #1 ser_clk = ~ser_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  for (genvar s = 0; s < 4; s++) begin : g_skew
    localparam int SKEW = 2 * s + 1;
    logic rst_n = 0;
    logic [1:0] lanes;
    logic [15:0] word, n_slip;
    logic word_valid, locked;
    int n_sent, nrx = 0, last_cyc = -1, cyc = 0;
    logic [15:0] expect_w = START;

    hsmc_adc_emulator #(.TRAIN_WORDS(32), .SKEW(SKEW), .START(START)) u_tx (
      .ser_clk, .rst_n, .lanes, .n_sent);
    lvds_deserializer dut (.ser_clk, .rst_n, .align(1'b0), .lanes, .word,
                           .word_valid, .locked, .n_slip);

    always @(posedge ser_clk) begin
      cyc <= cyc + 1;
      if (rst_n && word_valid) begin
        check(word == expect_w, $sformatf("skew %0d word %0d: %h vs %h", SKEW, nrx, word, expect_w));
        if (last_cyc >= 0) check(cyc - last_cyc == 8, "one word per 8 clocks");
        last_cyc <= cyc;
        expect_w <= expect_w + 1'b1;
        nrx <= nrx + 1;
      end
    end
    initial begin
      repeat (3) @(negedge ser_clk);
      rst_n = 1;
    end
  end

  initial begin
    repeat (1200) @(posedge ser_clk);
    for (int k = 0; k < 1; k++) $display("slips %0d %0d %0d %0d nrx %0d %0d", g_skew[0].n_slip, g_skew[1].n_slip, g_skew[2].n_slip, g_skew[3].n_slip, g_skew[0].nrx, g_skew[3].nrx);
    check(g_skew[0].locked && g_skew[1].locked && g_skew[2].locked && g_skew[3].locked, "all receivers locked");
    check(g_skew[0].nrx > 80 && g_skew[3].nrx > 80, "data words received");
    check(g_skew[1].n_slip > 0, "alignment needed bit slips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge ser_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
