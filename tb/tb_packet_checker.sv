// Testbench for packet_checker: good packets and packets with one wrong
// control code in each position; each must be reported once as good or bad.
module tb_packet_checker;
  import pet_daq_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  word_t word = '0;
  logic [2:0] word_idx = '0;
  logic pkt_ok, pkt_err;
  logic [31:0] n_ok, n_err;
  int checks = 0, failures = 0, oks = 0, errs = 0;

  packet_checker dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin if (pkt_ok) oks++; if (pkt_err) errs++; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic send(input int bad_pos);
    for (int i = 0; i < PKT_WORDS; i++) begin
      @(negedge clk);
      valid = 1; word_idx = 3'(i);
      word = make_sample(3'(i), sample_t'($urandom), 1'($urandom));
      if (i == bad_pos) word[15:13] = word[15:13] ^ 3'(1 + $urandom_range(0, 6));
    end
    @(negedge clk); valid = 0;
    check(pkt_ok == (bad_pos < 0) && pkt_err == (bad_pos >= 0),
          $sformatf("verdict for packet with bad word %0d", bad_pos));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(-1); send(-1);
    for (int p = 0; p < PKT_WORDS; p++) begin send(p); send(-1); end
    repeat (3) @(negedge clk);
    check(oks == 7 && n_ok == 7, $sformatf("good packets %0d", oks));
    check(errs == 5 && n_err == 5, $sformatf("bad packets %0d", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
