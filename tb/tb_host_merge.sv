// Testbench for host_merge: two modelled bus buffers filled with packets;
// the output stream must carry whole packets, alternate between the buses
// while both have data, keep each bus's order, and hold while not ready.
module tb_host_merge;
  import pet_daq_pkg::*;
  localparam int NB = 2, DL = 6, NP = 6;
  logic clk = 0, rst_n = 0, out_ready = 0;
  word_t [NB-1:0] rdata;
  logic [NB-1:0][DL:0] rcount;
  logic [NB-1:0] rd_en;
  word_t out_data;
  logic out_valid;
  int checks = 0, failures = 0, nout = 0, nheld = 0;
  word_t q[NB][$];
  word_t exp_q[NB][$];
  int bus_seq[$];

  host_merge #(.N_BUS(NB), .DEPTH_LOG2(DL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_comb for (int b = 0; b < NB; b++) begin
    rdata[b]  = q[b].size() > 0 ? q[b][0] : '0;
    rcount[b] = (DL+1)'(q[b].size());
  end

  int cur, widx = 0;
  word_t last_w;
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) if (rd_en[b] && q[b].size() > 0) void'(q[b].pop_front());
    if (out_valid && !out_ready) begin nheld++; last_w = out_data; end
    if (out_valid && out_ready) begin
      if (widx == 0) begin cur = int'(out_data[8]); bus_seq.push_back(cur); end
      check(exp_q[cur].size() > 0 && out_data == exp_q[cur][0], $sformatf("word %0d", nout));
      if (exp_q[cur].size() > 0) void'(exp_q[cur].pop_front());
      widx = (widx + 1) % PKT_WORDS;
      nout++;
    end
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < NP; p++) begin
        word_t w;
        w = make_header(4'(b), 8'(p), 1'b0);  // bit 8 tells the bus
        q[b].push_back(w); exp_q[b].push_back(w);
        for (int k = 1; k < PKT_WORDS; k++) begin
          w = make_sample(3'(k), sample_t'($urandom), 1'b0);
          q[b].push_back(w); exp_q[b].push_back(w);
        end
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(out_valid, "valid while data waits");
    while (nout < NB * NP * PKT_WORDS) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
    end
    repeat (5) @(negedge clk);
    check(!out_valid, "idle when buffers are empty");
    check(nheld > 0, "backpressure exercised");
    for (int k = 0; k < 2 * NP; k++) check(bus_seq[k] == k % 2, $sformatf("alternation %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
