// Testbench for daqfetch_sync: eight modelled DAQ boards on one bus, each
// with a queue of packets. Checks that every packet arrives whole and in
// order per board, that boards are served round robin, that a packet takes
// 8 read-clock cycles back to back, that only one board is enabled at a
// time, and that fetching stalls while the buffer reports no room.
module tb_daqfetch_sync;
  import pet_daq_pkg::*;
  localparam int N = 8, NP = 4;
  logic rd_clk = 0, rst_n = 0, space_ok = 1;
  logic [N-1:0] dav, oe, req;
  word_t bus_data, wdata;
  logic wr_en;
  logic [2:0] word_idx;
  logic [31:0] n_pkts, n_stall;
  int checks = 0, failures = 0, cyc = 0;
  word_t q[N][$];
  int order[$];
  int pkt_start[$];

  daqfetch_sync #(.N_DAQ(N)) dut (.*);
  always #10 rd_clk = ~rd_clk;
  always @(posedge rd_clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // board models
  always_comb begin
    bus_data = '0;
    for (int i = 0; i < N; i++) if (oe[i] && q[i].size() > 0) bus_data |= q[i][0];
  end
  always @(posedge rd_clk) begin
    for (int i = 0; i < N; i++) begin
      dav[i] <= q[i].size() >= PKT_WORDS + ((oe[i] && req[i]) ? 1 : 0);
      if (rst_n && oe[i] && req[i] && q[i].size() > 0) void'(q[i].pop_front());
    end
    if (rst_n) check($onehot0(oe), "one board enabled");
  end

  // receiver
  word_t exp_q[N][$];
  int cur;
  always @(posedge rd_clk) if (rst_n && wr_en) begin
    if (word_idx == 0) begin
      cur = int'(wdata[11:8]);
      order.push_back(cur);
      pkt_start.push_back(cyc);
    end
    check(exp_q[cur].size() > 0 && wdata == exp_q[cur][0],
          $sformatf("board %0d word %0d got %h", cur, word_idx, wdata));
    if (exp_q[cur].size() > 0) void'(exp_q[cur].pop_front());
  end

  initial begin
    dav = '0;
    for (int i = 0; i < N; i++)
      for (int p = 0; p < NP; p++) begin
        word_t w;
        w = make_header(4'(i), 8'(p), 1'b0);
        q[i].push_back(w); exp_q[i].push_back(w);
        for (int k = 1; k < PKT_WORDS; k++) begin
          w = make_sample(3'(k), sample_t'($urandom), 1'b0);
          q[i].push_back(w); exp_q[i].push_back(w);
        end
      end
    repeat (2) @(negedge rd_clk);
    rst_n = 1;
    wait (order.size() == 10);
    @(negedge rd_clk); space_ok = 0;
    repeat (30) @(negedge rd_clk);
    check(order.size() <= 11, "no new packet while stalled");
    check(n_stall > 20, "stall cycles counted");
    space_ok = 1;
    wait (order.size() == N * NP);
    repeat (10) @(negedge rd_clk);
    for (int i = 0; i < N; i++) check(exp_q[i].size() == 0, $sformatf("board %0d drained", i));
    for (int k = 0; k < N; k++) check(order[k] == k, $sformatf("round robin position %0d", k));
    check(pkt_start[5] - pkt_start[4] == 8, $sformatf("8 cycles per packet (%0d)", pkt_start[5] - pkt_start[4]));
    check(n_pkts == N * NP, "packet count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge rd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
