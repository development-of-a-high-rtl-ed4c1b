// End-to-end testbench of pet_daq_top at its default size (16 detectors and
// DAQ boards, two buses, 64-bit processor FIFOs).
//
// Acquisition chain: random detector pairs fire (coincidences), plus lone
// triggers (singles), triple triggers (multiples) and pairs repeated while
// the boards are still converting (dead time). An ADC model answers every
// conversion start with random samples. Every word reaching the host-link
// stream is checked against the packet the board must have built (header
// with board id and the event number of its trigger, then the four samples
// it was given), per board and in order; each event number must arrive from
// two boards. The host link is then held off long enough that the
// motherboard buffers fill, the bus fetches stall, the board FIFOs fill and
// packets are dropped; after release everything must drain.
// SoC side: the processor model streams words through the bridge loop-back
// and reads counter values through the HSMC receiver.
// Each mechanism is counted and must have happened at least once.
module tb_pet_daq_top;
  import pet_daq_pkg::*;
  localparam int N = 16, NB = 2, DW = 64;
  logic clk_sys = 0, rd_clk = 0, ser_clk = 0, rst_n = 0;
  logic [N-1:0] det_trig = '0, adc_start;
  logic [4:0] cfg_c = 5'b01010;
  sample_t [N-1:0][N_ADC-1:0] adc_data;
  word_t usb_data;
  logic usb_valid, usb_ready = 1;
  logic [31:0] n_coinc, n_single, n_multiple;
  logic [NB-1:0][31:0] n_pkts, n_stall, n_ok, n_err;
  logic [N-1:0][31:0] n_acq, n_ignored, n_dropped;
  logic lb_write = 0, lb_read = 0, lb_readdatavalid, lb_csr_sel = 0, lb_csr_read = 0;
  logic [DW-1:0] lb_writedata = '0, lb_readdata;
  logic [1:0] lb_csr_address = '0;
  logic [31:0] lb_csr_readdata;
  logic [1:0] lanes;
  logic cmd_write = 0, out_read = 0, out_readdatavalid, rx_csr_sel = 0, rx_csr_read = 0;
  logic [DW-1:0] cmd_writedata = '0, out_readdata;
  logic [1:0] rx_csr_address = '0;
  logic [31:0] rx_csr_readdata;
  hsmc_state_e rx_state;
  logic link_locked;
  logic [15:0] n_slip;
  int n_sent;
  int checks = 0, failures = 0;

  pet_daq_top dut (.*);
  hsmc_adc_emulator #(.TRAIN_WORDS(32), .SKEW(5), .START(16'h0100)) u_adcboard (
    .ser_clk, .rst_n, .lanes, .n_sent);

  always #5  clk_sys = ~clk_sys;   // 100 MHz
  always #17 rd_clk  = ~rd_clk;    // ~30 MHz read clock
  always #1  ser_clk = ~ser_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- ADC model and expected packets ----------------
  word_t exp_q[N][$];
  logic [7:0] trig_ev[N];
  int ev_seen[256];
  logic [N-1:0][31:0] drops_seen;
  always @(posedge clk_sys) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (dut.u_iris.daq_trig[i] && !dut.u_iris.busy[i]) trig_ev[i] = dut.u_iris.event_id;
      if (adc_start[i]) begin
        sample_t [N_ADC-1:0] s;
        for (int k = 0; k < N_ADC; k++) s[k] = sample_t'($urandom);
        adc_data[i] <= s;
        exp_q[i].push_back(make_header(4'(i), trig_ev[i], cfg_c[0]));
        for (int k = 0; k < N_ADC; k++) exp_q[i].push_back(make_sample(3'(k+1), s[k], cfg_c[k+1]));
      end
      if (n_dropped[i] != drops_seen[i]) begin
        drops_seen[i] = n_dropped[i];
        repeat (PKT_WORDS) void'(exp_q[i].pop_back());
      end
    end
  end

  // ---------------- host-link stream check ----------------
  int widx = 0, cur = 0, nwords = 0, npk = 0, held = 0;
  always @(posedge clk_sys) if (rst_n) begin
    if (usb_valid && !usb_ready) held++;
    if (usb_valid && usb_ready) begin
      if (widx == 0) begin
        cur = int'(usb_data[11:8]);
        ev_seen[usb_data[7:0]]++;
        npk++;
      end
      check(exp_q[cur].size() > 0 && usb_data == exp_q[cur][0],
            $sformatf("board %0d word %0d: got %h", cur, widx, usb_data));
      if (exp_q[cur].size() > 0) void'(exp_q[cur].pop_front());
      widx = (widx + 1) % PKT_WORDS;
      nwords++;
    end
  end

  // ---------------- detector stimulus ----------------
  task automatic fire(input logic [N-1:0] m);
    @(negedge clk_sys); det_trig = m;
    @(negedge clk_sys); det_trig = '0;
    repeat (3) @(negedge clk_sys);          // window closes
  endtask
  function automatic logic [N-1:0] rnd_pair();
    int a = $urandom_range(0, N-1), b = $urandom_range(0, N-2);
    if (b >= a) b++;
    return (N'(1) << a) | (N'(1) << b);
  endfunction

  int n_busy_hits = 0;
  task automatic events(input int n, input int gap);
    for (int e = 0; e < n; e++) begin
      int kind = $urandom_range(0, 19);
      logic [N-1:0] m = rnd_pair();
      if (kind == 0)      fire(N'(1) << $urandom_range(0, N-1));     // single
      else if (kind == 1) fire(m | (N'(1) << $urandom_range(0, N-1)) | (N'(1) << $urandom_range(0, N-1)) | N'(1)); // mostly multiples
      else if (kind == 2) begin fire(m); fire(m); n_busy_hits++; end  // pair again during dead time
      else                fire(m);
      repeat (gap) @(negedge clk_sys);
    end
  endtask

  // ---------------- processor model: bridge loop-back ----------------
  logic [DW-1:0] lb_sent[$];
  int lb_ok = 0;
  always @(posedge clk_sys) if (rst_n && lb_readdatavalid) begin
    check(lb_sent.size() > 0 && lb_readdata == lb_sent[0], "loop-back word");
    if (lb_sent.size() > 0) begin void'(lb_sent.pop_front()); lb_ok++; end
  end
  task automatic loopback(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk_sys); lb_write = 1; lb_writedata = {$urandom, $urandom}; lb_sent.push_back(lb_writedata);
    end
    @(negedge clk_sys); lb_write = 0;
    repeat (4) @(negedge clk_sys);
    for (int i = 0; i < n; i++) begin @(negedge clk_sys); lb_read = 1; end
    @(negedge clk_sys); lb_read = 0;
    repeat (3) @(negedge clk_sys);
  endtask

  // ---------------- processor model: HSMC receiver ----------------
  logic [DW-1:0] rx_got[$];
  always @(posedge clk_sys) if (rst_n && out_readdatavalid) rx_got.push_back(out_readdata);
  task automatic hsmc_read(input int n);
    logic [31:0] v;
    @(negedge clk_sys); cmd_write = 1; cmd_writedata = {OP_READ, 44'd0, 16'(n)};
    @(negedge clk_sys); cmd_write = 0;
    repeat (100) @(negedge clk_sys);
    @(negedge clk_sys); rx_csr_read = 1; rx_csr_sel = 1; rx_csr_address = 0;
    @(negedge clk_sys); rx_csr_read = 0; v = rx_csr_readdata;
    for (int i = 0; i < int'(v); i++) begin @(negedge clk_sys); out_read = 1; end
    @(negedge clk_sys); out_read = 0;
    repeat (3) @(negedge clk_sys);
  endtask

  initial begin
    int t0, p0;
    int sum_ign = 0, sum_drop = 0, sum_acq = 0, pairs = 0;
    adc_data = '0;
    drops_seen = '0;
    repeat (4) @(negedge clk_sys);
    rst_n = 1;
    // SoC side first
    loopback(40);
    wait (rx_state == S_READY);
    hsmc_read(20);
    check(rx_got.size() == 20, $sformatf("HSMC words returned (%0d)", rx_got.size()));
    for (int i = 0; i < rx_got.size(); i++)
      check(rx_got[i] == {TAG_DATA, 44'd0, 16'(16'h0100 + i)}, $sformatf("HSMC word %0d", i));
    // phase 1: normal running with light host backpressure
    fork
      events(150, 30);
      begin
        repeat (150 * 40) begin @(negedge clk_sys); usb_ready = ($urandom_range(0, 9) != 0); end
        usb_ready = 1;
      end
    join
    // throughput of the bus fetch with boards already full: hold the link, then release
    usb_ready = 0;
    events(250, 2);                   // fast events while the link is held
    repeat (2000) @(negedge clk_sys);
    check(n_stall[0] > 0 || n_stall[1] > 0, "bus fetch stalled on a full buffer");
    p0 = n_pkts[0] + n_pkts[1];
    t0 = $time;
    usb_ready = 1;
    repeat (300) @(negedge clk_sys);
    $display("bus fetch after release: %0d packets in %0d time units (read clock period 34)",
             n_pkts[0] + n_pkts[1] - p0, $time - t0);
    repeat (20000) @(negedge clk_sys);
    // everything drained
    for (int i = 0; i < N; i++) begin
      check(exp_q[i].size() == 0, $sformatf("board %0d drained (%0d words left)", i, exp_q[i].size()));
      sum_ign += n_ignored[i]; sum_drop += n_dropped[i]; sum_acq += n_acq[i];
    end
    for (int e = 0; e < 256; e++) if (ev_seen[e] >= 2) pairs++;
    check(npk == sum_acq, $sformatf("packets out (%0d) = packets acquired (%0d)", npk, sum_acq));
    check(n_ok[0] + n_ok[1] == npk && n_err[0] + n_err[1] == 0, "integrity check passes every packet");
    $display("coincidences %0d, singles %0d, multiples %0d, dead-time ignores %0d, drops %0d, stalls %0d/%0d, link held %0d, packets %0d, paired events %0d",
             n_coinc, n_single, n_multiple, sum_ign, sum_drop, n_stall[0], n_stall[1], held, npk, pairs);
    check(n_coinc > 0, "coincidences happened");
    check(n_single > 0, "singles rejected");
    check(n_multiple > 0, "multiples rejected");
    check(sum_ign > 0, "triggers ignored during dead time");
    check(sum_drop > 0, "packets dropped on a full board FIFO");
    check(n_pkts[0] > 0 && n_pkts[1] > 0, "both buses carried packets");
    check(held > 0, "host-link backpressure");
    check(pairs > 0, "events arrive from both boards of a pair");
    check(lb_ok == 40, "loop-back words returned");
    check(link_locked && n_slip > 0, "LVDS link aligned with bit slips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
