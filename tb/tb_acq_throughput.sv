// Workload testbench: a complete acquisition at the 13 MHz read clock, with
// the whole scanner at its default size (16 detectors and DAQ boards, two
// buses). Random detector pairs fire far faster than the system can take,
// the host link is always ready, and the rate of event data leaving the
// motherboard is measured over a fixed window once the system is saturated.
// The target is the 20.71 MB/s the original system reached at this clock;
// the ceiling is two buses moving 10 bytes per 8 read-clock cycles each,
// 32.5 MB/s. Every word on the host stream must carry the control code of
// its position, and the integrity checkers must see no bad packet.
//
// Time unit: one step is 0.1 ns; the 100 MHz system clock toggles every 50
// steps and the read clock every 385 steps (12.99 MHz).
module tb_acq_throughput;
  import pet_daq_pkg::*;
  localparam int N = 16, NB = 2, DW = 64;
  localparam int HALF_RD = 385;
  localparam longint WINDOW = 2_000_000;    // 200 us measuring window

  logic clk_sys = 0, rd_clk = 0, ser_clk = 0, rst_n = 0;
  logic [N-1:0] det_trig = '0, adc_start;
  logic [4:0] cfg_c = 5'b0;
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
  logic [1:0] lanes = '0;
  logic cmd_write = 0, out_read = 0, out_readdatavalid, rx_csr_sel = 0, rx_csr_read = 0;
  logic [DW-1:0] cmd_writedata = '0, out_readdata;
  logic [1:0] rx_csr_address = '0;
  logic [31:0] rx_csr_readdata;
  hsmc_state_e rx_state;
  logic link_locked;
  logic [15:0] n_slip;
  int checks = 0, failures = 0;

  function automatic longint total_drops();
    longint t = 0;
    for (int i = 0; i < N; i++) t += n_dropped[i];
    return t;
  endfunction

  pet_daq_top dut (.*);

  always #50      clk_sys = ~clk_sys;
  always #HALF_RD rd_clk  = ~rd_clk;
  always #20      ser_clk = ~ser_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ADC model: random samples for every conversion
  always @(posedge clk_sys) if (rst_n)
    for (int i = 0; i < N; i++)
      if (adc_start[i])
        for (int k = 0; k < N_ADC; k++) adc_data[i][k] <= sample_t'($urandom);

  // host stream: word codes and the measuring window
  int widx = 0, code_errs = 0;
  bit measuring = 0;
  longint words = 0;
  always @(posedge clk_sys) if (rst_n && usb_valid && usb_ready) begin
    if (usb_data[15:13] != code_at(3'(widx))) code_errs++;
    widx = (widx + 1) % PKT_WORDS;
    if (measuring) words++;
  end

  // a random pair of detectors every 8 system clocks
  initial begin
    adc_data = '0;
    forever begin
      @(negedge clk_sys);
      if (rst_n) begin
        int a, b;
        a = $urandom_range(0, N - 1);
        b = $urandom_range(0, N - 2);
        if (b >= a) b++;
        det_trig = (N'(1) << a) | (N'(1) << b);
        @(negedge clk_sys); det_trig = '0;
        repeat (6) @(negedge clk_sys);
      end
    end
  end

  initial begin
    longint t0, mbs_x10;
    repeat (4) @(negedge clk_sys);
    rst_n = 1;
    #(WINDOW / 4);                 // let the buses saturate
    t0 = $time;
    measuring = 1;
    #(WINDOW);
    measuring = 0;
    // bytes / (steps * 0.1 ns) in MB/s, times 10 for one decimal
    mbs_x10 = words * 2 * 100_000 / ($time - t0);
    $display("host stream: %0d words in %0d ns = %0d.%0d MB/s (coincidences %0d, drops %0d)",
             words, ($time - t0) / 10, mbs_x10 / 10, mbs_x10 % 10, n_coinc,
             total_drops());
    check(mbs_x10 >= 207, "at least 20.71 MB/s at 13 MHz read clock");
    check(mbs_x10 <= 325, "no more than two buses can carry (32.5 MB/s)");
    check(code_errs == 0, $sformatf("control codes on the host stream (%0d wrong)", code_errs));
    check(n_err[0] == 0 && n_err[1] == 0 && n_ok[0] > 0 && n_ok[1] > 0,
          "integrity checkers: packets on both buses, none bad");
    check(total_drops() > 0, "boards saturated (packets dropped)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
