// Testbench for daq_acq_ctrl: triggers an acquisition, models the ADCs,
// and checks the five packet words against the packet layout, the time from
// trigger to ADC start and to the first FIFO write, that triggers during the
// dead time are ignored and counted, and that a packet is dropped when the
// FIFO has no room.
module tb_daq_acq_ctrl;
  import pet_daq_pkg::*;
  localparam int CONV = 5;
  localparam logic [3:0] ID = 4'd9;
  logic clk = 0, rst_n = 0, trig = 0, fifo_room = 1;
  logic [7:0] event_id = '0;
  logic [4:0] cfg_c = 5'b10110;
  logic adc_start, fifo_wr_en, busy;
  sample_t [N_ADC-1:0] adc_data;
  word_t fifo_wdata;
  logic [31:0] n_acq, n_ignored, n_dropped;
  int checks = 0, failures = 0, cyc = 0;
  word_t got[$];
  int    wr_cyc[$];
  int    start_cyc;

  daq_acq_ctrl #(.DAQ_ID(ID), .CONV_CYCLES(CONV)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  int trig_cyc[$];
  always @(posedge clk) if (rst_n && trig && !busy) trig_cyc.push_back(cyc);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ADC model: new samples appear when a conversion starts
  always @(posedge clk) if (rst_n && adc_start) begin
    start_cyc <= cyc;
    for (int i = 0; i < N_ADC; i++) adc_data[i] <= sample_t'($urandom);
  end
  always @(posedge clk) if (rst_n && fifo_wr_en) begin got.push_back(fifo_wdata); wr_cyc.push_back(cyc); end

  task automatic pulse_trig(input logic [7:0] ev);
    @(negedge clk); trig = 1; event_id = ev;
    @(negedge clk); trig = 0;
  endtask

  initial begin
    int t0;
    sample_t [N_ADC-1:0] exp_s;
    adc_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one acquisition, with extra triggers during the dead time
    got.delete(); wr_cyc.delete();
    pulse_trig(8'h5A);
    t0 = trig_cyc[0];
    pulse_trig(8'h11);            // ignored
    repeat (3) @(negedge clk);
    pulse_trig(8'h22);            // ignored
    wait (got.size() == PKT_WORDS);
    exp_s = adc_data;
    check(start_cyc == t0 + 1, $sformatf("adc_start one cycle after trigger (%0d vs %0d)", start_cyc, t0));
    check(wr_cyc[0] == t0 + CONV + 2, $sformatf("first write CONV+2 cycles after trigger (%0d)", wr_cyc[0] - t0));
    check(got[0] == {3'b100, cfg_c[0], ID, 8'h5A}, $sformatf("header %h", got[0]));
    for (int i = 1; i < PKT_WORDS; i++) begin
      check(got[i][15:13] == code_at(3'(i)), $sformatf("code word %0d", i));
      check(got[i][12] == cfg_c[i], $sformatf("c bit word %0d", i));
      check(got[i][11:0] == exp_s[i-1], $sformatf("sample word %0d", i));
      check(wr_cyc[i] == wr_cyc[0] + i, "consecutive writes");
    end
    @(negedge clk);
    check(n_acq == 1 && n_ignored == 2 && n_dropped == 0, "counters after first event");
    // a trigger exactly at the end of the dead time is accepted
    check(!busy, "idle after the packet");
    pulse_trig(8'h33);
    wait (got.size() == 2*PKT_WORDS);
    check(got[PKT_WORDS] == {3'b100, cfg_c[0], ID, 8'h33}, "second header");
    // FIFO without room: packet dropped
    repeat (2) @(negedge clk);
    fifo_room = 0;
    pulse_trig(8'h44);
    repeat (CONV + 10) @(negedge clk);
    check(got.size() == 2*PKT_WORDS && n_dropped == 1, "packet dropped without room");
    check(n_acq == 2, "two packets written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
