// Testbench for daq_board: several triggered events pass through the
// acquisition controller, the dual-clock FIFO and the synchronous bus
// interface. The testbench plays the motherboard: on data ready it raises
// output enable and gives five read requests, and it checks every received
// word against the event's header and the ADC samples it supplied.
module tb_daq_board;
  import pet_daq_pkg::*;
  localparam logic [3:0] ID = 4'd3;
  localparam int NEV = 6;
  logic clk = 0, rd_clk = 0, rst_n = 0, trig = 0, oe = 0, req = 0;
  logic [7:0] event_id = '0;
  logic [4:0] cfg_c = 5'b00001;
  logic adc_start, dav, bus_drive, busy;
  sample_t [N_ADC-1:0] adc_data;
  word_t bus_data;
  logic [31:0] n_acq, n_ignored, n_dropped;
  int checks = 0, failures = 0;
  word_t exp_q[$];

  daq_board #(.DAQ_ID(ID), .CONV_CYCLES(5), .DEPTH_LOG2(4)) dut (.*);
  always #5  clk = ~clk;
  always #16 rd_clk = ~rd_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ADC model and expected packet
  logic [7:0] ev_q;
  always @(posedge clk) if (rst_n && trig && !busy) ev_q <= event_id;
  always @(posedge clk) if (rst_n && adc_start) begin
    sample_t [N_ADC-1:0] s;
    for (int i = 0; i < N_ADC; i++) s[i] = sample_t'($urandom);
    adc_data <= s;
    exp_q.push_back({CODE_HDR, cfg_c[0], ID, ev_q});
    for (int i = 0; i < N_ADC; i++) exp_q.push_back({code_at(3'(i+1)), cfg_c[i+1], s[i]});
  end

  initial begin
    adc_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < NEV; e++) begin
      @(negedge clk); trig = 1; event_id = 8'(e * 7 + 1);
      @(negedge clk); trig = 0;
      repeat (15) @(negedge clk);
    end
  end

  // motherboard side
  initial begin
    int got = 0;
    wait (rst_n);
    while (got < NEV) begin
      @(negedge rd_clk);
      if (dav) begin
        oe = 1;
        @(negedge rd_clk);
        for (int i = 0; i < PKT_WORDS; i++) begin
          req = 1;
          @(posedge rd_clk);
          check(bus_drive, "board drives under OE");
          check(exp_q.size() > 0 && bus_data == exp_q[0],
                $sformatf("event %0d word %0d: got %h", got, i, bus_data));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          @(negedge rd_clk);
        end
        req = 0; oe = 0;
        got++;
      end
    end
    repeat (4) @(negedge rd_clk);
    check(!dav, "no data ready when drained");
    check(n_acq == NEV && n_dropped == 0, "all events acquired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
