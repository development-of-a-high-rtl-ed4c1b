// Testbench for coincidence_unit: two detectors inside the window give one
// coincidence with both DAQ triggers and a new event number; a lone trigger,
// two triggers further apart than the window, and three triggers in one
// window are rejected and counted as singles and a multiple.
module tb_coincidence_unit;
  localparam int N = 16, WIN = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] det_trig = '0, daq_trig;
  logic [7:0] event_id;
  logic [31:0] n_coinc, n_single, n_multiple;
  int checks = 0, failures = 0;
  logic [N-1:0] seen[$];
  logic [7:0]   seen_ev[$];

  coincidence_unit #(.N_DET(N), .WINDOW(WIN)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && |daq_trig) begin seen.push_back(daq_trig); seen_ev.push_back(event_id); end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic fire(input logic [N-1:0] m);
    @(negedge clk); det_trig = m;
    @(negedge clk); det_trig = '0;
  endtask
  task automatic gap(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pair at the same time
    fire(16'h0003); gap(WIN + 2);
    // pair at the last cycle of the window
    fire(16'h0010); fire(16'h0400); gap(WIN + 2);  // second one in the last window cycle
    // single
    fire(16'h0100); gap(WIN + 2);
    // two triggers too far apart: two singles
    fire(16'h0001); gap(WIN + 1); fire(16'h8000); gap(WIN + 2);
    // three detectors: multiple
    fire(16'h0007); gap(WIN + 2);
    check(seen.size() == 2, $sformatf("two coincidences (%0d)", seen.size()));
    if (seen.size() == 2) begin
      check(seen[0] == 16'h0003, "first pair mask");
      check(seen[1] == 16'h0410, "second pair mask");
      check(seen_ev[1] == seen_ev[0] + 1, "event number increments");
    end
    check(n_coinc == 2, "coincidence count");
    check(n_single == 3, $sformatf("single count %0d", n_single));
    check(n_multiple == 1, "multiple count");
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
