// Testbench for hsmc_ctrl_fsm: a queue stands in for the receive buffer and
// for the command FIFO. Checks that the machine waits in initialization
// until the link is locked, serves a status command, serves a read of 12
// words in bursts of at most five (passing through Done between bursts),
// stalls while the output FIFO is not ready, and re-initializes on a reset
// command.
module tb_hsmc_ctrl_fsm;
  import pet_daq_pkg::*;
  localparam int DW = 64;
  logic clk = 0, rst_n = 0, link_locked = 0, out_ready = 1;
  logic cmd_valid, cmd_ready, rx_empty, rx_rd, out_valid;
  logic [DW-1:0] cmd_data, out_data, last_cmd;
  logic [15:0] rx_data, rx_drops = 16'd7, n_words, n_cmds;
  hsmc_state_e state;
  int checks = 0, failures = 0, nburst = 0, max_run = 0, run = 0, held = 0;
  logic [DW-1:0] cmdq[$];
  logic [15:0] rxq[$];
  logic [DW-1:0] outq[$];

  hsmc_ctrl_fsm #(.DATA_W(DW), .BURST(5)) dut (.*);
  always #5 clk = ~clk;

  assign cmd_valid = cmdq.size() > 0;
  assign cmd_data  = cmdq.size() > 0 ? cmdq[0] : '0;
  assign rx_empty  = rxq.size() == 0;
  assign rx_data   = rxq.size() > 0 ? rxq[0] : '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cmd_ready && cmdq.size() > 0) void'(cmdq.pop_front());
    if (rx_rd && rxq.size() > 0) void'(rxq.pop_front());
    if (out_valid && out_ready) outq.push_back(out_data);
    if (out_valid && !out_ready) held++;
    if (state == S_RDHSMC && rx_rd) run++;
    else if (state == S_DONE) begin if (run > max_run) max_run = run; if (run > 0) nburst++; run = 0; end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmdq.push_back({OP_STATUS, 60'd0});
    repeat (10) @(negedge clk);
    check(state == S_INIT && outq.size() == 0, "waits for link lock");
    link_locked = 1;
    repeat (10) @(negedge clk);
    check(outq.size() == 1 && outq[0][63:60] == TAG_STATUS, "status word sent");
    check(outq[0][0] == 1'b1 && outq[0][27:12] == 16'd7, "status carries lock and drops");
    outq.delete();
    for (int i = 0; i < 20; i++) rxq.push_back(16'(16'h0200 + i));
    cmdq.push_back({OP_READ, 44'd0, 16'd12});
    repeat (8) @(negedge clk);
    out_ready = 0;               // output FIFO full for a while
    repeat (6) @(negedge clk);
    out_ready = 1;
    repeat (40) @(negedge clk);
    check(outq.size() == 12, $sformatf("12 words moved (%0d)", outq.size()));
    for (int i = 0; i < outq.size(); i++)
      check(outq[i] == {TAG_DATA, 44'd0, 16'(16'h0200 + i)}, $sformatf("data word %0d", i));
    check(max_run <= 5 && nburst >= 3, $sformatf("bursts of five (%0d bursts, max %0d)", nburst, max_run));
    check(held > 0, "output backpressure seen");
    check(rxq.size() == 8, "rest stays in the buffer");
    check(n_words == 12 && n_cmds == 2, "register bank counters");
    check(last_cmd[15:0] == 16'd12, "last command stored");
    cmdq.push_back({OP_RESET, 60'd0});
    repeat (4) @(negedge clk);
    check(n_cmds == 0 && n_words == 0, "reset clears the registers");
    check(state == S_READY, "ready after reset");
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
