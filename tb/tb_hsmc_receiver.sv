// Testbench for hsmc_receiver: the converter-board model sends training
// words and then a counter over two skewed LVDS lanes; a processor model
// sends commands through the command FIFO and reads results back.
// Checks: the link aligns and the state machine leaves initialization; a
// status command answers with a status word; three reads of 15 words return
// consecutive counter values starting at the first data word; the receive
// buffer overflows while nobody reads and the drops show in the status; a
// reset command clears the counters.
module tb_hsmc_receiver;
  import pet_daq_pkg::*;
  localparam int DW = 64;
  localparam logic [15:0] START = 16'h0100;
  logic clk = 0, ser_clk = 0, rst_n = 0;
  logic [1:0] lanes;
  logic cmd_write = 0, out_read = 0, csr_sel = 0, csr_read = 0;
  logic [DW-1:0] cmd_writedata = '0, out_readdata;
  logic out_readdatavalid, link_locked;
  logic [1:0] csr_address = '0;
  logic [31:0] csr_readdata;
  logic [15:0] n_slip;
  hsmc_state_e state;
  int n_sent, checks = 0, failures = 0;
  logic [DW-1:0] got[$];

  hsmc_adc_emulator #(.TRAIN_WORDS(32), .SKEW(3), .START(START)) u_tx (.ser_clk, .rst_n, .lanes, .n_sent);
  hsmc_receiver #(.DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;
  always #1 ser_clk = ~ser_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic send_cmd(input logic [DW-1:0] c);
    @(negedge clk); cmd_write = 1; cmd_writedata = c;
    @(negedge clk); cmd_write = 0;
  endtask
  task automatic csr(input logic s, input logic [1:0] a, output logic [31:0] v);
    @(negedge clk); csr_read = 1; csr_sel = s; csr_address = a;
    @(negedge clk); csr_read = 0; v = csr_readdata;
  endtask
  // read everything the output FIFO holds, n words expected
  task automatic collect(input int n);
    logic [31:0] v;
    int guard = 0;
    while (got.size() < n && guard < 200) begin
      csr(1'b1, 2'd0, v);
      for (int i = 0; i < int'(v); i++) begin
        @(negedge clk); out_read = 1;
      end
      @(negedge clk); out_read = 0;
      @(negedge clk);
      guard++;
    end
  endtask
  always @(posedge clk) if (rst_n && out_readdatavalid) got.push_back(out_readdata);

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (state == S_READY);
    check(link_locked, "link locked before ready");
    check(n_slip > 0, "bit slips were needed");
    send_cmd({OP_STATUS, 60'd0});
    collect(1);
    check(got.size() == 1 && got[0][63:60] == TAG_STATUS && got[0][0], "status word");
    got.delete();
    for (int r = 0; r < 3; r++) send_cmd({OP_READ, 44'd0, 16'd15});
    collect(45);
    check(got.size() == 45, $sformatf("45 words returned (%0d)", got.size()));
    for (int i = 0; i < 30 && i < got.size(); i++)
      check(got[i] == {TAG_DATA, 44'd0, 16'(START + i)}, $sformatf("word %0d = %h", i, got[i][15:0]));
    for (int i = 1; i < got.size(); i++)
      check(got[i][15:0] > got[i-1][15:0], "values increase");
    got.delete();
    repeat (200) @(negedge clk);   // nobody reads: the receive buffer fills up
    send_cmd({OP_STATUS, 60'd0});
    collect(1);
    check(got.size() == 1 && got[0][27:12] > 0, "receive-buffer drops reported");
    check(got[0][43:28] == 16'd45 && got[0][59:44] == 16'd4, "words and commands counted");
    got.delete();
    send_cmd({OP_RESET, 60'd0});
    send_cmd({OP_STATUS, 60'd0});
    collect(1);
    check(got.size() == 1 && got[0][43:28] == 0 && got[0][59:44] == 0, "reset clears counters");
    csr(1'b0, 2'd1, v); check(v[0] && !v[2], "command FIFO empty, no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
