// Testbench for soc_bridge_loopback: plays the processor's test program.
// Writes blocks of random 64-bit words, reads them back and compares
// (integrity check), reads both FIFOs' status registers, and counts the
// clock cycles per word of the write-then-read loop.
module tb_soc_bridge_loopback;
  localparam int DW = 64, DL = 6, NBLK = 4, BLK = 48;
  logic clk = 0, rst_n = 0, h2f_write = 0, f2h_read = 0, csr_sel = 0, csr_read = 0;
  logic [DW-1:0] h2f_writedata = '0, f2h_readdata;
  logic f2h_readdatavalid;
  logic [1:0] csr_address = '0;
  logic [31:0] csr_readdata;
  int checks = 0, failures = 0, cyc = 0;
  logic [DW-1:0] sent[$];

  soc_bridge_loopback #(.DATA_W(DW), .DEPTH_LOG2(DL)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic csr(input logic s, input logic [1:0] a, output logic [31:0] v);
    @(negedge clk); csr_read = 1; csr_sel = s; csr_address = a;
    @(negedge clk); csr_read = 0; v = csr_readdata;
  endtask

  always @(posedge clk) if (rst_n && f2h_readdatavalid) begin
    check(sent.size() > 0 && f2h_readdata == sent[0], "loop-back data");
    if (sent.size() > 0) void'(sent.pop_front());
  end

  initial begin
    logic [31:0] v;
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = cyc;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < BLK; i++) begin
        @(negedge clk);
        h2f_write = 1; h2f_writedata = {$urandom, $urandom};
        sent.push_back(h2f_writedata);
      end
      @(negedge clk); h2f_write = 0;
      repeat (3) @(negedge clk);
      csr(1'b0, 2'd0, v); check(v == 0, "first FIFO emptied by the loop");
      csr(1'b1, 2'd0, v); check(v == BLK, $sformatf("second FIFO holds the block (%0d)", v));
      for (int i = 0; i < BLK; i++) begin
        @(negedge clk); f2h_read = 1;
      end
      @(negedge clk); f2h_read = 0;
      @(negedge clk);
    end
    check(sent.size() == 0, "all words returned");
    csr(1'b1, 2'd1, v); check(v[0] && !v[2], "second FIFO empty, no underflow");
    $display("loop-back: %0d words in %0d cycles", NBLK * BLK, cyc - t0);
    check(cyc - t0 < NBLK * (2 * BLK + 12), "about two cycles per word");
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
