// Testbench for async_fifo: random pushes in a fast write clock, random pops
// in a slower, unrelated read clock; every word read must be the next word
// written, the FIFO must report full and empty correctly, and the levels it
// reports must never exceed the depth.
module tb_async_fifo;
  localparam int W = 16, DL = 3, DEPTH = 1 << DL, N = 400;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic wfull, rempty;
  logic [DL:0] wfree, rcount;
  int checks = 0, failures = 0, nw = 0, nr = 0, saw_full = 0;
  logic [W-1:0] q[$];

  async_fifo #(.WIDTH(W), .DEPTH_LOG2(DL)) dut (.*, .wrst_n(rst_n), .rrst_n(rst_n));

  always #5  wclk = ~wclk;
  always #17 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // writer
  always @(negedge wclk) if (rst_n) begin
    wr_en <= (nw < N) && ($urandom_range(0, 3) != 0);
    wdata <= W'($urandom);
  end
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !wfull) begin q.push_back(wdata); nw++; end
    if (wfull) saw_full++;
    check(wfree <= DEPTH, "wfree within depth");
  end
  // reader (slow first so the FIFO fills, then fast)
  always @(negedge rclk) if (rst_n) rd_en <= (nw > N/2) ? 1'b1 : ($urandom_range(0, 7) == 0);
  always @(posedge rclk) if (rst_n) begin
    check(rcount <= DEPTH, "rcount within depth");
    if (rd_en && !rempty) begin
      check(q.size() > 0 && rdata == q[0], $sformatf("data order word %0d", nr));
      if (q.size() > 0) void'(q.pop_front());
      nr++;
    end
  end

  initial begin
    repeat (3) @(posedge rclk);
    check(rempty && rcount == 0 && wfree == DEPTH, "empty after reset");
    rst_n = 1;
    wait (nr == N);
    repeat (10) @(posedge rclk);
    check(rempty, "empty at end");
    check(saw_full > 0, "FIFO became full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
