// Testbench for hps_to_fpga_fifo: bridge writes of random 64-bit words,
// stream reads with random ready, checks order and the status registers
// (level, flags, overflow count when written past full).
module tb_hps_to_fpga_fifo;
  localparam int DW = 64, DL = 3, DEPTH = 1 << DL;
  logic clk = 0, rst_n = 0, avs_write = 0, csr_read = 0, m_ready = 0;
  logic [DW-1:0] avs_writedata = '0, m_data;
  logic [1:0] csr_address = '0;
  logic [31:0] csr_readdata;
  logic m_valid;
  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];

  hps_to_fpga_fifo #(.DATA_W(DW), .DEPTH_LOG2(DL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic csr(input logic [1:0] a, output logic [31:0] v);
    @(negedge clk); csr_read = 1; csr_address = a;
    @(negedge clk); csr_read = 0; v = csr_readdata;
  endtask
  task automatic wr(input logic [DW-1:0] d);
    @(negedge clk); avs_write = 1; avs_writedata = d;
    @(negedge clk); avs_write = 0;
  endtask

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    check(q.size() > 0 && m_data == q[0], "stream order");
    if (q.size() > 0) void'(q.pop_front());
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    csr(2'd1, v); check(v[0] && !v[1], "empty flag after reset");
    csr(2'd3, v); check(v == DEPTH, "depth register");
    for (int i = 0; i < DEPTH + 2; i++) begin
      logic [DW-1:0] d = {$urandom, $urandom};
      if (i < DEPTH) q.push_back(d);
      wr(d);
    end
    csr(2'd0, v); check(v == DEPTH, $sformatf("level %0d", v));
    csr(2'd1, v); check(v[1] && v[2], "full and overflow flags");
    csr(2'd2, v); check(v == 2, "two writes dropped");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      m_ready = $urandom_range(0, 1);
      if (i % 3 == 0 && i < 150) begin
        logic [DW-1:0] d = {$urandom, $urandom};
        if (q.size() < DEPTH - 1) begin q.push_back(d); avs_write = 1; avs_writedata = d; end
      end else avs_write = 0;
    end
    avs_write = 0; m_ready = 1;
    repeat (20) @(negedge clk);
    check(q.size() == 0 && !m_valid, "drained");
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
