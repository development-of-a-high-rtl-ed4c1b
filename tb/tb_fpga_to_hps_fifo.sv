// Testbench for fpga_to_hps_fifo: a stream source pushes random words until
// the FIFO is full; bridge reads return them in order one cycle later; a
// read of the empty FIFO returns zero and is counted.
module tb_fpga_to_hps_fifo;
  localparam int DW = 64, DL = 3, DEPTH = 1 << DL;
  logic clk = 0, rst_n = 0, s_valid = 0, avs_read = 0, csr_read = 0;
  logic [DW-1:0] s_data = '0, avs_readdata;
  logic s_ready, avs_readdatavalid;
  logic [1:0] csr_address = '0;
  logic [31:0] csr_readdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];

  fpga_to_hps_fifo #(.DATA_W(DW), .DEPTH_LOG2(DL)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic csr(input logic [1:0] a, output logic [31:0] v);
    @(negedge clk); csr_read = 1; csr_address = a;
    @(negedge clk); csr_read = 0; v = csr_readdata;
  endtask
  task automatic rd(output logic [DW-1:0] d);
    @(negedge clk); avs_read = 1;
    @(negedge clk); avs_read = 0;
    check(avs_readdatavalid, "read data valid one cycle after read");
    d = avs_readdata;
  endtask

  always @(posedge clk) if (rst_n && s_valid && s_ready) q.push_back(s_data);

  initial begin
    logic [31:0] v;
    logic [DW-1:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge clk); s_valid = 1; s_data = {$urandom, $urandom};
    end
    @(negedge clk); s_valid = 0;
    check(!s_ready, "not ready when full");
    check(q.size() == DEPTH, "accepted exactly the depth");
    csr(2'd0, v); check(v == DEPTH, "level register");
    for (int i = 0; i < DEPTH; i++) begin
      rd(d);
      check(d == q[0], $sformatf("read %0d in order", i));
      void'(q.pop_front());
    end
    rd(d); check(d == 0, "empty read returns zero");
    csr(2'd2, v); check(v == 1, "underflow counted");
    csr(2'd1, v); check(v[0] && v[2], "empty and underflow flags");
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
