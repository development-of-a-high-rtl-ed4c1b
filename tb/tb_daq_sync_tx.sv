// Testbench for daq_sync_tx: a queue stands in for the board FIFO. Checks
// that data ready follows the presence of a whole packet one cycle late,
// that the bus is driven only under output enable, and that each read
// request takes exactly the head word.
module tb_daq_sync_tx;
  import pet_daq_pkg::*;
  localparam int DL = 6;
  logic rd_clk = 0, rst_n = 0, oe = 0, req = 0;
  logic dav, bus_drive, fifo_rd_en;
  word_t bus_data, fifo_rdata;
  logic [DL:0] fifo_rcount;
  word_t q[$];
  int checks = 0, failures = 0;

  daq_sync_tx #(.DEPTH_LOG2(DL)) dut (.*);
  always #10 rd_clk = ~rd_clk;

  assign fifo_rcount = (DL+1)'(q.size());
  assign fifo_rdata  = q.size() > 0 ? q[0] : '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge rd_clk) if (rst_n && fifo_rd_en && q.size() > 0) void'(q.pop_front());

  initial begin
    word_t w;
    repeat (2) @(negedge rd_clk);
    rst_n = 1;
    @(negedge rd_clk);
    check(!dav && !bus_drive && bus_data == 0, "idle after reset");
    for (int i = 0; i < 4; i++) q.push_back(word_t'(16'h1000 + i));
    @(negedge rd_clk);
    check(!dav, "no data ready with 4 words");
    q.push_back(16'h1004);
    @(negedge rd_clk);
    check(dav, "data ready one cycle after the fifth word");
    oe = 1;
    #1 check(bus_drive && bus_data == 16'h1000, "head driven under OE");
    for (int i = 0; i < 5; i++) begin
      req = 1;
      #1 w = bus_data;
      check(w == word_t'(16'h1000 + i), $sformatf("word %0d on bus", i));
      check(fifo_rd_en, "pop with REQ");
      @(negedge rd_clk);
    end
    req = 0;
    check(q.size() == 0, "five words taken");
    oe = 0;
    #1 check(!bus_drive && bus_data == 0, "bus released");
    @(negedge rd_clk);
    check(!dav, "data ready low when empty");
    // REQ without OE must not pop
    for (int i = 0; i < 6; i++) q.push_back(word_t'(i));
    req = 1;
    @(negedge rd_clk);
    req = 0;
    check(q.size() == 6, "no pop without OE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge rd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
