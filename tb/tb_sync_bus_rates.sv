// Workload testbench: one synchronous DAQ bus at the read-clock rates the
// bus is meant for (10, 13, 30 and 50 MHz). At each rate two real DAQ
// boards (acquisition controller, dual-clock FIFO, bus interface) are
// triggered faster than the bus can drain them, so the bus runs saturated
// and the boards' FIFOs overflow. The testbench checks that back-to-back
// packets on the bus are exactly 8 read-clock cycles apart, that every word
// carries the control code of its position, that boards alternate, and it
// prints the packet time and the bus throughput for each rate.
//
// Time unit: one step is 0.1 ns here, so the 100 MHz board clock toggles
// every 50 steps; 30 MHz is approximated by a 33.4 ns period.
module tb_sync_bus_rates;
  import pet_daq_pkg::*;
  localparam int NR = 4;
  localparam int HALF[NR] = '{500, 385, 167, 100};   // read-clock half periods
  localparam int NPKT = 40;                          // packets checked per rate

  int checks = 0, failures = 0;
  int done_cnt = 0;
  logic clk = 0;
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  for (genvar r = 0; r < NR; r++) begin : g_rate
    localparam int H = HALF[r];
    logic rd_clk = 0, rst_n = 0;
    logic [1:0] trig = '0, oe, req, dav, busy, adc_start, drive;
    word_t bd[2];
    word_t bus_data, wdata;
    logic wr_en;
    logic [2:0] word_idx;
    logic [31:0] n_pkts, n_stall;
    logic [31:0] n_acq[2], n_ign[2], n_drop[2];
    sample_t [N_ADC-1:0] adc[2];
    logic [7:0] ev = '0;
    int npk = 0, last_id = -1, alternations = 0;
    longint t_last = -1, t_sum = 0, t_n = 0;

    always #(H) rd_clk = ~rd_clk;

    for (genvar b = 0; b < 2; b++) begin : g_board
      daq_board #(.DAQ_ID(4'(b))) u_board (
        .clk, .rd_clk, .rst_n, .trig(trig[b]), .event_id(ev), .cfg_c(5'b0),
        .adc_start(adc_start[b]), .adc_data(adc[b]), .oe(oe[b]), .req(req[b]),
        .dav(dav[b]), .bus_drive(drive[b]), .bus_data(bd[b]), .busy(busy[b]),
        .n_acq(n_acq[b]), .n_ignored(n_ign[b]), .n_dropped(n_drop[b]));
      always @(posedge clk) if (rst_n && adc_start[b])
        for (int k = 0; k < N_ADC; k++) adc[b][k] <= sample_t'($urandom);
    end
    assign bus_data = bd[0] | bd[1];

    daqfetch_sync #(.N_DAQ(2)) u_fetch (
      .rd_clk, .rst_n, .dav, .oe, .req, .bus_data, .space_ok(1'b1),
      .wr_en, .wdata, .word_idx, .n_pkts, .n_stall);

    // trigger both boards alternately, faster than the bus drains them
    always @(posedge clk) if (rst_n) begin
      trig <= ($urandom_range(0, 3) == 0) ? 2'(1 << $urandom_range(0, 1)) : 2'b00;
      if (|trig) ev <= ev + 1'b1;
    end

    always @(posedge rd_clk) if (rst_n && wr_en && npk < NPKT) begin
      check(wdata[15:13] == code_at(word_idx),
            $sformatf("rate %0d: word %0d code %b", r, word_idx, wdata[15:13]));
      if (word_idx == 3'd0) begin
        if (t_last >= 0 && npk > 4) begin
          check($time - t_last == 16 * H,
                $sformatf("rate %0d: packet spacing %0d steps", r, $time - t_last));
          t_sum += $time - t_last; t_n++;
        end
        if (last_id >= 0 && int'(wdata[11:8]) != last_id) alternations++;
        last_id = int'(wdata[11:8]);
        t_last = $time;
      end
      if (word_idx == 3'(PKT_WORDS - 1)) begin
        npk++;
        if (npk == NPKT) begin
          check(alternations >= NPKT - 6, $sformatf("rate %0d: boards alternate (%0d)", r, alternations));
          check(n_drop[0] + n_drop[1] > 0, $sformatf("rate %0d: board FIFOs overflowed", r));
          $display("read clock %0d.%0d MHz: %0d ns per packet, %0d.%0d MB/s per bus, drops %0d",
                   10000 / (2 * H), (100000 / (2 * H)) % 10, t_sum / t_n / 10,
                   100000 / (t_sum / t_n), (1000000 / (t_sum / t_n)) % 10,
                   n_drop[0] + n_drop[1]);
          done_cnt++;
        end
      end
    end

    initial begin
      repeat (3) @(negedge rd_clk);
      rst_n = 1;
    end
  end

  initial begin
    wait (done_cnt == NR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
