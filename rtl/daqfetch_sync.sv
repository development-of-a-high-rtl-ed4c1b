// Motherboard side of one synchronous DAQ bus (the bus fetch controller).
//
// Up to N_DAQ boards share one 16-bit bus; each has its own output enable
// (OE), read request (REQ) and data ready (DAV). Everything runs on the read
// clock that the motherboard sends to the boards. For each packet:
//   ARB     pick the next board with DAV high, round robin; wait here
//           (a stall) while the motherboard buffer has no room for a packet
//   OE      raise that board's OE so it drives the bus
//   BURST   five cycles with REQ high; the word on the bus is captured at
//           each of these edges (the board pops it at the same edge)
//   REL     drop OE so the bus is free for the next board
// A packet thus takes 8 read-clock cycles (267 ns at 30 MHz), and the five
// words leave on `wr_en/wdata` with their position in `word_idx`.
// The OE/REQ/DAV sequence and the five-word burst follow the original
// protocol; the arbitration order and the single turn-on and release cycles
// are choices of this design.
module daqfetch_sync
  import pet_daq_pkg::*;
#(
  parameter int N_DAQ = 8
) (
  input  logic             rd_clk,
  input  logic             rst_n,
  input  logic [N_DAQ-1:0] dav,
  output logic [N_DAQ-1:0] oe,
  output logic [N_DAQ-1:0] req,
  input  word_t            bus_data,
  input  logic             space_ok,
  output logic             wr_en,
  output word_t            wdata,
  output logic [2:0]       word_idx,
  output logic [31:0]      n_pkts,
  output logic [31:0]      n_stall
);
  localparam int SW = (N_DAQ > 1) ? $clog2(N_DAQ) : 1;
  typedef enum logic [1:0] {ARB, OEN, BURST, REL} state_e;
  state_e       state;
  logic [SW-1:0] sel, last, pick;
  logic          found;
  logic [2:0]    cnt;

  // round-robin search starting after the last served board
  always_comb begin
    found = 1'b0;
    pick  = last;
    for (int k = 1; k <= N_DAQ; k++) begin
      automatic int idx = (int'(last) + k) % N_DAQ;
      if (!found && dav[idx]) begin
        found = 1'b1;
        pick  = SW'(idx);
      end
    end
  end

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ARB;
      sel     <= '0;
      last    <= SW'(N_DAQ - 1);
      cnt     <= '0;
      n_pkts  <= '0;
      n_stall <= '0;
    end else begin
      unique case (state)
        ARB: if (found) begin
          if (space_ok) begin
            sel   <= pick;
            state <= OEN;
          end else begin
            n_stall <= n_stall + 1;
          end
        end
        OEN: begin
          cnt   <= '0;
          state <= BURST;
        end
        BURST: begin
          cnt <= cnt + 1'b1;
          if (cnt == 3'(PKT_WORDS - 1)) begin
            state  <= REL;
            n_pkts <= n_pkts + 1;
          end
        end
        REL: begin
          last  <= sel;
          state <= ARB;
        end
      endcase
    end
  end

  always_comb begin
    oe  = '0;
    req = '0;
    if (state == OEN || state == BURST) oe[sel] = 1'b1;
    if (state == BURST) req[sel] = 1'b1;
  end

  assign wr_en    = state == BURST;
  assign wdata    = bus_data;
  assign word_idx = cnt;

  // only one board may drive the bus
  assert property (@(posedge rd_clk) disable iff (!rst_n) $onehot0(oe));
endmodule
