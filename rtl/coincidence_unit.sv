// Coincidence network of the motherboard.
//
// Each detector's constant fraction discriminator sends a trigger when a
// photon is seen. A coincidence is two photons seen by two detectors within
// a short time window. The first trigger opens a window of WINDOW clock
// cycles (that cycle included); every detector that fires inside it is
// collected in a mask. When the window closes the mask is judged:
//   - exactly two detectors: a coincidence. Both DAQ boards get a one-cycle
//     trigger in `daq_trig`, and `event_id` carries the event number the two
//     boards write into their packet headers, so the host can pair them;
//   - one detector: a single, rejected;
//   - three or more: a multiple coincidence, rejected.
// The next window can open in the cycle after a window closes. Triggers must
// be single-cycle pulses already synchronous to `clk`.
// Coincidence detection in a time window follows the original system; the
// window in cycles, the acceptance of any detector pair and the rejection of
// multiples are choices of this design.
module coincidence_unit #(
  parameter int N_DET  = 16,
  parameter int WINDOW = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_DET-1:0] det_trig,
  output logic [N_DET-1:0] daq_trig,
  output logic [7:0]       event_id,
  output logic [31:0]      n_coinc,
  output logic [31:0]      n_single,
  output logic [31:0]      n_multiple
);
  localparam int TW = (WINDOW > 1) ? $clog2(WINDOW) : 1;
  logic             open_q;
  logic [TW-1:0]    timer;
  logic [N_DET-1:0] mask_q, mask_n;
  logic             close_now;
  logic [7:0]       evt_cnt;

  function automatic int unsigned popcount(input logic [N_DET-1:0] v);
    int unsigned n = 0;
    for (int i = 0; i < N_DET; i++) n += 32'(v[i]);
    return n;
  endfunction

  always_comb begin
    mask_n    = (open_q ? mask_q : '0) | det_trig;
    close_now = open_q ? (timer == '0) : ((|det_trig) && WINDOW <= 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q     <= 1'b0;
      timer      <= '0;
      mask_q     <= '0;
      daq_trig   <= '0;
      event_id   <= '0;
      evt_cnt    <= '0;
      n_coinc    <= '0;
      n_single   <= '0;
      n_multiple <= '0;
    end else begin
      daq_trig <= '0;
      if (close_now) begin
        open_q <= 1'b0;
        mask_q <= '0;
        if (popcount(mask_n) == 2) begin
          daq_trig <= mask_n;
          event_id <= evt_cnt;
          evt_cnt  <= evt_cnt + 1'b1;
          n_coinc  <= n_coinc + 1;
        end else if (popcount(mask_n) == 1) begin
          n_single <= n_single + 1;
        end else begin
          n_multiple <= n_multiple + 1;
        end
      end else if (open_q) begin
        mask_q <= mask_n;
        timer  <= timer - 1'b1;
      end else if (|det_trig) begin
        open_q <= 1'b1;
        mask_q <= det_trig;
        timer  <= TW'(WINDOW - 2);
      end
    end
  end
endmodule
