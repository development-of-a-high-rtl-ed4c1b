// DAQ-board acquisition controller.
//
// When the motherboard finds a coincidence it triggers the DAQ boards of the
// two detectors. This block then pulses `adc_start` to start the four 12-bit
// ADCs that digitize the Anger signals XA, XB, YA and YB, waits for the
// converters' conversion plus output delay (CONV_CYCLES), samples
// `adc_data`, and writes one five-word packet into the board FIFO: header
// (DAQ id and event marker), XA, XB, YA, YB. Triggers that arrive before the
// packet is written are ignored and counted: this is the non-paralysable
// dead time of the board. If the FIFO has fewer than five free words the
// packet is dropped and counted, so the FIFO never holds a partial packet.
//
// Timing: trigger seen in cycle 0, adc_start in cycle 1, samples taken after
// CONV_CYCLES more, then five consecutive FIFO writes; dead time is
// CONV_CYCLES + 7 cycles. The packet layout and the ADC delay (30 ns + 20 ns,
// 5 cycles at the assumed 100 MHz) come from the original system; the header
// field split, drop policy and clock rate are choices of this design.
module daq_acq_ctrl
  import pet_daq_pkg::*;
#(
  parameter logic [3:0] DAQ_ID      = 4'd0,
  parameter int         CONV_CYCLES = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trig,
  input  logic [7:0]           event_id,
  input  logic [4:0]           cfg_c,
  output logic                 adc_start,
  input  sample_t [N_ADC-1:0]  adc_data,
  output logic                 fifo_wr_en,
  output word_t                fifo_wdata,
  input  logic                 fifo_room,   // at least PKT_WORDS free
  output logic                 busy,
  output logic [31:0]          n_acq,
  output logic [31:0]          n_ignored,
  output logic [31:0]          n_dropped
);
  typedef enum logic [1:0] {IDLE, START, CONV, WRITE} state_e;
  state_e state;
  logic [7:0]            evt_q;
  sample_t [N_ADC-1:0]   smp_q;
  logic [$clog2(CONV_CYCLES+1)-1:0] cnt;
  logic [2:0]            widx;

  assign busy      = state != IDLE;
  assign adc_start = state == START;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      evt_q      <= '0;
      smp_q      <= '0;
      cnt        <= '0;
      widx       <= '0;
      n_acq      <= '0;
      n_ignored  <= '0;
      n_dropped  <= '0;
    end else begin
      if (trig && state != IDLE) n_ignored <= n_ignored + 1;
      unique case (state)
        IDLE: if (trig) begin
          evt_q <= event_id;
          state <= START;
        end
        START: begin
          cnt   <= '0;
          state <= CONV;
        end
        CONV: begin
          if (cnt == ($bits(cnt))'(CONV_CYCLES - 1)) begin
            smp_q <= adc_data;
            widx  <= '0;
            if (fifo_room) begin
              state <= WRITE;
            end else begin
              n_dropped <= n_dropped + 1;
              state     <= IDLE;
            end
          end
          cnt <= cnt + 1'b1;
        end
        WRITE: begin
          widx <= widx + 1'b1;
          if (widx == 3'(PKT_WORDS - 1)) begin
            n_acq <= n_acq + 1;
            state <= IDLE;
          end
        end
      endcase
    end
  end

  always_comb begin
    fifo_wr_en = state == WRITE;
    if (widx == 3'd0) fifo_wdata = make_header(DAQ_ID, evt_q, cfg_c[0]);
    else              fifo_wdata = make_sample(widx, smp_q[widx-3'd1], cfg_c[widx]);
  end
endmodule
