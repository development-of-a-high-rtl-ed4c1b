// Transfer state machine of the HSMC receiver.
//
// The processor sends commands through a FIFO; this state machine executes
// them and returns results through a second FIFO. Commands (one DATA_W-bit
// word, opcode in bits 63..60, count in bits 15..0):
//   OP_READ   n  move n words from the HSMC receive buffer to the processor
//   OP_STATUS    send one status word
//   OP_RESET     clear the command/status registers and re-initialize
// States:
//   S_INIT    clear the registers, wait until the LVDS link is aligned
//   S_READY   wait for a command
//   S_RDCMD   pop the command, store it in the register bank, decode it
//   S_STATUS  send the status word
//   S_RDHSMC  move words, at most BURST per visit, one per cycle while the
//             receive buffer has data and the output FIFO has room
//   S_DONE    end of a burst: back to S_RDHSMC if words remain, else S_READY
// Output words are tagged in bits 63..60: TAG_DATA with the 16-bit word in
// bits 15..0, or TAG_STATUS with commands served in 59..44, words moved in
// 43..28, receive-buffer drops in 27..12, buffer empty in bit 1 and link
// locked in bit 0. The register bank (last command, words moved, commands
// served) keeps the configuration and status.
// The six states, the three commands and the five-word bursts follow the
// original design; encodings and the status layout are choices of this one.
module hsmc_ctrl_fsm
  import pet_daq_pkg::*;
#(
  parameter int DATA_W = 64,
  parameter int BURST  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [DATA_W-1:0] cmd_data,
  input  logic [15:0]       rx_data,
  input  logic              rx_empty,
  output logic              rx_rd,
  input  logic [15:0]       rx_drops,
  input  logic              link_locked,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output hsmc_state_e       state,
  output logic [DATA_W-1:0] last_cmd,
  output logic [15:0]       n_words,
  output logic [15:0]       n_cmds
);
  logic [15:0] remaining;
  logic [$clog2(BURST+1)-1:0] bcnt;
  logic have, move;
  hsmc_op_e op;

  assign op = hsmc_op_e'(cmd_data[DATA_W-1 -: 4]);

  // data moves in S_RDHSMC when both sides are ready
  assign have = state == S_RDHSMC && !rx_empty && remaining != 0;
  assign move = have && out_ready;

  always_comb begin
    cmd_ready = state == S_RDCMD;
    rx_rd     = move;
    out_valid = 1'b0;
    out_data  = '0;
    if (state == S_STATUS) begin
      out_valid = 1'b1;
      out_data  = DATA_W'({TAG_STATUS, n_cmds, n_words, rx_drops,
                           10'd0, rx_empty, link_locked});
    end else if (have) begin
      out_valid = 1'b1;
      out_data  = DATA_W'({TAG_DATA, 44'd0, rx_data});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      last_cmd  <= '0;
      n_words   <= '0;
      n_cmds    <= '0;
      remaining <= '0;
      bcnt      <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          last_cmd  <= '0;
          n_words   <= '0;
          n_cmds    <= '0;
          remaining <= '0;
          if (link_locked) state <= S_READY;
        end
        S_READY: if (cmd_valid) state <= S_RDCMD;
        S_RDCMD: begin
          last_cmd <= cmd_data;
          bcnt     <= '0;
          unique case (op)
            OP_READ: begin
              remaining <= cmd_data[15:0];
              state     <= (cmd_data[15:0] == 16'd0) ? S_DONE : S_RDHSMC;
            end
            OP_STATUS: state <= S_STATUS;
            OP_RESET:  state <= S_INIT;
            default:   state <= S_DONE;
          endcase
        end
        S_STATUS: if (out_ready) state <= S_DONE;
        S_RDHSMC: if (move) begin
          remaining <= remaining - 1'b1;
          n_words   <= n_words + 1'b1;
          bcnt      <= bcnt + 1'b1;
          if (bcnt == ($bits(bcnt))'(BURST - 1) || remaining == 16'd1) state <= S_DONE;
        end
        S_DONE: begin
          bcnt <= '0;
          if (remaining != 0) begin
            state <= S_RDHSMC;
          end else begin
            n_cmds <= n_cmds + 1'b1;
            state  <= S_READY;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end
endmodule
