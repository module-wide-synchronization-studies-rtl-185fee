// Configuration FSM of the reset shift block.
//
// Turns the parallel 6-bit reset shift setting into the serial configuration
// sequence of the IO delay chain. States, as in the published design:
//   FS_IDLE   waits for i_start; it must be seen high in two adjacent cycles,
//             so a one-cycle glitch on the start line is ignored.
//   FS_REC    one cycle: latches i_cdata[4:0] into the shift register s_cdata
//             and bit 5 (the half-cycle shift select) into s_datashift.
//   FS_SEND   N_SEND = 5 cycles with o_cena high; o_cdata is s_cdata[0] and
//             s_cdata shifts right, so the word goes out LSB first. The bit
//             counter s_ccnt stops the state once 5 bits are out.
//   FS_UPDATE s_ccnt restarts at 0; the state lasts N_UPDATE = 11 cycles,
//             one more than the 10 the delay-chain configuration needs, and
//             o_cupdate (s_cupdateout) is high in its last cycle.
// Back in FS_IDLE the counter and the serial outputs are 0. Reset (active
// low, asynchronous) also returns to FS_IDLE.
// Design choices where the description is silent: o_datashift is a register
// that takes the latched bit 5 in the same cycle as o_cupdate, so the
// half-cycle shift and the new delay-chain word take effect together; the
// FSM re-runs if i_start is still high when it is back in FS_IDLE.
// Timing: from the second start sample to the update pulse the FSM takes
// 1 + 5 + 11 = 17 cycles of i_clk (31.25 MHz).
`timescale 1ps/1ps
module rst_shift_fsm
  import rst_shift_pkg::*;
#(
  parameter int unsigned CW       = CDATA_W,
  parameter int unsigned NSEND    = N_SEND,
  parameter int unsigned NUPDATE  = N_UPDATE
) (
  input  logic          i_clk,
  input  logic          i_reset_n,
  input  logic          i_start,
  input  logic [CW-1:0] i_cdata,
  output logic          o_cdata,
  output logic          o_cena,
  output logic          o_cupdate,
  output logic          o_datashift,
  output logic          o_busy
);

  fsm_state_t    state;
  logic          s_start_q;
  logic [CW-2:0] s_cdata;
  logic          s_datashift;
  logic [3:0]    s_ccnt;

  always_ff @(posedge i_clk or negedge i_reset_n) begin
    if (!i_reset_n) begin
      state       <= FS_IDLE;
      s_start_q   <= 1'b0;
      s_cdata     <= '0;
      s_datashift <= 1'b0;
      s_ccnt      <= '0;
      o_datashift <= 1'b0;
    end else begin
      s_start_q <= i_start;
      unique case (state)
        FS_IDLE: begin
          s_ccnt <= '0;
          if (i_start && s_start_q) state <= FS_REC;
        end
        FS_REC: begin
          s_cdata     <= i_cdata[CW-2:0];
          s_datashift <= i_cdata[CW-1];
          s_ccnt      <= '0;
          state       <= FS_SEND;
        end
        FS_SEND: begin
          s_cdata <= s_cdata >> 1;
          if (32'(s_ccnt) + 1 == NSEND) begin
            s_ccnt <= '0;
            state  <= FS_UPDATE;
          end else begin
            s_ccnt <= s_ccnt + 1'b1;
          end
        end
        FS_UPDATE: begin
          if (32'(s_ccnt) + 1 == NUPDATE) begin
            s_ccnt      <= '0;
            s_cdata     <= '0;
            o_datashift <= s_datashift;
            state       <= FS_IDLE;
          end else begin
            s_ccnt <= s_ccnt + 1'b1;
          end
        end
        default: state <= FS_IDLE;
      endcase
    end
  end

  assign o_cena    = (state == FS_SEND);
  assign o_cdata   = (state == FS_SEND) ? s_cdata[0] : 1'b0;
  assign o_cupdate = (state == FS_UPDATE) && (32'(s_ccnt) + 1 == NUPDATE);
  assign o_busy    = (state != FS_IDLE);

  // The update pulse never comes together with a serial bit, and the bit
  // counter stays inside the length of each state.
  a_no_update_while_shift: assert property (@(posedge i_clk) disable iff (!i_reset_n)
    !(o_cena && o_cupdate));
  a_send_count: assert property (@(posedge i_clk) disable iff (!i_reset_n)
    (state == FS_SEND) |-> (32'(s_ccnt) < NSEND));
  a_update_count: assert property (@(posedge i_clk) disable iff (!i_reset_n)
    (state == FS_UPDATE) |-> (32'(s_ccnt) < NUPDATE));

endmodule
