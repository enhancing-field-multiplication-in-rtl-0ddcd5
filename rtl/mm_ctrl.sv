// mm_ctrl: sequencer of the bit-serial systolic Montgomery multiplier.
//
// One multiplication takes 2K busy cycles, numbered n = 0 .. 2K-1:
//   n = 0 .. K-1    the serializers present operand bit n to PE 1 of both
//                   arrays (ser_shift = 1 throughout the busy phase);
//   n = 0           ctrl.t = 1: PE 1 latches the top bit of its result;
//   n = K-1         ctrl.z = 0: PE 1 works on its last bit, where the
//                   shifted-in partial-product bit must be zero;
//   n = K+1 .. 2K-1 sr_shift = 1: the output shift registers take the last
//                   PE's bits 1 .. K-1 (bit 0 is in its hold register).
// The t and z pulses reach later PEs through the arrays' own delay lines,
// so PE i sees them at n = 2(i-1) and n = 2(i-1)+K-1.
// Handshake (this design's choice): start is accepted in a cycle with
// busy = 0; load is high in that same cycle so that the operands are
// captured. done is a one-cycle pulse in the cycle after the last busy
// cycle, i.e. 2K+1 cycles after the accepted start, and the result is valid
// from then until the next operation has run K+1 busy cycles.
// Reset (asynchronous, active low) returns to idle.
// The t and z pulse times are those of the published architecture; the
// counter-based controller and the handshake are this design's own.
// Lint notes rst_n as used both asynchronously and synchronously: the
// synchronous use is the assertions' disable condition.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned K = 233
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  output logic     done,
  output logic     load,
  output logic     ser_shift,
  output mm_ctrl_t ctrl,
  output logic     sr_shift
);

  localparam int unsigned CW = $clog2(2 * K);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          if (cnt == CW'(2 * K - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state == S_RUN);
    load      = (state == S_IDLE) && start;
    ser_shift = busy;
    ctrl.t    = busy && (cnt == '0);
    ctrl.z    = !(busy && (cnt == CW'(K - 1)));
    sr_shift  = busy && (cnt >= CW'(K + 1));
  end

  // done is a single pulse and never overlaps a busy cycle.
  a_done_idle : assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_done_once : assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
