// div_controller -- counter and sequencer of the combined divider.
//
// A start pulse in IDLE latches the radix and runs the phases
//     NORM (NNORM cycles, decimal only) -> INIT (1) -> REC (NDEC or NBIN
//     cycles, one digit each) -> RDIG (1, rounding digit) -> ROUND (1)
// and then pulses done for one cycle; start to done takes 24 cycles for
// radix 10 and 17 for radix 16. count is the number of quotient digits
// produced (C in the block diagram, used by the exponent update).
// Decimal early stop: when the recurrence reports w_zero after j >= 1
// digits and j >= jp (the digit count that gives the preferred exponent),
// the remaining iterations are skipped and the unit goes to ROUND with
// count = j. Binary divisions always run all iterations.
// The phase lengths follow the paper's cycle breakdown; the state
// encoding and the start/done handshake are this design's own.
module div_controller
  import div_pkg::*;
#(
  parameter int N_DEC  = NDEC,
  parameter int N_BIN  = NBIN,
  parameter int N_NORM = NNORM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              radix16,
  input  logic              w_zero,
  input  logic signed [5:0] jp,
  output logic              norm_en,
  output logic [1:0]        norm_phase,
  output logic              rec_init,
  output logic              rec_step,
  output logic              cr_shift,
  output logic              cr_round,
  output logic [4:0]        count,
  output logic              r16,
  output logic              busy,
  output logic              done,
  output logic              early_stop
);
  typedef enum logic [2:0] {S_IDLE, S_NORM, S_INIT, S_REC, S_RDIG, S_ROUND} state_t;
  state_t state;
  logic [1:0] ncnt;
  logic [4:0] nlast;
  logic       stop;

  assign nlast      = r16 ? 5'(N_BIN) : 5'(N_DEC);
  assign stop       = !r16 && w_zero && count != 0 &&
                      $signed({1'b0, count}) >= $signed(jp);
  assign norm_en    = state == S_NORM;
  assign norm_phase = ncnt;
  assign rec_init   = state == S_INIT;
  assign rec_step   = state == S_REC || state == S_RDIG;
  assign cr_shift   = rec_step;
  assign cr_round   = state == S_ROUND;
  assign busy       = state != S_IDLE;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ncnt       <= '0;
      count      <= '0;
      r16        <= 1'b0;
      done       <= 1'b0;
      early_stop <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r16        <= radix16;
          ncnt       <= '0;
          early_stop <= 1'b0;
          state      <= radix16 ? S_INIT : S_NORM;
        end
        S_NORM: begin
          ncnt <= ncnt + 2'd1;
          if (ncnt == 2'(N_NORM - 1)) state <= S_INIT;
        end
        S_INIT: begin
          count <= '0;
          state <= S_REC;
        end
        S_REC: begin
          if (stop) begin
            early_stop <= 1'b1;
            state      <= S_ROUND;
          end else begin
            count <= count + 5'd1;
            if (count + 5'd1 == nlast) state <= S_RDIG;
          end
        end
        S_RDIG:  state <= S_ROUND;
        S_ROUND: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
