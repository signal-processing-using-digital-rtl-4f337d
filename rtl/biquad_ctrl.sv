// biquad_ctrl: sequencer of the second-order Direct Form II filter.
//
// One input sample is processed in five multiply-accumulate steps on the
// single multiplier and adder, using the partial sum kept in the data
// management between steps:
//
//   step 0: acc = x(n)  - a1 * w(n-1)        (subtract)
//   step 1: acc = acc   - a2 * w(n-2)        -> w(n) = truncated acc
//   step 2: acc = 0     + b0 * w(n)
//   step 3: acc = acc   + b1 * w(n-1)
//   step 4: acc = acc   + b2 * w(n-2)        -> y(n) = truncated acc,
//                                               delay line shifts
//
// Steps 0 and 1 are the two consecutive data-management steps of the
// source; steps 2 to 4 form the output sum of the same realisation.
//
// States: S_IDLE waits for x_valid and then loads the sample into the
// partial sum (load_x). S_START asserts mac_start for one cycle. S_WAIT
// waits for mac_done; in that cycle it writes the result back (acc_we),
// rotates the coefficient ring (rot) and, at step 1, stores w(n) (w0_we),
// at step 4 emits the output (y_we) and shifts the delay line (shift).
// Every step takes N+2 cycles (one to launch, N multiply cycles, one to
// write back); the edge that stores y(n) comes
// 5(N+2) edges after the edge that accepts the sample. A sample offered while busy is not
// taken. Active-low synchronous reset to S_IDLE.
module biquad_ctrl (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic                 mac_done,
  output logic                 busy,
  output logic                 load_x,
  output logic                 mac_start,
  output logic                 mac_sub,
  output logic                 addend_zero,
  output dsp_pkg::wsel_e       wsel,
  output logic                 acc_we,
  output logic                 rot,
  output logic                 w0_we,
  output logic                 y_we,
  output logic                 shift
);

  import dsp_pkg::*;

  ctrl_state_e state;
  logic [2:0]  step;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
    end else begin
      case (state)
        S_IDLE: if (x_valid) begin
          state <= S_START;
          step  <= '0;
        end
        S_START: state <= S_WAIT;
        S_WAIT: if (mac_done) begin
          if (step == 3'd4) begin
            state <= S_IDLE;
          end else begin
            state <= S_START;
            step  <= step + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state != S_IDLE);
    load_x      = (state == S_IDLE) && x_valid;
    mac_start   = (state == S_START);
    mac_sub     = (step < 3'd2);
    addend_zero = (step == 3'd2);
    case (step)
      3'd0, 3'd3: wsel = W_N1;
      3'd2:       wsel = W_N0;
      default:    wsel = W_N2;
    endcase
    acc_we = (state == S_WAIT) && mac_done;
    rot    = acc_we;
    w0_we  = acc_we && (step == 3'd1);
    y_we   = acc_we && (step == 3'd4);
    shift  = y_we;
  end

  // The multiplier finishes only while a step is waiting for it.
  a_done_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
                                   mac_done |-> state == S_WAIT);

endmodule
