// data_mem: memory storage of the signal processor's data management.
//
// It holds three things and delivers them to the multiplier and adder at
// the time each is needed:
//
//  * Coefficients, in a five-entry rotating register ring kept in the
//    order the filter uses them: a1, a2, b0, b1, b2. The head of the ring
//    (coef) is the coefficient of the current multiply step; rot moves the
//    ring one place, head to tail. A sample takes five steps, so after each
//    sample the ring is back at a1. Coefficients are written (coef_we,
//    coef_sel, coef_data) by name; a write is meant for when the filter is
//    idle and the ring is at its home position.
//  * The delay line w(n), w(n-1), w(n-2). w0_we writes w(n); shift moves
//    w(n) to w(n-1) and w(n-1) to w(n-2), discarding the old w(n-2) once it
//    has been used. wsel picks the value presented on w.
//  * The partial sum between multiply steps (ACC_W bits): acc_we loads
//    acc_d. The filter loads the input sample here, aligned to the sum's
//    scale, before the first step.
//
// All registers clear on the active-low synchronous reset. Registers for
// the coefficients and the ring order are this design's reading of the
// "shift-and-rotate" memory; the source leaves the memory's form open.
module data_mem #(
  parameter int unsigned N     = dsp_pkg::N_DEF,
  parameter int unsigned ACC_W = dsp_pkg::ACC_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient write port
  input  logic                 coef_we,
  input  dsp_pkg::coef_e       coef_sel,
  input  logic [N-1:0]         coef_data,
  // coefficient ring
  input  logic                 rot,
  output logic [N-1:0]         coef,
  // delay line
  input  logic                 w0_we,
  input  logic [N-1:0]         w0_d,
  input  logic                 shift,
  input  dsp_pkg::wsel_e       wsel,
  output logic [N-1:0]         w,
  // partial sum
  input  logic                 acc_we,
  input  logic [ACC_W-1:0]     acc_d,
  output logic [ACC_W-1:0]     acc_q
);

  import dsp_pkg::*;

  logic [N-1:0] ring [5];      // ring[0] is the head
  logic [N-1:0] wd   [3];      // w(n), w(n-1), w(n-2)

  // Ring position of each coefficient when the ring is at home.
  function automatic int unsigned home_pos(coef_e c);
    case (c)
      C_A1:    return 0;
      C_A2:    return 1;
      C_B0:    return 2;
      C_B1:    return 3;
      default: return 4;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) ring[i] <= '0;
    end else if (rot) begin
      for (int i = 0; i < 4; i++) ring[i] <= ring[i+1];
      ring[4] <= ring[0];
    end else if (coef_we) begin
      ring[home_pos(coef_sel)] <= coef_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) wd[i] <= '0;
    end else begin
      if (shift) begin
        wd[1] <= wd[0];
        wd[2] <= wd[1];
      end
      if (w0_we) wd[0] <= w0_d;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      acc_q <= '0;
    else if (acc_we) acc_q <= acc_d;
  end

  assign coef = ring[0];

  always_comb begin
    case (wsel)
      W_N1:    w = wd[1];
      W_N2:    w = wd[2];
      default: w = wd[0];
    endcase
  end

endmodule
