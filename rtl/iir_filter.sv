// iir_filter: second-order IIR filter, Direct Form II, on one multiplier and
// one adder/subtractor.
//
//   w(n) = x(n) - a1 w(n-1) - a2 w(n-2)
//   y(n) = b0 w(n) + b1 w(n-1) + b2 w(n-2)
//
// which together equal
//   y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) - a1 y(n-1) - a2 y(n-2).
// Only the two delayed values w(n-1), w(n-2) are kept. Changing the five
// coefficients retunes the filter to a different application.
//
// Structure: biquad_ctrl sequences five steps through mac_unit (serial
// multiplier + 32-bit adder/subtractor); each result passes through the
// truncation circuit and is kept in data_mem (partial sum, delay line,
// rotating coefficient ring). The partial sums stay at full ACC_W width
// (saturated on overflow); w(n) and y(n) are truncated to N bits.
//
// Number formats (this design's choice): x, y and w are Q1.(N-1); the
// coefficients have FRAC fraction bits (Q2.14 by default); the partial sum
// has N-1+FRAC fraction bits.
//
// Interface and timing: x is taken on a clock edge where x_valid is high
// and busy is low. y_valid pulses for one cycle with y, rising 5(N+2)
// edges later (90 for N = 16); y holds until the next output. sat is high
// with y when any step of that sample saturated. Coefficients are written
// through coef_we / coef_sel / coef_data while busy is low.
module iir_filter #(
  parameter int unsigned N     = dsp_pkg::N_DEF,
  parameter int unsigned ACC_W = dsp_pkg::ACC_DEF,
  parameter int unsigned FRAC  = dsp_pkg::FRAC_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x_valid,
  input  logic [N-1:0]   x,
  input  logic           coef_we,
  input  dsp_pkg::coef_e coef_sel,
  input  logic [N-1:0]   coef_data,
  output logic           busy,
  output logic           y_valid,
  output logic [N-1:0]   y,
  output logic           sat
);

  import dsp_pkg::*;

  logic             load_x, mac_start, mac_sub, addend_zero;
  logic             acc_we, rot, w0_we, y_we, shift;
  wsel_e            wsel;
  logic             mac_busy, mac_done, mac_ovf;
  logic [N-1:0]     coef, w, y_t;
  logic [ACC_W-1:0] acc_q, acc_d, addend, mac_res, acc_sat, x_aligned;
  logic             sat_t, sat_run;

  biquad_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_valid    (x_valid),
    .mac_done   (mac_done),
    .busy       (busy),
    .load_x     (load_x),
    .mac_start  (mac_start),
    .mac_sub    (mac_sub),
    .addend_zero(addend_zero),
    .wsel       (wsel),
    .acc_we     (acc_we),
    .rot        (rot),
    .w0_we      (w0_we),
    .y_we       (y_we),
    .shift      (shift)
  );

  assign addend = addend_zero ? '0 : acc_q;

  mac_unit #(.N(N), .ACC_W(ACC_W)) u_mac (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mac_start),
    .a     (w),
    .c     (coef),
    .addend(addend),
    .sub   (mac_sub),
    .busy  (mac_busy),
    .done  (mac_done),
    .res   (mac_res),
    .cout  (),
    .ovf   (mac_ovf)
  );

  truncation #(.N(N), .ACC_W(ACC_W), .FRAC(FRAC)) u_trunc (
    .acc    (mac_res),
    .ovf    (mac_ovf),
    .acc_sat(acc_sat),
    .y      (y_t),
    .sat    (sat_t)
  );

  // Input sample aligned to the partial sum's scale.
  assign x_aligned = ACC_W'($signed(x)) << FRAC;
  assign acc_d     = load_x ? x_aligned : acc_sat;

  data_mem #(.N(N), .ACC_W(ACC_W)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .coef_we  (coef_we & ~busy),
    .coef_sel (coef_sel),
    .coef_data(coef_data),
    .rot      (rot),
    .coef     (coef),
    .w0_we    (w0_we),
    .w0_d     (y_t),
    .shift    (shift),
    .wsel     (wsel),
    .w        (w),
    .acc_we   (acc_we | load_x),
    .acc_d    (acc_d),
    .acc_q    (acc_q)
  );

  // The controller only launches a multiply when the multiplier is free.
  a_start_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 mac_start |-> !mac_busy);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
      sat     <= 1'b0;
      sat_run <= 1'b0;
    end else begin
      y_valid <= y_we;
      // A partial sum may exceed the N-bit range; only adder overflow and
      // clamping of w(n) or y(n) count as saturation.
      if (load_x)      sat_run <= 1'b0;
      else if (acc_we) sat_run <= sat_run | mac_ovf | (w0_we & sat_t);
      if (y_we) begin
        y   <= y_t;
        sat <= sat_run | sat_t;  // sat_t covers y(n) itself
      end
    end
  end

endmodule
