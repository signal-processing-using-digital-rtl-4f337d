// dsp_top: general-purpose digital signal processor, with its arithmetic
// building blocks.
//
// The processor takes one sample stream from an N-bit analog-to-digital
// converter and returns one processed stream to an N-bit digital-to-analog
// converter. The converters are outside this RTL: x_in/x_valid are the ADC
// side, y_out/y_valid the DAC side. In between sits the second-order IIR
// filter (iir_filter), whose five coefficients are written through the
// coefficient port and select the application.
//
// Beside the filter, the top brings out the arithmetic circuits developed
// for the processor's adder and multiplier stage, each with its own ports:
//   ma_*  four-bit adder of cascaded gate-level full adder cells
//   am_*  4 x 4 cellular array multiplier (unsigned)
//   ra_*  4-bit ripple carry adder
//   cla_* 16-bit carry lookahead adder
//   pm_*  N x N signed parallel multiplier
// They are combinational. The filter itself uses the serial multiplier and
// the carry lookahead adder/subtractor.
//
// Timing of the filter: see iir_filter (y_valid rises 5(N+2) = 90 clock
// edges after the edge that accepts a sample). Active-low synchronous reset.
module dsp_top #(
  parameter int unsigned N     = dsp_pkg::N_DEF,
  parameter int unsigned ACC_W = dsp_pkg::ACC_DEF,
  parameter int unsigned FRAC  = dsp_pkg::FRAC_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  // ADC side
  input  logic             x_valid,
  input  logic [N-1:0]     x_in,
  // coefficient port
  input  logic             coef_we,
  input  logic [2:0]       coef_sel,
  input  logic [N-1:0]     coef_data,
  // DAC side
  output logic             busy,
  output logic             y_valid,
  output logic [N-1:0]     y_out,
  output logic             sat,
  // four-bit cascaded full adder cells
  input  logic [3:0]       ma_a,
  input  logic [3:0]       ma_b,
  input  logic             ma_cin,
  output logic [3:0]       ma_s,
  output logic             ma_cout,
  // cellular array multiplier
  input  logic [3:0]       am_a,
  input  logic [3:0]       am_b,
  output logic [7:0]       am_p,
  // ripple carry adder
  input  logic [3:0]       ra_a,
  input  logic [3:0]       ra_b,
  input  logic             ra_cin,
  output logic [3:0]       ra_s,
  output logic             ra_cout,
  // carry lookahead adder
  input  logic [15:0]      cla_a,
  input  logic [15:0]      cla_b,
  input  logic             cla_cin,
  output logic [15:0]      cla_s,
  output logic             cla_cout,
  // parallel multiplier
  input  logic [N-1:0]     pm_a,
  input  logic [N-1:0]     pm_b,
  output logic [2*N-1:0]   pm_p
);

  iir_filter #(.N(N), .ACC_W(ACC_W), .FRAC(FRAC)) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_valid  (x_valid),
    .x        (x_in),
    .coef_we  (coef_we),
    .coef_sel (dsp_pkg::coef_e'(coef_sel)),
    .coef_data(coef_data),
    .busy     (busy),
    .y_valid  (y_valid),
    .y        (y_out),
    .sat      (sat)
  );

  mirror_adder4 u_ma (
    .a   (ma_a),
    .b   (ma_b),
    .cin (ma_cin),
    .s   (ma_s),
    .cout(ma_cout)
  );

  array_mult #(.N(4)) u_am (
    .a(am_a),
    .b(am_b),
    .p(am_p)
  );

  ripple_adder #(.W(4)) u_ra (
    .a   (ra_a),
    .b   (ra_b),
    .cin (ra_cin),
    .s   (ra_s),
    .cout(ra_cout)
  );

  cla_adder #(.W(16)) u_cla (
    .a   (cla_a),
    .b   (cla_b),
    .cin (cla_cin),
    .s   (cla_s),
    .cout(cla_cout)
  );

  par_mult #(.N(N)) u_pm (
    .a(pm_a),
    .b(pm_b),
    .p(pm_p)
  );

endmodule
