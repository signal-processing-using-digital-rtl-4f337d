// mac_unit: the multiplier and adder circuit.
//
// An N x N signed multiply (serial_mult, N cycles) forms a 2N-bit product,
// which a 2N-bit adder/subtractor (addsub) adds to or subtracts from a
// previous value supplied by the data management: res = addend + a*c, or
// addend - a*c when sub is set. Subtracting realises the negated feedback
// coefficients (-a1, -a2) of the filter with a1 and a2 stored as they are.
//
// Timing: start, a and c are sampled on a clock edge; done pulses for one
// cycle N+1 cycles later. res, cout and ovf are combinational from the held
// product and from addend and sub, which must be stable while done is high.
// ovf is the adder's signed overflow, for the truncation circuit.
//
// ACC_W must equal 2N (the product width), as in the 16-bit multiplier /
// 32-bit adder pairing of the source design.
module mac_unit #(
  parameter int unsigned N     = dsp_pkg::N_DEF,
  parameter int unsigned ACC_W = dsp_pkg::ACC_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     c,
  input  logic [ACC_W-1:0] addend,
  input  logic             sub,
  output logic             busy,
  output logic             done,
  output logic [ACC_W-1:0] res,
  output logic             cout,
  output logic             ovf
);

  logic [2*N-1:0] prod;

  serial_mult #(.N(N)) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .a    (a),
    .b    (c),
    .busy (busy),
    .done (done),
    .p    (prod)
  );

  addsub #(.W(ACC_W)) u_add (
    .a   (addend),
    .b   (prod),
    .sub (sub),
    .s   (res),
    .cout(cout),
    .ovf (ovf)
  );

  initial begin
    assert (ACC_W == 2*N)
      else $error("mac_unit: ACC_W=%0d must be 2*N=%0d", ACC_W, 2*N);
  end

endmodule
