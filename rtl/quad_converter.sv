// quad_converter: quadratic converter QT_k of the coded-PSK demodulator.
//
// Forms the noncoherent response to code k from the two quadrature correlations:
//     z_k = sqrt(u0k^2 + u1k^2),
// which does not depend on the unknown carrier phase. The sum of squares is
// formed combinationally and loaded into a bit-serial square root (isqrt).
//
// Timing: z_valid pulses U_W + 1 clocks after u_valid. u_valid must not recur
// within that time (it comes once per codeword). Width: z has U_W bits.
module quad_converter #(
  parameter int unsigned U_W = 26
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  u_valid,
  input  logic signed [U_W-1:0] u0,
  input  logic signed [U_W-1:0] u1,
  output logic                  z_valid,
  output logic [U_W-1:0]        z
);

  logic signed [2*U_W-1:0] e0, e1;
  logic [2*U_W-1:0]        sq;
  logic                    busy;

  assign e0 = (2*U_W)'(u0);
  assign e1 = (2*U_W)'(u1);
  assign sq = $unsigned(e0 * e0 + e1 * e1);

  isqrt #(.OUT_W(U_W)) u_sqrt (
    .clk, .rst, .start(u_valid), .x(sq), .busy(busy), .done(z_valid), .root(z)
  );

  a_not_busy: assert property (@(posedge clk) disable iff (rst) u_valid |-> !busy);

endmodule
