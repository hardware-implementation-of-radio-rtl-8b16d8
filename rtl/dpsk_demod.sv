// dpsk_demod: noncoherent differential PSK demodulator on the BA2 responses.
//
// The information is in the phase change between adjacent symbols. With the
// quadrature responses (y0, y1) of the current symbol and (p0, p1) of the
// previous one, the real part of the product of the current envelope and the
// conjugate of the previous one,
//     d = y0*p0 + y1*p1 = |y||p| cos(delta psi),
// is negative for a phase change of pi: bit = (d < 0). The source says only that
// comparing adjacent symbol responses gives a DPSK demodulator; this dot-product
// comparison and the bit mapping are this design's choice.
//
// Timing: bit_valid one clock after a closing y_valid, from the second symbol
// after reset on (the first has no reference).
module dpsk_demod
  import radio_pkg::*;
#(
  parameter int unsigned Y_W = 20
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y0,
  input  logic signed [Y_W-1:0] y1,
  input  tag_t                  y_tag,
  output logic                  bit_valid,
  output logic                  bit_out,
  output logic [SYM_W-1:0]      sym_idx
);

  logic signed [Y_W-1:0]   p0, p1;
  logic                    have_prev;
  logic signed [2*Y_W:0]   d;
  logic signed [2*Y_W:0]   e0, e1, f0, f1;   // sign-extended operands

  assign e0 = (2*Y_W+1)'(y0);
  assign e1 = (2*Y_W+1)'(y1);
  assign f0 = (2*Y_W+1)'(p0);
  assign f1 = (2*Y_W+1)'(p1);
  assign d  = e0 * f0 + e1 * f1;

  always_ff @(posedge clk) begin
    if (rst) begin
      p0        <= '0;
      p1        <= '0;
      have_prev <= 1'b0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      sym_idx   <= '0;
    end else begin
      bit_valid <= y_valid && y_tag.sym_last && have_prev;
      if (y_valid && y_tag.sym_last) begin
        p0        <= y0;
        p1        <= y1;
        have_prev <= 1'b1;
        bit_out   <= d[2*Y_W];
        sym_idx   <= y_tag.sym_idx;
      end
    end
  end

endmodule
