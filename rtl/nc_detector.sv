// nc_detector: noncoherent radio signal detector on the BA2 responses.
//
// For every carrier period i the envelope of the last N periods,
//     z_i = sqrt(y0_i^2 + y1_i^2),
// is formed; it does not depend on the unknown carrier phase, and because the
// quadrature sums slide by one period, z_i follows the signal period by period
// without needing symbol timing. z is compared with the threshold input:
// detect = (z > threshold). The formula and its per-period index follow the
// source; the threshold comparison and its port are this design's choice. The
// period's tag comes out with z, so z at a symbol's last period (z_tag.sym_last)
// is that symbol's envelope.
//
// Timing: the sum of squares is registered, then a Y_W-stage pipelined square
// root: z_valid follows y_valid by Y_W + 1 clocks, one result per clock.
module nc_detector
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
  input  logic [Y_W-1:0]        threshold,
  output logic                  z_valid,
  output logic [Y_W-1:0]        z,
  output tag_t                  z_tag,
  output logic                  detect
);

  logic signed [2*Y_W-1:0] e0, e1;   // sign-extended responses
  logic [2*Y_W-1:0]        sq_q;
  logic                    sq_valid;
  tag_t                    sq_tag;

  assign e0 = (2*Y_W)'(y0);
  assign e1 = (2*Y_W)'(y1);

  // |y| <= 2^(Y_W-1), so y0^2 + y1^2 <= 2^(2*Y_W-1) fits in 2*Y_W bits.
  always_ff @(posedge clk) begin
    if (rst) begin
      sq_q     <= '0;
      sq_valid <= 1'b0;
      sq_tag   <= '0;
    end else begin
      sq_valid <= y_valid;
      if (y_valid) begin
        sq_q   <= $unsigned(e0 * e0 + e1 * e1);
        sq_tag <= y_tag;
      end
    end
  end

  isqrt_pipe #(.OUT_W(Y_W), .TAG_W($bits(tag_t))) u_sqrt (
    .clk, .rst, .in_valid(sq_valid), .x(sq_q), .in_tag(sq_tag),
    .out_valid(z_valid), .root(z), .out_tag(z_tag)
  );

  assign detect = z > threshold;

endmodule
