// qpsk_demod: coherent four-position PSK demodulator on the BA2 responses.
//
// At the period that closes a symbol the two quadrature sums are proportional to
// the two components of the carrier phase psi (y0 ~ 2NS*sin(psi + pi/2) for the
// s1 - s3 pair, y1 ~ 2NS*sin(psi) for s2 - s4 with sampling at 0.25..1.0 T0).
// The decision takes their signs: dibit[1] = (y0 < 0), dibit[0] = (y1 < 0), so
// each phase quadrant gives its own dibit and neighbouring quadrants differ in
// one bit (Gray order). The bit mapping is this design's own choice; the source only says
// that BA2 supports a coherent four-position PSK demodulator.
//
// Timing: dibit_valid follows a closing y_valid by one clock.
module qpsk_demod
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
  output logic                  dibit_valid,
  output logic [1:0]            dibit,
  output logic [SYM_W-1:0]      sym_idx
);

  always_ff @(posedge clk) begin
    if (rst) begin
      dibit_valid <= 1'b0;
      dibit       <= '0;
      sym_idx     <= '0;
    end else begin
      dibit_valid <= y_valid && y_tag.sym_last;
      if (y_valid && y_tag.sym_last) begin
        dibit   <= {y0[Y_W-1], y1[Y_W-1]};
        sym_idx <= y_tag.sym_idx;
      end
    end
  end

endmodule
