// bpsk_demod: coherent binary PSK demodulator on the BA1 response.
//
// With coherent sampling the BA1 response at the end of a symbol is +N*2S for
// carrier phase 0 and -N*2S for phase pi. The decision is the sign of y taken at
// the period that closes the symbol: bit = 1 when y < 0 (phase pi), 0 otherwise.
// The mapping of phases to bit values is this design's choice; the source only
// says that BA1 supports a coherent binary PSK demodulator.
//
// Timing: bit_valid is raised one clock after a y_valid whose tag closes a
// symbol; sym_idx is that symbol's number in the codeword frame.
module bpsk_demod
  import radio_pkg::*;
#(
  parameter int unsigned Y_W = 20
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y,
  input  tag_t                  y_tag,
  output logic                  bit_valid,
  output logic                  bit_out,
  output logic [SYM_W-1:0]      sym_idx
);

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      sym_idx   <= '0;
    end else begin
      bit_valid <= y_valid && y_tag.sym_last;
      if (y_valid && y_tag.sym_last) begin
        bit_out <= y[Y_W-1];
        sym_idx <= y_tag.sym_idx;
      end
    end
  end

endmodule
