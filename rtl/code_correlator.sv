// code_correlator: computing unit CU of the coded-PSK demodulator.
//
// Correlates the K symbol responses of one quadrature channel with one binary
// code sequence a_i = +-1:
//     u = sum_{i=1}^{K} a_i * y_i,
// where y_i is the channel's sliding sum at the period that closes symbol i.
// It is a serial accumulate-and-dump correlator: the accumulator restarts at
// symbol 0 of a codeword (the tag's symbol number), adds +y or -y per symbol and
// presents u after symbol K-1. CODE bit i is chip i, 1 for a = +1.
//
// Timing: u_valid one clock after the closing y_valid of symbol K-1.
// Width: U_W = Y_W + ceil(log2(K+1)), enough for K full-scale responses.
module code_correlator
  import radio_pkg::*;
#(
  parameter int unsigned Y_W  = 20,
  parameter int unsigned K    = 63,
  parameter logic [K-1:0] CODE = K'(radio_pkg::code_word(K, 0)),
  localparam int unsigned U_W = Y_W + $clog2(K + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y,
  input  tag_t                  y_tag,
  output logic                  u_valid,
  output logic signed [U_W-1:0] u
);

  logic signed [U_W-1:0] acc_q, acc_n, term;
  logic                  chip;
  logic [MAX_K-1:0]      code_ext;   // CODE zero-extended to the tag's index range

  assign code_ext = MAX_K'(CODE);

  always_comb begin
    chip  = code_ext[y_tag.sym_idx];
    term  = chip ? U_W'(y) : -U_W'(y);
    acc_n = ((y_tag.sym_idx == '0) ? '0 : acc_q) + term;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q   <= '0;
      u_valid <= 1'b0;
      u       <= '0;
    end else begin
      u_valid <= 1'b0;
      if (y_valid && y_tag.sym_last) begin
        acc_q <= acc_n;
        if (y_tag.sym_idx == SYM_W'(K - 1)) begin
          u       <= acc_n;
          u_valid <= 1'b1;
        end
      end
    end
  end

endmodule
