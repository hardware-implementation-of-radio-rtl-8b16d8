// fast_sum: the fast accumulation algorithm over N = 2^n periods, used as the
// accumulator of the basic coherent algorithm and as each quadrature processing
// channel QPC0 / QPC1.
//
// Instead of adding N values per period, n = log2 N stages (fast_sum_stage) are
// chained; stage k holds 2^(k-1) cells in its delay line. Every period the output
// is the sliding sum of the last N inputs:
//     y(i) = sum_{j=0}^{N-1} x(i - j),
// at the cost of n additions per period. Total delay-line storage is N-1 cells.
//
// Timing: out_valid follows in_valid by n clocks; one input per clock can be
// accepted. Each stage widens the value by one bit, so OUT_W = IN_W + n and the
// sum cannot overflow. The tag is delayed with the data.
module fast_sum
  import radio_pkg::*;
#(
  parameter int unsigned IN_W = 11,   // width of the period differences
  parameter int unsigned N    = 512,  // periods per symbol, a power of two
  localparam int unsigned NS    = $clog2(N),
  localparam int unsigned OUT_W = IN_W + NS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  input  tag_t                    in_tag,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output tag_t                    out_tag
);

  // Stage k's value, sign-extended to OUT_W; index 0 is the input.
  logic signed [OUT_W-1:0] x     [NS+1];
  logic                    v     [NS+1];
  tag_t                    t     [NS+1];

  assign x[0] = OUT_W'(in_data);
  assign v[0] = in_valid;
  assign t[0] = in_tag;

  for (genvar k = 1; k <= NS; k++) begin : g_stage
    logic signed [IN_W+k-1:0] o;
    fast_sum_stage #(.IN_W(IN_W + k - 1), .DEPTH(2 ** (k - 1))) u_stage (
      .clk      (clk),
      .rst      (rst),
      .in_valid (v[k-1]),
      .in_data  (x[k-1][IN_W+k-2:0]),
      .in_tag   (t[k-1]),
      .out_valid(v[k]),
      .out_data (o),
      .out_tag  (t[k])
    );
    assign x[k] = OUT_W'(o);
  end

  assign out_valid = v[NS];
  assign out_data  = x[NS];
  assign out_tag   = t[NS];

  initial assert (N >= 2 && (N & (N - 1)) == 0) else $error("N must be a power of two >= 2");

endmodule
