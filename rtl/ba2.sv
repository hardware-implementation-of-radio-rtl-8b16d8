// ba2: basic quadrature processing algorithm BA2.
//
// Four samples per carrier period (at 0.25, 0.5, 0.75 and 1.0 T0 in coherent
// sampling) are held in MS4. SUB0 forms s1 - s3 and SUB1 forms s2 - s4 once per
// period; the quadrature processing channels QPC0 and QPC1 (fast sliding sums)
// add the last N = 2^n differences:
//     y0(i) = sum_{k=0}^{N-1} (s1 - s3)(i-k),   y1(i) = sum_{k=0}^{N-1} (s2 - s4)(i-k).
// The pair (y0, y1) is the complex envelope of the last N periods, so its
// magnitude does not depend on the carrier phase; it feeds the coherent and the
// noncoherent decision blocks.
//
// Interface: adc_valid/adc_data is the sample stream, phase/tag come from
// sample_timing (P = 4). Timing: y_valid follows the clock that accepted s4 by
// n + 2 clocks. Widths: ADC_W + 1 + n bits per channel, no overflow possible.
module ba2
  import radio_pkg::*;
#(
  parameter int unsigned ADC_W = 10,
  parameter int unsigned N     = 512,
  localparam int unsigned Y_W  = ADC_W + 1 + $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic [1:0]              phase,
  input  tag_t                    tag,
  output logic                    y_valid,
  output logic signed [Y_W-1:0]   y0,
  output logic signed [Y_W-1:0]   y1,
  output tag_t                    y_tag
);

  logic                    p_valid;
  logic signed [ADC_W-1:0] s [4];
  tag_t                    p_tag;
  logic                    d0_valid, d1_valid;
  logic signed [ADC_W:0]   x0, x1;
  tag_t                    d0_tag, d1_tag;
  logic                    y1_valid;
  tag_t                    y1_tag;

  ms_shift_reg #(.P(4), .W(ADC_W)) u_ms4 (
    .clk, .rst, .in_valid(adc_valid), .in_data(adc_data), .in_phase(phase), .in_tag(tag),
    .out_valid(p_valid), .s(s), .out_tag(p_tag)
  );

  period_subtractor #(.W(ADC_W)) u_sub0 (
    .clk, .rst, .in_valid(p_valid), .a(s[0]), .b(s[2]), .in_tag(p_tag),
    .out_valid(d0_valid), .d(x0), .out_tag(d0_tag)
  );

  period_subtractor #(.W(ADC_W)) u_sub1 (
    .clk, .rst, .in_valid(p_valid), .a(s[1]), .b(s[3]), .in_tag(p_tag),
    .out_valid(d1_valid), .d(x1), .out_tag(d1_tag)
  );

  fast_sum #(.IN_W(ADC_W + 1), .N(N)) u_qpc0 (
    .clk, .rst, .in_valid(d0_valid), .in_data(x0), .in_tag(d0_tag),
    .out_valid(y_valid), .out_data(y0), .out_tag(y_tag)
  );

  fast_sum #(.IN_W(ADC_W + 1), .N(N)) u_qpc1 (
    .clk, .rst, .in_valid(d1_valid), .in_data(x1), .in_tag(d1_tag),
    .out_valid(y1_valid), .out_data(y1), .out_tag(y1_tag)
  );

  // Both channels run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (rst) y_valid == y1_valid && (!y_valid || y_tag == y1_tag));

endmodule
