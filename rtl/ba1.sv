// ba1: basic coherent processing algorithm BA1.
//
// Two samples per carrier period, taken at the maximum and the minimum of a
// coherently sampled carrier (0.25 T0 and 0.75 T0), are held in MS2; SUB forms
// s1 - s2 once per period and the fast sliding sum adds the last N = 2^n
// differences:
//     y(i) = sum_{k=0}^{N-1} (s1(i-k) - s2(i-k)).
// y is produced every period; at the period that closes a symbol (tag.sym_last)
// it is the symbol's coherent response.
//
// Interface: adc_valid/adc_data is the sample stream, phase/tag come from
// sample_timing (P = 2). Timing: y_valid follows the clock that accepted s2 by
// n + 2 clocks (one for MS2, one for SUB, one per stage). Widths: y has
// ADC_W + 1 + n bits, enough for any input without overflow.
module ba1
  import radio_pkg::*;
#(
  parameter int unsigned ADC_W = 10,
  parameter int unsigned N     = 512,
  localparam int unsigned Y_W  = ADC_W + 1 + $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic                   phase,
  input  tag_t                   tag,
  output logic                   y_valid,
  output logic signed [Y_W-1:0]  y,
  output tag_t                   y_tag
);

  logic                    p_valid;
  logic signed [ADC_W-1:0] s [2];
  tag_t                    p_tag;
  logic                    d_valid;
  logic signed [ADC_W:0]   d;
  tag_t                    d_tag;

  ms_shift_reg #(.P(2), .W(ADC_W)) u_ms2 (
    .clk, .rst, .in_valid(adc_valid), .in_data(adc_data), .in_phase(phase), .in_tag(tag),
    .out_valid(p_valid), .s(s), .out_tag(p_tag)
  );

  period_subtractor #(.W(ADC_W)) u_sub (
    .clk, .rst, .in_valid(p_valid), .a(s[0]), .b(s[1]), .in_tag(p_tag),
    .out_valid(d_valid), .d(d), .out_tag(d_tag)
  );

  fast_sum #(.IN_W(ADC_W + 1), .N(N)) u_sum (
    .clk, .rst, .in_valid(d_valid), .in_data(d), .in_tag(d_tag),
    .out_valid(y_valid), .out_data(y), .out_tag(y_tag)
  );

endmodule
