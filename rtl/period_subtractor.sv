// period_subtractor: the subtractor SUB (SUB0 / SUB1 in the quadrature form).
//
// Once per carrier period it forms the difference of two samples of that period,
// a - b (s1 - s2 in the basic coherent algorithm, s1 - s3 and s2 - s4 in the
// quadrature one). This removes any DC offset of the ADC and doubles the wanted
// component. The result is one bit wider than the samples, so it never overflows.
//
// Timing: registered, one clock from in_valid to out_valid; the tag is delayed
// with the data.
module period_subtractor
  import radio_pkg::*;
#(
  parameter int unsigned W = 10   // sample width
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  input  tag_t                  in_tag,
  output logic                  out_valid,
  output logic signed [W:0]     d,
  output tag_t                  out_tag
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      d         <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        d       <= (W+1)'(a) - (W+1)'(b);
        out_tag <= in_tag;
      end
    end
  end

endmodule
