// fast_sum_stage: stage k of the fast sliding-sum algorithm (SUM_k with MR_k).
//
// MR_k is a multibit shift register of DEPTH = 2^(k-1) cells that delays the
// stage input by DEPTH periods; SUM_k adds the delayed value to the current one.
// With x_(k-1)(i) the input of period i the stage gives
//     x_k(i) = x_(k-1)(i) + x_(k-1)(i - 2^(k-1)),
// so stage 1 sums two neighbouring period differences, stage 2 four, and after n
// stages the output is the sum over the last 2^n periods.
//
// Timing: the delay line advances and the sum is registered on in_valid (once per
// period); out_valid follows in_valid by one clock and the tag travels along.
// The output is one bit wider than the input.
module fast_sum_stage
  import radio_pkg::*;
#(
  parameter int unsigned IN_W  = 11,  // input width
  parameter int unsigned DEPTH = 1    // MR cells, 2^(k-1) for stage k
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  input  tag_t                   in_tag,
  output logic                   out_valid,
  output logic signed [IN_W:0]   out_data,
  output tag_t                   out_tag
);

  logic signed [IN_W-1:0] mr [DEPTH];   // mr[DEPTH-1] is the value DEPTH periods old

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < DEPTH; j++) mr[j] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mr[0] <= in_data;
        for (int j = 1; j < DEPTH; j++) mr[j] <= mr[j-1];
        out_data <= (IN_W+1)'(in_data) + (IN_W+1)'(mr[DEPTH-1]);
        out_tag  <= in_tag;
      end
    end
  end

endmodule
