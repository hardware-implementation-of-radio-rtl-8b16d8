// ms_shift_reg: the multibit sample shift register MS2 / MS4.
//
// The ADC samples of one carrier period are shifted into a P-cell register (P = 2
// gives MS2 of the basic coherent algorithm, P = 4 gives MS4 of the quadrature
// one). When the sample with phase P-1 has been shifted in, the register holds
// s1..sP of that period and out_valid is raised for one clock together with the
// period's tag. s[0] is s1, the oldest sample.
//
// Timing: a sample accepted in clock t that completes a period shows on s[] with
// out_valid in clock t+1; one sample per clock may be accepted without a pause.
// The shift register follows the source; the valid/tag handshake is this
// design's own.
module ms_shift_reg
  import radio_pkg::*;
#(
  parameter int unsigned P = 4,   // samples per period
  parameter int unsigned W = 10   // ADC sample width (two's complement)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [W-1:0]    in_data,
  input  logic [$clog2(P)-1:0]   in_phase,
  input  tag_t                   in_tag,
  output logic                   out_valid,
  output logic signed [W-1:0]    s [P],
  output tag_t                   out_tag
);

  logic signed [W-1:0] sr [P];   // sr[0] is the newest sample

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < P; j++) sr[j] <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && (in_phase == $clog2(P)'(P - 1));
      if (in_valid) begin
        sr[0] <= in_data;
        for (int j = 1; j < P; j++) sr[j] <= sr[j-1];
        if (in_phase == $clog2(P)'(P - 1)) out_tag <= in_tag;
      end
    end
  end

  always_comb
    for (int j = 0; j < P; j++) s[j] = sr[P-1-j];

endmodule
