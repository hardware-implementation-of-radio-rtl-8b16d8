// max_choice: maximum choice device (CDM) of the coded-PSK demodulator.
//
// Takes the M converter outputs z_1..z_M of one codeword and decides for the
// codeword with the largest response: s_idx is its number (0-based), z_max its
// value. Ties go to the lower number (this design's choice). The comparison is a
// linear scan in one combinational block, registered at the output.
//
// Timing: out_valid one clock after in_valid.
module max_choice #(
  parameter int unsigned M   = 2,
  parameter int unsigned Z_W = 26,
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [Z_W-1:0]     z [M],
  output logic               out_valid,
  output logic [IW-1:0]      s_idx,
  output logic [Z_W-1:0]     z_max
);

  logic [IW-1:0]  best_i;
  logic [Z_W-1:0] best_z;

  always_comb begin
    best_i = '0;
    best_z = z[0];
    for (int k = 1; k < M; k++)
      if (z[k] > best_z) begin
        best_i = IW'(k);
        best_z = z[k];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      s_idx     <= '0;
      z_max     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s_idx <= best_i;
        z_max <= best_z;
      end
    end
  end

endmodule
