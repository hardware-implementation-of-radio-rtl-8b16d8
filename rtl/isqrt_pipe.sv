// isqrt_pipe: pipelined integer square root, one result per clock.
//
// Computes root = floor(sqrt(x)) for an unsigned x of 2*OUT_W bits by the same
// digit-by-digit method as isqrt, unrolled: stage j decides result bit
// OUT_W-1-j by trying to subtract (res + 4^(OUT_W-1-j)) from the remainder. A
// sideband tag travels with each operand. It serves the noncoherent detector,
// which needs an envelope for every carrier period; the pipelined form is this
// design's choice.
//
// Timing: out_valid / root / out_tag follow in_valid by OUT_W clocks; a new
// operand may enter every clock.
module isqrt_pipe #(
  parameter int unsigned OUT_W = 20,
  parameter int unsigned TAG_W = 9
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [2*OUT_W-1:0] x,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [OUT_W-1:0]   root,
  output logic [TAG_W-1:0]   out_tag
);

  localparam int unsigned XW = 2 * OUT_W;

  logic [XW-1:0]    rem [OUT_W+1];
  logic [XW-1:0]    res [OUT_W+1];
  logic             v   [OUT_W+1];
  logic [TAG_W-1:0] t   [OUT_W+1];

  assign rem[0] = x;
  assign res[0] = '0;
  assign v[0]   = in_valid;
  assign t[0]   = in_tag;

  for (genvar j = 0; j < OUT_W; j++) begin : g_stage
    localparam logic [XW-1:0] ONE = XW'(1) << (XW - 2 - 2 * j);
    logic [XW-1:0] trial;
    assign trial = res[j] + ONE;
    always_ff @(posedge clk) begin
      if (rst) begin
        rem[j+1] <= '0;
        res[j+1] <= '0;
        v[j+1]   <= 1'b0;
        t[j+1]   <= '0;
      end else begin
        v[j+1] <= v[j];
        t[j+1] <= t[j];
        if (rem[j] >= trial) begin
          rem[j+1] <= rem[j] - trial;
          res[j+1] <= (res[j] >> 1) + ONE;
        end else begin
          rem[j+1] <= rem[j];
          res[j+1] <= res[j] >> 1;
        end
      end
    end
  end

  assign out_valid = v[OUT_W];
  assign root      = res[OUT_W][OUT_W-1:0];
  assign out_tag   = t[OUT_W];

endmodule
