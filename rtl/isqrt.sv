// isqrt: integer square root, one result bit per clock.
//
// Computes root = floor(sqrt(x)) for an unsigned x of 2*OUT_W bits with the
// digit-by-digit (restoring) method: a trial bit pair is subtracted from the
// running remainder and kept when the remainder stays non-negative. This is the
// square-root step of the quadratic converters, z_k = sqrt(u0k^2 + u1k^2). The
// source gives only the formula; the sequential bit-serial form is this design's
// choice, sized for the low codeword rate at which these values are needed.
//
// Interface: start (ignored while busy) loads x; done pulses for one clock with
// root valid OUT_W clocks later, and root holds until the next start.
module isqrt #(
  parameter int unsigned OUT_W = 21
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [2*OUT_W-1:0]   x,
  output logic                 busy,
  output logic                 done,
  output logic [OUT_W-1:0]     root
);

  localparam int unsigned XW = 2 * OUT_W;

  logic [XW-1:0]           rem_q, res_q, one_q;
  logic [$clog2(OUT_W+1)-1:0] cnt_q;
  logic [XW-1:0]           trial;

  assign trial = res_q + one_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rem_q <= '0;
      res_q <= '0;
      one_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      root  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem_q <= x;
          res_q <= '0;
          one_q <= XW'(1) << (XW - 2);
          cnt_q <= '0;
          busy  <= 1'b1;
        end
      end else begin
        if (rem_q >= trial) begin
          rem_q <= rem_q - trial;
          res_q <= (res_q >> 1) + one_q;
        end else begin
          res_q <= res_q >> 1;
        end
        one_q <= one_q >> 2;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == ($clog2(OUT_W+1))'(OUT_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= (rem_q >= trial) ? OUT_W'((res_q >> 1) + one_q) : OUT_W'(res_q >> 1);
        end
      end
    end
  end

endmodule
