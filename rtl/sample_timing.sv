// sample_timing: sample, period and symbol counter of the receiver.
//
// The ADC delivers P samples per carrier period (P = 2 for the basic coherent
// algorithm, 4 for the quadrature one), N periods make an information symbol and K
// symbols a codeword. This block numbers every accepted sample: its phase inside
// the period (0 = s1) and the tag of its period (last period of a symbol?, symbol
// number). The tag stays constant over the whole period, so a shift register that
// completes the period on any of its samples picks up the right one.
//
// sync is a one-clock pulse marking the first sample of a codeword: in that clock
// the counters read as zero, so a sample accepted in the same clock is s1 of
// period 0 of symbol 0. The counting and sync scheme is this design's own; the
// source only shows a 'sync' input on the decision device.
//
// Interface: adc_valid is the sampling strobe. phase and tag describe the sample
// presented in the same clock (combinational from the counters and sync); the
// counters advance on adc_valid.
module sample_timing
  import radio_pkg::*;
#(
  parameter int unsigned P = 4,    // samples per carrier period
  parameter int unsigned N = 512,  // periods per information symbol
  parameter int unsigned K = 63    // symbols per codeword
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sync,
  input  logic                       adc_valid,
  output logic [$clog2(P)-1:0]       phase,
  output tag_t                       tag
);

  localparam int PHW = $clog2(P);
  localparam int NW  = $clog2(N);

  logic [PHW-1:0]   phase_q;
  logic [NW-1:0]    period_q, period_c;
  logic [SYM_W-1:0] sym_q, sym_c;

  always_comb begin
    phase    = sync ? '0 : phase_q;
    period_c = sync ? '0 : period_q;
    sym_c    = sync ? '0 : sym_q;
    tag.sym_last = (period_c == NW'(N - 1));
    tag.sym_idx  = sym_c;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q  <= '0;
      period_q <= '0;
      sym_q    <= '0;
    end else if (sync || adc_valid) begin
      phase_q  <= phase;
      period_q <= period_c;
      sym_q    <= sym_c;
      if (adc_valid) begin
        if (phase == PHW'(P - 1)) begin
          phase_q <= '0;
          if (period_c == NW'(N - 1)) begin
            period_q <= '0;
            sym_q    <= (sym_c == SYM_W'(K - 1)) ? '0 : sym_c + 1'b1;
          end else begin
            period_q <= period_c + 1'b1;
          end
        end else begin
          phase_q <= phase + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (P >= 2 && (P & (P - 1)) == 0) else $error("P must be a power of two >= 2");
    assert (N >= 2 && (N & (N - 1)) == 0) else $error("N must be a power of two >= 2");
    assert (K >= 1 && K <= MAX_K) else $error("K out of range");
  end

endmodule
