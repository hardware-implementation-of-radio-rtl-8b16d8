// radio_top: universal detector / demodulator for several radio signal formats.
//
// One ADC sample stream, four samples per carrier period (0.25, 0.5, 0.75 and
// 1.0 T0 under coherent sampling), is processed by all algorithms at once:
//   - BA1 takes the samples at 0.25 T0 and 0.75 T0 (s1 and s3 of the four) as its
//     s1 and s2 and drives the coherent binary PSK demodulator;
//   - one BA2 produces the quadrature responses y0, y1, which drive in parallel
//     the coherent four-position PSK demodulator, the noncoherent detector, the
//     DPSK demodulator and the demodulator of "integrally" coded binary PSK.
// Each output family is valid only for the signal format it is meant for; the
// device does not decide which format is present.
//
// Sharing one sampling grid and one BA2 among the decision blocks is this
// design's reading of the "universal on-chip device" of the source. The ADC and
// the clock pulse generator that places the sampling instants are outside: their
// outputs are adc_data and adc_valid.
//
// Interface: sync marks the first sample of a codeword (see sample_timing).
// Timing: one sample per clock at most; every decision output pulses its *_valid
// for one clock. The detector reports every carrier period (det_tag tells which
// period), the other decisions once per symbol or codeword.
module radio_top
  import radio_pkg::*;
#(
  parameter int unsigned ADC_W = 10,   // ADC resolution
  parameter int unsigned N     = 512,  // carrier periods per information symbol
  parameter int unsigned K     = 63,   // symbols per codeword (code length)
  parameter int unsigned M     = 2,    // number of codewords
  parameter code_family_e CODE_FAMILY = CODE_MSEQ,   // code table of the coded-PSK demodulator
  localparam int unsigned Y_W  = ADC_W + 1 + $clog2(N),
  localparam int unsigned U_W  = Y_W + $clog2(K + 1),
  localparam int unsigned IW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sync,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic [Y_W-1:0]          det_threshold,
  // coherent binary PSK (BA1)
  output logic                    bpsk_valid,
  output logic                    bpsk_bit,
  output logic [SYM_W-1:0]        bpsk_sym,
  // coherent four-position PSK (BA2)
  output logic                    qpsk_valid,
  output logic [1:0]              qpsk_dibit,
  output logic [SYM_W-1:0]        qpsk_sym,
  // noncoherent detector (BA2)
  output logic                    det_valid,
  output logic [Y_W-1:0]          det_z,
  output tag_t                    det_tag,     // period of det_z; sym_last marks a symbol's envelope
  output logic                    det_detect,
  // DPSK (BA2)
  output logic                    dpsk_valid,
  output logic                    dpsk_bit,
  output logic [SYM_W-1:0]        dpsk_sym,
  // "integrally" coded PSK (BA2)
  output logic                    code_valid,
  output logic [IW-1:0]           code_idx,
  output logic [U_W-1:0]          code_z,
  output logic [U_W-1:0]          code_z_all [M]   // response to every codeword
);

  logic [1:0]            phase;
  tag_t                  tag;
  logic                  y1v, y2v;
  logic signed [Y_W-1:0] y, y0, y1;
  tag_t                  y1t, y2t;

  sample_timing #(.P(4), .N(N), .K(K)) u_timing (
    .clk, .rst, .sync, .adc_valid, .phase, .tag
  );

  // BA1 sees every other sample: s1 and s3 of the four-sample grid.
  ba1 #(.ADC_W(ADC_W), .N(N)) u_ba1 (
    .clk, .rst, .adc_valid(adc_valid && !phase[0]), .adc_data, .phase(phase[1]), .tag,
    .y_valid(y1v), .y(y), .y_tag(y1t)
  );

  ba2 #(.ADC_W(ADC_W), .N(N)) u_ba2 (
    .clk, .rst, .adc_valid, .adc_data, .phase, .tag,
    .y_valid(y2v), .y0(y0), .y1(y1), .y_tag(y2t)
  );

  bpsk_demod #(.Y_W(Y_W)) u_bpsk (
    .clk, .rst, .y_valid(y1v), .y(y), .y_tag(y1t),
    .bit_valid(bpsk_valid), .bit_out(bpsk_bit), .sym_idx(bpsk_sym)
  );

  qpsk_demod #(.Y_W(Y_W)) u_qpsk (
    .clk, .rst, .y_valid(y2v), .y0, .y1, .y_tag(y2t),
    .dibit_valid(qpsk_valid), .dibit(qpsk_dibit), .sym_idx(qpsk_sym)
  );

  nc_detector #(.Y_W(Y_W)) u_det (
    .clk, .rst, .y_valid(y2v), .y0, .y1, .y_tag(y2t), .threshold(det_threshold),
    .z_valid(det_valid), .z(det_z), .z_tag(det_tag), .detect(det_detect)
  );

  dpsk_demod #(.Y_W(Y_W)) u_dpsk (
    .clk, .rst, .y_valid(y2v), .y0, .y1, .y_tag(y2t),
    .bit_valid(dpsk_valid), .bit_out(dpsk_bit), .sym_idx(dpsk_sym)
  );

  icpsk_demod #(.Y_W(Y_W), .K(K), .M(M), .CODE_FAMILY(CODE_FAMILY)) u_icpsk (
    .clk, .rst, .y_valid(y2v), .y0, .y1, .y_tag(y2t),
    .word_valid(code_valid), .s_idx(code_idx), .z_max(code_z), .z(code_z_all)
  );

endmodule
