// icpsk_demod: noncoherent demodulator of "integrally" coded binary PSK signals.
//
// A codeword is K binary PSK symbols whose phases follow one of M code sequences.
// The quadrature responses y0, y1 of the BA2 channels (QPC0, QPC1) at each
// symbol end are correlated with every code sequence, separately per channel:
//     u0k = sum_i a_ik * y0_i,   u1k = sum_i a_ik * y1_i      (CU_0k, CU_1k)
// then each pair is turned into a phase-independent response
//     z_k = sqrt(u0k^2 + u1k^2)                               (QT_k)
// and the maximum choice device picks the codeword number s_I with the largest
// z_k. The structure follows the source. The code table is computed at
// elaboration from CODE_FAMILY (radio_pkg): M-sequences by default, or Walsh
// codes (K a power of two) or the (7,4) Hamming code (K = 7, M up to 16). The
// choice of sequences within a family and the frame timing by tags are this
// design's own. A noncoherent receiver cannot tell a codeword from its
// complement (both give the same z), so a code that holds complementary pairs,
// like the Hamming code with its all-ones word, decides between such pairs by
// the lower number.
//
// Interface: y_valid / y0 / y1 / y_tag from ba2. word_valid pulses once per
// codeword with s_idx (0-based codeword number) and z_max.
// Timing: U_W + 3 clocks after the closing y_valid of the codeword's last symbol
// (1 for CU, U_W + 1 for QT, 1 for the decision).
module icpsk_demod
  import radio_pkg::*;
#(
  parameter int unsigned Y_W = 20,
  parameter int unsigned K   = 63,
  parameter int unsigned M   = 2,
  parameter code_family_e CODE_FAMILY = CODE_MSEQ,
  localparam int unsigned U_W = Y_W + $clog2(K + 1),
  localparam int unsigned IW  = (M > 1) ? $clog2(M) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  y_valid,
  input  logic signed [Y_W-1:0] y0,
  input  logic signed [Y_W-1:0] y1,
  input  tag_t                  y_tag,
  output logic                  word_valid,
  output logic [IW-1:0]         s_idx,
  output logic [U_W-1:0]        z_max,
  output logic [U_W-1:0]        z [M]
);

  logic                  u_valid [M];
  logic                  u1_valid [M];
  logic signed [U_W-1:0] u0 [M];
  logic signed [U_W-1:0] u1 [M];
  logic                  z_valid [M];

  for (genvar k = 0; k < M; k++) begin : g_code
    localparam logic [K-1:0] CODE = K'(family_word(CODE_FAMILY, K, k));

    code_correlator #(.Y_W(Y_W), .K(K), .CODE(CODE)) u_cu0 (
      .clk, .rst, .y_valid, .y(y0), .y_tag, .u_valid(u_valid[k]), .u(u0[k])
    );
    code_correlator #(.Y_W(Y_W), .K(K), .CODE(CODE)) u_cu1 (
      .clk, .rst, .y_valid, .y(y1), .y_tag, .u_valid(u1_valid[k]), .u(u1[k])
    );
    quad_converter #(.U_W(U_W)) u_qt (
      .clk, .rst, .u_valid(u_valid[k]), .u0(u0[k]), .u1(u1[k]),
      .z_valid(z_valid[k]), .z(z[k])
    );
  end

  max_choice #(.M(M), .Z_W(U_W)) u_cdm (
    .clk, .rst, .in_valid(z_valid[0]), .z(z), .out_valid(word_valid), .s_idx(s_idx), .z_max(z_max)
  );

  initial begin
    if (CODE_FAMILY == CODE_WALSH)
      assert ((K & (K - 1)) == 0 && M <= K) else $error("Walsh codes need K a power of two and M <= K");
    if (CODE_FAMILY == CODE_HAMMING74)
      assert (K == 7 && M <= 16) else $error("the Hamming (7,4) code needs K = 7 and M <= 16");
  end

  // All CUs and QTs run in lock step.
  for (genvar k = 0; k < M; k++) begin : g_chk
    a_lockstep: assert property (@(posedge clk) disable iff (rst)
      u_valid[k] == u1_valid[k] && z_valid[k] == z_valid[0]);
  end

endmodule
