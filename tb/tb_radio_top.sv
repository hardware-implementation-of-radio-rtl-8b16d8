// tb_radio_top: end-to-end test of radio_top at reduced size (N = 8, K = 7, M = 2).
//
// A sampled carrier, four samples per period at 0.25, 0.5, 0.75 and 1.0 T0 with
// a DC offset and noise, is generated codeword by codeword; sync marks the
// first sample of each codeword. Frame types: "integrally" coded PSK (one of M
// codes at a random carrier phase), coherent binary PSK (phase 0 or pi per
// symbol), coherent four-position PSK (phases pi/4 + q*pi/2) and noise only.
// One codeword is cut short mid-period by an early sync.
//
// Every output is compared with values computed here from the generated
// samples: per symbol Y0 = sum (s1 - s3), Y1 = sum (s2 - s4) over its N periods,
// BPSK bit = Y0 < 0, QPSK dibit = {Y0 < 0, Y1 < 0}, detector z = isqrt(W0^2 + W1^2)
// for every period with W0, W1 the same sums over the last N periods,
// DPSK bit = (Y0*P0 + Y1*P1 < 0) against the previous symbol, and per codeword
// z_k = isqrt(u0k^2 + u1k^2) with u = sum a_ik Y. The transmitted data must also
// come back: the coded frame's code number, the BPSK bits, the QPSK dibits and
// the DPSK differences. Each mechanism (sync restart, sample gaps, back-to-back
// samples, both detector outcomes, both DPSK values, every codeword decision)
// is counted, and one that never happened is a failure.
module tb_radio_top;
  import radio_pkg::*;
  localparam int ADC_W = 10, N = 8, K = 7, M = 2, FAM = 0;
  localparam int Y_W = ADC_W + 1 + $clog2(N);
  localparam int U_W = Y_W + $clog2(K + 1);
  localparam int IW  = (M > 1) ? $clog2(M) : 1;
  localparam int THR = 2 * N * 60;    // detector threshold: 60 LSB of carrier amplitude
  localparam int NFRAMES = 12;

  logic clk = 1'b0, rst = 1'b1, sync = 1'b0, adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic [Y_W-1:0] det_threshold = Y_W'(THR);
  logic bpsk_valid, bpsk_bit, qpsk_valid, det_valid, det_detect, dpsk_valid, dpsk_bit, code_valid;
  logic [SYM_W-1:0] bpsk_sym, qpsk_sym, dpsk_sym;
  logic [1:0] qpsk_dibit;
  logic [Y_W-1:0] det_z;
  tag_t det_tag;
  logic [IW-1:0] code_idx;
  logic [U_W-1:0] code_z;
  logic [U_W-1:0] code_z_all [M];

  always #5 clk = ~clk;

  radio_top #(.ADC_W(ADC_W), .N(N), .K(K), .M(M)) dut (
    .clk, .rst, .sync, .adc_valid, .adc_data, .det_threshold,
    .bpsk_valid, .bpsk_bit, .bpsk_sym, .qpsk_valid, .qpsk_dibit, .qpsk_sym,
    .det_valid, .det_z, .det_tag, .det_detect, .dpsk_valid, .dpsk_bit, .dpsk_sym,
    .code_valid, .code_idx, .code_z, .code_z_all
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // ---- code table, built here independently. M-sequences: Fibonacci LFSR of a
  // primitive polynomial, its time reversal for odd codes, cyclic shifts by
  // code/2. Walsh: chip i of code k is +1 when i & k has even parity. Hamming
  // (7,4): data bits of k, then parities d0^d1^d3, d0^d2^d3, d1^d2^d3. ----
  bit chip_tab [M][K];
  initial begin
    int m, taps, seq [K];
    m = $clog2(K + 1);
    // feedback tap j of x^m + ... : a[t] = a[t-m] ^ a[t-m+j]
    case (m)
      3: taps = 1; 4: taps = 1; 5: taps = 2; 6: taps = 1; 7: taps = 1; default: taps = 1;
    endcase
    for (int t = 0; t < K; t++)
      seq[t] = (t < m) ? 1 : (seq[t-m] ^ seq[t-m+taps]);
    for (int k = 0; k < M; k++)
      for (int i = 0; i < K; i++)
        if (FAM == 1) chip_tab[k][i] = !($countones(i & k) % 2);
        else if (FAM == 2) begin
          bit [3:0] d;
          d = 4'(k);
          chip_tab[k][i] = (i < 4) ? d[i] : (i == 4) ? (d[0] ^ d[1] ^ d[3]) :
                           (i == 5) ? (d[0] ^ d[2] ^ d[3]) : (d[1] ^ d[2] ^ d[3]);
        end
        else chip_tab[k][i] = (k % 2 == 0) ? bit'(seq[(i + k / 2) % K]) : bit'(seq[(2 * K - 1 - i - k / 2) % K]);
  end

  function automatic longint isq(longint s);
    longint r;
    r = longint'($floor($sqrt(real'(s))));
    while (r * r > s) r--;
    while ((r + 1) * (r + 1) <= s) r++;
    return r;
  endfunction

  // ---- expectations, one entry per completed symbol / codeword ----
  typedef struct { longint y0, y1; int sym; bit has_prev; longint p0, p1; int sent_bit; int sent_dibit; int sent_diff; } sym_exp_t;
  typedef struct { longint z [M]; int sent; } word_exp_t;
  typedef struct { longint z; bit last; int sym; } per_exp_t;
  per_exp_t zq [$];
  sym_exp_t bq [$];
  sym_exp_t qq [$];
  sym_exp_t dq [$];
  word_exp_t wq [$];

  int n_bpsk = 0, n_qpsk = 0, n_det = 0, n_det1 = 0, n_det0 = 0, n_dpsk = 0, n_dpsk1 = 0, n_dpsk0 = 0;
  int n_word [M];
  int n_sync_restart = 0, n_gap = 0, n_b2b = 0;
  int n_bpsk_data = 0, n_qpsk_data = 0, n_dpsk_data = 0;

  always @(negedge clk) if (!rst) begin
    if (bpsk_valid) begin
      sym_exp_t e;
      if (bq.size() == 0) check(0, "unexpected BPSK bit");
      else begin
        e = bq.pop_front();
        check(bpsk_bit == (e.y0 < 0) && int'(bpsk_sym) == e.sym, $sformatf("BPSK bit %0d sym %0d", bpsk_bit, bpsk_sym));
        if (e.sent_bit >= 0) begin check(int'(bpsk_bit) == e.sent_bit, "BPSK data"); n_bpsk_data++; end
        n_bpsk++;
      end
    end
    if (qpsk_valid) begin
      sym_exp_t e;
      if (qq.size() == 0) check(0, "unexpected QPSK dibit");
      else begin
        e = qq.pop_front();
        check(qpsk_dibit == {e.y0 < 0, e.y1 < 0} && int'(qpsk_sym) == e.sym, "QPSK dibit");
        if (e.sent_dibit >= 0) begin check(int'(qpsk_dibit) == e.sent_dibit, "QPSK data"); n_qpsk_data++; end
        n_qpsk++;
      end
    end
    if (det_valid) begin
      per_exp_t e;
      if (zq.size() == 0) check(0, "unexpected detector output");
      else begin
        e = zq.pop_front();
        check(longint'(det_z) == e.z, $sformatf("detector z=%0d exp %0d", det_z, e.z));
        check(det_tag.sym_last == e.last && int'(det_tag.sym_idx) == e.sym, "detector period tag");
        check(det_detect == (e.z > longint'(THR)), "detector decision");
        if (det_detect) n_det1++; else n_det0++;
        n_det++;
      end
    end
    if (dpsk_valid) begin
      sym_exp_t e;
      if (dq.size() == 0) check(0, "unexpected DPSK bit");
      else begin
        e = dq.pop_front();
        check(e.has_prev, "DPSK bit without a previous symbol");
        check(dpsk_bit == (e.y0 * e.p0 + e.y1 * e.p1 < 0) && int'(dpsk_sym) == e.sym, "DPSK bit");
        if (e.sent_diff >= 0) begin check(int'(dpsk_bit) == e.sent_diff, "DPSK data"); n_dpsk_data++; end
        if (dpsk_bit) n_dpsk1++; else n_dpsk0++;
        n_dpsk++;
      end
    end
    if (code_valid) begin
      word_exp_t e;
      if (wq.size() == 0) check(0, "unexpected codeword decision");
      else begin
        int best;
        e = wq.pop_front();
        best = 0;
        for (int k = 0; k < M; k++) begin
          check(longint'(code_z_all[k]) == e.z[k], $sformatf("z%0d=%0d exp %0d", k, code_z_all[k], e.z[k]));
          if (e.z[k] > e.z[best]) best = k;
        end
        check(int'(code_idx) == best && longint'(code_z) == e.z[best], "codeword decision");
        if (e.sent >= 0) begin
          // the transmitted codeword must reach the maximum response; a code with
          // complementary pairs (Hamming) ties with the complement, and the lower
          // number wins the tie
          int want;
          want = (FAM == 2 && ((~e.sent) & 15) < e.sent) ? ((~e.sent) & 15) : e.sent;
          check(code_z_all[e.sent] == code_z, "transmitted codeword reaches the maximum");
          check(int'(code_idx) == want, $sformatf("decided %0d sent %0d", code_idx, e.sent));
        end
        n_word[code_idx]++;
      end
    end
  end

  // ---- stimulus ----
  // sliding window over the last N completed periods, across symbol and
  // codeword boundaries, for the per-period detector output
  longint wh0 [$];
  longint wh1 [$];
  longint ws0 = 0, ws1 = 0;
  initial for (int j = 0; j < N; j++) begin wh0.push_back(0); wh1.push_back(0); end

  task automatic period_done(input longint d0, input longint d1, input bit last, input int sym);
    per_exp_t e;
    ws0 += d0 - wh0.pop_front(); wh0.push_back(d0);
    ws1 += d1 - wh1.pop_front(); wh1.push_back(d1);
    e.z = isq(ws0 * ws0 + ws1 * ws1); e.last = last; e.sym = sym;
    zq.push_back(e);
  endtask

  longint py0 = 0, py1 = 0;
  bit have_prev = 0;
  int prev_sent = -1;

  task automatic sample(input int v, input bit sy);
    // random gaps in the sampling strobe, except in long back-to-back stretches
    while (($urandom_range(0, 99) < 15) && !sy) begin
      @(negedge clk);
      adc_valid = 1'b0; sync = 1'b0; adc_data = ADC_W'($urandom);
      n_gap++;
    end
    @(negedge clk);
    adc_valid = 1'b1; sync = sy; adc_data = ADC_W'(v);
    n_b2b++;
  endtask

  // s_j = A*sin(2*pi*(j+1)/4 + phi) + dc + noise, j = 0..3
  function automatic int smp(real a, real phi, int j);
    real v;
    v = a * $sin(6.28318530718 * real'(j + 1) / 4.0 + phi) + 5.0 + real'($urandom_range(0, 6)) - 3.0;
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // One codeword: kind 0 coded PSK, 1 BPSK, 2 QPSK, 3 noise; cut >= 0 stops it
  // in symbol 'cut' after two samples of a period.
  task automatic frame(input int kind, input int code, input int cut);
    real psi, amp;
    longint u0 [M];
    longint u1 [M];
    word_exp_t we;
    psi = (kind == 0) ? 6.28318530718 * real'($urandom_range(0, 999)) / 1000.0 : 0.0;
    amp = (kind == 3) ? 0.0 : 150.0 + real'($urandom_range(0, 250));
    for (int k = 0; k < M; k++) begin u0[k] = 0; u1[k] = 0; end
    for (int i = 0; i < K; i++) begin
      real phi;
      longint y0, y1;
      int sb, sd, sf, q;
      sb = -1; sd = -1; sf = -1;
      case (kind)
        0: phi = psi + (chip_tab[code][i] ? 0.0 : 3.14159265359);
        1: begin sb = $urandom_range(0, 1); phi = sb ? 3.14159265359 : 0.0; end
        2: begin
             q = $urandom_range(0, 3);
             phi = 3.14159265359 / 4.0 + real'(q) * 3.14159265359 / 2.0;
             // y0 ~ cos(phi), y1 ~ -sin(phi)
             sd = 2 * int'($cos(phi) < 0.0) + int'(-$sin(phi) < 0.0);
           end
        default: phi = 0.0;
      endcase
      y0 = 0; y1 = 0;
      for (int p = 0; p < N; p++) begin
        int s [4];
        for (int j = 0; j < 4; j++) s[j] = smp(amp, phi, j);
        if (cut == i && p == N / 2) begin
          sample(s[0], 0); sample(s[1], 0);
          return;
        end
        for (int j = 0; j < 4; j++) sample(s[j], i == 0 && p == 0 && j == 0);
        y0 += longint'(s[0] - s[2]);
        y1 += longint'(s[1] - s[3]);
        period_done(longint'(s[0] - s[2]), longint'(s[1] - s[3]), p == N - 1, i);
      end
      if (kind == 1 && prev_sent >= 0) sf = sb ^ prev_sent;
      prev_sent = (kind == 1) ? sb : -1;
      begin
        sym_exp_t e;
        e.y0 = y0; e.y1 = y1; e.sym = i; e.has_prev = have_prev; e.p0 = py0; e.p1 = py1;
        e.sent_bit = sb; e.sent_dibit = sd; e.sent_diff = sf;
        bq.push_back(e); qq.push_back(e);
        if (have_prev) dq.push_back(e);
      end
      have_prev = 1; py0 = y0; py1 = y1;
      for (int k = 0; k < M; k++) begin
        u0[k] += chip_tab[k][i] ? y0 : -y0;
        u1[k] += chip_tab[k][i] ? y1 : -y1;
      end
    end
    for (int k = 0; k < M; k++) we.z[k] = isq(u0[k] * u0[k] + u1[k] * u1[k]);
    we.sent = (kind == 0) ? code : -1;
    wq.push_back(we);
  endtask

  initial begin
    for (int k = 0; k < M; k++) n_word[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      case (f % 6)
        0: frame(0, (M > 2) ? int'($urandom_range(0, M - 1)) : 0, -1);
        1: frame(1, 0, -1);
        2: frame(0, 1 % M, (f == 2) ? 1 : -1);   // the first one is cut short
        3: frame(2, 0, -1);
        4: frame(0, (M > 2) ? int'($urandom_range(0, M - 1)) : (f / 6 + 1) % M, -1);
        default: frame(3, 0, -1);
      endcase
      if (f == 2) n_sync_restart++;
    end
    @(negedge clk);
    adc_valid = 1'b0; sync = 1'b0;
    repeat (4 * U_W + 40) @(negedge clk);
    check(bq.size() == 0 && qq.size() == 0 && zq.size() == 0 && dq.size() == 0 && wq.size() == 0,
          "every expected output delivered");
    $display("mechanisms: bpsk=%0d qpsk=%0d det=%0d (on %0d, off %0d) dpsk=%0d (1: %0d, 0: %0d) restarts=%0d gaps=%0d samples=%0d",
             n_bpsk, n_qpsk, n_det, n_det1, n_det0, n_dpsk, n_dpsk1, n_dpsk0, n_sync_restart, n_gap, n_b2b);
    $display("data recovered: bpsk=%0d qpsk=%0d dpsk=%0d", n_bpsk_data, n_qpsk_data, n_dpsk_data);
    check(n_sync_restart > 0, "sync restart happened");
    check(n_gap > 0 && n_b2b > 0, "gaps and back-to-back samples happened");
    check(n_det1 > 0 && n_det0 > 0, "both detector outcomes happened");
    check(n_dpsk1 > 0 && n_dpsk0 > 0, "both DPSK bit values happened");
    check(n_bpsk_data > 0 && n_qpsk_data > 0 && n_dpsk_data > 0, "data of every format recovered");
    if (M <= 4) for (int k = 0; k < M; k++) check(n_word[k] > 0, $sformatf("codeword %0d decided", k));
    else begin
      int distinct;
      distinct = 0;
      for (int k = 0; k < M; k++) distinct += int'(n_word[k] > 0);
      check(distinct >= 3, "several codewords decided");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
