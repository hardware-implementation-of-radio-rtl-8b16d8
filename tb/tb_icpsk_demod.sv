// tb_icpsk_demod: self-checking test of the coded-PSK demodulator back end
// (K = 7, M = 4). For each codeword a code number c, a carrier phase psi and an
// amplitude are drawn; symbol i gets the responses y0 = A*a_ic*cos(psi) + noise,
// y1 = A*a_ic*sin(psi) + noise. The test computes u0k, u1k, z_k for every code
// from its own code table and checks z_k, the decision s_idx (which must also
// be the transmitted c) and the latency U_W + 3.
// Code table: 7-chip M-sequence of x^3 + x + 1 from all ones (1110010), its
// time reversal, and their one-chip cyclic shifts.
module tb_icpsk_demod;
  import radio_pkg::*;
  localparam int Y_W = 14, K = 7, M = 4, U_W = Y_W + 3;
  localparam bit [K-1:0] C [M] = '{7'b0100111, 7'b1110010, 7'b1010011, 7'b0111001};
  logic clk = 1'b0, rst = 1'b1, y_valid = 1'b0, word_valid;
  logic signed [Y_W-1:0] y0 = '0, y1 = '0;
  tag_t y_tag = '0;
  logic [1:0] s_idx;
  logic [U_W-1:0] z_max;
  logic [U_W-1:0] z [M];
  icpsk_demod #(.Y_W(Y_W), .K(K), .M(M)) dut (.clk, .rst, .y_valid, .y0, .y1, .y_tag,
                                              .word_valid, .s_idx, .z_max, .z);
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isq(longint s);
    int r;
    r = $rtoi($floor($sqrt(real'(s))));
    while (longint'(r) * longint'(r) > s) r--;
    while (longint'(r) * longint'(r) + 2 * longint'(r) + 1 <= s) r++;
    return r;
  endfunction

  initial begin
    int wins [M];
    for (int k = 0; k < M; k++) wins[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 120; w++) begin
      int c, lat, best, bz;
      real psi, amp;
      int u0 [M];
      int u1 [M];
      int ez [M];
      c = $urandom_range(0, M - 1);
      psi = 6.2831853 * real'($urandom_range(0, 999)) / 1000.0;
      amp = 500.0 + real'($urandom_range(0, 7000));
      for (int k = 0; k < M; k++) begin u0[k] = 0; u1[k] = 0; end
      for (int i = 0; i < K; i++) begin
        int a, v0, v1;
        @(negedge clk);
        y_valid = 1'b0; y0 = Y_W'($urandom); y1 = Y_W'($urandom);   // idle clock
        @(negedge clk);
        a  = C[c][i] ? 1 : -1;
        v0 = $rtoi(amp * real'(a) * $cos(psi)) + int'($urandom_range(0, 200)) - 100;
        v1 = $rtoi(amp * real'(a) * $sin(psi)) + int'($urandom_range(0, 200)) - 100;
        y_valid = 1'b1; y0 = Y_W'(v0); y1 = Y_W'(v1);
        y_tag = '{sym_last: 1'b1, sym_idx: SYM_W'(i)};
        for (int k = 0; k < M; k++) begin
          u0[k] += C[k][i] ? v0 : -v0;
          u1[k] += C[k][i] ? v1 : -v1;
        end
      end
      @(negedge clk);
      y_valid = 1'b0;
      lat = 1;
      while (!word_valid && lat < 60) begin @(negedge clk); lat++; end
      check(lat == U_W + 3, $sformatf("latency %0d", lat));
      best = 0; bz = -1;
      for (int k = 0; k < M; k++) begin
        ez[k] = isq(longint'(u0[k]) * u0[k] + longint'(u1[k]) * u1[k]);
        check(int'(z[k]) == ez[k], $sformatf("z%0d=%0d exp %0d", k, z[k], ez[k]));
        if (ez[k] > bz) begin bz = ez[k]; best = k; end
      end
      check(int'(s_idx) == best && int'(z_max) == bz, "decision matches model");
      check(int'(s_idx) == c, $sformatf("decided %0d sent %0d", s_idx, c));
      wins[s_idx]++;
    end
    for (int k = 0; k < M; k++) check(wins[k] > 0, "every codeword decided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
