// tb_ba2: self-checking test of the basic quadrature algorithm BA2 (N = 8).
// Random samples with gaps and sync pulses; every period's y0 and y1 must equal
// the plain sums of (s1 - s3) and (s2 - s4) over the last 8 periods, n + 2 = 5
// clocks after the clock that accepted s4, with that period's tag. A coherent
// sine at a known phase is also applied and must give the textbook values
// y0 = 2*N*A*cos(psi), y1 = -2*N*A*sin(psi) for psi = 0 and pi/2.
module tb_ba2;
  import radio_pkg::*;
  localparam int ADC_W = 10, N = 8, NS = 3, Y_W = ADC_W + 1 + NS, K = 5;
  logic clk = 1'b0, rst = 1'b1, sync = 1'b0, adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic [1:0] phase;
  tag_t tag, y_tag;
  logic y_valid;
  logic signed [Y_W-1:0] y0, y1;
  int h0 [$];
  int h1 [$];
  int e0_q [$];
  int e1_q [$];
  int t_q [$];
  tag_t tag_q [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0;
  int last_y0, last_y1;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sample_timing #(.P(4), .N(N), .K(K)) u_t (.clk, .rst, .sync, .adc_valid, .phase, .tag);
  ba2 #(.ADC_W(ADC_W), .N(N)) dut (.clk, .rst, .adc_valid, .adc_data, .phase, .tag,
                                   .y_valid, .y0, .y1, .y_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  always @(negedge clk) if (!rst && y_valid) begin
    if (e0_q.size() == 0) check(0, "unexpected output");
    else begin
      int a, b, ti;
      tag_t et;
      a = e0_q.pop_front(); b = e1_q.pop_front(); ti = t_q.pop_front(); et = tag_q.pop_front();
      check(int'(y0) == a, $sformatf("y0=%0d exp %0d", y0, a));
      check(int'(y1) == b, $sformatf("y1=%0d exp %0d", y1, b));
      check(cyc - ti == NS + 2, $sformatf("latency %0d", cyc - ti));
      check(y_tag == et, "tag");
      last_y0 = int'(y0); last_y1 = int'(y1);
      outs++;
    end
  end

  // One sample; the model keeps the period's samples and the sliding sums.
  int ph = 0;
  int sp [4];
  task automatic put(input bit v, input int val, input bit sy);
    @(negedge clk);
    adc_valid = v;
    adc_data  = ADC_W'(val);
    sync      = sy;
    if (sy) ph = 0;
    #1;
    if (v) begin
      sp[ph] = val;
      if (ph == 3) begin
        int s0, s1;
        void'(h0.pop_front()); void'(h1.pop_front());
        h0.push_back(sp[0] - sp[2]); h1.push_back(sp[1] - sp[3]);
        s0 = 0; s1 = 0;
        foreach (h0[j]) begin s0 += h0[j]; s1 += h1[j]; end
        e0_q.push_back(s0); e1_q.push_back(s1);
        t_q.push_back(cyc); tag_q.push_back(tag);
      end
      ph = (ph + 1) % 4;
    end
  endtask

  initial begin
    for (int j = 0; j < N; j++) begin h0.push_back(0); h1.push_back(0); end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4000; c++)
      put((c % 500 < 250) ? 1'b1 : ($urandom_range(0, 2) == 0), int'($urandom_range(0, 1023)) - 512, c % 913 == 77);
    // Coherent carrier, amplitude 200, phase 0: samples at 0.25..1.0 T0 are A, 0, -A, 0.
    for (int p = 0; p < N; p++) begin put(1, 200, p == 0); put(1, 0, 0); put(1, -200, 0); put(1, 0, 0); end
    @(negedge clk) adc_valid = 1'b0;
    repeat (8) @(negedge clk);
    check(last_y0 == 2 * N * 200 && last_y1 == 0, $sformatf("phase 0: y0=%0d y1=%0d", last_y0, last_y1));
    // Phase pi/2: samples 0, -A, 0, A.
    for (int p = 0; p < N; p++) begin put(1, 0, 0); put(1, -200, 0); put(1, 0, 0); put(1, 200, 0); end
    @(negedge clk) adc_valid = 1'b0;
    repeat (8) @(negedge clk);
    check(last_y0 == 0 && last_y1 == -2 * N * 200, $sformatf("phase pi/2: y0=%0d y1=%0d", last_y0, last_y1));
    check(e0_q.size() == 0 && outs > 250, "all periods delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
