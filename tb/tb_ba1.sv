// tb_ba1: self-checking test of the basic coherent algorithm BA1 (N = 8).
// A random sample stream with gaps and sync pulses is fed in with its phase and
// tag from sample_timing. Every period's output must equal the plain sum of
// (s1 - s2) over the last 8 completed periods, appear n + 2 = 5 clocks after
// the clock that accepted s2, and carry that period's tag.
module tb_ba1;
  import radio_pkg::*;
  localparam int ADC_W = 10, N = 8, NS = 3, Y_W = ADC_W + 1 + NS, K = 5;
  logic clk = 1'b0, rst = 1'b1, sync = 1'b0, adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic [0:0] phase;
  tag_t tag, y_tag;
  logic y_valid;
  logic signed [Y_W-1:0] y;
  int hist [$];
  int exp_q [$];
  int t_q [$];
  tag_t tag_q [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sample_timing #(.P(2), .N(N), .K(K)) u_t (.clk, .rst, .sync, .adc_valid, .phase, .tag);
  ba1 #(.ADC_W(ADC_W), .N(N)) dut (.clk, .rst, .adc_valid, .adc_data, .phase, .tag, .y_valid, .y, .y_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  always @(negedge clk) if (!rst && y_valid) begin
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      int e, ti;
      tag_t et;
      e = exp_q.pop_front(); ti = t_q.pop_front(); et = tag_q.pop_front();
      check(int'(y) == e, $sformatf("y=%0d exp %0d", y, e));
      check(cyc - ti == NS + 2, $sformatf("latency %0d", cyc - ti));
      check(y_tag == et, "tag");
      outs++;
    end
  end

  initial begin
    int s1, ph;
    s1 = 0; ph = 0;
    for (int j = 0; j < N; j++) hist.push_back(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      adc_valid = (c % 500 < 250) ? 1'b1 : ($urandom_range(0, 2) == 0);
      adc_data  = ADC_W'($urandom);
      sync      = (c % 731 == 100);
      if (sync) ph = 0;
      #1;
      if (adc_valid) begin
        if (ph == 0) s1 = int'(adc_data);
        else begin
          int s;
          void'(hist.pop_front());
          hist.push_back(s1 - int'(adc_data));
          s = 0;
          foreach (hist[j]) s += hist[j];
          exp_q.push_back(s);
          t_q.push_back(cyc);
          tag_q.push_back(tag);
        end
        ph ^= 1;
      end
    end
    @(negedge clk) adc_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0 && outs > 500, "all periods delivered");
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
