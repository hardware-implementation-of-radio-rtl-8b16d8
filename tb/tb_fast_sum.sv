// tb_fast_sum: self-checking test of the fast sliding sum (N = 16, n = 4).
// Each output must be the plain sum of the last 16 inputs (zeros before the
// first), must appear exactly n = 4 clocks after its input, and the pipeline
// must accept one input per clock. Full-scale negative inputs check the widths.
module tb_fast_sum;
  import radio_pkg::*;
  localparam int IN_W = 11, N = 16, NS = 4, OUT_W = IN_W + NS;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [IN_W-1:0] in_data = '0;
  logic signed [OUT_W-1:0] out_data;
  tag_t in_tag = '0, out_tag;
  int hist [$];
  int exp_q [$];
  int t_in [$];
  tag_t tag_q [$];
  int checks = 0, failures = 0, cyc = 0, outs = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fast_sum #(.IN_W(IN_W), .N(N)) dut (.clk, .rst, .in_valid, .in_data, .in_tag,
                                      .out_valid, .out_data, .out_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // Compare every output with the oldest outstanding expectation.
  always @(negedge clk) if (!rst && out_valid) begin
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      int e, ti;
      tag_t et;
      e = exp_q.pop_front(); ti = t_in.pop_front(); et = tag_q.pop_front();
      check(int'(out_data) == e, $sformatf("y=%0d exp %0d", out_data, e));
      check(cyc - ti == NS, $sformatf("latency %0d exp %0d", cyc - ti, NS));
      check(out_tag == et, "tag");
      outs++;
    end
  end

  initial begin
    for (int j = 0; j < N; j++) hist.push_back(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // bursts of back-to-back inputs alternate with random gaps
      in_valid = (c % 400 < 200) ? 1'b1 : ($urandom_range(0, 3) == 0);
      in_data  = (c >= 1000 && c < 1100) ? -(2 ** (IN_W - 1)) : IN_W'($urandom);
      in_tag   = tag_t'($urandom);
      if (in_valid) begin
        int s;
        void'(hist.pop_front());
        hist.push_back(int'(in_data));
        s = 0;
        foreach (hist[j]) s += hist[j];
        exp_q.push_back(s);
        t_in.push_back(cyc);
        tag_q.push_back(in_tag);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all outputs delivered");
    check(outs > 1000, "output count");
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
