// tb_sample_timing: self-checking test of the sample / period / symbol counter.
// A reference model counts the same strobes; valid gaps and random sync pulses
// (including sync with and without a sample in the same clock) are applied, and
// phase and tag are compared for every accepted sample.
module tb_sample_timing;
  import radio_pkg::*;
  localparam int P = 4, N = 4, K = 3;
  logic clk = 1'b0, rst = 1'b1, sync = 1'b0, adc_valid = 1'b0;
  logic [1:0] phase;
  tag_t tag;
  int checks = 0, failures = 0, n_sync = 0, n_wrap = 0;
  int rp = 0, rn = 0, rk = 0;

  always #5 clk = ~clk;

  sample_timing #(.P(P), .N(N), .K(K)) dut (.clk, .rst, .sync, .adc_valid, .phase, .tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      adc_valid = ($urandom_range(0, 9) < 7);
      sync      = ($urandom_range(0, 199) == 0);
      #1;
      if (sync) begin rp = 0; rn = 0; rk = 0; n_sync++; end
      if (adc_valid) begin
        check(phase == 2'(rp), $sformatf("phase %0d exp %0d", phase, rp));
        check(tag.sym_last == (rn == N - 1), "sym_last");
        check(tag.sym_idx == SYM_W'(rk), $sformatf("sym_idx %0d exp %0d", tag.sym_idx, rk));
        rp++;
        if (rp == P) begin
          rp = 0; rn++;
          if (rn == N) begin
            rn = 0; rk++;
            if (rk == K) begin rk = 0; n_wrap++; end
          end
        end
      end
    end
    check(n_sync > 0 && n_wrap > 0, "sync and codeword wrap both exercised");
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
