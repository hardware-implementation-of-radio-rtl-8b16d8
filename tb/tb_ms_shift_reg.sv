// tb_ms_shift_reg: self-checking test of the period sample register (MS4).
// Random samples arrive with gaps; the register must present s1..s4 of each
// completed period, with the period's tag, one clock after the fourth sample.
module tb_ms_shift_reg;
  import radio_pkg::*;
  localparam int P = 4, W = 10;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [W-1:0] in_data = '0;
  logic [1:0] in_phase = '0;
  tag_t in_tag = '0, out_tag;
  logic signed [W-1:0] s [P];
  logic signed [W-1:0] exp_s [P];
  tag_t exp_tag;
  bit expect_out = 0;
  int checks = 0, failures = 0, periods = 0;

  always #5 clk = ~clk;

  ms_shift_reg #(.P(P), .W(W)) dut (.clk, .rst, .in_valid, .in_data, .in_phase, .in_tag,
                                     .out_valid, .s, .out_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  initial begin
    int ph;
    ph = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // outputs for the previous clock's inputs
      check(out_valid == expect_out, "out_valid timing");
      if (expect_out && out_valid) begin
        for (int j = 0; j < P; j++) check(s[j] == exp_s[j], $sformatf("s%0d=%0d exp %0d", j + 1, s[j], exp_s[j]));
        check(out_tag == exp_tag, "tag");
        periods++;
      end
      expect_out = 0;
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = W'($urandom);
      in_phase = 2'(ph);
      in_tag   = tag_t'($urandom);
      if (in_valid) begin
        exp_s[ph] = in_data;
        if (ph == P - 1) begin expect_out = 1; exp_tag = in_tag; end
        ph = (ph + 1) % P;
      end
    end
    check(periods > 100, "periods completed");
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
