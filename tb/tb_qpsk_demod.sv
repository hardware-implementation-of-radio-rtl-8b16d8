// tb_qpsk_demod: self-checking test of the coherent four-position PSK
// decision. Carrier phases in the four quadrants are turned into the responses
// y0 = R*cos(psi), y1 = -R*sin(psi) of BA2; only symbol-closing periods may
// produce a dibit, one clock later, equal to {y0 < 0, y1 < 0}, and every quadrant
// must give its own dibit.
module tb_qpsk_demod;
  import radio_pkg::*;
  localparam int Y_W = 14;
  logic clk = 1'b0, rst = 1'b1, y_valid = 1'b0, dibit_valid;
  logic signed [Y_W-1:0] y0 = '0, y1 = '0;
  tag_t y_tag = '0;
  logic [1:0] dibit;
  logic [SYM_W-1:0] sym_idx;
  qpsk_demod #(.Y_W(Y_W)) dut (.clk, .rst, .y_valid, .y0, .y1, .y_tag, .dibit_valid, .dibit, .sym_idx);
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

  initial begin
    bit ev;
    logic [1:0] ed;
    logic [SYM_W-1:0] es;
    int seen [4];
    ev = 0; ed = '0; es = '0;
    for (int q = 0; q < 4; q++) seen[q] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      real psi;
      int q;
      @(negedge clk);
      check(dibit_valid == ev, "dibit_valid");
      if (ev) begin
        check(dibit == ed, $sformatf("dibit %b exp %b", dibit, ed));
        check(sym_idx == es, "sym_idx");
      end
      q   = $urandom_range(0, 3);
      psi = 3.14159265 / 2.0 * (real'(q) + 0.1 + 0.8 * real'($urandom_range(0, 1000)) / 1000.0);
      y0  = Y_W'($rtoi(4000.0 * $cos(psi)));
      y1  = Y_W'($rtoi(-4000.0 * $sin(psi)));
      y_valid = $urandom_range(0, 1);
      y_tag = tag_t'($urandom);
      ev = y_valid && y_tag.sym_last;
      if (ev) begin
        ed = {q == 1 || q == 2, q == 0 || q == 1};
        es = y_tag.sym_idx;
        seen[ed]++;
      end
    end
    for (int q = 0; q < 4; q++) check(seen[q] > 0, "every quadrant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
