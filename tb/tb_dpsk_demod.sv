// tb_dpsk_demod: self-checking test of the DPSK decision. A stream of symbol
// responses at a random carrier phase is generated from random differential
// bits (phase step 0 or pi) with amplitude changes; each bit, from the second
// symbol on, must be recovered one clock after its symbol.
module tb_dpsk_demod;
  import radio_pkg::*;
  localparam int Y_W = 14;
  logic clk = 1'b0, rst = 1'b1, y_valid = 1'b0, bit_valid, bit_out;
  logic signed [Y_W-1:0] y0 = '0, y1 = '0;
  tag_t y_tag = '0;
  logic [SYM_W-1:0] sym_idx;
  dpsk_demod #(.Y_W(Y_W)) dut (.clk, .rst, .y_valid, .y0, .y1, .y_tag, .bit_valid, .bit_out, .sym_idx);
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
    real psi, amp;
    bit ev, eb, first;
    int n_one, n_zero;
    psi = 0.7; ev = 0; eb = 0; first = 1; n_one = 0; n_zero = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      bit b;
      @(negedge clk);
      check(bit_valid == ev, "bit_valid");
      if (ev) begin
        check(bit_out == eb, $sformatf("bit %0d exp %0d", bit_out, eb));
        if (eb) n_one++; else n_zero++;
      end
      ev = 0;
      y_valid = ($urandom_range(0, 3) != 0);
      y_tag = '{sym_last: ($urandom_range(0, 2) == 0), sym_idx: SYM_W'(c)};
      if (y_valid && y_tag.sym_last) begin
        b = $urandom_range(0, 1);
        if (b) psi += 3.14159265;
        psi += 0.3 * (real'($urandom_range(0, 100)) / 100.0 - 0.5);  // slow carrier drift
        amp = 1000.0 + 6000.0 * real'($urandom_range(0, 100)) / 100.0;
        y0 = Y_W'($rtoi(amp * $cos(psi)));
        y1 = Y_W'($rtoi(amp * $sin(psi)));
        ev = !first; eb = b; first = 0;
      end else begin
        y0 = Y_W'($urandom); y1 = Y_W'($urandom);   // mid-symbol values are ignored
      end
    end
    check(n_one > 100 && n_zero > 100, "both bit values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
