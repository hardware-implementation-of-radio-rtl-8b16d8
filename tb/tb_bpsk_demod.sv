// tb_bpsk_demod: self-checking test of the coherent binary PSK decision.
// Responses with random signs and magnitudes (zero and the extremes included)
// are presented with random tags; only periods that close a symbol may produce
// a bit, one clock later, equal to 1 exactly for a negative response.
module tb_bpsk_demod;
  import radio_pkg::*;
  localparam int Y_W = 14;
  logic clk = 1'b0, rst = 1'b1, y_valid = 1'b0, bit_valid, bit_out;
  logic signed [Y_W-1:0] y = '0;
  tag_t y_tag = '0;
  logic [SYM_W-1:0] sym_idx;
  bpsk_demod #(.Y_W(Y_W)) dut (.clk, .rst, .y_valid, .y, .y_tag, .bit_valid, .bit_out, .sym_idx);
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
    bit ev, eb;
    logic [SYM_W-1:0] es;
    int ones;
    ev = 0; eb = 0; es = '0; ones = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(bit_valid == ev, "bit_valid");
      if (ev) begin
        check(bit_out == eb, $sformatf("bit %0d exp %0d", bit_out, eb));
        check(sym_idx == es, "sym_idx");
        ones += int'(eb);
      end
      y_valid = $urandom_range(0, 1);
      case ($urandom_range(0, 5))
        0: y = '0;
        1: y = -(2 ** (Y_W - 1));
        2: y = 2 ** (Y_W - 1) - 1;
        default: y = Y_W'($urandom);
      endcase
      y_tag = tag_t'($urandom);
      ev = y_valid && y_tag.sym_last;
      if (ev) begin eb = (y < 0); es = y_tag.sym_idx; end
    end
    check(ones > 100, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
