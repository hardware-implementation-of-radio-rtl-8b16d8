// tb_period_subtractor: self-checking test of SUB. Random sample pairs,
// including the extreme values, must give a - b without overflow, one clock
// later, with the tag carried along and valid following the input valid.
module tb_period_subtractor;
  import radio_pkg::*;
  localparam int W = 10;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [W-1:0] a = '0, b = '0;
  logic signed [W:0] d;
  tag_t in_tag = '0, out_tag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  period_subtractor #(.W(W)) dut (.clk, .rst, .in_valid, .a, .b, .in_tag, .out_valid, .d, .out_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  initial begin
    int ea, eb;
    bit ev;
    tag_t et;
    ev = 0; ea = 0; eb = 0; et = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      check(out_valid == ev, "valid");
      if (ev) begin
        check(int'(d) == ea - eb, $sformatf("d=%0d exp %0d", d, ea - eb));
        check(out_tag == et, "tag");
      end
      in_valid = $urandom_range(0, 1);
      case ($urandom_range(0, 3))
        0: begin a = -(2 ** (W - 1)); b = 2 ** (W - 1) - 1; end
        1: begin a = 2 ** (W - 1) - 1; b = -(2 ** (W - 1)); end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      in_tag = tag_t'($urandom);
      ev = in_valid;
      if (in_valid) begin ea = int'(a); eb = int'(b); et = in_tag; end
    end
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
