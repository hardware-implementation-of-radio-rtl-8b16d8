// tb_fast_sum_stage: self-checking test of one SUM/MR stage (DEPTH = 4, i.e.
// stage 3). The output for each valid input must be that input plus the input
// four valid clocks earlier (zero before that), one clock later.
module tb_fast_sum_stage;
  import radio_pkg::*;
  localparam int IN_W = 12, DEPTH = 4;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic signed [IN_W-1:0] in_data = '0;
  logic signed [IN_W:0] out_data;
  tag_t in_tag = '0, out_tag;
  int hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fast_sum_stage #(.IN_W(IN_W), .DEPTH(DEPTH)) dut (.clk, .rst, .in_valid, .in_data, .in_tag,
                                                    .out_valid, .out_data, .out_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  initial begin
    int exp_v;
    bit ev;
    tag_t et;
    ev = 0; exp_v = 0; et = '0;
    for (int j = 0; j < DEPTH; j++) hist.push_back(0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(out_valid == ev, "valid");
      if (ev) begin
        check(int'(out_data) == exp_v, $sformatf("out=%0d exp %0d", out_data, exp_v));
        check(out_tag == et, "tag");
      end
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = (c % 97 == 5) ? -(2 ** (IN_W - 1)) : IN_W'($urandom);
      in_tag   = tag_t'($urandom);
      ev = in_valid;
      if (in_valid) begin
        exp_v = int'(in_data) + hist[0];
        et = in_tag;
        void'(hist.pop_front());
        hist.push_back(int'(in_data));
      end
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
