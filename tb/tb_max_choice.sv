// tb_max_choice: self-checking test of the maximum choice device (M = 4).
// Random responses, with forced ties; s_idx must be the lowest-numbered maximum
// and z_max its value, one clock after in_valid. Every index must win sometime.
module tb_max_choice;
  localparam int M = 4, Z_W = 12;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [Z_W-1:0] z [M];
  logic [1:0] s_idx;
  logic [Z_W-1:0] z_max;
  max_choice #(.M(M), .Z_W(Z_W)) dut (.clk, .rst, .in_valid, .z, .out_valid, .s_idx, .z_max);
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
    int ei, ez;
    int wins [M];
    ev = 0; ei = 0; ez = 0;
    for (int k = 0; k < M; k++) begin wins[k] = 0; z[k] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      check(out_valid == ev, "out_valid");
      if (ev) begin
        check(int'(s_idx) == ei, $sformatf("idx %0d exp %0d", s_idx, ei));
        check(int'(z_max) == ez, "z_max");
      end
      in_valid = $urandom_range(0, 1);
      for (int k = 0; k < M; k++) z[k] = Z_W'($urandom);
      if (c % 5 == 0) z[$urandom_range(1, M - 1)] = z[0];   // tie with a lower index
      ev = in_valid;
      if (in_valid) begin
        ei = 0; ez = int'(z[0]);
        for (int k = 1; k < M; k++) if (int'(z[k]) > ez) begin ei = k; ez = int'(z[k]); end
        wins[ei]++;
      end
    end
    for (int k = 0; k < M; k++) check(wins[k] > 0, "every index wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
