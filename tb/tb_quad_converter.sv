// tb_quad_converter: self-checking test of a quadratic converter QT.
// Random correlation pairs, extremes included; z must be
// floor(sqrt(u0^2 + u1^2)), U_W + 1 clocks after u_valid.
module tb_quad_converter;
  localparam int U_W = 17;
  logic clk = 1'b0, rst = 1'b1, u_valid = 1'b0, z_valid;
  logic signed [U_W-1:0] u0 = '0, u1 = '0;
  logic [U_W-1:0] z;
  quad_converter #(.U_W(U_W)) dut (.clk, .rst, .u_valid, .u0, .u1, .z_valid, .z);
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
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 400; c++) begin
      longint s;
      int r, lat;
      @(negedge clk);
      u0 = (c < 2) ? -(2 ** (U_W - 1)) : U_W'($urandom);
      u1 = (c == 0) ? -(2 ** (U_W - 1)) : U_W'($urandom);
      u_valid = 1'b1;
      s = longint'(u0) * longint'(u0) + longint'(u1) * longint'(u1);
      r = $rtoi($floor($sqrt(real'(s))));
      while (longint'(r) * longint'(r) > s) r--;
      while (longint'(r) * longint'(r) + 2 * longint'(r) + 1 <= s) r++;
      @(negedge clk);
      u_valid = 1'b0;
      lat = 1;
      while (!z_valid && lat < 60) begin @(negedge clk); lat++; end
      check(lat == U_W + 1, $sformatf("latency %0d", lat));
      check(int'(z) == r, $sformatf("z=%0d exp %0d", z, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
