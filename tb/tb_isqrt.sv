// tb_isqrt: self-checking test of the bit-serial square root (OUT_W = 21).
// Random and edge-case radicands; the root must satisfy r^2 <= x < (r+1)^2 and
// arrive OUT_W + 1 clocks after start; a start while busy is ignored.
module tb_isqrt;
  localparam int OUT_W = 21, XW = 2 * OUT_W;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, busy, done;
  logic [XW-1:0] x = '0;
  logic [OUT_W-1:0] root;
  isqrt #(.OUT_W(OUT_W)) dut (.clk, .rst, .start, .x, .busy, .done, .root);
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
    longint unsigned xv, r;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 600; c++) begin
      int lat;
      case (c)
        0: xv = 0;
        1: xv = 1;
        2: xv = 2;
        3: xv = (64'(1) << XW) - 1;
        4: xv = 64'((1 << 20) - 1) * 64'((1 << 20) - 1);
        default: xv = {$urandom, $urandom} >> ($urandom_range(0, 63 - XW + 40));
      endcase
      xv &= (64'(1) << XW) - 1;
      @(negedge clk);
      start = 1'b1; x = XW'(xv);
      @(negedge clk);
      start = 1'b1; x = '1;       // ignored: the unit is busy
      lat = 1;
      @(negedge clk);
      start = 1'b0;
      lat++;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      check(lat == OUT_W + 1, $sformatf("latency %0d", lat));
      r = 64'(root);
      check(r * r <= xv && (r + 1) * (r + 1) > xv, $sformatf("sqrt(%0d) = %0d", xv, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
