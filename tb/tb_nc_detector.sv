// tb_nc_detector: self-checking test of the noncoherent detector. A stream of
// per-period responses with gaps, random magnitudes, extremes and random tags
// is presented; every period must give z = floor(sqrt(y0^2 + y1^2)) with its
// tag, detect = z > threshold, exactly Y_W + 1 clocks later. Both detection
// outcomes must occur and back-to-back inputs must be accepted.
module tb_nc_detector;
  import radio_pkg::*;
  localparam int Y_W = 14;
  logic clk = 1'b0, rst = 1'b1, y_valid = 1'b0, z_valid, detect;
  logic signed [Y_W-1:0] y0 = '0, y1 = '0;
  tag_t y_tag = '0, z_tag;
  logic [Y_W-1:0] threshold = 14'd2000, z;
  int checks = 0, failures = 0, cyc = 0, n_det = 0, n_nodet = 0, n_b2b = 0;
  typedef struct { longint r; tag_t t; int c; } exp_t;
  exp_t q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  nc_detector #(.Y_W(Y_W)) dut (.clk, .rst, .y_valid, .y0, .y1, .y_tag, .threshold,
                                .z_valid, .z, .z_tag, .detect);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  always @(negedge clk) if (!rst && z_valid) begin
    exp_t e;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      e = q.pop_front();
      check(longint'(z) == e.r, $sformatf("z=%0d exp %0d", z, e.r));
      check(z_tag == e.t, "tag");
      check(cyc - e.c == Y_W + 1, $sformatf("latency %0d", cyc - e.c));
      check(detect == (e.r > 2000), "detect");
      if (e.r > 2000) n_det++; else n_nodet++;
    end
  end

  initial begin
    bit prev;
    prev = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      longint s, r;
      @(negedge clk);
      y_valid = (c % 300 < 100) ? 1'b1 : ($urandom_range(0, 2) == 0);
      y0 = (c == 5) ? -(2 ** (Y_W - 1)) : Y_W'($urandom);
      y1 = (c == 5) ? -(2 ** (Y_W - 1)) : Y_W'($urandom);
      if (c % 3 == 0) begin y0 = y0 >>> 3; y1 = y1 >>> 3; end
      y_tag = tag_t'($urandom);
      if (y_valid) begin
        exp_t e;
        s = longint'(y0) * longint'(y0) + longint'(y1) * longint'(y1);
        r = longint'($floor($sqrt(real'(s))));
        while (r * r > s) r--;
        while (r * r + 2 * r + 1 <= s) r++;
        e.r = r; e.t = y_tag; e.c = cyc;
        q.push_back(e);
        if (prev) n_b2b++;
      end
      prev = y_valid;
    end
    @(negedge clk) y_valid = 1'b0;
    repeat (Y_W + 4) @(negedge clk);
    check(q.size() == 0, "all outputs delivered");
    check(n_det > 0 && n_nodet > 0 && n_b2b > 0, "both outcomes, back-to-back inputs");
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
