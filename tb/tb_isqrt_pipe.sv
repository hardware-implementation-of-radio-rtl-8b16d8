// tb_isqrt_pipe: self-checking test of the pipelined square root (OUT_W = 20).
// Random and edge-case radicands, one per clock with occasional gaps; each root
// must satisfy r^2 <= x < (r+1)^2, keep its tag and arrive OUT_W clocks later.
module tb_isqrt_pipe;
  localparam int OUT_W = 20, XW = 2 * OUT_W, TAG_W = 9;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [XW-1:0] x = '0;
  logic [TAG_W-1:0] in_tag = '0, out_tag;
  logic [OUT_W-1:0] root;
  int checks = 0, failures = 0, cyc = 0;
  typedef struct { longint unsigned x; logic [TAG_W-1:0] t; int c; } exp_t;
  exp_t q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  isqrt_pipe #(.OUT_W(OUT_W), .TAG_W(TAG_W)) dut (.clk, .rst, .in_valid, .x, .in_tag, .out_valid, .root, .out_tag);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  always @(negedge clk) if (!rst && out_valid) begin
    exp_t e;
    longint unsigned r;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      e = q.pop_front();
      r = 64'(root);
      check(r * r <= e.x && (r + 1) * (r + 1) > e.x, $sformatf("sqrt(%0d) = %0d", e.x, r));
      check(out_tag == e.t, "tag");
      check(cyc - e.c == OUT_W, $sformatf("latency %0d", cyc - e.c));
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      longint unsigned xv;
      @(negedge clk);
      case (c)
        0: xv = 0;
        1: xv = 1;
        2: xv = (64'(1) << XW) - 1;
        3: xv = 64'((1 << OUT_W) - 1) * 64'((1 << OUT_W) - 1);
        default: xv = {$urandom, $urandom} >> $urandom_range(64 - XW, 63);
      endcase
      in_valid = ($urandom_range(0, 9) != 0);
      x = XW'(xv);
      in_tag = TAG_W'($urandom);
      if (in_valid) begin
        exp_t e;
        e.x = 64'(x); e.t = in_tag; e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (OUT_W + 4) @(negedge clk);
    check(q.size() == 0, "all outputs delivered");
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
