// tb_code_correlator: self-checking test of a computing unit CU (K = 7).
// Symbol responses arrive with mid-symbol periods and gaps in between; after
// symbol 6 the unit must present u = sum a_i * y_i for the code 1110010 (chip 0
// first), one clock after the closing response, and nothing at other times.
// A frame restarted in the middle (symbol number back to 0) must start afresh.
module tb_code_correlator;
  import radio_pkg::*;
  localparam int Y_W = 14, K = 7, U_W = Y_W + 3;
  localparam logic [K-1:0] CODE = 7'b0100111;   // chips 1,1,1,0,0,1,0
  logic clk = 1'b0, rst = 1'b1, y_valid = 1'b0, u_valid;
  logic signed [Y_W-1:0] y = '0;
  tag_t y_tag = '0;
  logic signed [U_W-1:0] u;
  code_correlator #(.Y_W(Y_W), .K(K), .CODE(CODE)) dut (.clk, .rst, .y_valid, .y, .y_tag, .u_valid, .u);
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
    int acc, words;
    bit ev;
    int eu;
    acc = 0; words = 0; ev = 0; eu = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 300; w++) begin
      int first;
      first = (w % 10 == 3) ? 3 : 0;    // some frames are cut short by a restart
      for (int i = 0; i < K; i++) begin
        int yi;
        // mid-symbol periods with arbitrary values
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          check(u_valid == ev, "u_valid"); if (ev) check(int'(u) == eu, $sformatf("u=%0d exp %0d", u, eu));
          ev = 0;
          y_valid = $urandom_range(0, 1); y = Y_W'($urandom);
          y_tag = '{sym_last: 1'b0, sym_idx: SYM_W'(i)};
        end
        @(negedge clk);
        check(u_valid == ev, "u_valid"); if (ev) check(int'(u) == eu, $sformatf("u=%0d exp %0d", u, eu));
        ev = 0;
        yi = (w % 7 == 0) ? -(2 ** (Y_W - 1)) : int'($urandom_range(0, 2 ** Y_W - 1)) - 2 ** (Y_W - 1);
        y_valid = 1'b1; y = Y_W'(yi);
        y_tag = '{sym_last: 1'b1, sym_idx: SYM_W'(i)};
        if (i == 0) acc = 0;
        acc += CODE[i] ? yi : -yi;
        if (i == K - 1) begin ev = 1; eu = acc; words++; end
        if (first == 3 && i == 2) break;
      end
    end
    @(negedge clk);
    check(u_valid == ev, "u_valid"); if (ev) check(int'(u) == eu, "last u");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
