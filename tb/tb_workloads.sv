// tb_workloads: the coded-PSK configurations the design is meant to serve, run
// end to end through radio_top (each instance with its own clock):
//   - two signals coded by 15-chip and by 31-chip M-sequences (K = 15, K = 31,
//     M = 2; the 63-chip case is the default size, see tb_radio_top_full),
//   - the (7,4) Hamming code, K = 7 and M = 16,
//   - Walsh codes, K = 16 and M = 4.
// All use a 10-bit ADC and N = 64 periods per symbol, the short end of the
// intended 64..512 range, to keep the run short. Each instance checks every
// output against its own model (see radio_top_env); this module adds up the
// results.
module tb_workloads;
  bit done [4];
  int checks [4];
  int failures [4];

  radio_top_env #(.N(64), .K(15), .M(2),  .FAM(0), .NFRAMES(12)) u_mseq15 (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  radio_top_env #(.N(64), .K(31), .M(2),  .FAM(0), .NFRAMES(12)) u_mseq31 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  radio_top_env #(.N(64), .K(7),  .M(16), .FAM(2), .NFRAMES(36)) u_ham74  (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  radio_top_env #(.N(64), .K(16), .M(4),  .FAM(1), .NFRAMES(12)) u_walsh  (.done(done[3]), .checks(checks[3]), .failures(failures[3]));

  function automatic int total(input int v [4]);
    int s;
    s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) $display("configuration %0d: checks=%0d failures=%0d", i, checks[i], failures[i]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end
endmodule
