// vrh_configs_tb -- end-to-end test of the other evaluated configurations.
//
// Runs vrh_stream_check on three sizes of the decompressor, side by side:
//   16 chains  (MAX=1), s5378-like: 14 slices per vector, no transformation
//   128 chains (MAX=4), s38417-like: 13 slices per vector, T1 + 100 T2 cells
//   64 chains  (MAX=3), s38584-like: 23 slices per vector, T1 + 100 T2 cells
//   50 chains  (MAX=3), a slice that does not split evenly: primitive parts
//              of 7 and 6 bits, 5 slices per vector, T1 + 50 T2 cells
// and the test-time setting: 64 chains, 5 ATE channels, the tester clocked
// 2 and 10 times slower than the decoder (r = 2, r = 10), with the cycle
// count checked against the tester and decoder rates.
// Slices per vector are the cores' scan-cell counts divided by the chain
// count, rounded up. Each instance checks every slice it receives; the
// totals are printed in one TB_RESULT line.
module vrh_configs_tb;
  logic d0, d1, d2, d3, d4, d5;
  int c0, c1, c2, c3, c4, c5, f0, f1, f2, f3, f4, f5;
  int checks, failures;

  vrh_stream_check #(.N_SC(16),  .MAX(1), .W_SC(14), .T2_NUM(0),   .USE_T1(1'b0), .NVEC(20), .SEED(3))
    u16  (.done(d0), .checks(c0), .failures(f0));
  vrh_stream_check #(.N_SC(128), .MAX(4), .W_SC(13), .T2_NUM(100), .USE_T1(1'b1), .NVEC(12), .SEED(5))
    u128 (.done(d1), .checks(c1), .failures(f1));
  vrh_stream_check #(.N_SC(64),  .MAX(3), .W_SC(23), .T2_NUM(100), .USE_T1(1'b1), .NVEC(8),  .SEED(7))
    u64  (.done(d2), .checks(c2), .failures(f2));
  vrh_stream_check #(.N_SC(50),  .MAX(3), .W_SC(5),  .T2_NUM(50),  .USE_T1(1'b1), .NVEC(30), .SEED(9))
    u50  (.done(d3), .checks(c3), .failures(f3));
  vrh_stream_check #(.N_SC(64),  .MAX(3), .W_SC(4),  .T2_NUM(100), .USE_T1(1'b1), .NVEC(30), .SEED(11), .R(2))
    ur2  (.done(d4), .checks(c4), .failures(f4));
  vrh_stream_check #(.N_SC(64),  .MAX(3), .W_SC(4),  .T2_NUM(100), .USE_T1(1'b1), .NVEC(30), .SEED(13), .R(10))
    ur10 (.done(d5), .checks(c5), .failures(f5));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5, f0 + f1 + f2 + f3 + f4 + f5 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2 && d3 && d4 && d5);
    checks = c0 + c1 + c2 + c3 + c4 + c5;
    failures = f0 + f1 + f2 + f3 + f4 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
