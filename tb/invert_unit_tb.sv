// invert_unit_tb -- self-checking test of the Invert Unit.
//
// The testbench marks, in a chain-by-slice table, every cno that T1
// (whole chain) or T2 (listed cno) inverts, then for random slice data and
// every slice index checks that exactly those cells come out inverted.
// It also checks that the example masks invert something in every slice
// position that holds a T2 cno.
module invert_unit_tb;
  localparam int unsigned N_SC   = vrh_pkg::N_SC;
  localparam int unsigned W_SC   = vrh_pkg::W_SC;
  localparam int unsigned T2_NUM = vrh_pkg::T2_NUM;
  localparam int unsigned CW     = vrh_pkg::CW;
  localparam int unsigned SW     = (W_SC > 1) ? $clog2(W_SC) : 1;

  logic [N_SC-1:0] din = '0, dout;
  logic [SW-1:0]   slice_idx = '0;

  int checks = 0, failures = 0;
  bit flip[W_SC][N_SC];
  int t2_hits = 0;

  invert_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cno;
    for (int sl = 0; sl < int'(W_SC); sl++)
      for (int c = 0; c < int'(N_SC); c++) flip[sl][c] = vrh_pkg::DEF_T1_MASK[c];
    for (int k = 0; k < int'(T2_NUM); k++) begin
      cno = int'(vrh_pkg::DEF_T2_CELLS[k*CW +: CW]);
      flip[cno / N_SC][cno % N_SC] ^= 1'b1;
    end
    for (int n = 0; n < 500; n++) begin
      din = {$urandom, $urandom};
      slice_idx = SW'(n % W_SC);
      #1;
      for (int c = 0; c < int'(N_SC); c++) begin
        checks++;
        if (dout[c] != (din[c] ^ flip[n % W_SC][c])) begin
          failures++;
          if (failures < 10) $display("FAIL slice %0d chain %0d", n % W_SC, c);
        end
        if (flip[n % W_SC][c] != vrh_pkg::DEF_T1_MASK[c]) t2_hits++;
      end
    end
    checks++;
    if (t2_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
