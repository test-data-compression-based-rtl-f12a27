// block_size_enable_tb -- self-checking test of the Block Size/Enable unit.
//
// Part 1 reproduces the worked example of a 64-chain slice with 8 primitive
// parts: for every position s (reached by first decoding s primitive-part
// blocks) and every block level P_0..P_3 the number of decoded primitive
// parts must be the one in the table below, and exactly parts s .. s+n-1
// must be enabled. Part 2 runs random codeword sequences, including failed
// codewords whose raw bits arrive late, against a reference pointer s.
// Part 3 uses a second instance for a 50-chain slice, which splits into
// primitive parts of 7,6,6,6,7,6,6,6 bits, and checks that raw_short marks
// exactly the 6-bit parts as s walks through the slice.
module block_size_enable_tb;
  localparam int unsigned MAX = vrh_pkg::MAX;
  localparam int unsigned M   = vrh_pkg::M;
  localparam int unsigned LVW = vrh_pkg::LVW;
  localparam int unsigned IW  = $clog2(M + 1);
  localparam int unsigned QW  = $clog2(MAX + 1);
  localparam int unsigned NP  = 1 << MAX;
  // decoded primitive parts for s = 0..7 (rows) and a P_0..P_3 block (columns)
  localparam int TABLE [8][4] = '{'{8, 4, 2, 1}, '{1, 1, 1, 1}, '{2, 2, 2, 1}, '{1, 1, 1, 1},
                                  '{4, 4, 2, 1}, '{1, 1, 1, 1}, '{2, 2, 2, 1}, '{1, 1, 1, 1}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic code_valid = 1'b0, failed = 1'b0, raw_valid = 1'b0;
  logic [IW-1:0] code_index = '0;
  logic load, raw_pop, raw_short, slice_done;
  logic u_load, u_raw_pop, u_raw_short, u_slice_done, u_valid = 1'b0;
  logic [QW-1:0] u_size_q;
  logic [NP-1:0] u_en;
  logic [MAX-1:0] u_s;
  logic [QW-1:0] size_q;
  logic [NP-1:0] en;
  logic [MAX-1:0] s;

  int checks = 0, failures = 0;
  int first_of_level[4];

  block_size_enable dut (.*);

  block_size_enable #(.N_SC(50)) dut50 (
    .clk, .rst_n, .code_valid(u_valid), .code_index(IW'(first_of_level[3])),
    .failed(1'b0), .raw_valid(1'b1), .load(u_load), .raw_pop(u_raw_pop),
    .raw_short(u_raw_short), .size_q(u_size_q), .en(u_en),
    .slice_done(u_slice_done), .s(u_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [NP-1:0] mask(int from, int n);
    logic [NP-1:0] e = '0;
    for (int p = from; p < from + n; p++) e[p] = 1'b1;
    return e;
  endfunction

  // present one codeword for one cycle and check the decision
  task automatic decode(input int k, input bit f, input int exp_n, input int exp_s);
    code_valid = 1'b1; code_index = IW'(k); failed = f; raw_valid = 1'b1;
    #1;
    check(load && raw_pop == f && !raw_short, "load");
    check((1 << size_q) == exp_n, "size");
    check(en == mask(exp_s, exp_n), "enables");
    check(slice_done == (exp_s + exp_n == int'(NP)), "slice_done");
    @(negedge clk);
    code_valid = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sref, k, lvl, n, tz;
    for (int l = 0; l < 4; l++) first_of_level[l] = -1;
    for (int kk = int'(M) - 1; kk >= 0; kk--)
      first_of_level[vrh_pkg::DEF_BLOCK_LEVEL[kk*LVW +: LVW]] = kk;
    repeat (2) @(negedge clk);
    // part 1: the worked example
    for (int i = 0; i < 4; i++)
      for (int s0 = 0; s0 < 8; s0++) begin
        rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; @(negedge clk);
        for (int p = 0; p < s0; p++) decode(first_of_level[3], 1'b0, 1, p);
        check(int'(s) == s0, "pointer");
        decode(first_of_level[i], 1'b0, TABLE[s0][i], s0);
      end
    // part 2: random sequences
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; @(negedge clk);
    sref = 0;
    for (int w = 0; w < 3000; w++) begin
      automatic bit f = ($urandom_range(0, 4) == 0);
      k = f ? int'(M) : $urandom_range(0, M - 1);
      lvl = f ? int'(MAX) : int'(vrh_pkg::DEF_BLOCK_LEVEL[k*LVW +: LVW]);
      tz = 0;
      if (sref == 0) tz = int'(MAX);
      else while (((sref >> tz) & 1) == 0) tz++;
      n = 1 << (int'(MAX) - ((lvl > int'(MAX) - tz) ? lvl : int'(MAX) - tz));
      if (f) begin   // raw bits not there yet: must wait
        code_valid = 1'b1; code_index = IW'(k); failed = 1'b1; raw_valid = 1'b0;
        repeat ($urandom_range(1, 3)) begin
          #1 check(!load && !raw_pop && en == '0 && !slice_done, "wait for raw");
          @(negedge clk);
        end
      end
      decode(k, f, n, sref);
      sref = (sref + n) % int'(NP);
      check(int'(s) == sref, "pointer advance");
    end
    // part 3: uneven 50-chain slice
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; @(negedge clk);
    for (int p = 0; p < 16; p++) begin
      check(int'(u_s) == p % 8, "50-chain pointer");
      check(u_raw_short == !(p % 8 == 0 || p % 8 == 4), "raw_short");
      u_valid = 1'b1;
      @(negedge clk);
      u_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
