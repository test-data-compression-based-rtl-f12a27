// vrh_decompressor_tb -- end-to-end test of the VRH decompressor at its
// default size (64 scan chains, 8-bit primitive parts, 24 distinct blocks,
// 5 ATE channels, 4 slices per vector, T1 plus 50 T2 cells).
//
// The testbench acts as the encoder and the tester. It invents NVEC test
// vectors of W_SC slices. Each slice is built left to right from primitive
// part s = 0: at each step it either emits a failed codeword followed by 8
// raw bits, or picks a random distinct block; the part that block decodes to
// is the whole block when the block fits at s, otherwise its leading half,
// quarter, ... (reuse of a longer block's codeword). The expected slice is
// that data with the T1/T2 inversions applied, the compressed stream is the
// codewords (canonical code, built here from the code lengths) and raw bits.
// The stream is fed as 5-bit ATE words with random idle cycles. Every slice
// shifted out must equal the expected one, last_slice must mark slice W_SC-1.
//
// Mechanisms counted (each must occur): whole-block decode, reused
// (truncated) block decode, failed part, T2 inversion in a slice, vector
// wrap, ATE back-pressure (ate_sync low while a word is offered) and a failed
// codeword waiting for its raw bits. The cycle count is checked against the
// decoder's rate: one cycle per codeword bit plus one load cycle per codeword
// (raw bits are taken in parallel in the load cycle). The tester supplies
// more than one bit per cycle on average, so the run may exceed that minimum
// only by a few percent.
module vrh_decompressor_tb;
  import vrh_pkg::*;
  localparam int NVEC   = 159;            // vectors (size of the s9234 test set)
  localparam int NP     = 1 << MAX;
  localparam int NSLICE = NVEC * int'(W_SC);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ATE_W-1:0] ate_data = '0;
  logic ate_valid = 1'b0;
  logic ate_sync, scan_shift, last_slice;
  logic [N_SC-1:0] scan_data;

  int checks = 0, failures = 0;
  int n_full = 0, n_reuse = 0, n_failed = 0, n_t2 = 0, n_wrap = 0;
  int n_backpressure = 0, n_rawwait = 0, n_codewords = 0;
  int len[NCODE];
  int unsigned code[NCODE];
  bit stream[$];
  logic [N_SC-1:0] expected[$];

  vrh_decompressor dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int unsigned value, int nbits);
    for (int b = nbits - 1; b >= 0; b--) stream.push_back(value[b]);
  endtask

  // encoder side: build the stream and the expected slices
  initial begin : encode
    int order[$];
    int unsigned c;
    int prev, s, k, lvl, tz, j, n;
    logic [N_SC-1:0] slice, inv;
    logic [PSIZE-1:0] raw;
    for (int i = 0; i < int'(NCODE); i++) len[i] = int'(DEF_CODE_LEN[i*LW +: LW]);
    for (int i = 0; i < int'(NCODE); i++) order.push_back(i);
    order.sort() with (len[item] * 1000 + item);
    c = 0; prev = len[order[0]];
    foreach (order[i]) begin
      c = c << (len[order[i]] - prev);
      prev = len[order[i]];
      code[order[i]] = c;
      c++;
    end
    for (int sl = 0; sl < NSLICE; sl++) begin
      s = 0;
      slice = '0;
      while (s < NP) begin
        n_codewords++;
        if ($urandom_range(0, 5) == 0) begin
          raw = PSIZE'($urandom);
          put(code[FAIL_IDX], len[FAIL_IDX]);
          for (int b = 0; b < int'(PSIZE); b++) stream.push_back(raw[b]);
          slice[s*PSIZE +: PSIZE] = raw;
          n_failed++;
          s++;
        end else begin
          k = $urandom_range(0, M - 1);
          lvl = int'(DEF_BLOCK_LEVEL[k*LVW +: LVW]);
          tz = 0;
          if (s == 0) tz = int'(MAX);
          else while (((s >> tz) & 1) == 0) tz++;
          j = (lvl > int'(MAX) - tz) ? lvl : int'(MAX) - tz;
          n = 1 << (int'(MAX) - j);
          if (j > lvl) n_reuse++; else n_full++;
          put(code[k], len[k]);
          for (int b = 0; b < n * int'(PSIZE); b++)
            slice[s*PSIZE + b] = DEF_BLOCKS[k*N_SC + b];
          s += n;
        end
      end
      inv = DEF_T1_MASK;
      for (int t = 0; t < int'(T2_NUM); t++)
        if (int'(DEF_T2_CELLS[t*CW +: CW]) / int'(N_SC) == sl % int'(W_SC)) begin
          inv[int'(DEF_T2_CELLS[t*CW +: CW]) % int'(N_SC)] ^= 1'b1;
        end
      if (inv != DEF_T1_MASK) n_t2++;
      expected.push_back(slice ^ inv);
    end
  end

  // tester side: feed the stream as ATE words with random idle cycles
  initial begin : tester
    int total_bits, pos;
    #1;
    total_bits = stream.size();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pos = 0;
    while (pos < total_bits) begin
      ate_valid = ($urandom_range(0, 7) != 0);
      for (int b = 0; b < int'(ATE_W); b++)
        ate_data[b] = (pos + b < total_bits) ? stream[pos + b] : 1'b1;
      @(posedge clk);
      if (ate_valid && !ate_sync) n_backpressure++;
      if (ate_valid && ate_sync) pos += int'(ATE_W);
      @(negedge clk);
    end
    ate_valid = 1'b0;
  end

  always @(posedge clk)
    if (rst_n && dut.u_block_size_enable.code_valid && dut.u_block_size_enable.failed
        && !dut.u_block_size_enable.raw_valid)
      n_rawwait++;

  // scan side: compare every slice shifted out
  initial begin : monitor
    int got, cycles, bound;
    got = 0; cycles = 0;
    @(posedge rst_n);
    while (got < NSLICE) begin
      @(posedge clk);
      cycles++;
      if (scan_shift) begin
        check(scan_data == expected[got], "slice data");
        check(last_slice == (got % int'(W_SC) == int'(W_SC) - 1), "last_slice");
        if (last_slice) n_wrap++;
        got++;
      end
    end
    bound = stream.size() - n_failed * int'(PSIZE) + n_codewords;
    check(cycles >= bound, "cycle lower bound");
    check(cycles <= bound + bound / 20 + 20, "cycle upper bound");
    $display("slices=%0d bits=%0d codewords=%0d cycles=%0d (minimum %0d)",
             got, stream.size(), n_codewords, cycles, bound);
    $display("full=%0d reuse=%0d failed=%0d t2_slices=%0d wraps=%0d backpressure=%0d rawwait=%0d",
             n_full, n_reuse, n_failed, n_t2, n_wrap, n_backpressure, n_rawwait);
    check(n_full > 0, "whole-block decode seen");
    check(n_reuse > 0, "reused-codeword decode seen");
    check(n_failed > 0, "failed part seen");
    check(n_t2 > 0, "T2 inversion seen");
    check(n_wrap > 0, "vector wrap seen");
    check(n_backpressure > 0, "ATE back-pressure seen");
    check(n_rawwait > 0, "raw-bit wait seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
