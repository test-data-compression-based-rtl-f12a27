// vrh_stream_check -- reusable end-to-end checker for one configuration of
// the VRH decompressor (used by vrh_configs_tb).
//
// It builds an example code for the given size -- 24 blocks whose levels
// are spread over P_0 .. P_MAX, pseudo-random block contents, a T1 mask and
// T2_NUM cells -- instantiates vrh_decompressor with it, encodes NVEC random
// test vectors of W_SC slices (random failed parts and random blocks, the
// piece size following the position rule; slices that do not split evenly
// use parts of ceil and floor size, the first half taking the extra bit),
// feeds the stream as ATE words
// with random idle cycles and compares every slice shifted out. The expected
// slices and the canonical codewords are computed here, not taken from the
// design. done rises when all slices are checked; checks/failures count the
// comparisons. With R > 0 the tester is clocked R times slower than the
// decoder (r = f_SYS / f_ATE): a new word is offered only R cycles after the
// previous one was taken, and the total cycle count must lie between the
// tester bound (words * R) or the decoder bound (one cycle per codeword bit
// plus one per codeword), whichever is larger, and 10 % above it. With R = 0
// words are offered at random. It also counts whole-block decodes, reused (truncated)
// decodes and failed parts and reports a failure if one of them never
// happened.
module vrh_stream_check #(
  parameter int unsigned N_SC   = 64,
  parameter int unsigned MAX    = 3,
  parameter int unsigned W_SC   = 4,
  parameter int unsigned T2_NUM = 50,
  parameter bit          USE_T1 = 1'b1,
  parameter int          NVEC   = 20,
  parameter int unsigned SEED   = 1,
  parameter int unsigned R      = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import vrh_pkg::M, vrh_pkg::NCODE, vrh_pkg::FAIL_IDX,
         vrh_pkg::ATE_W, vrh_pkg::LMAX, vrh_pkg::LW, vrh_pkg::DEF_CODE_LEN;
  localparam int unsigned LVW = $clog2(MAX + 1);
  localparam int unsigned CW  = $clog2(W_SC * N_SC);
  localparam int unsigned T2W = (T2_NUM > 0) ? T2_NUM : 1;
  localparam int NP = 1 << MAX;
  localparam int unsigned PSIZE = (N_SC + (1 << MAX) - 1) >> MAX;

  function automatic logic [M*LVW-1:0] mk_level();
    logic [M*LVW-1:0] t = '0;
    for (int unsigned k = 0; k < M; k++) t[k*LVW +: LVW] = LVW'((k * (MAX + 1)) / M);
    return t;
  endfunction
  function automatic logic [M*N_SC-1:0] mk_blocks();
    logic [M*N_SC-1:0] t = '0;
    logic [31:0] x = 32'h1234_5678 ^ SEED;
    for (int unsigned b = 0; b < M * N_SC; b++) begin
      x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
      t[b] = x[3];
    end
    return t;
  endfunction
  function automatic logic [N_SC-1:0] mk_t1();
    logic [N_SC-1:0] t = '0;
    if (USE_T1) for (int unsigned c = 0; c < N_SC; c++) t[c] = (c % 5 == 1);
    return t;
  endfunction
  function automatic logic [T2W*CW-1:0] mk_t2();
    logic [T2W*CW-1:0] t = '0;
    for (int unsigned k = 0; k < T2_NUM; k++) t[k*CW +: CW] = CW'((37 * k + 11) % (W_SC * N_SC));
    return t;
  endfunction

  localparam logic [M*LVW-1:0]  LEVEL = mk_level();
  localparam logic [M*N_SC-1:0] BLKS  = mk_blocks();
  localparam logic [N_SC-1:0]   T1    = mk_t1();
  localparam logic [T2W*CW-1:0] T2    = mk_t2();

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ATE_W-1:0] ate_data = '0;
  logic ate_valid = 1'b0;
  logic ate_sync, scan_shift, last_slice;
  logic [N_SC-1:0] scan_data;

  vrh_decompressor #(.N_SC(N_SC), .MAX(MAX), .W_SC(W_SC), .T2_NUM(T2_NUM),
                     .BLOCK_LEVEL(LEVEL), .BLOCKS(BLKS), .T1_MASK(T1),
                     .T2_CELLS(T2)) dut (.*);

  always #5 clk = ~clk;

  int len[NCODE];
  int unsigned code[NCODE];
  bit stream[$];
  logic [N_SC-1:0] expected[$];
  int n_full = 0, n_reuse = 0, n_failed = 0, n_codewords = 0, n_rawbits = 0;
  int pstart[NP + 1];     // first chain of each primitive part

  // split the slice max times, halves of ceil and floor size
  initial begin : geometry
    int sizes[$], nxt[$], acc;
    sizes.push_back(int'(N_SC));
    for (int l = 0; l < int'(MAX); l++) begin
      nxt.delete();
      foreach (sizes[i]) begin
        nxt.push_back((sizes[i] + 1) / 2);
        nxt.push_back(sizes[i] / 2);
      end
      sizes = nxt;
    end
    acc = 0;
    foreach (sizes[i]) begin
      pstart[i] = acc;
      acc += sizes[i];
    end
    pstart[NP] = acc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d chains] %s at %0t", N_SC, what, $time);
    end
  endtask

  initial begin : encode
    int order[$];
    int unsigned c;
    int prev, s, k, lvl, tz, j, n;
    logic [N_SC-1:0] slice, inv;
    logic [PSIZE-1:0] raw;
    #0;   // part geometry first
    done = 1'b0; checks = 0; failures = 0;
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
    for (int sl = 0; sl < NVEC * int'(W_SC); sl++) begin
      s = 0;
      slice = '0;
      while (s < NP) begin
        n_codewords++;
        if ($urandom_range(0, 5) == 0) begin
          raw = PSIZE'($urandom);
          for (int b = len[FAIL_IDX] - 1; b >= 0; b--) stream.push_back(code[FAIL_IDX][b]);
          for (int b = 0; b < pstart[s + 1] - pstart[s]; b++) begin
            stream.push_back(raw[b]);
            slice[pstart[s] + b] = raw[b];
            n_rawbits++;
          end
          n_failed++;
          s++;
        end else begin
          k = $urandom_range(0, M - 1);
          lvl = int'(LEVEL[k*LVW +: LVW]);
          tz = 0;
          if (s == 0) tz = int'(MAX);
          else while (((s >> tz) & 1) == 0) tz++;
          j = (lvl > int'(MAX) - tz) ? lvl : int'(MAX) - tz;
          n = 1 << (int'(MAX) - j);
          if (j > lvl) n_reuse++; else n_full++;
          for (int b = len[k] - 1; b >= 0; b--) stream.push_back(code[k][b]);
          for (int b = 0; b < pstart[s + n] - pstart[s]; b++)
            slice[pstart[s] + b] = BLKS[k*N_SC + b];
          s += n;
        end
      end
      inv = T1;
      for (int t = 0; t < int'(T2_NUM); t++)
        if (int'(T2[t*CW +: CW]) / int'(N_SC) == sl % int'(W_SC))
          inv[int'(T2[t*CW +: CW]) % int'(N_SC)] ^= 1'b1;
      expected.push_back(slice ^ inv);
    end
  end

  initial begin : tester
    int total_bits, pos, wait_cnt;
    #1;
    total_bits = stream.size();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pos = 0;
    wait_cnt = 0;
    while (pos < total_bits) begin
      if (R > 0) ate_valid = (wait_cnt >= int'(R) - 1);
      else       ate_valid = ($urandom_range(0, 3) != 0);
      wait_cnt++;
      for (int b = 0; b < int'(ATE_W); b++)
        ate_data[b] = (pos + b < total_bits) ? stream[pos + b] : 1'b1;
      @(posedge clk);
      if (ate_valid && ate_sync) begin
        pos += int'(ATE_W);
        wait_cnt = 0;
      end
      @(negedge clk);
    end
    ate_valid = 1'b0;
  end

  initial begin : monitor
    int got, cycles, dec_min, ate_min, bound;
    got = 0;
    cycles = 0;
    @(posedge rst_n);
    while (got < NVEC * int'(W_SC)) begin
      @(posedge clk);
      cycles++;
      if (scan_shift) begin
        check(scan_data == expected[got], "slice data");
        check(last_slice == (got % int'(W_SC) == int'(W_SC) - 1), "last_slice");
        got++;
      end
    end
    if (R > 0) begin
      dec_min = stream.size() - n_rawbits + n_codewords;
      ate_min = ((stream.size() - 1) / int'(ATE_W)) * int'(R);
      bound = (dec_min > ate_min) ? dec_min : ate_min;
      check(cycles >= bound && cycles <= bound + bound / 10 + 20, "cycle count");
      $display("[%0d chains, r=%0d] cycles=%0d decoder bound=%0d tester bound=%0d cycles/slice=%0d",
               N_SC, R, cycles, dec_min, ate_min, cycles / got);
    end
    check(n_full > 0 && n_reuse > 0 && n_failed > 0, "all decode kinds seen");
    $display("[%0d chains, MAX=%0d, W_SC=%0d, T2=%0d, T1=%0d] slices=%0d full=%0d reuse=%0d failed=%0d",
             N_SC, MAX, W_SC, T2_NUM, USE_T1, got, n_full, n_reuse, n_failed);
    done = 1'b1;
  end
endmodule
