// vrh_pkg -- shared sizes and default code tables of the variable-to-variable
// reusable Huffman (VRH) test-data decompressor.
//
// The sizes follow the configuration whose decompressor cost is reported for
// the method: 64 scan chains, 8-bit primitive parts (so a slice holds
// 2^3 = 8 primitive parts and MAX = 3), 24 encoded distinct blocks plus one
// codeword that marks a failed (unencoded) primitive part, and 5 ATE channels.
// PSIZE is the size of the largest primitive part, ceil(N_SC / 2^MAX).
//
// Everything that depends on a particular test set is test-set specific and
// is produced by the (software) encoder: the Huffman code lengths, the level
// P_r of every distinct block, the block contents, the chains inverted by
// transformation T1 and the cells inverted by T2. The defaults below are an
// example code of the right shape, defined by simple formulas, so that the
// RTL elaborates and can be simulated on its own; a real decompressor is
// obtained by overriding the table parameters of vrh_decompressor.
//
// Table layout (all tables are flat packed vectors, entry k at [k*W +: W]):
//   code length  : LW bits per codeword, NCODE entries
//   block level  : LVW bits per distinct block (r of a P_r-block), M entries
//   block bits   : N_SC bits per distinct block; bit 0 is the block's first
//                  bit and lands on scan chain 0 of the part it is decoded to
//   T1 mask      : N_SC bits, bit c set = chain c inverted
//   T2 cells     : CW bits per cell, cell number = slice * N_SC + chain
package vrh_pkg;

  localparam int unsigned N_SC     = 64;  // scan chains = slice width
  localparam int unsigned MAX      = 3;   // slice = 2^MAX primitive parts
  localparam int unsigned PSIZE    = (N_SC + (1 << MAX) - 1) >> MAX; // 8 bits
  localparam int unsigned M        = 24;  // encoded distinct blocks
  localparam int unsigned NCODE    = M + 1; // + the "failed" codeword
  localparam int unsigned FAIL_IDX = M;   // CodeIndex of the failed codeword
  localparam int unsigned ATE_W    = 5;   // ATE channels (bits per ATE word)
  localparam int unsigned W_SC     = 4;   // slices per test vector (scan length)
  localparam int unsigned T2_NUM   = 50;  // scan cells inverted by T2
  localparam int unsigned LMAX     = 16;  // longest codeword the FSM accepts

  // Part geometry. A slice of n_sc bits is halved max times; where a part
  // cannot be halved evenly the first half gets the extra bit. Every part of
  // level i then has ceil(n_sc/2^i) or floor(n_sc/2^i) bits. part_start gives
  // the first scan chain of primitive part p (p = 2^max gives n_sc).
  function automatic int unsigned part_start(int unsigned n_sc, int unsigned max,
                                             int unsigned p);
    int unsigned lo = 0;
    int unsigned n  = n_sc;
    if (p >= (32'd1 << max)) return n_sc;
    for (int unsigned l = 1; l <= max; l++)
      if (((p >> (max - l)) & 1) != 0) begin
        lo = lo + (n + 1) / 2;
        n  = n / 2;
      end else begin
        n  = (n + 1) / 2;
      end
    return lo;
  endfunction

  // primitive part that holds scan chain c
  function automatic int unsigned part_of(int unsigned n_sc, int unsigned max,
                                          int unsigned c);
    for (int unsigned p = 0; p < (32'd1 << max); p++)
      if (c < part_start(n_sc, max, p + 1)) return p;
    return 0;
  endfunction

  localparam int unsigned LW  = $clog2(LMAX + 1);
  localparam int unsigned LVW = $clog2(MAX + 1);
  localparam int unsigned CW  = $clog2(W_SC * N_SC);

  // Example Huffman code lengths for the 25 codewords (Kraft sum exactly 1):
  // blocks 0,1 and the failed codeword get 3 bits, blocks 2-5 get 4 bits,
  // blocks 6-13 get 5, blocks 14-19 get 6 and blocks 20-23 get 7.
  function automatic int unsigned def_len(int unsigned k);
    if (k == FAIL_IDX) return 3;
    if (k < 2)         return 3;
    if (k < 6)         return 4;
    if (k < 14)        return 5;
    if (k < 20)        return 6;
    return 7;
  endfunction

  function automatic logic [NCODE*LW-1:0] def_code_len();
    logic [NCODE*LW-1:0] t = '0;
    for (int unsigned k = 0; k < NCODE; k++) t[k*LW +: LW] = LW'(def_len(k));
    return t;
  endfunction

  // Example block levels: blocks 0-3 are P_0 (whole slices), 4-9 P_1,
  // 10-15 P_2 and 16-23 P_3 (primitive parts).
  function automatic logic [M*LVW-1:0] def_block_level();
    logic [M*LVW-1:0] t = '0;
    for (int unsigned k = 0; k < M; k++)
      t[k*LVW +: LVW] = LVW'(k < 4 ? 0 : k < 10 ? 1 : k < 16 ? 2 : 3);
    return t;
  endfunction

  // Example block contents: a 32-bit xorshift sequence seeded per block.
  function automatic logic [M*N_SC-1:0] def_blocks();
    logic [M*N_SC-1:0] t = '0;
    logic [31:0] x;
    for (int unsigned k = 0; k < M; k++) begin
      x = 32'h9E37_79B9 ^ (32'(k) * 32'h0101_0101 + 32'd1);
      for (int unsigned b = 0; b < N_SC; b++) begin
        x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
        t[k*N_SC + b] = x[7];
      end
    end
    return t;
  endfunction

  // Example T1 mask: every chain c with c mod 7 == 3 is inverted.
  function automatic logic [N_SC-1:0] def_t1_mask();
    logic [N_SC-1:0] t = '0;
    for (int unsigned c = 0; c < N_SC; c++) t[c] = (c % 7 == 3);
    return t;
  endfunction

  // Example T2 cells: cell k is number (37*k + 11) mod (W_SC*N_SC); 37 is odd,
  // so the T2_NUM cells are all different.
  function automatic logic [T2_NUM*CW-1:0] def_t2_cells();
    logic [T2_NUM*CW-1:0] t = '0;
    for (int unsigned k = 0; k < T2_NUM; k++)
      t[k*CW +: CW] = CW'((37 * k + 11) % (W_SC * N_SC));
    return t;
  endfunction

  localparam logic [NCODE*LW-1:0] DEF_CODE_LEN    = def_code_len();
  localparam logic [M*LVW-1:0]    DEF_BLOCK_LEVEL = def_block_level();
  localparam logic [M*N_SC-1:0]   DEF_BLOCKS      = def_blocks();
  localparam logic [N_SC-1:0]     DEF_T1_MASK     = def_t1_mask();
  localparam logic [T2_NUM*CW-1:0] DEF_T2_CELLS   = def_t2_cells();

endpackage
