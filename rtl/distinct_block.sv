// distinct_block -- Distinct Block unit of the VRH decompressor.
//
// Combinational. For a codeword of an encoded distinct block it looks up the
// block (a ROM of M blocks of N_SC bits) and, for a decoded piece of
// 2^size_q primitive parts, drives a copy of the block's leading bits into
// every aligned group of 2^size_q primitive parts across the slice. A piece
// of 2^size_q parts always starts at a multiple of 2^size_q, so the copy that
// falls on the parts the Register enables is exactly the decoded piece. For
// the failed codeword the raw bits of one primitive part are copied into
// every primitive part instead. When the slice splits evenly (N_SC =
// PSIZE * 2^MAX, the evaluated case) this is plain replication: 2^(MAX-q)
// copies of the first 2^q * PSIZE bits. When it does not, each group's copy
// is simply as long as that group, i.e. the first ceil or floor bits of the
// block, the part geometry being the one of vrh_pkg::part_start.
// The replication scheme is the method's; the ROM as a constant table and
// the bit order (block bit 0 = first bit = lowest scan chain of the piece)
// are this design's.
module distinct_block #(
  parameter int unsigned N_SC  = vrh_pkg::N_SC,
  parameter int unsigned MAX   = vrh_pkg::MAX,
  parameter int unsigned M     = vrh_pkg::M,
  parameter logic [M*N_SC-1:0] BLOCKS = vrh_pkg::DEF_BLOCKS,
  localparam int unsigned PSIZE = (N_SC + (1 << MAX) - 1) >> MAX,
  localparam int unsigned IW  = $clog2(M + 1),
  localparam int unsigned QW  = $clog2(MAX + 1)
) (
  input  logic [IW-1:0]    code_index,
  input  logic             failed,
  input  logic [PSIZE-1:0] raw_data,
  input  logic [QW-1:0]    size_q,      // decoded piece = 2^size_q primitive parts
  output logic [N_SC-1:0]  block_out
);
  logic [N_SC-1:0]      blk;
  logic [N_SC-1:0]      raw_copy;
  logic [MAX:0][N_SC-1:0] piece_copy;   // one candidate per piece size

  always_comb begin
    blk = '0;
    for (int unsigned k = 0; k < M; k++)
      if (32'(code_index) == k) blk = BLOCKS[k*N_SC +: N_SC];
  end

  // Each output bit takes a fixed block bit per piece size: its distance
  // from the first chain of its aligned group.
  for (genvar c = 0; c < N_SC; c++) begin : g_bit
    localparam int unsigned P = vrh_pkg::part_of(N_SC, MAX, c);
    assign raw_copy[c] = raw_data[c - vrh_pkg::part_start(N_SC, MAX, P)];
    for (genvar q = 0; q <= MAX; q++) begin : g_size
      localparam int unsigned BASE = vrh_pkg::part_start(N_SC, MAX, (P >> q) << q);
      assign piece_copy[q][c] = blk[c - BASE];
    end
  end

  assign block_out = failed ? raw_copy : piece_copy[size_q];
endmodule
