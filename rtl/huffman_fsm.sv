// huffman_fsm -- bit-serial Huffman decoding FSM of the VRH decompressor.
//
// A Huffman code of NCODE codewords is a full binary tree with NCODE leaves
// and NCODE-1 internal nodes. The FSM has one state per internal node, the
// root being state 0, and takes one received bit per cycle: the bit selects
// the left or right child of the current node. When the child is a leaf,
// the index of that codeword (0..NCODE-1) is placed on code_index,
// code_valid is raised and the FSM returns to the root; failed is raised as
// well when the codeword is the one reserved for unencoded primitive parts.
// code_valid doubles as Stop: it stays high, and no further bit is consumed,
// until the rest of the decompressor acknowledges the codeword with ack.
//
// The code is given by its codeword lengths (CODE_LEN). The codewords are
// the canonical Huffman code for those lengths (shorter codes first, equal
// lengths in index order, first received bit = branch at the root), and the
// next-state table of the tree is computed from them at elaboration. A
// Huffman code is always complete (Kraft sum 1); a length table that is not
// is rejected at elaboration. The FSM's outputs (CodeIndex, Valid Code,
// Failed, Stop) are the method's; the canonical assignment, the state
// numbering and the ack handshake are this design's choices.
//
// Timing: a codeword of L bits is recognised in L cycles; code_valid rises
// after the edge that takes its last bit and falls after the edge with ack.
module huffman_fsm #(
  parameter int unsigned NCODE    = vrh_pkg::NCODE,
  parameter int unsigned FAIL_IDX = vrh_pkg::FAIL_IDX,
  parameter int unsigned LMAX     = vrh_pkg::LMAX,
  parameter int unsigned LW       = $clog2(LMAX + 1),
  parameter logic [NCODE*LW-1:0] CODE_LEN = vrh_pkg::DEF_CODE_LEN,
  localparam int unsigned IW = $clog2(NCODE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bit_in,
  input  logic          bit_valid,   // a bit is offered (taken when !stop)
  output logic          stop,
  output logic          code_valid,
  output logic [IW-1:0] code_index,
  output logic          failed,
  input  logic          ack
);
  localparam int unsigned NNODE = NCODE - 1;                   // internal nodes
  localparam int unsigned SW    = (NNODE > 1) ? $clog2(NNODE) : 1;
  localparam int unsigned VW    = (SW > IW) ? SW : IW;
  localparam int unsigned EW    = 1 + VW;                      // {leaf, value}

  // Canonical codewords, right-aligned in LMAX bits.
  function automatic logic [NCODE*LMAX-1:0] canonical_codes();
    logic [NCODE*LMAX-1:0] t = '0;
    logic [LMAX-1:0] c = '0;
    for (int unsigned l = 1; l <= LMAX; l++) begin
      for (int unsigned k = 0; k < NCODE; k++)
        if (32'(CODE_LEN[k*LW +: LW]) == l) begin
          t[k*LMAX +: LMAX] = c;
          c = c + 1'b1;
        end
      c = c << 1;
    end
    return t;
  endfunction

  localparam logic [NCODE*LMAX-1:0] CODES = canonical_codes();

  // Kraft sum of the lengths, scaled by 2^LMAX; 2^LMAX for a complete code.
  function automatic longint unsigned kraft();
    longint unsigned sum = 0;
    for (int unsigned k = 0; k < NCODE; k++)
      sum += 64'd1 << (LMAX - 32'(CODE_LEN[k*LW +: LW]));
    return sum;
  endfunction

  // Next-state table. Internal nodes are the proper prefixes of the
  // codewords, numbered in order of discovery (the empty prefix, i.e. the
  // root, first). Entry [2*n + b] is {1, codeword index} when bit b leads
  // from node n to a leaf and {0, node} when it leads to another node.
  function automatic logic [2*NNODE*EW-1:0] next_table();
    logic [2*NNODE*EW-1:0] t = '0;
    logic [LMAX-1:0] npfx [NNODE];
    int unsigned     ndep [NNODE];
    int unsigned     nn = 0;
    logic [LMAX-1:0] p, child;
    int unsigned     l;
    bit              seen;
    for (int unsigned k = 0; k < NCODE; k++) begin
      l = 32'(CODE_LEN[k*LW +: LW]);
      for (int unsigned d = 0; d < l; d++) begin
        p = CODES[k*LMAX +: LMAX] >> (l - d);
        seen = 1'b0;
        for (int unsigned n = 0; n < nn; n++)
          if (ndep[n] == d && npfx[n] == p) seen = 1'b1;
        if (!seen && nn < NNODE) begin
          npfx[nn] = p;
          ndep[nn] = d;
          nn++;
        end
      end
    end
    for (int unsigned n = 0; n < nn; n++)
      for (int unsigned b = 0; b < 2; b++) begin
        child = (npfx[n] << 1) | LMAX'(b);
        for (int unsigned k = 0; k < NCODE; k++)
          if (32'(CODE_LEN[k*LW +: LW]) == ndep[n] + 1 && CODES[k*LMAX +: LMAX] == child)
            t[(2*n + b)*EW +: EW] = {1'b1, VW'(k)};
        for (int unsigned m = 0; m < nn; m++)
          if (ndep[m] == ndep[n] + 1 && npfx[m] == child)
            t[(2*n + b)*EW +: EW] = {1'b0, VW'(m)};
      end
    return t;
  endfunction

  localparam logic [2*NNODE*EW-1:0] NEXT = next_table();

  if (kraft() != (64'd1 << LMAX)) begin : g_code_check
    $error("CODE_LEN is not a complete prefix code");
  end

  logic [SW-1:0] node;
  logic [EW-1:0] entry;
  logic          take;

  assign stop  = code_valid;
  assign take  = bit_valid && !code_valid;

  always_comb begin
    entry = '0;
    for (int unsigned n = 0; n < NNODE; n++)
      if (32'(node) == n) entry = NEXT[(2*n + 32'(bit_in))*EW +: EW];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      node       <= '0;
      code_valid <= 1'b0;
      code_index <= '0;
      failed     <= 1'b0;
    end else if (code_valid) begin
      if (ack) code_valid <= 1'b0;
    end else if (take) begin
      if (entry[EW-1]) begin
        node       <= '0;
        code_valid <= 1'b1;
        code_index <= IW'(entry[VW-1:0]);
        failed     <= 32'(entry[VW-1:0]) == FAIL_IDX;
      end else begin
        node <= SW'(entry[VW-1:0]);
      end
    end

  a_ack_only_when_valid: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> code_valid);
endmodule
