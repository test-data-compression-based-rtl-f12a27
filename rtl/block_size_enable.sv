// block_size_enable -- Block Size/Enable unit of the VRH decompressor.
//
// Holds s, the MAX-bit count of primitive parts of the current slice that are
// already decoded (s points at the next one). When the q lowest bits of s are
// zero (q = MAX for s = 0), the largest part that may start at s is a
// P_(MAX-q)-part. A codeword of a P_r-block therefore decodes to a part of
// level j = max(r, MAX-q), i.e. 2^(MAX-j) primitive parts: the whole block if
// it fits, otherwise its leading half, quarter, ... A failed codeword always
// decodes one primitive part (level MAX). This rule is the method's own.
//
// Interface and timing: the unit loads the pending codeword (code_valid) in
// the same cycle, unless it is a failed codeword whose PSIZE raw bits are not
// yet in the input buffer (raw_valid low), in which case it waits. On a load
// it drives size_q = MAX-j to the Distinct Block unit, one enable per
// primitive part of the Register (parts s .. s+2^size_q-1), ack to the FSM,
// raw_pop to the input buffer for failed parts, and slice_done when the part
// completes the slice; s advances at the same clock edge. The acknowledge
// handshake and the level table format are this design's choices.
// raw_short tells the input buffer that primitive part s is one bit shorter
// than PSIZE (only when the slice does not split evenly).
module block_size_enable #(
  parameter int unsigned N_SC = vrh_pkg::N_SC,
  parameter int unsigned MAX  = vrh_pkg::MAX,
  parameter int unsigned M    = vrh_pkg::M,
  parameter int unsigned LVW  = $clog2(MAX + 1),
  parameter logic [M*LVW-1:0] BLOCK_LEVEL = vrh_pkg::DEF_BLOCK_LEVEL,
  localparam int unsigned IW     = $clog2(M + 1),
  localparam int unsigned QW     = $clog2(MAX + 1),
  localparam int unsigned NPARTS = 1 << MAX,
  localparam int unsigned PSIZE  = (N_SC + NPARTS - 1) >> MAX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              code_valid,
  input  logic [IW-1:0]     code_index,
  input  logic              failed,
  input  logic              raw_valid,
  output logic              load,
  output logic              raw_pop,
  output logic              raw_short,
  output logic [QW-1:0]     size_q,
  output logic [NPARTS-1:0] en,
  output logic              slice_done,
  output logic [MAX-1:0]    s
);
  logic [QW-1:0]  tz;       // trailing zero bits of s (MAX when s == 0)
  logic [QW-1:0]  level;    // r of the received block
  logic [QW-1:0]  j;        // level of the part actually decoded
  logic [MAX:0]   s_sum;

  always_comb begin
    tz = QW'(MAX);
    for (int i = int'(MAX) - 1; i >= 0; i--)
      if (s[i]) tz = QW'(i);
  end

  always_comb begin
    level = QW'(MAX);
    if (!failed)
      for (int unsigned k = 0; k < M; k++)
        if (32'(code_index) == k) level = QW'(BLOCK_LEVEL[k*LVW +: LVW]);
    j      = (level > QW'(MAX) - tz) ? level : QW'(MAX) - tz;
    size_q = QW'(MAX) - j;
  end

  // parts narrower than PSIZE, from the part geometry
  logic [NPARTS-1:0] short_part;
  for (genvar p = 0; p < NPARTS; p++) begin : g_part
    assign short_part[p] = (vrh_pkg::part_start(N_SC, MAX, p + 1)
                            - vrh_pkg::part_start(N_SC, MAX, p)) < PSIZE;
  end
  assign raw_short  = short_part[s];

  assign load       = code_valid && (!failed || raw_valid);
  assign raw_pop    = load && failed;
  assign s_sum      = {1'b0, s} + ((MAX + 1)'(1) << size_q);
  assign slice_done = load && s_sum[MAX];

  always_comb
    for (int unsigned p = 0; p < NPARTS; p++)
      en[p] = load && ((MAX'(p) >> size_q) == (s >> size_q));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    s <= '0;
    else if (load) s <= s_sum[MAX-1:0];
endmodule
