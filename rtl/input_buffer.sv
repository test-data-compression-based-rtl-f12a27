// input_buffer -- ATE-side buffer of the VRH decompressor.
//
// Compressed data arrive from the tester as ATE_W-bit words (one bit per ATE
// channel) and leave bit-serially towards the Huffman FSM. The buffer is a
// small bit queue of DEPTH bits, oldest bit at position 0; ATE word bit 0 is
// the oldest bit of that word.
//
// Interface and timing (all single-clock, synchronous, active-low reset):
//   ate_sync  : high while at least ATE_W bits are free; a word is taken at a
//               rising edge where ate_sync and ate_valid are both high.
//   bit_out   : oldest bit, meaningful while bit_valid is high. While stop is
//               low, a valid bit is handed to the FSM every cycle and removed.
//   stop      : from the FSM; freezes the serial output while a recognised
//               codeword is being processed.
//   raw_data  : the oldest PSIZE bits, raw_valid when the part's bits are
//               held; raw_pop removes them (the raw bits of a failed primitive
//               part, which bypass the FSM and go to the Distinct Block unit).
//               raw_short marks a primitive part one bit shorter than PSIZE
//               (slices that do not split evenly): PSIZE-1 bits are then
//               needed and removed.
// The method only states that the buffer takes data in parallel from the ATE,
// shifts them serially into the FSM, is disabled by Stop and raises ATE-Sync;
// the queue depth, the handshake and the bit order are this design's choices.
module input_buffer #(
  parameter int unsigned ATE_W = vrh_pkg::ATE_W,
  parameter int unsigned PSIZE = vrh_pkg::PSIZE,
  parameter int unsigned DEPTH = PSIZE + ATE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ATE_W-1:0] ate_data,
  input  logic             ate_valid,
  output logic             ate_sync,
  input  logic             stop,
  output logic             bit_out,
  output logic             bit_valid,
  output logic [PSIZE-1:0] raw_data,
  output logic             raw_valid,
  input  logic             raw_pop,
  input  logic             raw_short
);
  localparam int unsigned CNTW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0] q;
  logic [CNTW-1:0]  cnt;

  logic             bit_pop, accept;
  logic [CNTW-1:0]  npop, raw_len;
  logic [DEPTH-1:0] q_next;
  logic [CNTW-1:0]  cnt_next;

  assign ate_sync  = (32'(cnt) + ATE_W) <= DEPTH;
  assign accept    = ate_sync && ate_valid;
  assign bit_out   = q[0];
  assign bit_valid = cnt != '0;
  assign bit_pop   = bit_valid && !stop;
  assign raw_data  = q[PSIZE-1:0];
  assign raw_len   = raw_short ? CNTW'(PSIZE - 1) : CNTW'(PSIZE);
  assign raw_valid = cnt >= raw_len;

  always_comb begin
    npop = bit_pop ? CNTW'(1) : (raw_pop ? raw_len : '0);
    q_next   = q >> npop;
    cnt_next = cnt - npop;
    if (accept) begin
      q_next   = q_next | (DEPTH'(ate_data) << cnt_next);
      cnt_next = cnt_next + CNTW'(ATE_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q   <= '0;
      cnt <= '0;
    end else begin
      q   <= q_next;
      cnt <= cnt_next;
    end

  a_raw_pop_ok: assert property (@(posedge clk) disable iff (!rst_n)
    raw_pop |-> raw_valid && stop);
endmodule
