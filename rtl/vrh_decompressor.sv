// vrh_decompressor -- on-chip decompressor for variable-to-variable reusable
// Huffman (VRH) compressed test data, feeding N_SC parallel scan chains.
//
// Data path: ATE words -> input_buffer -> (bit-serial) huffman_fsm ->
// CodeIndex / Failed -> distinct_block (block ROM + replication, or raw bits
// of a failed primitive part) -> invert_unit (undoes T1/T2) -> slice_register
// -> scan chains. block_size_enable holds the primitive-part pointer s of the
// slice, decides how much of the received block is used (the "reuse" of a
// long block's codeword for a shorter part) and enables the matching parts of
// the register; slice_counter tells the invert unit which slice is built.
// The block set, connections and signal names (CodeIndex, Valid Code, Failed,
// Stop, Size, EN, ATE-Sync) follow the method's architecture; handshakes,
// bit orders and table formats are this design's choices and are described
// in each unit.
//
// Ports:
//   ate_data/ate_valid/ate_sync : one ATE_W-bit word per edge where valid and
//                                 sync are both high (ATE_W ATE channels)
//   scan_data/scan_shift        : a complete slice, scan chain c on bit c,
//                                 to be shifted in where scan_shift is high
//   last_slice                  : with scan_shift, the last slice of a vector
// Throughput: a codeword of L bits costs L cycles plus one load cycle; a
// failed part additionally needs its raw bits (PSIZE, or PSIZE-1 for a
// short part of an unevenly split slice) to be in the buffer.
module vrh_decompressor #(
  parameter int unsigned N_SC     = vrh_pkg::N_SC,
  parameter int unsigned MAX      = vrh_pkg::MAX,
  parameter int unsigned M        = vrh_pkg::M,
  parameter int unsigned ATE_W    = vrh_pkg::ATE_W,
  parameter int unsigned W_SC     = vrh_pkg::W_SC,
  parameter int unsigned T2_NUM   = vrh_pkg::T2_NUM,
  parameter int unsigned LMAX     = vrh_pkg::LMAX,
  parameter int unsigned LW       = $clog2(LMAX + 1),
  parameter int unsigned LVW      = $clog2(MAX + 1),
  parameter int unsigned CW       = $clog2(W_SC * N_SC),
  parameter logic [(M+1)*LW-1:0] CODE_LEN    = vrh_pkg::DEF_CODE_LEN,
  parameter logic [M*LVW-1:0]    BLOCK_LEVEL = vrh_pkg::DEF_BLOCK_LEVEL,
  parameter logic [M*N_SC-1:0]   BLOCKS      = vrh_pkg::DEF_BLOCKS,
  parameter logic [N_SC-1:0]     T1_MASK     = vrh_pkg::DEF_T1_MASK,
  parameter logic [(T2_NUM > 0 ? T2_NUM : 1)*CW-1:0] T2_CELLS = vrh_pkg::DEF_T2_CELLS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ATE_W-1:0] ate_data,
  input  logic             ate_valid,
  output logic             ate_sync,
  output logic [N_SC-1:0]  scan_data,
  output logic             scan_shift,
  output logic             last_slice
);
  localparam int unsigned PSIZE  = (N_SC + (1 << MAX) - 1) >> MAX;
  localparam int unsigned NCODE  = M + 1;
  localparam int unsigned IW     = $clog2(NCODE);
  localparam int unsigned QW     = $clog2(MAX + 1);
  localparam int unsigned NPARTS = 1 << MAX;
  localparam int unsigned SW     = (W_SC > 1) ? $clog2(W_SC) : 1;

  if (N_SC < (2 << MAX)) begin : g_size_check
    $error("a primitive part needs at least two scan chains");
  end

  logic              data_in, data_valid, stop;
  logic [PSIZE-1:0]  raw_data;
  logic              raw_valid, raw_pop, raw_short;
  logic              code_valid, failed, load;
  logic [IW-1:0]     code_index;
  logic [QW-1:0]     size_q;
  logic [NPARTS-1:0] en;
  logic              slice_done, vector_done;
  logic [N_SC-1:0]   block_out, r_in;
  logic [SW-1:0]     slice_idx;

  input_buffer #(.ATE_W(ATE_W), .PSIZE(PSIZE)) u_input_buffer (
    .clk, .rst_n, .ate_data, .ate_valid, .ate_sync, .stop,
    .bit_out(data_in), .bit_valid(data_valid),
    .raw_data, .raw_valid, .raw_pop, .raw_short
  );

  huffman_fsm #(.NCODE(NCODE), .FAIL_IDX(M), .LMAX(LMAX), .LW(LW),
                .CODE_LEN(CODE_LEN)) u_huffman_fsm (
    .clk, .rst_n, .bit_in(data_in), .bit_valid(data_valid), .stop,
    .code_valid, .code_index, .failed, .ack(load)
  );

  block_size_enable #(.N_SC(N_SC), .MAX(MAX), .M(M), .LVW(LVW),
                      .BLOCK_LEVEL(BLOCK_LEVEL)) u_block_size_enable (
    .clk, .rst_n, .code_valid, .code_index, .failed, .raw_valid,
    .load, .raw_pop, .raw_short, .size_q, .en, .slice_done, .s()
  );

  distinct_block #(.N_SC(N_SC), .MAX(MAX), .M(M),
                   .BLOCKS(BLOCKS)) u_distinct_block (
    .code_index, .failed, .raw_data, .size_q, .block_out
  );

  slice_counter #(.W_SC(W_SC)) u_slice_counter (
    .clk, .rst_n, .slice_done, .slice_idx, .vector_done
  );

  invert_unit #(.N_SC(N_SC), .W_SC(W_SC), .T2_NUM(T2_NUM), .CW(CW),
                .T1_MASK(T1_MASK), .T2_CELLS(T2_CELLS)) u_invert_unit (
    .din(block_out), .slice_idx, .dout(r_in)
  );

  slice_register #(.N_SC(N_SC), .MAX(MAX)) u_slice_register (
    .clk, .rst_n, .r_in, .en, .slice_done, .vector_done,
    .r_out(scan_data), .scan_shift, .last_slice
  );
endmodule
