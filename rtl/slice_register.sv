// slice_register -- Register of the VRH decompressor.
//
// N_SC flip-flops, one per scan chain, split into 2^MAX primitive parts
// (PSIZE bits each when the slice splits evenly, otherwise the geometry of
// vrh_pkg::part_start). At each clock edge every part whose enable is high
// takes its bits from r_in. When the part that completes a slice has been loaded
// (slice_done at that edge), scan_shift is high for the following cycle and
// r_out then holds the complete slice: the scan chains shift it in at the
// edge that ends that cycle. The decoder cannot load a new part in that same
// cycle (the next codeword needs at least one more cycle), so r_out is stable
// while scan_shift is high. last_slice marks the final slice of a vector.
// The one-cycle scan_shift pulse is this design's choice of interface.
module slice_register #(
  parameter int unsigned N_SC  = vrh_pkg::N_SC,
  parameter int unsigned MAX   = vrh_pkg::MAX,
  localparam int unsigned NPARTS = 1 << MAX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_SC-1:0]   r_in,
  input  logic [NPARTS-1:0] en,
  input  logic              slice_done,
  input  logic              vector_done,
  output logic [N_SC-1:0]   r_out,
  output logic              scan_shift,
  output logic              last_slice
);
  logic [N_SC-1:0] bit_en;

  for (genvar c = 0; c < N_SC; c++) begin : g_bit
    assign bit_en[c] = en[vrh_pkg::part_of(N_SC, MAX, c)];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r_out      <= '0;
      scan_shift <= 1'b0;
      last_slice <= 1'b0;
    end else begin
      for (int unsigned c = 0; c < N_SC; c++)
        if (bit_en[c]) r_out[c] <= r_in[c];
      scan_shift <= slice_done;
      last_slice <= vector_done;
    end

  a_stable_while_shifting: assert property (@(posedge clk) disable iff (!rst_n)
    scan_shift |-> en == '0);
endmodule
