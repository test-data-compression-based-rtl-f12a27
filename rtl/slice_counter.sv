// slice_counter -- Slice Counter of the VRH decompressor.
//
// Counts the slices of the test vector being decompressed: slice_idx is the
// index (0 .. W_SC-1) of the slice now being assembled in the Register and
// is used by the Invert Unit to locate the T2 cells. It advances on every
// completed slice and wraps after W_SC slices, at which point the whole test
// vector has been shifted into the scan chains (vector_done, combinational,
// with the slice_done that completes the last slice). Slice order 0, 1, ...
// matches the slice numbering of the scan structure; the wrap-around and the
// vector_done output are this design's choices.
module slice_counter #(
  parameter int unsigned W_SC = vrh_pkg::W_SC,
  localparam int unsigned SW  = (W_SC > 1) ? $clog2(W_SC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slice_done,
  output logic [SW-1:0] slice_idx,
  output logic          vector_done
);
  assign vector_done = slice_done && (32'(slice_idx) == W_SC - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           slice_idx <= '0;
    else if (vector_done) slice_idx <= '0;
    else if (slice_done)  slice_idx <= slice_idx + 1'b1;
endmodule
