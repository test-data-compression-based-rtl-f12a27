// invert_unit -- Invert Unit of the VRH decompressor (removes T1 and T2).
//
// Combinational, between the Distinct Block unit and the Register. Before
// compression the test set may have been transformed by T1, which inverts all
// bits of selected scan chains, and by T2, which inverts selected scan cells
// (a cell is one position of one chain, i.e. one bit of one slice). This unit
// undoes both as the slices are rebuilt: every bit of chain c is XORed with
// T1_MASK[c], and additionally with 1 when (slice_idx, c) is one of the T2
// cells. T2 therefore needs the index of the slice being assembled (from the
// slice counter) and a small decoder per chain; T1 is one inverter per chain.
// Both masks are fixed by the encoder for a given test set and are
// parameters here. With T1_MASK = 0 and T2_NUM = 0 the unit is absent, as in
// the untransformed configuration.
module invert_unit #(
  parameter int unsigned N_SC   = vrh_pkg::N_SC,
  parameter int unsigned W_SC   = vrh_pkg::W_SC,
  parameter int unsigned T2_NUM = vrh_pkg::T2_NUM,
  parameter int unsigned CW     = $clog2(W_SC * N_SC),
  parameter logic [N_SC-1:0] T1_MASK = vrh_pkg::DEF_T1_MASK,
  parameter logic [(T2_NUM > 0 ? T2_NUM : 1)*CW-1:0] T2_CELLS = vrh_pkg::DEF_T2_CELLS,
  localparam int unsigned SW = (W_SC > 1) ? $clog2(W_SC) : 1
) (
  input  logic [N_SC-1:0] din,
  input  logic [SW-1:0]   slice_idx,
  output logic [N_SC-1:0] dout
);
  logic [N_SC-1:0] t2_mask;

  always_comb begin
    t2_mask = '0;
    for (int unsigned k = 0; k < T2_NUM; k++)
      if (32'(slice_idx) == 32'(T2_CELLS[k*CW +: CW]) / N_SC)
        t2_mask[32'(T2_CELLS[k*CW +: CW]) % N_SC] = 1'b1;
  end

  assign dout = din ^ T1_MASK ^ t2_mask;
endmodule
