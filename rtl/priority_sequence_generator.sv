// priority_sequence_generator: two-way input-to-output mapping of the fair fetching logic.
//
// Case 0 (swap = 0) passes I0 to O0 and I1 to O1; case 1 (swap = 1) crosses
// them. Placed behind the two sampler-state FIFOs it puts the pixels into the
// priority order of the cycle (O0 has the higher priority); placed behind the
// filter it restores the original FIFO order (the mapping is its own inverse).
// Used at widths 1 (fetch flags), 2 (filter types) and 16 (pixel data, results).
// The case bit is kept once in the texture unit and shared by all instances
// (this design's choice). Combinational.
module priority_sequence_generator #(
  parameter int unsigned W = 16
) (
  input  logic         swap,
  input  logic [W-1:0] i0,
  input  logic [W-1:0] i1,
  output logic [W-1:0] o0,
  output logic [W-1:0] o1
);

  assign o0 = swap ? i1 : i0;
  assign o1 = swap ? i0 : i1;

endmodule
