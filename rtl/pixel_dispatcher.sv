// pixel_dispatcher: sends the fetched pixel(s) to the two address generators.
//
// Address generator 0 gets pixel 0 when pf[0] is set, otherwise pixel 1;
// address generator 1 gets pixel 1 when pf[1] is set, otherwise pixel 0.
// So two bilinear pixels go one to each generator, and a single trilinear or
// anisotropic pixel goes to both, which then fetch its two mip levels.
//   pf = 11: AG0 <- pixel 0, AG1 <- pixel 1
//   pf = 10: AG0 <- pixel 0, AG1 <- pixel 0
//   pf = 01: AG0 <- pixel 1, AG1 <- pixel 1
// This is the dispatch table of the published design, two 2-to-1
// multiplexers. Combinational. Pixels are in priority order.
module pixel_dispatcher #(
  parameter int unsigned W = 16
) (
  input  logic [1:0]   pf,
  input  logic [W-1:0] pix0,
  input  logic [W-1:0] pix1,
  output logic [W-1:0] ag0,
  output logic [W-1:0] ag1
);

  assign ag0 = pf[0] ? pix0 : pix1;
  assign ag1 = pf[1] ? pix1 : pix0;

endmodule
