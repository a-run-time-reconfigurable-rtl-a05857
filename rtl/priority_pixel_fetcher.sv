// priority_pixel_fetcher: decides which of the two head pixels are filtered this cycle.
//
// Inputs are the filter types of the two head pixels in priority order (slot 0
// first); FT_NONE marks an empty FIFO. Output pf[i] = 1 means the pixel of slot
// i is fetched and filtered now. The higher-priority pixel always goes if there
// is one. The second goes with it only if both are bilinear (two bilinear
// filters, one pixel each). A trilinear or anisotropic pixel takes both
// filters, so it goes alone. A lone pixel in slot 1 goes when slot 0 is empty.
//   ft0       ft1          pf0 pf1
//   Bi        Bi            1   1
//   Tri/Ani   any           1   0
//   Bi        none/Tri/Ani  1   0
//   none      Bi/Tri/Ani    0   1
//   none      none          0   0   (this design's addition)
// Combinational.
module priority_pixel_fetcher
  import tex_pkg::*;
(
  input  ft_e        ft0,
  input  ft_e        ft1,
  output logic [1:0] pf
);

  always_comb begin
    pf[0] = (ft0 != FT_NONE);
    pf[1] = ((ft0 == FT_BI) && (ft1 == FT_BI)) ||
            ((ft0 == FT_NONE) && (ft1 != FT_NONE));
  end

endmodule
