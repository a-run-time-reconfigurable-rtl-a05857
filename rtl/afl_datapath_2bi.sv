// afl_datapath_2bi: additional filter datapath for two bilinears as the fundamental element.
//
// Bilinear filters 0 and 1 run every cycle. Depending on the filter type the
// datapath stores:
//   bilinear     Bi0 -> R0 and/or Bi1 -> R1 (two independent pixels per cycle)
//   trilinear    Li(Bi of level 0, Bi of level 1, LF) -> R   (one pixel per cycle)
//   anisotropic  R + AL(Li(...)) -> R over n cycles, i.e. the sum of n trilinear
//                results each divided by n                   (one pixel per n cycles)
// The trilinear step is Tri = Bi1 + (Bi0 - Bi1) x LF with Bi0 taken from mip
// level 0 of the pair. Because the two bilinear filters swap mip levels on
// alternate cycles, lod_swap says which filter holds level 0 this cycle.
// Choices of this design: the accumulator adds to zero on the first
// anisotropic iteration instead of to the old register value, and a
// trilinear/anisotropic result goes to the register of the priority slot that
// owns the pixel (R0 for slot 0, R1 for slot 1), so it leaves on its own output.
// Interface: inputs sampled on the rising clock edge when valid is high;
// r0/r1 are the registers, updated one edge after the operands are presented.
module afl_datapath_2bi
  import tex_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  ft_e        ft,
  input  logic [1:0] ar,
  input  logic [1:0] pf,
  input  logic       first,
  input  logic       lod_swap,
  input  fp16_t      bi0,
  input  fp16_t      bi1,
  input  fp16_t      lf,
  output fp16_t      r0,
  output fp16_t      r1
);

  fp16_t lv0, lv1, tri_v, al, acc_old, acc;
  logic  slot;
  fp16_t res;

  assign lv0 = lod_swap ? bi1 : bi0;
  assign lv1 = lod_swap ? bi0 : bi1;

  linear_filter u_li  (.t0(lv0), .t1(lv1), .fc(lf), .y(tri_v));
  aniso_logic   u_al  (.x(tri_v), .ar(ar), .y(al));

  assign slot    = ~pf[0];
  assign acc_old = first ? FP16_ZERO : (slot ? r1 : r0);

  fp16_add      u_acc (.a(acc_old), .b(al), .sub(1'b0), .y(acc));

  assign res = (ft == FT_TRI) ? tri_v : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= FP16_ZERO;
      r1 <= FP16_ZERO;
    end else if (valid) begin
      if (ft == FT_BI) begin
        if (pf[0]) r0 <= bi0;
        if (pf[1]) r1 <= bi1;
      end else if (!slot) begin
        r0 <= res;
      end else begin
        r1 <= res;
      end
    end
  end

endmodule
