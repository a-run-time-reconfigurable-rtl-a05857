// mbap_texture_unit: two-bilinear all-purpose (MBAP) texture unit.
//
// Two sub texture units (each with its own input stream, sampler-state FIFO,
// address generator and texture cache) share one texture filter built from two
// bilinear filters and a single additional filter logic. Each cycle the fair
// fetching and dispatching logic decides which head pixels use the filter:
//   1. the 2-bit and 16-bit priority sequence generators put the two FIFO heads
//      (filter type, pixel data) into this round's priority order; the order
//      alternates between FIFO 0 first and FIFO 1 first, round-robin style;
//   2. the priority pixel fetcher picks the pixels (two bilinears, or one
//      trilinear/anisotropic pixel that needs both bilinear filters);
//   3. the pixel dispatcher sends them to address generators 0 and 1;
//   4. the 1-bit priority sequence generator turns the fetch flags back into
//      FIFO order (pops and output write enables) and the second 16-bit one
//      sends the results in R0/R1 back to their own sub texture unit output.
// Address generators and texture caches are outside this module: the request
// (ag_valid, ag_pix, ag_lod, ag_iter) leaves on ports and the texels and
// fractions are expected back combinationally in the same cycle (no cache
// misses). ag_lod selects mip level 0 or 1 of the pixel's level pair;
// ag_iter is the index of the anisotropic sample being filtered.
// Timing: bilinear and trilinear pixels leave one cycle after they are
// fetched (out_wen high for one cycle); an n:1 anisotropic pixel occupies the
// filter n cycles and leaves one cycle after the last. The priority order
// advances once per fetched group of pixels, and while an anisotropic pixel is
// in progress the fetch decision of its first cycle is held; both are this
// design's choices, as are the FIFO depth and a single anisotropic ratio
// input for all pixels.
module mbap_texture_unit
  import tex_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // sub texture unit inputs
  input  logic [1:0]        in_push,
  input  ft_e               in_ft  [2],
  input  logic [PIX_W-1:0]  in_pix [2],
  output logic [1:0]        in_full,
  input  logic [1:0]        ar,
  // requests to address generators 0/1
  output logic [1:0]        ag_valid,
  output logic [PIX_W-1:0]  ag_pix [2],
  output logic [1:0]        ag_lod,
  output logic [ITER_W-1:0] ag_iter,
  // texels and fractions from address generators / texture caches 0/1
  input  fp16_t             tex0 [4],
  input  fp16_t             xf0,
  input  fp16_t             yf0,
  input  fp16_t             tex1 [4],
  input  fp16_t             xf1,
  input  fp16_t             yf1,
  input  fp16_t             lf,
  // sub texture unit outputs
  output fp16_t             out_data [2],
  output logic [1:0]        out_wen
);

  localparam int unsigned EW = 2 + PIX_W;

  logic [EW-1:0]    head [2];
  logic [1:0]       empty, pop;
  ft_e              ft_in [2];
  logic             prio, swap, swap_q, held_swap;
  logic [1:0]       pf_f, pf_p, held_pf, pop_p, wen_q;
  logic [1:0]       fts0, fts1;
  logic [PIX_W-1:0] px0, px1;
  logic             valid, first, last, lod_par;
  ft_e              op_ft;
  fp16_t            r0, r1, o0, o1;

  // sampler-state FIFOs
  for (genvar i = 0; i < 2; i++) begin : g_fifo
    ss_fifo #(.DEPTH(FIFO_DEPTH), .W(EW)) u_fifo (
      .clk, .rst_n,
      .push(in_push[i]), .din({in_ft[i], in_pix[i]}), .full(in_full[i]),
      .pop(pop[i]), .dout(head[i]), .empty(empty[i]), .count()
    );
    assign ft_in[i] = empty[i] ? FT_NONE : ft_e'(head[i][EW-1 -: 2]);
  end

  // priority order of this round; held while an operation is in progress
  assign swap = first ? prio : held_swap;

  priority_sequence_generator #(.W(2)) u_psg_ft (
    .swap, .i0(ft_in[0]), .i1(ft_in[1]), .o0(fts0), .o1(fts1)
  );

  priority_pixel_fetcher u_fetch (.ft0(ft_e'(fts0)), .ft1(ft_e'(fts1)), .pf(pf_f));

  assign pf_p  = first ? pf_f : held_pf;
  assign valid = |pf_p;
  assign op_ft = ft_e'(pf_p[0] ? fts0 : fts1);

  priority_sequence_generator #(.W(PIX_W)) u_psg_pix (
    .swap, .i0(head[0][PIX_W-1:0]), .i1(head[1][PIX_W-1:0]), .o0(px0), .o1(px1)
  );

  pixel_dispatcher #(.W(PIX_W)) u_disp (
    .pf(pf_p), .pix0(px0), .pix1(px1), .ag0(ag_pix[0]), .ag1(ag_pix[1])
  );

  // address generator requests
  always_comb begin
    ag_valid[0] = valid && (pf_p[0] || op_ft != FT_BI);
    ag_valid[1] = valid && (pf_p[1] || op_ft != FT_BI);
    ag_lod      = (op_ft == FT_BI) ? 2'b00 : {~lod_par, lod_par};
  end

  mbap_texture_filter u_filter (
    .clk, .rst_n, .valid, .pf(pf_p), .ft(op_ft), .ar,
    .tex0, .xf0, .yf0, .tex1, .xf1, .yf1, .lf,
    .r0, .r1, .iter(ag_iter), .first, .last, .lod_par
  );

  // fetch flags back to FIFO order: pops when the operation completes
  assign pop_p = pf_p & {2{last}};

  priority_sequence_generator #(.W(1)) u_psg_pf (
    .swap, .i0(pop_p[0]), .i1(pop_p[1]), .o0(pop[0]), .o1(pop[1])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio      <= 1'b0;
      held_swap <= 1'b0;
      held_pf   <= 2'b00;
      swap_q    <= 1'b0;
      wen_q     <= 2'b00;
    end else begin
      if (valid && last)  prio <= ~prio;
      if (valid && first) begin
        held_swap <= swap;
        held_pf   <= pf_p;
      end
      swap_q <= swap;
      wen_q  <= pop;
    end
  end

  // results back to their own sub texture unit
  priority_sequence_generator #(.W(16)) u_psg_out (
    .swap(swap_q), .i0(r0), .i1(r1), .o0(o0), .o1(o1)
  );

  assign out_data[0] = o0;
  assign out_data[1] = o1;
  assign out_wen     = wen_q;

endmodule
