// ss_fifo: sampler-state FIFO in front of a texture unit.
//
// Holds the pixel requirements (filter type and pixel data) of one sub texture
// unit. A synchronous circular buffer with a first-word-fall-through head:
// dout shows the oldest entry whenever empty is low, so the fetch logic can
// look at its filter type before deciding to pop it. A push and a pop may
// happen in the same cycle. The depth is this design's choice (the unit's
// throughput analysis assumes a FIFO that never fills).
// Interface: push/din/full, pop/dout/empty, count; all on the rising edge.
module ss_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 18
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  output logic                       full,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) wp <= inc(wp);
      if (pop && !empty) rp <= inc(rp);
      count <= count + ($clog2(DEPTH+1))'(push && !full) - ($clog2(DEPTH+1))'(pop && !empty);
    end
  end

  always_ff @(posedge clk)
    if (push && !full) mem[wp] <= din;

  // A producer must not push into a full FIFO nor a consumer pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
