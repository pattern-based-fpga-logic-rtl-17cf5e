// routing_mux: one local-routing multiplexer.
//
// Selects one of W source signals with a binary select code. A code of W or
// more selects constant 0, which is how an unused LUT input is tied off.
// Purely combinational. The binary encoding is this design's own choice; a
// fabricated block would decode one-hot configuration memory cells into a
// pass-transistor tree, which has the same logic function.
module routing_mux #(
  parameter int unsigned W    = 32,
  parameter int unsigned SELW = (W > 1) ? $clog2(W + 1) : 1
) (
  input  logic [W-1:0]    src,
  input  logic [SELW-1:0] sel,
  output logic            out
);

  always_comb begin
    out = 1'b0;
    for (int unsigned s = 0; s < W; s++)
      if (sel == SELW'(s)) out = src[s];
  end

endmodule
