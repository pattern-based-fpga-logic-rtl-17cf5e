// local_routing: fully connected local routing of a pattern-based logic block,
// with the pattern-N shortcut multiplexers merged into it.
//
// Every input i of every LUT j has one multiplexer. Like the local routing of
// a classical cluster, it can pick any of the I logic-block inputs (ipin) or
// any of the N BLE outputs (opin). In addition, input i of LUT j (i < j) has
// one more source: the unregistered output of LUT i (lut_comb[i]). These are
// the N(N-1)/2 two-input shortcut multiplexers of a pattern-N (21 for N = 7),
// folded into the local-routing multiplexers as one extra input each rather
// than built as a separate layer. Because LUTs are acyclic and their inputs
// are interchangeable, letting LUT j reach LUT i only on its input i covers
// every combinational connection pattern among the N LUTs once the LUTs are
// ordered topologically. Shortcuts need K >= N-1 to reach every LUT pair;
// with fewer inputs the missing pairs go through the BLE outputs only.
//
// Select codes are defined in clb_pkg: ipin[c] for c < I, opin[c-I] for
// I <= c < I+N, the shortcut for c = I+N, constant 0 otherwise. The sources
// and the shortcut rule follow the document; the code numbering and the
// position of the shortcut input (the last one) are this design's own
// choices. Purely combinational.
module local_routing #(
  parameter int unsigned K    = clb_pkg::K_DEF,
  parameter int unsigned N    = clb_pkg::N_DEF,
  parameter int unsigned I    = clb_pkg::I_DEF,
  parameter int unsigned SELW = clb_pkg::sel_width(I, N)
) (
  input  logic [I-1:0]              ipin,      // logic-block inputs
  input  logic [N-1:0]              opin,      // BLE outputs fed back
  input  logic [N-1:0]              lut_comb,  // unregistered LUT outputs
  input  logic [N-1:0][K-1:0][SELW-1:0] sel,   // select code per LUT input
  output logic [N-1:0][K-1:0]       lut_in     // LUT inputs
);

  localparam int unsigned W = I + N + 1;

  for (genvar j = 0; j < N; j++) begin : g_lut
    for (genvar i = 0; i < K; i++) begin : g_in
      logic [W-1:0] src;
      // Shortcut source exists only from a lower-numbered LUT.
      if (i < j) begin : g_short
        assign src = {lut_comb[i], opin, ipin};
      end else begin : g_plain
        assign src = {1'b0, opin, ipin};
      end
      routing_mux #(.W(W), .SELW(SELW)) u_mux (
        .src (src),
        .sel (sel[j][i]),
        .out (lut_in[j][i])
      );
    end
  end

endmodule
