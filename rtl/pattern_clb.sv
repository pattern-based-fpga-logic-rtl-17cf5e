// pattern_clb: pattern-based FPGA logic block (a pattern-N cluster).
//
// A cluster of N basic logic elements (BLEs) with K-input LUTs and I inputs
// from the global routing. The local routing is fully connected: every LUT
// input can take any logic-block input or any BLE output. On top of that, the
// unregistered output of each LUT is fed back into the local routing as a fast
// combinational shortcut to the higher-numbered LUTs (input i of LUT j can take
// LUT i's output for i < j), which lets any acyclic network of up to N LUTs be
// mapped inside one block without passing through the BLE output multiplexers.
// The defaults are the evaluated configuration: K = 6, N = 7 (a pattern-7), and
// I = K(N+1)/2 = 24.
//
// Interface: ipin are the logic-block inputs, opin the BLE outputs (one per
// BLE). The configuration is static and applied on ports: lut_cfg holds each
// LUT's truth table (bit a is the output for input value a, in[0] least
// significant), seq_mode selects registered (1) or combinational (0) output
// per BLE, and route_sel holds the select code of every LUT input's
// local-routing multiplexer (codes in clb_pkg). How the configuration memory
// is loaded is outside this block; exposing it as ports is this design's
// choice.
//
// Timing: a combinational path runs from ipin through up to N LUTs to opin
// within the cycle; registered BLEs update on the rising edge of clk and are
// cleared by the asynchronous active-low rst_n (the reset is this design's
// own choice).
//
// The BLE outputs are fed back into the local routing, so the netlist holds
// structural combinational loops, as every FPGA cluster does: a configuration
// that chains combinational BLEs into a cycle through that feedback is an
// invalid bitstream, and the loop warnings tools print for this module stand
// for that reason. The shortcut paths themselves are acyclic by construction.
module pattern_clb #(
  parameter int unsigned K    = clb_pkg::K_DEF,
  parameter int unsigned N    = clb_pkg::N_DEF,
  parameter int unsigned I    = K * (N + 1) / 2,
  parameter int unsigned SELW = clb_pkg::sel_width(I, N)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [I-1:0]                  ipin,
  output logic [N-1:0]                  opin,
  input  logic [N-1:0][2**K-1:0]        lut_cfg,
  input  logic [N-1:0]                  seq_mode,
  input  logic [N-1:0][K-1:0][SELW-1:0] route_sel
);

  // A pattern-N needs K >= N-1 so that LUT N-1 has an input for every
  // lower LUT's shortcut.
  if (K < N - 1) begin : g_size_check
    $error("pattern_clb: K must be at least N-1");
  end

  logic [N-1:0][K-1:0] lut_in;
  logic [N-1:0]        lut_comb;

  local_routing #(.K(K), .N(N), .I(I), .SELW(SELW)) u_routing (
    .ipin     (ipin),
    .opin     (opin),
    .lut_comb (lut_comb),
    .sel      (route_sel),
    .lut_in   (lut_in)
  );

  for (genvar j = 0; j < N; j++) begin : g_ble
    ble #(.K(K)) u_ble (
      .clk      (clk),
      .rst_n    (rst_n),
      .in       (lut_in[j]),
      .lut_cfg  (lut_cfg[j]),
      .seq_mode (seq_mode[j]),
      .lut_out  (lut_comb[j]),
      .out      (opin[j])
    );
  end

endmodule
