// ble: basic logic element, a K-LUT followed by a D flip-flop and a 2:1
// output multiplexer.
//
// In combinational mode (seq_mode = 0) the output is the LUT output; in
// sequential mode (seq_mode = 1) it is the flip-flop, which samples the LUT
// output on every rising clock edge. The LUT output is also brought out on
// lut_out unregistered, so that a pattern-based logic block can feed it back
// to the local routing as a fast combinational shortcut even when the BLE is
// registered.
//
// Structure and the two modes follow the standard BLE. The asynchronous
// active-low reset that clears the flip-flop is this design's own choice.
// Timing: out follows in combinationally in combinational mode, and one
// clock cycle later in sequential mode.
module ble #(
  parameter int unsigned K = clb_pkg::K_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [K-1:0]      in,        // LUT inputs from the local routing
  input  logic [2**K-1:0]   lut_cfg,   // LUT truth table
  input  logic              seq_mode,  // 0: combinational, 1: registered
  output logic              lut_out,   // unregistered LUT output
  output logic              out        // BLE output (OPIN)
);

  logic q;

  lut #(.K(K)) u_lut (
    .in  (in),
    .cfg (lut_cfg),
    .out (lut_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= lut_out;
  end

  always_comb out = seq_mode ? q : lut_out;

endmodule
