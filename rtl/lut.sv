// lut: K-input look-up table.
//
// The output is the configuration bit addressed by the K inputs, taken as an
// unsigned number with in[0] as the least significant bit. The table holds
// 2**K bits; bit a of cfg is the output for input value a. Purely
// combinational. The look-up function follows the standard LUT definition;
// the bit ordering of the table is this design's own choice.
module lut #(
  parameter int unsigned K = clb_pkg::K_DEF
) (
  input  logic [K-1:0]      in,   // LUT inputs, all logically equivalent
  input  logic [2**K-1:0]   cfg,  // truth table
  output logic              out
);

  always_comb out = cfg[in];

endmodule
