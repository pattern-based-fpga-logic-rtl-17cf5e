// pattern_cases_tb: checks that the smallest pattern-based logic blocks can
// map every combinational interconnection case between their LUTs.
//
// A pattern-2 block (K=1, N=2) must realise two 1-LUTs that are either
// independent or directly connected. A pattern-3 block (K=2, N=3) must
// realise, on top of either pattern-2 case, a third LUT that is independent,
// fed by LUT 0, fed by LUT 1, or fed by both. For every case the testbench
// describes the netlist as a connection table (each LUT input is a block
// input or another LUT), derives the routing selects from it, loads random
// truth tables, and compares the block output with a direct evaluation of
// the netlist for every block-input value. Everything is combinational.
module pattern_cases_tb;
  import clb_pkg::*;

  // ---------------- pattern-3: K=2, N=3, I=4 ----------------
  localparam int unsigned K3 = 2, N3 = 3, I3 = K3 * (N3 + 1) / 2;
  localparam int unsigned S3 = sel_width(I3, N3), SC3 = shortcut_code(I3, N3);
  logic [I3-1:0]                  ipin3;
  logic [N3-1:0]                  opin3;
  logic [N3-1:0][2**K3-1:0]       cfg3;
  logic [N3-1:0][K3-1:0][S3-1:0]  sel3;

  pattern_clb #(.K(K3), .N(N3), .I(I3)) dut3 (
    .clk(1'b0), .rst_n(1'b1), .ipin(ipin3), .opin(opin3),
    .lut_cfg(cfg3), .seq_mode('0), .route_sel(sel3));

  // ---------------- pattern-2: K=1, N=2, I=1 ----------------
  localparam int unsigned K2 = 1, N2 = 2, I2 = K2 * (N2 + 1) / 2;
  localparam int unsigned S2 = sel_width(I2, N2), SC2 = shortcut_code(I2, N2);
  logic [I2-1:0]                  ipin2;
  logic [N2-1:0]                  opin2;
  logic [N2-1:0][2**K2-1:0]       cfg2;
  logic [N2-1:0][K2-1:0][S2-1:0]  sel2;

  pattern_clb #(.K(K2), .N(N2), .I(I2)) dut2 (
    .clk(1'b0), .rst_n(1'b1), .ipin(ipin2), .opin(opin2),
    .lut_cfg(cfg2), .seq_mode('0), .route_sel(sel2));

  int checks = 0, failures = 0;
  int cases_p2 = 0, cases_p3 = 0;

  // conn[j][i] >= 0: LUT conn[j][i] drives input i of LUT j (must be i).
  // conn[j][i] <  0: block input -(conn[j][i]+1) drives it.
  int conn3 [N3][K3];
  int conn2 [N2][K2];

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_p3(input string name);
    logic [N3-1:0] v;
    for (int j = 0; j < int'(N3); j++) begin
      cfg3[j] = (2**K3)'($urandom);
      for (int i = 0; i < int'(K3); i++)
        sel3[j][i] = (conn3[j][i] >= 0) ? S3'(SC3) : S3'(-(conn3[j][i] + 1));
    end
    for (int p = 0; p < 2**I3; p++) begin
      ipin3 = I3'(p);
      for (int j = 0; j < int'(N3); j++) begin
        int a = 0;
        for (int i = 0; i < int'(K3); i++)
          a |= int'((conn3[j][i] >= 0) ? v[conn3[j][i]] : ipin3[-(conn3[j][i] + 1)]) << i;
        v[j] = cfg3[j][a];
      end
      #1;
      checks++;
      if (opin3 !== v) begin
        failures++;
        $display("FAIL pattern-3 %s ipin=%b: opin %b expected %b", name, ipin3, opin3, v);
      end
    end
    cases_p3++;
  endtask

  task automatic run_p2(input string name);
    logic [N2-1:0] v;
    for (int j = 0; j < int'(N2); j++) begin
      cfg2[j] = (2**K2)'($urandom);
      for (int i = 0; i < int'(K2); i++)
        sel2[j][i] = (conn2[j][i] >= 0) ? S2'(SC2) : S2'(-(conn2[j][i] + 1));
    end
    for (int p = 0; p < 2**I2; p++) begin
      ipin2 = I2'(p);
      for (int j = 0; j < int'(N2); j++) begin
        int a = 0;
        for (int i = 0; i < int'(K2); i++)
          a |= int'((conn2[j][i] >= 0) ? v[conn2[j][i]] : ipin2[-(conn2[j][i] + 1)]) << i;
        v[j] = cfg2[j][a];
      end
      #1;
      checks++;
      if (opin2 !== v) begin
        failures++;
        $display("FAIL pattern-2 %s ipin=%b: opin %b expected %b", name, ipin2, opin2, v);
      end
    end
    cases_p2++;
  endtask

  initial begin
    repeat (20) begin
      // Pattern-2, Fig. 3(a): LUT 0 drives input 0 of LUT 1.
      conn2[0][0] = -1; conn2[1][0] = 0;  run_p2("direct");
      // Pattern-2, Fig. 3(c): independent LUTs (only one block input here).
      conn2[0][0] = -1; conn2[1][0] = -1; run_p2("independent");

      for (int direct = 0; direct < 2; direct++) begin
        // LUT 0 on block inputs 0,1; LUT 1 input 1 on block input 2 and
        // input 0 either on LUT 0 or on block input 3.
        conn3[0][0] = -1; conn3[0][1] = -2;
        conn3[1][0] = (direct != 0) ? 0 : -4; conn3[1][1] = -3;
        // Fig. 4(a): third LUT independent.
        conn3[2][0] = -4; conn3[2][1] = -1; run_p3("independent third");
        // Fig. 4(b): third LUT fed by LUT 0.
        conn3[2][0] = 0;  conn3[2][1] = -4; run_p3("third fed by LUT 0");
        // Fig. 4(c): third LUT fed by LUT 1.
        conn3[2][0] = -4; conn3[2][1] = 1;  run_p3("third fed by LUT 1");
        // Fig. 4(d): third LUT fed by both.
        conn3[2][0] = 0;  conn3[2][1] = 1;  run_p3("third fed by both");
      end
    end
    checks++;
    if (cases_p2 == 0 || cases_p3 == 0) begin
      failures++;
      $display("FAIL no cases run");
    end
    $display("pattern-2 cases %0d, pattern-3 cases %0d", cases_p2, cases_p3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
