// local_routing_tb: self-checking testbench of the local routing with merged
// pattern shortcuts (default K=6, N=7, I=24).
//
// Applies random select codes and random sources, and compares every LUT
// input with a reference decode of the select code: logic-block input, BLE
// output, the shortcut from LUT i on input i of LUT j (only for i < j), or 0.
// It also counts the 21 shortcut positions that exist and checks that the
// shortcut code on inputs with no shortcut gives 0.
module local_routing_tb;
  import clb_pkg::*;
  localparam int unsigned K    = K_DEF;
  localparam int unsigned N    = N_DEF;
  localparam int unsigned I    = I_DEF;
  localparam int unsigned SELW = sel_width(I, N);
  localparam int unsigned SC   = shortcut_code(I, N);

  logic [I-1:0]                  ipin;
  logic [N-1:0]                  opin, lut_comb;
  logic [N-1:0][K-1:0][SELW-1:0] sel;
  logic [N-1:0][K-1:0]           lut_in;
  int checks = 0, failures = 0;
  int shortcut_hits = 0, shortcut_positions = 0;

  local_routing dut (.ipin, .opin, .lut_comb, .sel, .lut_in);

  function automatic logic expected(int j, int i, int code);
    if (code < int'(I))            return ipin[code];
    else if (code < int'(I + N))   return opin[code - I];
    else if (code == int'(SC) && i < j) return lut_comb[i];
    else                           return 1'b0;
  endfunction

  task automatic check_all(input string what);
    for (int j = 0; j < int'(N); j++)
      for (int i = 0; i < int'(K); i++) begin
        checks++;
        if (lut_in[j][i] !== expected(j, i, int'(sel[j][i]))) begin
          failures++;
          $display("FAIL %s: lut %0d in %0d sel %0d got %b", what, j, i, sel[j][i], lut_in[j][i]);
        end
      end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Random configurations and sources.
    repeat (400) begin
      ipin = I'($urandom); opin = N'($urandom); lut_comb = N'($urandom);
      for (int j = 0; j < int'(N); j++)
        for (int i = 0; i < int'(K); i++) begin
          sel[j][i] = SELW'($urandom_range(0, 2**SELW - 1));
          if (sel[j][i] == SELW'(SC) && i < j) shortcut_hits++;
        end
      #1; check_all("random");
    end
    // Every input on the shortcut code: it must carry LUT i's output where
    // i < j, and 0 elsewhere; try both values of every LUT output.
    for (int j = 0; j < int'(N); j++)
      for (int i = 0; i < int'(K); i++) sel[j][i] = SELW'(SC);
    ipin = '1; opin = '1;
    for (int v = 0; v < 2; v++) begin
      lut_comb = (v != 0) ? '1 : '0;
      #1; check_all("shortcut sweep");
    end
    lut_comb = '1; #1;
    for (int j = 0; j < int'(N); j++)
      for (int i = 0; i < int'(K); i++) shortcut_positions += lut_in[j][i];
    checks++;
    if (shortcut_positions != int'(num_shortcuts(N))) begin
      failures++;
      $display("FAIL shortcut count %0d, expected %0d", shortcut_positions, num_shortcuts(N));
    end
    checks++;
    if (shortcut_hits == 0) begin
      failures++;
      $display("FAIL random configurations never used a shortcut");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
