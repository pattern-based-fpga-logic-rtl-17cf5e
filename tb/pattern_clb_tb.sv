// pattern_clb_tb: end-to-end testbench of the pattern-based logic block at its
// default size (K=6, N=7, I=24; no parameter overrides).
//
// Three parts:
//  1. A 24-input odd-parity tree mapped as a chain of all seven LUTs: LUT 0
//     takes six block inputs, LUT j takes LUT j-1 through its pattern shortcut
//     on input j-1 and block inputs on the rest. The block is combinational
//     end to end, and the output is compared with the parity of the inputs.
//  2. A 3-bit counter in three registered BLEs fed back through the BLE
//     outputs, checked cycle by cycle against an integer count.
//  2b. One BLE registering a&b while LUT 1 uses the same a&b unregistered
//     through its shortcut (a LUT feeding both a flip-flop and a LUT).
//  3. Random legal configurations: random truth tables, random modes and
//     random routing (block inputs, BLE outputs, shortcuts, unused inputs).
//     Legal means no combinational cycle: LUT j may read the output of BLE m
//     only if BLE m is registered or m < j. A reference model evaluates the
//     LUTs in index order each cycle and tracks the flip-flops.
// Each mechanism (registered-plus-shortcut fanout, shortcut, combinational and registered BLE-output feedback,
// combinational and registered BLEs, reset) is counted; one that never
// happens counts as a failure.
module pattern_clb_tb;
  import clb_pkg::*;
  localparam int unsigned K    = K_DEF;
  localparam int unsigned N    = N_DEF;
  localparam int unsigned I    = I_DEF;
  localparam int unsigned SELW = sel_width(I, N);
  localparam int unsigned SC   = shortcut_code(I, N);

  logic                          clk = 1'b0;
  logic                          rst_n;
  logic [I-1:0]                  ipin;
  logic [N-1:0]                  opin;
  logic [N-1:0][2**K-1:0]        lut_cfg;
  logic [N-1:0]                  seq_mode;
  logic [N-1:0][K-1:0][SELW-1:0] route_sel;

  int checks = 0, failures = 0, cycles = 0;
  int n_fanout = 0, n_shortcut = 0, n_fb_comb = 0, n_fb_seq = 0, n_comb_ble = 0, n_seq_ble = 0, n_reset = 0;

  // Reference state.
  logic [N-1:0] ref_q, ref_lut, ref_out;

  pattern_clb dut (.clk, .rst_n, .ipin, .opin, .lut_cfg, .seq_mode, .route_sel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d: opin %b expected %b", what, cycles, got, exp);
    end
  endtask

  // Value seen by input i of LUT j under the current configuration, given the
  // LUT values already computed for lower-numbered LUTs.
  function automatic logic ref_src(int j, int i);
    int code = int'(route_sel[j][i]);
    if (code < int'(I)) return ipin[code];
    if (code < int'(I + N)) begin
      int m = code - int'(I);
      return seq_mode[m] ? ref_q[m] : ref_lut[m];
    end
    if (code == int'(SC) && i < j) return ref_lut[i];
    return 1'b0;
  endfunction

  // Combinational evaluation of the whole block, in LUT index order.
  task automatic ref_eval();
    for (int j = 0; j < int'(N); j++) begin
      int addr = 0;
      for (int i = 0; i < int'(K); i++) addr |= int'(ref_src(j, i)) << i;
      ref_lut[j] = lut_cfg[j][addr];
      ref_out[j] = seq_mode[j] ? ref_q[j] : ref_lut[j];
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b1; #1;
    rst_n = 1'b0; #1;
    ref_q = '0;
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Random legal configuration.
  task automatic random_config();
    for (int j = 0; j < int'(N); j++) begin
      for (int w = 0; w < 2**K; w += 32) lut_cfg[j][w +: 32] = $urandom;
      seq_mode[j] = $urandom_range(0, 2) == 0;
    end
    for (int j = 0; j < int'(N); j++)
      for (int i = 0; i < int'(K); i++) begin
        int kind = $urandom_range(0, 3);
        int m = $urandom_range(0, N - 1);
        case (kind)
          0: route_sel[j][i] = SELW'($urandom_range(0, I - 1));
          1: route_sel[j][i] = (seq_mode[m] || m < j) ? SELW'(I + m) : SELW'($urandom_range(0, I - 1));
          2: route_sel[j][i] = (i < j) ? SELW'(SC) : SELW'($urandom_range(0, I - 1));
          default: route_sel[j][i] = SELW'(SC);  // unused where i >= j
        endcase
        if (route_sel[j][i] == SELW'(SC) && i < j) n_shortcut++;
        if (route_sel[j][i] >= SELW'(I) && route_sel[j][i] < SELW'(I + N)) begin
          if (seq_mode[int'(route_sel[j][i]) - int'(I)]) n_fb_seq++;
          else n_fb_comb++;
        end
      end
    for (int j = 0; j < int'(N); j++) if (seq_mode[j]) n_seq_ble++; else n_comb_ble++;
  endtask

  initial begin
    int in_bit;
    logic par;
    int count;

    // ---- 1. parity chain through all seven shortcuts ----
    rst_n = 1'b1;
    seq_mode = '0;
    // Inputs left over once the block inputs run out are routed anywhere and
    // masked out of the LUT's parity table.
    in_bit = 0;
    for (int j = 0; j < int'(N); j++) begin
      automatic int used = 0;
      for (int i = 0; i < int'(K); i++)
        if (j > 0 && i == j - 1) begin
          route_sel[j][i] = SELW'(SC);
          used |= 1 << i;
          n_shortcut++;
        end else if (in_bit < int'(I)) begin
          route_sel[j][i] = SELW'(in_bit);
          used |= 1 << i;
          in_bit++;
        end else route_sel[j][i] = SELW'(0);
      for (int a = 0; a < 2**K; a++) lut_cfg[j][a] = ($countones(a & used) % 2) == 1;
    end
    n_comb_ble += N;
    repeat (200) begin
      ipin = I'({$urandom, $urandom});
      #1;
      // All 24 inputs reach the chain once; the parity is theirs.
      par = ^ipin;
      checks++;
      if (opin[N-1] !== par) begin
        failures++;
        $display("FAIL parity chain: ipin %h opin[%0d]=%b expected %b", ipin, N - 1, opin[N-1], par);
      end
      cycles++;
    end

    // ---- 2. 3-bit counter in registered BLEs ----
    // BLE b computes bit b of count+1 from the three current bits, which it
    // reads back through the BLE outputs on inputs 0..2.
    for (int b = 0; b < 3; b++) begin
      for (int a = 0; a < 2**K; a++) lut_cfg[b][a] = ((((a & 7) + 1) >> b) & 1) == 1;
      seq_mode[b] = 1'b1;
      for (int i = 0; i < int'(K); i++) route_sel[b][i] = (i < 3) ? SELW'(I + i) : SELW'(0);
      n_fb_seq += 3;
      n_seq_ble++;
    end
    ipin = '0;
    do_reset();
    count = 0;
    repeat (40) begin
      #1;
      checks++;
      if (int'(opin[2:0]) != count) begin
        failures++;
        $display("FAIL counter: %0d expected %0d", opin[2:0], count);
      end
      @(posedge clk);
      count = (count + 1) % 8;
      cycles++;
      @(negedge clk);
    end

    // ---- 2b. one LUT used registered and unregistered ----
    // BLE 0 registers a&b; LUT 1 takes the unregistered a&b through its
    // shortcut and outputs (a&b)^c combinationally, so one BLE serves a LUT
    // output that drives both a flip-flop and another LUT.
    seq_mode = '0;
    seq_mode[0] = 1'b1;
    for (int a = 0; a < 2**K; a++) begin
      lut_cfg[0][a] = (a & 3) == 3;
      lut_cfg[1][a] = (((a & 1) ^ ((a >> 1) & 1)) == 1);
    end
    for (int j = 2; j < int'(N); j++)
      for (int i = 0; i < int'(K); i++) route_sel[j][i] = SELW'(0);  // idle BLEs
    for (int i = 0; i < int'(K); i++) begin
      route_sel[0][i] = (i < 2) ? SELW'(i) : SELW'(I - 1);
      route_sel[1][i] = (i == 0) ? SELW'(SC) : (i == 1) ? SELW'(2) : SELW'(I - 1);
    end
    ipin = '0;
    do_reset();
    ref_q = '0;
    repeat (50) begin
      ipin = I'($urandom & 7);
      #1;
      checks++;
      if (opin[1] !== ((ipin[0] & ipin[1]) ^ ipin[2]) || opin[0] !== ref_q[0]) begin
        failures++;
        $display("FAIL registered+shortcut fanout: ipin %b opin %b", ipin[2:0], opin[1:0]);
      end
      n_fanout++;
      @(posedge clk);
      ref_q[0] = ipin[0] & ipin[1];
      cycles++;
      @(negedge clk);
    end

    // ---- 3. random legal configurations ----
    repeat (300) begin
      random_config();
      do_reset();
      repeat (8) begin
        ipin = I'({$urandom, $urandom});
        #1;
        ref_eval();
        check(opin, ref_out, "random config");
        @(posedge clk);
        ref_q = ref_lut;
        cycles++;
        @(negedge clk);
      end
    end

    $display("mechanisms: fanout=%0d shortcut=%0d comb_feedback=%0d reg_feedback=%0d comb_ble=%0d reg_ble=%0d reset=%0d",
             n_fanout, n_shortcut, n_fb_comb, n_fb_seq, n_comb_ble, n_seq_ble, n_reset);
    if (n_fanout   == 0) begin failures++; $display("FAIL no registered+shortcut fanout"); end
    if (n_shortcut == 0) begin failures++; $display("FAIL no shortcut used"); end
    if (n_fb_comb  == 0) begin failures++; $display("FAIL no combinational feedback"); end
    if (n_fb_seq   == 0) begin failures++; $display("FAIL no registered feedback"); end
    if (n_comb_ble == 0) begin failures++; $display("FAIL no combinational BLE"); end
    if (n_seq_ble  == 0) begin failures++; $display("FAIL no registered BLE"); end
    if (n_reset    == 0) begin failures++; $display("FAIL no reset"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
