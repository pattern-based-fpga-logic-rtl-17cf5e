// ble_tb: self-checking testbench of the basic logic element.
//
// Uses a 2-input XOR truth table on a K=6 BLE. In combinational mode the
// output must follow the inputs in the same cycle; in sequential mode it must
// show the LUT value of the previous clock edge, and reset must clear it. The
// unregistered LUT output is checked in both modes. A reference flip-flop in
// the testbench tracks the expected registered value.
module ble_tb;
  localparam int unsigned K = 6;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [K-1:0]    in;
  logic [2**K-1:0] cfg;
  logic            seq_mode;
  logic            lut_out, out;
  logic            ref_q;
  int checks = 0, failures = 0;
  int cycles = 0;

  ble dut (.clk, .rst_n, .in, .lut_cfg(cfg), .seq_mode, .lut_out, .out);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b exp %b", what, cycles, got, exp);
    end
  endtask

  function automatic logic f(input logic [K-1:0] x);
    return x[0] ^ x[1];
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**K; a++) cfg[a] = f(K'(a));
    rst_n = 1'b1; seq_mode = 1'b1; in = '1;
    #1 rst_n = 1'b0;
    #2;
    check(out, 1'b0, "reset clears register");
    repeat (2) @(posedge clk);
    #1; check(out, 1'b0, "register held in reset");
    rst_n = 1'b1;
    ref_q = 1'b0;
    // Sequential mode: output lags the LUT by one clock edge.
    repeat (200) begin
      @(negedge clk);
      in = K'($urandom);
      #1;
      check(lut_out, f(in), "lut_out seq mode");
      check(out, ref_q, "registered output before edge");
      @(posedge clk);
      ref_q = f(in);
      cycles++;
      #1;
      check(out, ref_q, "registered output after edge");
    end
    // Combinational mode: output follows the inputs without a clock.
    seq_mode = 1'b0;
    repeat (200) begin
      @(negedge clk);
      in = K'($urandom);
      #1;
      check(out, f(in), "combinational output");
      check(lut_out, f(in), "lut_out comb mode");
      cycles++;
    end
    // Reset while in sequential mode after activity.
    seq_mode = 1'b1;
    in = 6'b000001;
    @(posedge clk); #1;
    check(out, 1'b1, "register loaded");
    rst_n = 1'b0; #1;
    check(out, 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
