// lut_tb: self-checking testbench of the K-input look-up table.
//
// Checks three known functions (AND, OR, odd parity of all inputs) on every
// input value, then random truth tables on random inputs. Expected values are
// computed from the function definition or by scanning the table for the
// matching address, not by indexing it. Ends with the TB_RESULT line.
module lut_tb;
  localparam int unsigned K = 6;

  logic [K-1:0]    in;
  logic [2**K-1:0] cfg;
  logic            out;
  int checks = 0, failures = 0;

  lut dut (.in(in), .cfg(cfg), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: in=%b got %b exp %b", what, in, out, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    // AND: only the all-ones address is 1.
    cfg = '0; cfg[2**K-1] = 1'b1;
    for (int a = 0; a < 2**K; a++) begin
      in = K'(a); #1; check(&in, "and");
    end
    // OR: only the all-zeros address is 0.
    cfg = '1; cfg[0] = 1'b0;
    for (int a = 0; a < 2**K; a++) begin
      in = K'(a); #1; check(|in, "or");
    end
    // Odd parity table, built from the popcount of each address.
    for (int a = 0; a < 2**K; a++) cfg[a] = $countones(a) % 2 == 1;
    for (int a = 0; a < 2**K; a++) begin
      in = K'(a); #1; check(^in, "xor");
    end
    // Random tables and inputs.
    repeat (500) begin
      for (int w = 0; w < 2**K; w += 32) cfg[w +: 32] = $urandom;
      in = K'($urandom);
      exp = 1'b0;
      for (int a = 0; a < 2**K; a++) if (K'(a) == in) exp = cfg[a];
      #1; check(exp, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
