// param_rom_tb: self-checking test of the tuning-set block RAM.  Reads every
// address in random order and checks the data against the expected table,
// the one-cycle read latency, and that every stored set is safe: legal CLKFX
// ratios, both outputs within 55..105 MHz for a 50 MHz reference, and a
// frequency difference between 0.1 % and 0.5 % in either direction.
module param_rom_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic     clk = 1'b0;
  logic [2:0] addr = '0;
  md_pair_t data;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  param_rom #(.DEPTH(DEPTH)) dut (.clk(clk), .addr(addr), .data(data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected sets {M_A, D_A, M_B, D_B}.
  int exp_set[DEPTH][4] = '{
    '{32, 21, 29, 19}, '{32, 23, 25, 18}, '{31, 24, 22, 17}, '{29, 22, 25, 19},
    '{23, 14, 28, 17}, '{27, 16, 22, 13}, '{30, 19, 19, 12}, '{31, 20, 17, 11}};

  initial begin
    int order[DEPTH];
    md_pair_t prior;
    real fa, fb;
    foreach (order[i]) order[i] = i;
    order.shuffle();
    @(negedge clk);
    for (int k = 0; k < 3 * DEPTH; k++) begin
      int i;
      i = order[k % DEPTH];
      addr = 3'(i);
      prior = data;
      #5;
      check(data == prior, "data steady until the clock edge");
      @(negedge clk);
      check(data.a.m == 8'(exp_set[i][0]) && data.a.d == 8'(exp_set[i][1]) &&
            data.b.m == 8'(exp_set[i][2]) && data.b.d == 8'(exp_set[i][3]),
            $sformatf("set %0d: %0d/%0d %0d/%0d", i, data.a.m, data.a.d, data.b.m, data.b.d));
      check(data.a.m inside {[2:32]} && data.b.m inside {[2:32]} &&
            data.a.d inside {[1:32]} && data.b.d inside {[1:32]}, $sformatf("set %0d legal", i));
      fa = 50.0 * data.a.m / data.a.d;
      fb = 50.0 * data.b.m / data.b.d;
      check(fa > 55.0 && fa < 105.0 && fb > 55.0 && fb < 105.0, $sformatf("set %0d in range", i));
      check((fa - fb) / fa > 0.001 && (fa - fb) / fa < 0.005 ||
            (fb - fa) / fa > 0.001 && (fb - fa) / fa < 0.005,
            $sformatf("set %0d difference %0.3f %%", i, 100.0 * (fa - fb) / fa));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
