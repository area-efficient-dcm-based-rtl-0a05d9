// trng_nist_tb: statistical workload for the complete generator at its
// default parameters.  For every stored tuning set it collects NBITS output
// bits (words taken MSB first) and applies two tests of the NIST SP 800-22
// suite that can be computed on the fly, plus a distribution test:
//   * frequency (monobit): p = erfc(|S_n| / sqrt(2 n));
//   * runs:               p = erfc(|V - 2 n pi (1-pi)| / (2 sqrt(2 n) pi (1-pi)));
//   * chi-square of the 3-bit sample values over 8 hist (7 degrees of
//     freedom, 18.48 is the 1 % critical value).
// A test passes at p >= 0.01.  The testbench prints the results per set.
// It fails if a set does not produce its bits in time, if the test
// statistics are not finite, or if no stored set passes all three tests:
// tuning is meant to find a set that does.
module trng_nist_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NBITS = 12000;   // a multiple of 6
  localparam int unsigned NSETS = 8;

  logic       clk = 1'b0, rst = 1'b1, en = 1'b1, load = 1'b0;
  logic [5:0] trng;
  logic       trng_valid, ready;
  logic [2:0] set_idx;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  trng_top dut (
    .clk(clk), .rst(rst), .en(en), .load(load),
    .trng(trng), .trng_valid(trng_valid), .ready(ready), .set_idx(set_idx));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Complementary error function, Abramowitz and Stegun 7.1.26 (|error| < 1.5e-7).
  function automatic real erfc_approx(input real x);
    real t, y, ax;
    ax = (x < 0.0) ? -x : x;
    t  = 1.0 / (1.0 + 0.3275911 * ax);
    y  = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741
         + t * (-1.453152027 + t * 1.061405429)))) * $exp(-ax * ax);
    return (x < 0.0) ? 2.0 - y : y;
  endfunction

  // Bit collection.
  bit        collecting = 1'b0;
  int        nbits = 0, ones = 0, runs = 0, s_sum = 0;
  bit        last_bit;
  int        hist[8];

  always @(posedge clk) begin
    #1;
    if (collecting && trng_valid && nbits < NBITS) begin
      hist[trng[5:3]]++;
      hist[trng[2:0]]++;
      for (int i = 5; i >= 0; i--) begin
        if (nbits == 0 || trng[i] != last_bit) runs++;
        last_bit = trng[i];
        ones    += trng[i];
        s_sum   += trng[i] ? 1 : -1;
        nbits++;
      end
    end
  end

  task automatic pulse_load();
    @(negedge clk) load = 1'b1;
    repeat (2) @(negedge clk);
    load = 1'b0;
  endtask

  int passing_sets = 0;

  task automatic evaluate(input int s);
    real n, p_freq, pi_, p_runs, chi, e;
    bit  ok;
    int  w = 0;
    while (!ready && w < 2000) begin
      @(posedge clk);
      w++;
    end
    check(ready && set_idx == 3'(s), $sformatf("tuned to set %0d", s));
    nbits = 0; ones = 0; runs = 0; s_sum = 0;
    foreach (hist[i]) hist[i] = 0;
    collecting = 1'b1;
    while (nbits < NBITS) @(posedge clk);
    collecting = 1'b0;
    n      = real'(nbits);
    p_freq = erfc_approx(((s_sum < 0) ? -s_sum : s_sum) / $sqrt(2.0 * n));
    pi_    = real'(ones) / n;
    if (pi_ - 0.5 >= 2.0 / $sqrt(n) || 0.5 - pi_ >= 2.0 / $sqrt(n)) begin
      p_runs = 0.0;   // prerequisite frequency condition fails
    end else begin
      e      = real'(runs) - 2.0 * n * pi_ * (1.0 - pi_);
      p_runs = erfc_approx(((e < 0.0) ? -e : e) / (2.0 * $sqrt(2.0 * n) * pi_ * (1.0 - pi_)));
    end
    chi = 0.0;
    e   = n / 3.0 / 8.0;
    foreach (hist[i]) chi += (real'(hist[i]) - e) * (real'(hist[i]) - e) / e;
    ok = (p_freq >= 0.01) && (p_runs >= 0.01) && (chi < 18.48);
    if (ok) passing_sets++;
    check(p_freq >= 0.0 && p_freq <= 2.0 && p_runs >= 0.0 && p_runs <= 2.0 && chi >= 0.0,
          $sformatf("set %0d statistics finite", s));
    $display("set %0d: %0d bits, ones %0.4f, frequency p=%0.4f %s, runs p=%0.4f %s, chi2(7)=%0.2f %s",
             s, nbits, pi_, p_freq, p_freq >= 0.01 ? "pass" : "FAIL",
             p_runs, p_runs >= 0.01 ? "pass" : "FAIL", chi, chi < 18.48 ? "pass" : "FAIL");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    evaluate(0);
    for (int k = 1; k < NSETS; k++) begin
      pulse_load();
      @(negedge clk);
      evaluate(k);
    end
    $display("sets passing all three tests: %0d of %0d", passing_sets, NSETS);
    check(passing_sets > 0, "at least one stored set passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
