// trng_top_tb: end-to-end test of the tunable beat-frequency TRNG at its
// default parameters.  After reset and after each load edge (all eight
// tuning sets, then a wrap back to set 0) it collects output words and
// checks:
//   * the mean beat period seen by the counter matches f_A / |f_A - f_B|
//     for the stored (M, D) pair of that set, computed here;
//   * every output word is made of the three LSBs of captured counts, in
//     capture order (counts may be skipped, never reordered or altered);
//   * the output bits are roughly balanced and vary within every set;
//   * while en is low no word is produced and trng holds;
//   * a load edge during a retune is ignored.
// It counts how often each mechanism happened (retune, set wrap, en gating,
// ignored load, words, bounce ignored by the hold-off) and fails if one
// never did.  Counts dropped by the output crossing are counted too, but at
// the default hold-off beats are too far apart for a drop to occur; that
// path is exercised by lsb_collector_tb.
module trng_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WORDS_PER_SET = 100;
  localparam int unsigned NSETS = 8;

  logic       clk = 1'b0, rst = 1'b1, en = 1'b1, load = 1'b0;
  logic [5:0] trng;
  logic       trng_valid, ready;
  logic [2:0] set_idx;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz reference

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

  int exp_set[NSETS][4] = '{
    '{32, 21, 29, 19}, '{32, 23, 25, 18}, '{31, 24, 22, 17}, '{29, 22, 25, 19},
    '{23, 14, 28, 17}, '{27, 16, 22, 13}, '{30, 19, 19, 12}, '{31, 20, 17, 11}};

  // Captured counts, observed at the beat counter.
  logic [2:0] captured[$];
  real        cnt_sum = 0.0, acc = 0.0;
  int         cnt_n = 0, held_off = 0;
  real        exp_period = 1.0;
  int         drops = 0;

  // Rising edges of the beat wave that the hold-off ignores (jitter bounce).
  always @(posedge dut.clk_a) begin
    if (!dut.rst_s && dut.u_bfd.beat && !dut.u_bfd.beat_q && dut.u_bfd.cnt < 16'd32) held_off++;
  end

  always @(posedge dut.clk_a) begin
    if (dut.u_bfd.count_valid && !dut.rst_s) begin
      captured.push_back(dut.u_bfd.count_max[2:0]);
      if (dut.u_lsb.busy) drops++;
      // Should a beat still be split (a bounce longer than the hold-off),
      // its pieces add up to one beat period.
      acc += real'(dut.u_bfd.count_max);
      if (acc > 0.75 * exp_period) begin
        cnt_sum += acc;
        cnt_n++;
        acc = 0.0;
      end
    end
  end

  // Output words.
  int words = 0, ones = 0, set_words = 0;
  bit seen_val[64];
  always @(posedge clk) begin
    #1;
    if (trng_valid) begin
      logic [2:0] hi, lo;
      check(en, "word while en low");
      words++;
      set_words++;
      ones += $countones(trng);
      seen_val[trng] = 1'b1;
      hi = trng[5:3];
      lo = trng[2:0];
      while (captured.size() > 0 && captured[0] != hi) void'(captured.pop_front());
      check(captured.size() > 0, $sformatf("upper chunk %o was captured", hi));
      if (captured.size() > 0) void'(captured.pop_front());
      while (captured.size() > 0 && captured[0] != lo) void'(captured.pop_front());
      check(captured.size() > 0, $sformatf("lower chunk %o was captured", lo));
      if (captured.size() > 0) void'(captured.pop_front());
    end
  end

  int retunes = 0, wraps = 0, gated = 0, ignored_loads = 0;

  task automatic pulse_load();
    @(negedge clk) load = 1'b1;
    repeat (2) @(negedge clk);
    load = 1'b0;
  endtask

  task automatic run_set(input int s);
    real fa, fb;
    int  nvals;
    int  n = 0;
    while (!ready && n < 2000) begin
      @(posedge clk);
      n++;
    end
    check(ready && set_idx == 3'(s), $sformatf("tuned to set %0d (set_idx %0d)", s, set_idx));
    fa = 50.0 * exp_set[s][0] / exp_set[s][1];
    fb = 50.0 * exp_set[s][2] / exp_set[s][3];
    exp_period = fa / ((fa > fb) ? fa - fb : fb - fa);
    repeat (2) @(posedge dut.u_bfd.count_valid);   // skip the count started at reset
    cnt_sum = 0.0; cnt_n = 0; set_words = 0; acc = 0.0;
    foreach (seen_val[i]) seen_val[i] = 1'b0;
    while (set_words < WORDS_PER_SET) @(posedge clk);
    check(cnt_n > 0 && cnt_sum / cnt_n > 0.95 * exp_period && cnt_sum / cnt_n < 1.05 * exp_period,
          $sformatf("set %0d: mean beat period %0.1f cycles, expected %0.1f",
                    s, cnt_n > 0 ? cnt_sum / cnt_n : 0.0, exp_period));
    nvals = 0;
    foreach (seen_val[i]) nvals += seen_val[i];
    check(nvals >= 4, $sformatf("set %0d: %0d distinct words of 64", s, nvals));
  endtask

  initial begin
    logic [5:0] held;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_set(0);

    // en gating: no words for 20 us, trng holds.
    @(negedge clk) en = 1'b0;
    begin
      int w0;
      w0 = words;
      held = trng;
      #20us;
      check(words == w0 && trng == held, "en low stops output");
      gated++;
    end
    @(negedge clk) en = 1'b1;

    for (int k = 1; k <= NSETS; k++) begin
      pulse_load();
      @(negedge clk);
      check(!ready, "retune started");
      retunes++;
      captured.delete();
      if (k == 4) begin
        repeat (5) @(negedge clk);
        pulse_load();
        ignored_loads++;
      end
      if (k % NSETS == 0) wraps++;
      run_set(k % NSETS);
    end

    check(ones > words * 6 * 40 / 100 && ones < words * 6 * 60 / 100,
          $sformatf("ones %0d of %0d bits", ones, words * 6));
    $display("mechanisms: retunes=%0d wraps=%0d en_gated=%0d ignored_loads=%0d words=%0d held_off=%0d drops=%0d",
             retunes, wraps, gated, ignored_loads, words, held_off, drops);
    check(retunes == NSETS, "retunes happened");
    check(wraps > 0, "set index wrapped");
    check(gated > 0, "en gating happened");
    check(ignored_loads > 0, "load during retune happened");
    check(words >= (NSETS + 1) * WORDS_PER_SET, "words produced");
    check(held_off > 0, "hold-off ignored a bounce of the beat detector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
