// lsb_collector_tb: self-checking test of the LSB packing and clock-domain
// crossing.  Phase 1 sends counts slowly, so every one must arrive; each
// trng_valid word must equal the LSBs of the last two counts, older one in
// the upper bits, and arrive within a bounded latency.  Phase 2 holds en low:
// counts are consumed but trng must not change.  Phase 3 sends counts back to
// back: some are dropped, and what arrives must be an in-order subsequence of
// what was sent.
module lsb_collector_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_s = 1'b0, clk = 1'b0, rst_s = 1'b1, rst = 1'b1, en = 1'b1;
  logic [15:0] in_count = '0;
  logic        in_valid = 1'b0;
  logic [5:0]  trng;
  logic        trng_valid;

  int checks = 0, failures = 0;

  always #3.5 clk_s = ~clk_s;   // ~143 MHz sampling clock
  always #10  clk   = ~clk;     // 50 MHz system clock

  lsb_collector #(.CNT_W(16), .LSB_W(3), .OUT_W(6)) dut (
    .clk_s(clk_s), .rst_s(rst_s), .in_count(in_count), .in_valid(in_valid),
    .clk(clk), .rst(rst), .en(en), .trng(trng), .trng_valid(trng_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [2:0] sent[$];
  realtime    sent_t[$];
  int         phase = 1;
  int         words = 0, chunks_rx = 0, chunks_tx = 0;

  task automatic send(input logic [15:0] v);
    @(negedge clk_s);
    in_count = v;
    in_valid = 1'b1;
    sent.push_back(v[2:0]);
    sent_t.push_back($realtime);
    chunks_tx++;
    @(negedge clk_s);
    in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    #1;
    if (trng_valid) begin
      logic [2:0] hi, lo;
      realtime    t;
      words++;
      hi = trng[5:3];
      lo = trng[2:0];
      if (phase == 1) begin
        check(sent.size() >= 2, "word without two samples");
        if (sent.size() >= 2) begin
          check(hi == sent[0] && lo == sent[1],
                $sformatf("word %o, expected %o%o", trng, sent[0], sent[1]));
          t = sent_t[1];
          check($realtime - t < 4 * 20.0 + 2 * 7.0,
                $sformatf("latency %0.1f ns", $realtime - t));
          void'(sent.pop_front()); void'(sent.pop_front());
          void'(sent_t.pop_front()); void'(sent_t.pop_front());
        end
      end else if (phase == 3) begin
        // in-order subsequence: skip dropped samples
        while (sent.size() > 0 && sent[0] != hi) void'(sent.pop_front());
        check(sent.size() > 0, "upper chunk was sent");
        if (sent.size() > 0) void'(sent.pop_front());
        while (sent.size() > 0 && sent[0] != lo) void'(sent.pop_front());
        check(sent.size() > 0, "lower chunk was sent");
        if (sent.size() > 0) void'(sent.pop_front());
        chunks_rx += 2;
      end else begin
        check(1'b0, "trng_valid while en is low");
      end
    end
  end

  logic [5:0] held;

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    @(posedge clk_s) rst_s = 1'b0;

    // Phase 1: 200 counts, 40 sampling cycles apart.
    for (int i = 0; i < 200; i++) begin
      send(16'($urandom));
      repeat (40) @(posedge clk_s);
    end
    repeat (20) @(posedge clk);
    check(words == 100, $sformatf("phase 1 words %0d", words));
    check(sent.size() == 0, "phase 1 all samples used");

    // Phase 2: en low, nothing may change.
    @(negedge clk) en = 1'b0;
    phase = 2;
    held = trng;
    for (int i = 0; i < 20; i++) begin
      send(16'($urandom));
      repeat (40) @(posedge clk_s);
    end
    repeat (20) @(posedge clk);
    check(trng == held, "trng unchanged while en is low");
    sent.delete(); sent_t.delete();

    // Phase 3: back-to-back counts, some dropped.
    @(negedge clk) en = 1'b1;
    phase = 3;
    chunks_tx = 0;
    for (int i = 0; i < 400; i++) send(16'($urandom));
    repeat (40) @(posedge clk);
    check(chunks_rx > 20 && chunks_rx < chunks_tx,
          $sformatf("phase 3: %0d of %0d kept", chunks_rx, chunks_tx));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
