// bfd_core_tb: self-checking test of the beat-frequency detector and counter.
// clk_b is driven as a slow wave whose edges fall between clk_s edges, with
// random high and low times, so the sampled value on every clk_s edge is
// known.  A sampled 0->1 transition is accepted if it comes at least HOLDOFF
// cycles after the last accepted one (the first one counts from reset, whose
// count starts two cycles ahead because of the settling stages).  The
// expected captured count is the number of clk_s cycles between two accepted
// transitions, and it must appear SYNC_STAGES + 1 cycles after the sampling
// edge.  A second instance with a 5-bit counter checks saturation.
module bfd_core_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned SYNC = 2;
  localparam int unsigned NBEATS = 300;
  localparam int unsigned HOLD = 20;

  logic clk_s = 1'b0, clk_b = 1'b0, rst = 1'b1;
  logic beat, beat5;
  logic [15:0] count_max;
  logic [4:0]  count_max5;
  logic        count_valid, count_valid5;

  int checks = 0, failures = 0;

  always #5 clk_s = ~clk_s;   // 100 MHz, rising edges at 5, 15, 25, ...

  bfd_core #(.CNT_W(16), .SYNC_STAGES(SYNC), .HOLDOFF(HOLD)) dut (
    .clk_s(clk_s), .rst(rst), .clk_b(clk_b), .beat(beat),
    .count_max(count_max), .count_valid(count_valid));

  bfd_core #(.CNT_W(5), .SYNC_STAGES(SYNC), .HOLDOFF(HOLD)) dut5 (
    .clk_s(clk_s), .rst(rst), .clk_b(clk_b), .beat(beat5),
    .count_max(count_max5), .count_valid(count_valid5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: cycle numbers of sampled rising transitions.
  longint cyc = 0;
  bit     prev_s = 1'b0;
  longint last_rise = -2;
  int     ignored = 0;
  longint exp_cycle[$];
  int     exp_count[$];
  int     seen = 0, saturated = 0;

  always @(posedge clk_s) begin
    if (!rst) begin
      cyc++;
      if (clk_b && !prev_s) begin
        if (cyc - last_rise >= HOLD) begin
          exp_cycle.push_back(cyc + SYNC + 1);
          exp_count.push_back(int'(cyc - last_rise));
          last_rise = cyc;
        end else begin
          ignored++;
        end
      end
      prev_s = clk_b;
      // Outputs are registered: what shows after this edge belongs to cycle cyc.
      #1;
      if (count_valid) begin
        longint ec;
        int     en;
        seen++;
        if (exp_cycle.size() == 0) begin
          check(1'b0, "unexpected count_valid");
        end else begin
          ec = exp_cycle.pop_front();
          en = exp_count.pop_front();
          check(ec == cyc, $sformatf("count_valid at cycle %0d, expected %0d", cyc, ec));
          if (en >= 0) begin
            check(count_max == 16'(en), $sformatf("count %0d, expected %0d", count_max, en));
            check(count_valid5 && count_max5 == ((en > 31) ? 5'd31 : 5'(en)),
                  $sformatf("5-bit count %0d, expected min(%0d,31)", count_max5, en));
            if (en > 31) saturated++;
          end
        end
      end else begin
        check(!count_valid5, "5-bit instance pulses alone");
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk_s);
    @(negedge clk_s) rst = 1'b0;
    repeat (HOLD + 5) @(posedge clk_s);
    // clk_b edges 3 ns after a clk_s edge, random 3..60 cycles apart.
    @(posedge clk_s);
    for (int i = 0; i < 2 * NBEATS; i++) begin
      #3 clk_b = ~clk_b;
      repeat ($urandom_range(60, 2) - 1) @(posedge clk_s);
      @(posedge clk_s);
    end
    repeat (10) @(posedge clk_s);
    check(seen + ignored == NBEATS && exp_cycle.size() == 0,
          $sformatf("%0d beats captured, %0d ignored, %0d still expected", seen, ignored, exp_cycle.size()));
    check(saturated > 0, "saturation exercised");
    check(ignored > 0, "hold-off exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
