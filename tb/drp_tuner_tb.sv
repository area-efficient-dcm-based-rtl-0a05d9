// drp_tuner_tb: self-checking test of the tuning controller, connected to
// the tuning-set block RAM and two DCM models.  After reset and after each
// load edge it checks the DRP words written to each DCM against the
// expected set, that the DCMs are in reset while written, that ready comes
// back once both are locked, and that the DCM outputs then run at the
// expected frequencies.  It steps through all sets and wraps, and checks
// that a load edge during a retune is ignored.
module drp_tuner_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [2:0] rom_addr, set_idx;
  md_pair_t   rom_data;
  drp_req_t   drp_a, drp_b;
  drp_rsp_t   rsp_a, rsp_b;
  logic       dcm_rst, locked_a, locked_b, ready;
  logic       clk_a, clk_b;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  param_rom #(.DEPTH(DEPTH)) u_rom (.clk(clk), .addr(rom_addr), .data(rom_data));

  drp_tuner #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .load(load), .rom_addr(rom_addr), .rom_data(rom_data),
    .drp_a(drp_a), .rsp_a(rsp_a), .drp_b(drp_b), .rsp_b(rsp_b), .dcm_rst(dcm_rst),
    .locked_a(locked_a), .locked_b(locked_b), .ready(ready), .set_idx(set_idx));

  dcm_model u_dcm_a (
    .CLKIN(clk), .RST(dcm_rst), .CLKFX(clk_a), .LOCKED(locked_a), .DCLK(clk),
    .DEN(drp_a.den), .DWE(drp_a.dwe), .DADDR(drp_a.daddr), .DI(drp_a.di),
    .DO(rsp_a.dout), .DRDY(rsp_a.drdy));
  dcm_model u_dcm_b (
    .CLKIN(clk), .RST(dcm_rst), .CLKFX(clk_b), .LOCKED(locked_b), .DCLK(clk),
    .DEN(drp_b.den), .DWE(drp_b.dwe), .DADDR(drp_b.daddr), .DI(drp_b.di),
    .DO(rsp_b.dout), .DRDY(rsp_b.drdy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int exp_set[DEPTH][4] = '{
    '{32, 21, 29, 19}, '{32, 23, 25, 18}, '{31, 24, 22, 17}, '{29, 22, 25, 19},
    '{23, 14, 28, 17}, '{27, 16, 22, 13}, '{30, 19, 19, 12}, '{31, 20, 17, 11}};

  // Record DRP writes.
  int writes_a = 0, writes_b = 0;
  logic [15:0] di_a, di_b;
  always @(posedge clk) begin
    if (!rst && drp_a.den) begin
      writes_a++;
      di_a = drp_a.di;
      check(drp_a.dwe && drp_a.daddr == DRP_ADDR_CLKFX && dcm_rst, "DCM A write form");
    end
    if (!rst && drp_b.den) begin
      writes_b++;
      di_b = drp_b.di;
      check(drp_b.dwe && drp_b.daddr == DRP_ADDR_CLKFX && dcm_rst, "DCM B write form");
    end
  end

  int ea = 0, eb = 0;
  always @(posedge clk_a) ea++;
  always @(posedge clk_b) eb++;

  task automatic expect_set(input int s);
    int n = 0, a0, b0;
    real fa, fb;
    while (!ready && n < 1000) begin
      @(posedge clk);
      n++;
    end
    check(ready, "ready after retune");
    check(n < 200, $sformatf("retune took %0d cycles", n));
    check(set_idx == 3'(s), $sformatf("set_idx %0d, expected %0d", set_idx, s));
    check(di_a == {8'(exp_set[s][0] - 1), 8'(exp_set[s][1] - 1)},
          $sformatf("set %0d DCM A word %h", s, di_a));
    check(di_b == {8'(exp_set[s][2] - 1), 8'(exp_set[s][3] - 1)},
          $sformatf("set %0d DCM B word %h", s, di_b));
    check(locked_a && locked_b && !dcm_rst, "DCMs running");
    fa = 50.0 * exp_set[s][0] / exp_set[s][1];
    fb = 50.0 * exp_set[s][2] / exp_set[s][3];
    a0 = ea; b0 = eb;
    #10us;
    check((ea - a0) >= int'(fa * 10.0) - 2 && (ea - a0) <= int'(fa * 10.0) + 2,
          $sformatf("set %0d DCM A %0d edges in 10 us, %0.2f MHz expected", s, ea - a0, fa));
    check((eb - b0) >= int'(fb * 10.0) - 2 && (eb - b0) <= int'(fb * 10.0) + 2,
          $sformatf("set %0d DCM B %0d edges in 10 us, %0.2f MHz expected", s, eb - b0, fb));
  endtask

  task automatic pulse_load();
    @(negedge clk) load = 1'b1;
    repeat (2) @(negedge clk);
    load = 1'b0;
  endtask

  initial begin
    int w0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_set(0);
    check(writes_a == 1 && writes_b == 1, "one write per DCM after reset");
    for (int k = 1; k <= DEPTH; k++) begin
      w0 = writes_a;
      pulse_load();
      @(negedge clk);
      check(!ready, "busy after load");
      if (k == 3) begin
        // A second load during the retune must be ignored.
        repeat (5) @(negedge clk);
        pulse_load();
      end
      expect_set(k % DEPTH);
      check(writes_a == w0 + 1, "exactly one write per retune");
    end
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
