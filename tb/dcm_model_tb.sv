// dcm_model_tb: self-checking test of the DCM behavioural model.
// Checks lock time after reset, the synthesized frequency CLKIN * M / D,
// that jitter is present and bounded, DRP read/write with its latency, that
// a new ratio only applies after the next reset, and that CLKFX is held low
// in reset.
module dcm_model_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int unsigned LOCK = 64;
  localparam int unsigned JIT  = 150;
  localparam int unsigned LAT  = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic clkfx, locked;
  logic den = 1'b0, dwe = 1'b0;
  logic [DRP_ADDR_W-1:0] daddr = '0;
  logic [DRP_DATA_W-1:0] di = '0, dout;
  logic drdy;

  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz reference

  dcm_model #(.CLKFX_MULTIPLY(7), .CLKFX_DIVIDE(5), .JITTER_PS(JIT),
              .LOCK_CYCLES(LOCK), .DRP_LATENCY(LAT)) dut (
    .CLKIN(clk), .RST(rst), .CLKFX(clkfx), .LOCKED(locked),
    .DCLK(clk), .DEN(den), .DWE(dwe), .DADDR(daddr), .DI(di), .DO(dout), .DRDY(drdy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Rising edges of CLKFX and period statistics.
  int      edges = 0;
  realtime t_prev = 0.0, p_min = 1.0e9, p_max = 0.0;
  bit      measure = 1'b0;
  always @(posedge clkfx) begin
    edges++;
    if (measure && t_prev > 0.0) begin
      if ($realtime - t_prev < p_min) p_min = $realtime - t_prev;
      if ($realtime - t_prev > p_max) p_max = $realtime - t_prev;
    end
    t_prev = $realtime;
  end

  task automatic measure_freq(input real f_mhz);
    int e0;
    real nominal_ns;
    nominal_ns = 1000.0 / f_mhz;
    p_min = 1.0e9; p_max = 0.0; t_prev = 0.0;
    @(posedge clkfx);
    measure = 1'b1;
    e0 = edges;
    #10000;
    measure = 1'b0;
    // 10 us at f_mhz gives f_mhz * 10 edges.
    check((edges - e0) >= int'(f_mhz * 10.0) - 2 && (edges - e0) <= int'(f_mhz * 10.0) + 2,
          $sformatf("frequency %0.2f MHz: %0d edges in 10 us", f_mhz, edges - e0));
    check(p_max - p_min > 0.05, $sformatf("jitter present (spread %0.3f ns)", p_max - p_min));
    check(p_min > nominal_ns - 2.0 * JIT / 1000.0 - 0.002 && p_max < nominal_ns + 2.0 * JIT / 1000.0 + 0.002,
          $sformatf("jitter bounded: %0.3f..%0.3f around %0.3f ns", p_min, p_max, nominal_ns));
  endtask

  task automatic wait_lock();
    int n = 0;
    while (!locked && n < 200) begin
      @(posedge clk);
      n++;
    end
    check(n >= LOCK && n <= LOCK + 2, $sformatf("lock after %0d CLKIN cycles", n));
  endtask

  task automatic drp(input bit we, input logic [15:0] wdata, output logic [15:0] rdata);
    int n = 0;
    @(negedge clk);
    den = 1'b1; dwe = we; daddr = DRP_ADDR_CLKFX; di = wdata;
    @(negedge clk);
    den = 1'b0; dwe = 1'b0;
    n = 0;   // DEN was taken at the edge just passed
    while (!drdy && n < 20) begin
      @(negedge clk);
      n++;
    end
    check(n == LAT, $sformatf("DRDY latency %0d", n));
    rdata = dout;
  endtask

  logic [15:0] r;
  int e_rst;

  initial begin
    repeat (5) @(posedge clk);
    check(clkfx == 1'b0 && locked == 1'b0, "held low and unlocked in reset");
    @(negedge clk) rst = 1'b0;
    wait_lock();
    measure_freq(70.0);

    drp(1'b0, 16'h0, r);
    check(r == {8'd6, 8'd4}, $sformatf("read back {M-1,D-1} = %h", r));
    drp(1'b1, {8'd10, 8'd7}, r);                  // M = 11, D = 8
    check(r == {8'd6, 8'd4}, "write returns previous contents");
    drp(1'b0, 16'h0, r);
    check(r == {8'd10, 8'd7}, $sformatf("new contents %h", r));
    measure_freq(70.0);                           // unchanged until reset

    @(negedge clk) rst = 1'b1;
    e_rst = edges;
    repeat (10) @(posedge clk);
    check(edges == e_rst && !locked, "no CLKFX edges in reset");
    @(negedge clk) rst = 1'b0;
    wait_lock();
    measure_freq(68.75);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
