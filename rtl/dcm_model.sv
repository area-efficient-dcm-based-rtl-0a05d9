// dcm_model: behavioural model of a digital clock manager (DCM) with a
// dynamic reconfiguration port (DRP).  This is a simulation model of an FPGA
// hard macro, not synthesizable logic: on a device the vendor's DCM primitive
// takes its place, with the same ports.
//
// What it does: once RST is released it measures the CLKIN period over
// LOCK_CYCLES rising edges, raises LOCKED and from then on produces
// CLKFX = CLKIN * M / D.  Every edge of CLKFX is displaced from its ideal
// position by an independent, uniformly distributed jitter of up to
// +/- JITTER_PS; the ideal positions stay on a fixed grid, so the jitter does
// not accumulate, as for an output locked to its reference.  That jitter
// stands for the clock-manager jitter which the generator harvests as its
// source of randomness.
//
// Reconfiguration: M and D sit in one DRP register at DRP_ADDR_CLKFX as
// {M-1, D-1}.  A DRP access is a one-DCLK pulse on DEN (with DWE for a
// write); DRDY pulses DRP_LATENCY DCLK cycles later and DO then holds the
// register's value before the access.  As on the real part, a new M/D only
// takes effect at the next release of RST.  DEN during a pending access is
// a protocol error and is flagged by an assertion.
//
// The document says that the DCMs generate the two oscillations, that M and
// D set their frequencies and are changed through the DRP; the register
// address, latencies, lock time and the jitter distribution are this model's
// own choices.
module dcm_model
  import trng_pkg::*;
#(
  parameter int unsigned CLKFX_MULTIPLY = 7,    // M after configuration
  parameter int unsigned CLKFX_DIVIDE   = 5,    // D after configuration
  parameter int unsigned JITTER_PS      = 150,  // peak jitter per half period
  parameter int unsigned LOCK_CYCLES    = 64,   // CLKIN edges from RST release to LOCKED
  parameter int unsigned DRP_LATENCY    = 3     // DCLK cycles from DEN to DRDY
) (
  input  logic                  CLKIN,
  input  logic                  RST,
  output logic                  CLKFX,
  output logic                  LOCKED,
  input  logic                  DCLK,
  input  logic                  DEN,
  input  logic                  DWE,
  input  logic [DRP_ADDR_W-1:0] DADDR,
  input  logic [DRP_DATA_W-1:0] DI,
  output logic [DRP_DATA_W-1:0] DO,
  output logic                  DRDY
);
  timeunit 1ns;
  timeprecision 1ps;

  // DRP register contents (the configured ratio) and the ratio in use.
  logic [7:0]  m_cfg = 8'(CLKFX_MULTIPLY);
  logic [7:0]  d_cfg = 8'(CLKFX_DIVIDE);
  int unsigned m_act = CLKFX_MULTIPLY;
  int unsigned d_act = CLKFX_DIVIDE;

  // Lock acquisition.
  int unsigned lock_cnt = 0;
  logic        locked_r = 1'b0;
  realtime     t_first  = 0.0;
  real         half_ns  = 1.0;

  always @(posedge CLKIN or posedge RST) begin
    if (RST) begin
      locked_r <= 1'b0;
      lock_cnt <= 0;
    end else if (!locked_r) begin
      if (lock_cnt == 0) begin
        t_first = $realtime;
        m_act   = int'(m_cfg);
        d_act   = int'(d_cfg);
      end
      lock_cnt <= lock_cnt + 1;
      if (lock_cnt == LOCK_CYCLES) begin
        // Mean CLKIN period times D / M, halved.
        half_ns  = (($realtime - t_first) / real'(LOCK_CYCLES))
                   * real'(d_act) / real'(m_act) / 2.0;
        locked_r <= 1'b1;
      end
    end
  end

  // Synthesized clock.  Edges follow an ideal grid that starts at lock; each
  // edge is displaced from its grid point by its own jitter, so the jitter
  // does not accumulate (the output stays locked to CLKIN).
  logic    clkfx_r = 1'b0;
  int      jit_ps;
  realtime ideal_ns;
  real     delay_ns;

  always begin
    if (!locked_r) begin
      clkfx_r = 1'b0;
      @(posedge locked_r);
      ideal_ns = $realtime;
    end else begin
      jit_ps   = int'($urandom_range(2 * JITTER_PS)) - int'(JITTER_PS);
      ideal_ns = ideal_ns + half_ns;
      delay_ns = ideal_ns + real'(jit_ps) / 1000.0 - $realtime;
      if (delay_ns < 0.01) delay_ns = 0.01;
      #(delay_ns);
      clkfx_r = locked_r ? ~clkfx_r : 1'b0;
    end
  end

  // Dynamic reconfiguration port.
  logic [DRP_DATA_W-1:0] do_r   = '0;
  logic                  drdy_r = 1'b0;
  int unsigned           drp_wait = 0;

  always @(posedge DCLK) begin
    drdy_r <= 1'b0;
    if (drp_wait != 0) begin
      assert (!DEN) else $error("dcm_model: DEN while a DRP access is pending");
      drp_wait <= drp_wait - 1;
      if (drp_wait == 1) drdy_r <= 1'b1;
    end else if (DEN) begin
      do_r <= (DADDR == DRP_ADDR_CLKFX) ? {m_cfg - 8'd1, d_cfg - 8'd1} : '0;
      if (DWE && DADDR == DRP_ADDR_CLKFX) begin
        m_cfg <= DI[15:8] + 8'd1;
        d_cfg <= DI[7:0] + 8'd1;
      end
      drp_wait <= (DRP_LATENCY == 0) ? 1 : DRP_LATENCY;
    end
  end

  assign CLKFX  = clkfx_r;
  assign LOCKED = locked_r;
  assign DO     = do_r;
  assign DRDY   = drdy_r;

endmodule
