// trng_top: tunable beat-frequency-detection true random number generator
// built on two digital clock managers (DCMs).
//
// Two DCMs, both fed by the system clock clk, synthesize clocks of slightly
// different frequency (clk_a = clk * M_A / D_A, clk_b = clk * M_B / D_B).
// bfd_core samples clk_b with clk_a; the sampled wave flips at the beat
// frequency, and the number of clk_a cycles in each beat period varies with
// the DCMs' jitter; a hold-off of HOLDOFF cycles keeps the jitter bounce at
// each crossing from restarting the counter more than once per beat.  lsb_collector keeps the three LSBs of every such count,
// brings them into the clk domain and shifts them into the 6-bit output
// trng; trng_valid pulses when two fresh 3-bit samples have filled it.
//
// Tuning: drp_tuner reads safe (M, D) sets from the param_rom block RAM and
// writes them into both DCMs through their DRPs, set 0 after reset and the
// next set on each rising edge of load.  While it works, ready is low, the
// sampling-clock domain is held in reset and no bits are produced.
//
// Ports: clk, rst (async, active high), en (when low, samples are discarded
// instead of shifted in), load, trng[5:0], trng_valid, ready, set_idx.
// clk, rst, en, load and trng[5:0] are the generator's own pins; trng_valid,
// ready and set_idx are this design's additions that make the output usable.
// The DCMs are behavioural models (dcm_model) in simulation; on an FPGA the
// vendor's DCM primitive with DRP takes their place.
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned CNT_W     = 16,   // beat counter width
  parameter int unsigned HOLDOFF   = 32,   // min. cycles between accepted beats
  parameter int unsigned LSB_W     = 3,    // random bits kept per beat count
  parameter int unsigned OUT_W     = 6,    // output word, trng[5:0]
  parameter int unsigned DEPTH     = 8,    // stored tuning sets
  parameter int unsigned JITTER_PS = 150,  // DCM model jitter per half period
  parameter int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             load,
  output logic [OUT_W-1:0] trng,
  output logic             trng_valid,
  output logic             ready,
  output logic [AW-1:0]    set_idx
);
  timeunit 1ns;
  timeprecision 1ps;


  // ---------------- tuning circuitry ----------------
  logic [AW-1:0] rom_addr;
  md_pair_t      rom_data;
  drp_req_t      drp_a, drp_b;
  drp_rsp_t      rsp_a, rsp_b;
  logic          dcm_rst;
  logic          locked_a, locked_b;

  param_rom #(.DEPTH(DEPTH), .AW(AW)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (rom_data)
  );

  drp_tuner #(.DEPTH(DEPTH), .AW(AW)) u_tuner (
    .clk      (clk),
    .rst      (rst),
    .load     (load),
    .rom_addr (rom_addr),
    .rom_data (rom_data),
    .drp_a    (drp_a),
    .rsp_a    (rsp_a),
    .drp_b    (drp_b),
    .rsp_b    (rsp_b),
    .dcm_rst  (dcm_rst),
    .locked_a (locked_a),
    .locked_b (locked_b),
    .ready    (ready),
    .set_idx  (set_idx)
  );

  // ---------------- clock generators ----------------
  logic clk_a, clk_b;

  dcm_model #(.JITTER_PS(JITTER_PS)) u_dcm_a (
    .CLKIN  (clk),
    .RST    (dcm_rst),
    .CLKFX  (clk_a),
    .LOCKED (locked_a),
    .DCLK   (clk),
    .DEN    (drp_a.den),
    .DWE    (drp_a.dwe),
    .DADDR  (drp_a.daddr),
    .DI     (drp_a.di),
    .DO     (rsp_a.dout),
    .DRDY   (rsp_a.drdy)
  );

  dcm_model #(.JITTER_PS(JITTER_PS)) u_dcm_b (
    .CLKIN  (clk),
    .RST    (dcm_rst),
    .CLKFX  (clk_b),
    .LOCKED (locked_b),
    .DCLK   (clk),
    .DEN    (drp_b.den),
    .DWE    (drp_b.dwe),
    .DADDR  (drp_b.daddr),
    .DI     (drp_b.di),
    .DO     (rsp_b.dout),
    .DRDY   (rsp_b.drdy)
  );

  // ---------------- harvesting ----------------
  logic             rst_s;        // sampling-domain reset
  logic             rst_out;      // output-side reset
  logic [CNT_W-1:0] count_max;
  logic             count_valid;

  reset_sync u_rst_s (
    .clk     (clk_a),
    .rst_in  (rst | dcm_rst | !locked_a | !locked_b),
    .rst_out (rst_s)
  );

  bfd_core #(.CNT_W(CNT_W), .HOLDOFF(HOLDOFF)) u_bfd (
    .clk_s       (clk_a),
    .rst         (rst_s),
    .clk_b       (clk_b),
    .beat        (),
    .count_max   (count_max),
    .count_valid (count_valid)
  );

  // The output side restarts with every retune, together with the source.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) rst_out <= 1'b1;
    else     rst_out <= !ready;
  end

  lsb_collector #(.CNT_W(CNT_W), .LSB_W(LSB_W), .OUT_W(OUT_W)) u_lsb (
    .clk_s      (clk_a),
    .rst_s      (rst_s),
    .in_count   (count_max),
    .in_valid   (count_valid),
    .clk        (clk),
    .rst        (rst_out),
    .en         (en),
    .trng       (trng),
    .trng_valid (trng_valid)
  );

endmodule
