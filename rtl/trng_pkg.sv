// trng_pkg: types and constants shared by the tunable beat-frequency TRNG.
//
// A tuning set is one (M, D) pair per digital clock manager (DCM): the DCM
// synthesizes CLKIN * M / D.  The two DCMs are given slightly different
// ratios so that their outputs beat against each other.  The DRP register
// layout (one 16-bit word, M-1 in the upper byte and D-1 in the lower byte,
// at address 0x50) follows the layout used by Xilinx DCM_ADV primitives; the
// document only says that M and D are rewritten through the DRP, so the
// address and encoding are this design's choice.
package trng_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // One DCM's synthesis ratio.
  typedef struct packed {
    logic [7:0] m;   // multiplication factor, 2..32
    logic [7:0] d;   // division factor, 1..32
  } md_t;

  // One stored tuning set: ratios for DCM A (sampling clock) and DCM B.
  typedef struct packed {
    md_t a;
    md_t b;
  } md_pair_t;

  localparam int unsigned DRP_ADDR_W = 7;
  localparam int unsigned DRP_DATA_W = 16;

  // DRP register that holds {M-1, D-1} for the CLKFX output.
  localparam logic [DRP_ADDR_W-1:0] DRP_ADDR_CLKFX = 7'h50;

  // Request side of one DRP (driven by the tuning controller).
  typedef struct packed {
    logic                  den;
    logic                  dwe;
    logic [DRP_ADDR_W-1:0] daddr;
    logic [DRP_DATA_W-1:0] di;
  } drp_req_t;

  // Response side of one DRP (driven by the DCM).
  typedef struct packed {
    logic [DRP_DATA_W-1:0] dout;
    logic                  drdy;
  } drp_rsp_t;

  // DRP word for a ratio.
  function automatic logic [DRP_DATA_W-1:0] md_to_drp(md_t r);
    return {r.m - 8'd1, r.d - 8'd1};
  endfunction

endpackage
