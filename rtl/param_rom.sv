// param_rom: on-chip block RAM holding the safe tuning sets of the two DCMs.
//
// Each word is a md_pair_t: the (M, D) ratio of DCM A (sampling clock) and
// of DCM B (sampled clock).  Only these predetermined sets are ever written
// to the DCMs, so reconfiguration cannot drive them into an unsafe state.
// The read is synchronous, one clk cycle from addr to data, as in a block
// RAM; the contents are fixed at configuration.
//
// From the document: the safe (M, D) combinations of each DCM are chosen at
// design time and stored in a block RAM.  The document lists no values; the
// DEPTH sets below are this design's.  Each pair puts both outputs between
// 64 and 85 MHz for a 50 MHz reference, with legal CLKFX ratios
// (2 <= M <= 32, 1 <= D <= 32) and a frequency difference of only 0.15 % to
// 0.3 %, so that one beat period spans roughly 340 to 610 sampling-clock
// cycles.  The small difference makes the phase slide slowly (20 to 45 ps
// per cycle), so the jitter decides the crossing cycle over a wide zone.
module param_rom
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output md_pair_t      data
);
  timeunit 1ns;
  timeprecision 1ps;


  // Stored sets: {M_A, D_A, M_B, D_B}.  Entries past the table repeat it.
  function automatic md_pair_t table_entry(int unsigned i);
    case (i % 8)
      0:       return '{a: '{m: 8'd32, d: 8'd21}, b: '{m: 8'd29, d: 8'd19}};  // 76.19 / 76.32 MHz
      1:       return '{a: '{m: 8'd32, d: 8'd23}, b: '{m: 8'd25, d: 8'd18}};  // 69.57 / 69.44 MHz
      2:       return '{a: '{m: 8'd31, d: 8'd24}, b: '{m: 8'd22, d: 8'd17}};  // 64.58 / 64.71 MHz
      3:       return '{a: '{m: 8'd29, d: 8'd22}, b: '{m: 8'd25, d: 8'd19}};  // 65.91 / 65.79 MHz
      4:       return '{a: '{m: 8'd23, d: 8'd14}, b: '{m: 8'd28, d: 8'd17}};  // 82.14 / 82.35 MHz
      5:       return '{a: '{m: 8'd27, d: 8'd16}, b: '{m: 8'd22, d: 8'd13}};  // 84.38 / 84.62 MHz
      6:       return '{a: '{m: 8'd30, d: 8'd19}, b: '{m: 8'd19, d: 8'd12}};  // 78.95 / 79.17 MHz
      default: return '{a: '{m: 8'd31, d: 8'd20}, b: '{m: 8'd17, d: 8'd11}};  // 77.50 / 77.27 MHz
    endcase
  endfunction

  md_pair_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = table_entry(i);
  end

  always_ff @(posedge clk) begin
    data <= mem[addr];
  end

endmodule
