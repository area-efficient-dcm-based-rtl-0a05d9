// bfd_core: beat-frequency detector and counter, the entropy harvester of
// the generator.
//
// Two clocks of slightly different frequency come in.  A D flip-flop clocked
// by clk_s samples the other clock, clk_b, as data.  Because the phase of
// clk_b relative to clk_s slides by the frequency difference each cycle, the
// flip-flop output is a square wave at the beat frequency |f_s - f_b|; near
// each of its edges the two clocks are almost aligned, so jitter decides on
// which cycle the sampled value flips.  A counter, also clocked by clk_s,
// counts clk_s cycles and is restarted at the rising edge of the flip-flop
// output that starts each beat.  The value it had reached (the number of
// clk_s cycles in one beat period) is captured in count_max and flagged by a
// one-cycle pulse on count_valid.  The low bits of that count are the random
// output.
//
// Near a crossing, jitter makes the sampled value flip back and forth for a
// few cycles.  A rising edge less than HOLDOFF cycles after the last accepted
// one is therefore ignored, so each beat restarts the counter once and each
// captured value is a full beat period whose exact length jitter has moved.
// HOLDOFF must stay below the shortest nominal beat period; 0 accepts every
// edge.
//
// Timing: the sampling flop is followed by SYNC_STAGES flops that let a
// metastable sample settle, and one more to find the rising edge, so
// count_valid pulses SYNC_STAGES + 1 clk_s cycles after the sampling edge
// that first saw clk_b high.  The counter saturates at all ones if no beat
// comes.  rst is asynchronous, active high, and must be released
// synchronously to clk_s.
//
// From the document: the sampling DFF, the counter driven by one of the two
// clocks and restarted when the DFF sets, and the use of the count reached.
// This design's choices: the settling stages, the hold-off, the counter
// width, counting so that the captured value equals the beat period in
// cycles, saturation.
module bfd_core #(
  parameter int unsigned CNT_W       = 16,  // counter width
  parameter int unsigned SYNC_STAGES = 2,   // settling flops after the sampling DFF
  parameter int unsigned HOLDOFF     = 32   // min. cycles between two accepted beats
) (
  input  logic             clk_s,       // sampling clock (DCM A), drives the counter
  input  logic             rst,         // async reset, released synchronously to clk_s
  input  logic             clk_b,       // sampled clock (DCM B)
  output logic             beat,        // settled DFF output (beat-frequency wave)
  output logic [CNT_W-1:0] count_max,   // clk_s cycles in the last beat period
  output logic             count_valid  // one-cycle pulse when count_max is new
);
  timeunit 1ns;
  timeprecision 1ps;


  logic                   samp;       // the beat-frequency DFF
  logic [SYNC_STAGES-1:0] settle;
  logic                   beat_q;
  logic [CNT_W-1:0]       cnt;
  logic                   rise;

  assign beat = settle[SYNC_STAGES-1];
  // A rising edge restarts the counter only if at least HOLDOFF cycles have
  // passed since the last accepted one; later edges of the same jittery
  // crossing are ignored.
  assign rise = beat & ~beat_q & (cnt >= CNT_W'(HOLDOFF));

  always_ff @(posedge clk_s or posedge rst) begin
    if (rst) begin
      samp        <= 1'b0;
      settle      <= '0;
      beat_q      <= 1'b0;
      cnt         <= '0;
      count_max   <= '0;
      count_valid <= 1'b0;
    end else begin
      samp        <= clk_b;
      settle      <= SYNC_STAGES'({settle, samp});
      beat_q      <= beat;
      count_valid <= rise;
      if (rise) begin
        count_max <= cnt;
        cnt       <= CNT_W'(1);
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
