// lsb_collector: keeps the low LSB_W bits of every captured beat count,
// carries them from the sampling-clock domain into the system clock domain
// and packs them into the OUT_W-bit output word trng.
//
// Source side (clk_s): when in_valid pulses and no transfer is in flight,
// the LSB_W low bits of in_count are held in a register and a request bit is
// toggled.  Counts that arrive while a transfer is in flight are dropped
// (with the beat detector's hold-off at its default, counts come too far
// apart for this to happen).  Destination side (clk): the request bit passes two
// synchronizer flops; when it differs from the acknowledge bit, the held
// bits are taken (they are stable by construction), shifted into the low end
// of trng if en is high, and the acknowledge bit is set equal to the request.
// The acknowledge passes two flops back to the source, which then accepts
// the next count.  After OUT_W / LSB_W accepted samples trng_valid pulses
// for one clk cycle and trng holds OUT_W fresh bits.
//
// Latency: a kept sample reaches trng 3 clk cycles after the source toggles
// its request (two synchronizer flops, one shift).  Both resets are
// asynchronous, active high, and released synchronously to their own clock.
//
// From the document: the last three LSBs of each maximum count are the
// random bits, and the output trng[5:0] is a shift register.  This design's
// choices: the toggle handshake across the clock domains, dropping counts
// while busy, gating by en and the trng_valid flag.
module lsb_collector #(
  parameter int unsigned CNT_W = 16,  // width of the incoming count
  parameter int unsigned LSB_W = 3,   // random bits kept per count
  parameter int unsigned OUT_W = 6    // output word width, a multiple of LSB_W
) (
  // sampling-clock domain
  input  logic             clk_s,
  input  logic             rst_s,
  input  logic [CNT_W-1:0] in_count,
  input  logic             in_valid,
  // system clock domain
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [OUT_W-1:0] trng,
  output logic             trng_valid
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned WORD_SAMPLES = OUT_W / LSB_W;
  localparam int unsigned FILL_W       = $clog2(WORD_SAMPLES + 1);

  initial begin
    assert (OUT_W % LSB_W == 0 && OUT_W >= LSB_W && CNT_W >= LSB_W)
      else $error("lsb_collector: OUT_W must be a multiple of LSB_W");
  end

  // ---------------- source side ----------------
  logic [LSB_W-1:0] hold;
  logic             req;
  logic [1:0]       ack_sync;
  logic             busy;
  logic             ack;     // destination side, declared here for the synchronizer

  assign busy = (req != ack_sync[1]);

  always_ff @(posedge clk_s or posedge rst_s) begin
    if (rst_s) begin
      hold     <= '0;
      req      <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack};
      if (in_valid && !busy) begin
        hold <= in_count[LSB_W-1:0];
        req  <= ~req;
      end
    end
  end

  // ---------------- destination side ----------------
  logic [1:0]        req_sync;
  logic [FILL_W-1:0] fill;
  logic              take;

  assign take = (req_sync[1] != ack);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      req_sync   <= '0;
      ack        <= 1'b0;
      trng       <= '0;
      fill       <= '0;
      trng_valid <= 1'b0;
    end else begin
      req_sync   <= {req_sync[0], req};
      trng_valid <= 1'b0;
      if (take) begin
        ack <= req_sync[1];
        if (en) begin
          trng <= OUT_W'({trng, hold});
          if (fill == FILL_W'(WORD_SAMPLES - 1)) begin
            fill       <= '0;
            trng_valid <= 1'b1;
          end else begin
            fill <= fill + 1'b1;
          end
        end
      end
    end
  end

endmodule
