// drp_tuner: the tuning circuitry.  It retunes the two DCMs on the fly by
// dynamic reconfiguration through their DRPs, using only the tuning sets
// stored in the parameter block RAM.
//
// After reset it loads set 0.  Each later rising edge of load, while the
// tuner is idle, selects the next set (wrapping after DEPTH sets); a load
// edge that arrives while a retune is running is ignored.  A retune runs:
//   READ    present the set index to the block RAM (one-cycle read);
//   WRITE   hold both DCMs in reset and issue one DRP write to each,
//           {M-1, D-1} at DRP_ADDR_CLKFX;
//   WAIT    wait until both DCMs have pulsed DRDY;
//   HOLD    keep reset asserted RST_CYCLES more cycles, then release it;
//   LOCK    wait until both DCMs report LOCKED again.
// ready is high in IDLE only; the rest of the generator uses it to discard
// bits made while the clocks were being changed.  set_idx is the set in use.
// All of it runs on clk, which also clocks the DRPs (DCLK).
//
// From the document: stored safe M/D values in block RAM, written to the
// DCMs through their DRPs on the fly.  This design's choices: the sequence
// above, the load edge as the trigger, stepping through the sets in order,
// resetting the DCMs around the write and the counts of cycles.
module drp_tuner
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH      = 8,  // stored tuning sets
  parameter int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter int unsigned RST_CYCLES = 4   // extra DCM reset cycles after the writes
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,       // request: move to the next tuning set
  // parameter block RAM
  output logic [AW-1:0] rom_addr,
  input  md_pair_t      rom_data,
  // DCM A and DCM B
  output drp_req_t      drp_a,
  input  drp_rsp_t      rsp_a,
  output drp_req_t      drp_b,
  input  drp_rsp_t      rsp_b,
  output logic          dcm_rst,
  input  logic          locked_a,
  input  logic          locked_b,
  // status
  output logic          ready,
  output logic [AW-1:0] set_idx
);
  timeunit 1ns;
  timeprecision 1ps;


  typedef enum logic [2:0] {S_IDLE, S_READ, S_WRITE, S_WAIT, S_HOLD, S_LOCK} state_t;

  localparam int unsigned HW = $clog2(RST_CYCLES + 1);

  state_t        state;
  logic          load_q;
  logic          rdy_a, rdy_b;
  logic [HW-1:0] hold_cnt;

  assign rom_addr = set_idx;
  assign ready    = (state == S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= S_READ;
      load_q   <= 1'b0;
      set_idx  <= '0;
      dcm_rst  <= 1'b1;
      drp_a    <= '0;
      drp_b    <= '0;
      rdy_a    <= 1'b0;
      rdy_b    <= 1'b0;
      hold_cnt <= '0;
    end else begin
      load_q <= load;
      drp_a  <= '0;
      drp_b  <= '0;
      unique case (state)
        S_IDLE: begin
          if (load && !load_q) begin
            set_idx <= (set_idx == AW'(DEPTH - 1)) ? '0 : set_idx + 1'b1;
            state   <= S_READ;
          end
        end
        S_READ: begin
          // rom_addr has been stable for this cycle; data is valid next.
          dcm_rst <= 1'b1;
          state   <= S_WRITE;
        end
        S_WRITE: begin
          drp_a <= '{den: 1'b1, dwe: 1'b1, daddr: DRP_ADDR_CLKFX, di: md_to_drp(rom_data.a)};
          drp_b <= '{den: 1'b1, dwe: 1'b1, daddr: DRP_ADDR_CLKFX, di: md_to_drp(rom_data.b)};
          rdy_a <= 1'b0;
          rdy_b <= 1'b0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (rsp_a.drdy) rdy_a <= 1'b1;
          if (rsp_b.drdy) rdy_b <= 1'b1;
          if ((rdy_a || rsp_a.drdy) && (rdy_b || rsp_b.drdy)) begin
            hold_cnt <= HW'(RST_CYCLES);
            state    <= S_HOLD;
          end
        end
        S_HOLD: begin
          if (hold_cnt == '0) begin
            dcm_rst <= 1'b0;
            state   <= S_LOCK;
          end else begin
            hold_cnt <= hold_cnt - 1'b1;
          end
        end
        S_LOCK: begin
          if (locked_a && locked_b) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A DRP access must not start while the previous one is pending.
  a_one_access_a: assert property (@(posedge clk) disable iff (rst)
    drp_a.den |=> !drp_a.den);
  a_one_access_b: assert property (@(posedge clk) disable iff (rst)
    drp_b.den |=> !drp_b.den);

endmodule
