// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain.  rst_out rises as soon as rst_in rises, with or without a clock,
// and falls STAGES clk edges after rst_in has fallen.  Used for the
// sampling-clock domain, whose clock stops while the DCMs are retuned.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) chain <= '1;
    else        chain <= STAGES'({chain, 1'b0});
  end

  assign rst_out = chain[STAGES-1];

endmodule
