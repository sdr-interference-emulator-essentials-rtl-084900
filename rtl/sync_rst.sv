// sync_rst: reset synchroniser with asynchronous set and synchronous release.
//
// The MMCM's locked flag is not guaranteed to be synchronous to its clocks, so the reset
// derived from it is brought into a clock domain here. When arst is high the STAGES-deep
// flip-flop chain is set at once, without a clock edge (so it works while the clock is still
// absent), and rst_o / rstn_o assert immediately. After arst falls, zeros shift through the
// chain and the reset is released on a clock edge, STAGES clocks later. rstn_o is the
// active-low copy. The asynchronous set / synchronous release routine follows the document;
// the chain length is this design's choice.
module sync_rst #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst,
  output logic rst_o,
  output logic rstn_o
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) chain <= '1;
    else      chain <= {chain[STAGES-2:0], 1'b0};
  end

  assign rst_o  = chain[STAGES-1];
  assign rstn_o = !chain[STAGES-1];

endmodule
