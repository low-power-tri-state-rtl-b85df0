// dead_pulse_gen: turns the level "this register may be released" into a
// short dead pulse (the non-inverted dead-pulse block of the per-register
// management logic).
//
// The circuit version XORs the level with a delayed copy of itself and ANDs
// the result with the level, so a pulse appears only on the rising edge of
// the release condition and lasts for the delay of the chain (tens of
// picoseconds, well under a clock period). In synchronous logic the shortest
// pulse is one clock cycle: dead_o is high in the first cycle in which
// free_i is high after having been low, and low otherwise. That the pulse
// is one cycle long is this design's choice.
//
// Interface: free_i (level), dead_o (one-cycle pulse, combinational from
// free_i and a flop holding last cycle's free_i).
// Reset: the flop resets to 1, because every register starts released and
// already discharged, so no pulse is produced coming out of reset.
module dead_pulse_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic free_i,
  output logic dead_o
);

  logic free_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) free_q <= 1'b1;
    else        free_q <= free_i;
  end

  assign dead_o = free_i & ~free_q;

endmodule
