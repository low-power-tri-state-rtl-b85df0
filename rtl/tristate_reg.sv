// tristate_reg: one register of tri-state cells, modelled at the logic level.
//
// Each cell is a conventional storage cell with an added discharge
// transistor driven by 'dead'; all cells of the register share one
// data-retention transistor, gated by the inverse of 'drowsy', between
// their virtual ground and ground. The three states are:
//   work   (dead=0, drowsy=0): reads and writes as a normal register;
//   drowsy (dead=0, drowsy=1): virtual ground raised, data retained;
//   dead   (dead=1 pulse):     every cell discharged to '0'.
// Only the logic behaviour is modelled here: the stored word, its clearing
// by the dead pulse, and its retention while drowsy. Leakage, the raised
// virtual ground and noise margins are not modelled.
//
// Interface: dead_i is a one-cycle pulse; on that clock edge the word is
// cleared to zero (it wins over a write). we_i/wdata_i write the word on the
// clock edge. A write while drowsy is a protocol error (the cells are not
// powered for writing) and is flagged by an assertion; the model still
// ignores such a write. q_o is the stored word (asynchronous read).
// clean_o is high while the word is known to be all zeros because it was
// discharged (or reset) and nothing has been written since; the register
// file uses it to drop writes of zero.
// Reset clears the word (the design's choice: a released register holds
// zeros, so reset puts every register in that condition).
module tristate_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dead_i,
  input  logic             drowsy_i,
  input  logic             we_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic [WIDTH-1:0] q_o,
  output logic             clean_o
);

  logic [WIDTH-1:0] cells_q;
  logic             clean_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells_q <= '0;
      clean_q <= 1'b1;
    end else if (dead_i) begin
      cells_q <= '0;
      clean_q <= 1'b1;
    end else if (we_i && !drowsy_i) begin
      cells_q <= wdata_i;
      clean_q <= 1'b0;
    end
  end

  assign q_o     = cells_q;
  assign clean_o = clean_q;

  // dead and drowsy are never both high: the states are exclusive.
  a_dead_drowsy_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                       !(dead_i && drowsy_i))
    else $error("tristate_reg: dead and drowsy asserted together");

  // A drowsy register is not written.
  a_no_write_drowsy: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(we_i && drowsy_i))
    else $error("tristate_reg: write to a drowsy register");

endmodule
