// rob_reg_mgmt: management logic of one physical register in a core that
// recovers through a reorder buffer, producing that register's dead pulse
// and drowsy level.
//
// State kept per register:
//   RegMap    - the register is mapped to an architectural register;
//   Complete  - the register has been redefined (its Redefiner renamed);
//   RegUse    - number of renamed consumers that have not read it yet;
//   LConFree  - compiler hint: no unresolved branch lies between the last
//               consumer and the Redefiner (Case 1), so the register may be
//               released as soon as the last consumer has read it;
//   1stMapped - set when the first (producing) instruction that will write
//               this register is identified; it keeps the register in work
//               state until the compiler-marked last consumer is renamed.
// Release conditions:
//   conventional: RegMap=0, Complete=1, RegUse=0
//   early       : RegUse=0, LConFree=1, 1stMapped=0
// When either holds the register is free: dead_pulse_gen emits one dead
// pulse on the cycle the condition first holds and the cells discharge.
// Otherwise, when RegUse=0 and 1stMapped=0 (Case 2, waiting for the
// Redefiner to commit) drowsy is high and the cells keep their data at low
// leakage. In every other case the register is in work state.
//
// Events (all for this register, all sampled on the rising edge):
//   alloc_i      - renamed as a destination: RegMap=1, 1stMapped=1,
//                  Complete=0, RegUse=0, LConFree=0;
//   use_inc_i    - consumers renamed this cycle (0..NRD);
//   last_i       - the marked last consumer was renamed this cycle:
//                  1stMapped=0 and LConFree takes lconfree_i;
//   use_dec_i    - consumers that read the register this cycle (0..NRD);
//   redef_i      - its Redefiner was renamed: Complete=1;
//   unmap_i      - its Redefiner committed: RegMap=0;
//   restore_i    - a misprediction squashed its Redefiner: Complete=0.
// When 1stMapped is cleared, the counting of RegUse, the meaning of
// redef/unmap and the restore event are this design's choices; the release
// and drowsy conditions follow the described logic.
// Outputs are combinational from the state flops: free_o, dead_o, drowsy_o,
// state_o.
module rob_reg_mgmt
  import trireg_pkg::*;
#(
  parameter int unsigned UW = USE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         alloc_i,
  input  logic [1:0]   use_inc_i,
  input  logic         last_i,
  input  logic         lconfree_i,
  input  logic [1:0]   use_dec_i,
  input  logic         redef_i,
  input  logic         unmap_i,
  input  logic         restore_i,
  output logic         free_o,
  output logic         dead_o,
  output logic         drowsy_o,
  output reg_state_e   state_o,
  output logic [UW-1:0] reguse_o
);

  logic          regmap_q, complete_q, lconfree_q, first_mapped_q;
  logic [UW-1:0] reguse_q;
  logic          use_zero, free_conv, free_early;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // Out of reset every register is released: unmapped and complete.
      regmap_q       <= 1'b0;
      complete_q     <= 1'b1;
      lconfree_q     <= 1'b0;
      first_mapped_q <= 1'b0;
      reguse_q       <= '0;
    end else if (alloc_i) begin
      regmap_q       <= 1'b1;
      complete_q     <= 1'b0;
      lconfree_q     <= 1'b0;
      first_mapped_q <= 1'b1;
      reguse_q       <= '0;
    end else begin
      reguse_q <= reguse_q + UW'(use_inc_i) - UW'(use_dec_i);
      if (last_i) begin
        first_mapped_q <= 1'b0;
        lconfree_q     <= lconfree_i;
      end
      if (redef_i)   complete_q <= 1'b1;
      if (restore_i) complete_q <= 1'b0;
      if (unmap_i)   regmap_q   <= 1'b0;
    end
  end

  assign use_zero   = (reguse_q == '0);
  assign free_conv  = !regmap_q && complete_q && use_zero;
  assign free_early = use_zero && lconfree_q && !first_mapped_q;
  assign free_o     = free_conv || free_early;
  assign drowsy_o   = !free_o && use_zero && !first_mapped_q;

  dead_pulse_gen u_pulse (
    .clk    (clk),
    .rst_n  (rst_n),
    .free_i (free_o),
    .dead_o (dead_o)
  );

  always_comb begin
    if (free_o)        state_o = RS_DEAD;
    else if (drowsy_o) state_o = RS_DROWSY;
    else               state_o = RS_WORK;
  end

  assign reguse_o = reguse_q;

  // A register is only allocated while it is free.
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 alloc_i |-> free_o)
    else $error("rob_reg_mgmt: allocation of a register that is not free");

  // RegUse never drops below zero or wraps.
  a_use_range: assert property (@(posedge clk) disable iff (!rst_n)
      !alloc_i |-> ({1'b0, reguse_q} + (UW+1)'(use_inc_i) >= (UW+1)'(use_dec_i)) &&
                   ({1'b0, reguse_q} + (UW+1)'(use_inc_i) - (UW+1)'(use_dec_i) < (UW+1)'(2**UW)))
    else $error("rob_reg_mgmt: RegUse counter out of range");

endmodule
