// ckpt_reg_mgmt: management logic of one physical register in a core that
// recovers through checkpoints, producing that register's dead pulse and
// drowsy level.
//
// State kept per register: the RegMapped flag (mapped to an architectural
// register), the RegUse counter (renamed consumers that have not read it)
// and the CP counter (kept up by the checkpoint logic: raised and lowered
// as instructions carrying a checkpoint tag that refer to the register
// rename and execute). The register is
//   free        when RegUse = RegMapped = CP = 0: one dead pulse discharges
//               its cells;
//   checkpointed when RegUse = RegMapped = 0 and CP != 0: drowsy is high and
//               the cells keep their data at low leakage for recovery;
//   active      otherwise: work state.
//
// Events (for this register, sampled on the rising edge):
//   alloc_i   - renamed as a destination: RegMapped=1, RegUse=0, CP=0
//               (only legal while free);
//   use_inc_i - consumers renamed this cycle (0..NRD);
//   use_dec_i - consumers that read it this cycle (0..NRD);
//   unmap_i   - the architectural register was mapped elsewhere:
//               RegMapped=0;
//   remap_i   - a rollback restored this mapping: RegMapped=1 (wins over
//               unmap_i in the same cycle);
//   cp_inc_i, cp_dec_i - CP counter up / down by one.
// The event encoding and the remap event are this design's choices.
// Outputs are combinational from the state flops.
module ckpt_reg_mgmt
  import trireg_pkg::*;
#(
  parameter int unsigned UW = USE_W,
  parameter int unsigned CW = CP_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_i,
  input  logic [1:0]    use_inc_i,
  input  logic [1:0]    use_dec_i,
  input  logic          unmap_i,
  input  logic          remap_i,
  input  logic          cp_inc_i,
  input  logic          cp_dec_i,
  output logic          free_o,
  output logic          dead_o,
  output logic          drowsy_o,
  output reg_state_e    state_o,
  output logic [CW-1:0] cp_o
);

  logic          regmapped_q;
  logic [UW-1:0] reguse_q;
  logic [CW-1:0] cp_q;
  logic          unused_and_unmapped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regmapped_q <= 1'b0;
      reguse_q    <= '0;
      cp_q        <= '0;
    end else if (alloc_i) begin
      regmapped_q <= 1'b1;
      reguse_q    <= '0;
      cp_q        <= '0;
    end else begin
      reguse_q <= reguse_q + UW'(use_inc_i) - UW'(use_dec_i);
      cp_q     <= cp_q + CW'(cp_inc_i) - CW'(cp_dec_i);
      if (unmap_i) regmapped_q <= 1'b0;
      if (remap_i) regmapped_q <= 1'b1;
    end
  end

  assign unused_and_unmapped = !regmapped_q && (reguse_q == '0);
  assign free_o   = unused_and_unmapped && (cp_q == '0);
  assign drowsy_o = unused_and_unmapped && (cp_q != '0);

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

  assign cp_o = cp_q;

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 alloc_i |-> free_o)
    else $error("ckpt_reg_mgmt: allocation of a register that is not free");

  a_cp_range: assert property (@(posedge clk) disable iff (!rst_n)
      !alloc_i |-> !(cp_dec_i && !cp_inc_i && cp_q == '0) &&
                   !(cp_inc_i && !cp_dec_i && cp_q == '1))
    else $error("ckpt_reg_mgmt: CP counter out of range");

  a_use_range: assert property (@(posedge clk) disable iff (!rst_n)
      !alloc_i |-> ({1'b0, reguse_q} + (UW+1)'(use_inc_i) >= (UW+1)'(use_dec_i)) &&
                   ({1'b0, reguse_q} + (UW+1)'(use_inc_i) - (UW+1)'(use_dec_i) < (UW+1)'(2**UW)))
    else $error("ckpt_reg_mgmt: RegUse counter out of range");

endmodule
