// trireg_top: the two forms of the tri-state register file side by side.
//
// The same tri-state register file can serve a core that recovers through a
// reorder buffer and a core that recovers through checkpoints; only the
// per-register management logic differs. This top holds one instance of
// each, with independent ports (rob_* and cp_*) and a shared clock and
// reset, so that both can be simulated and synthesised together. Each
// instance is a 128 x 32 bit file with two read ports and one write port
// by default. Port meanings and timing are those of rob_trireg_rf and
// ckpt_trireg_rf.
module trireg_top
  import trireg_pkg::*;
#(
  parameter int unsigned NREGS           = NREGS_DEF,
  parameter bit          ZERO_WRITE_ELIM = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // reorder-buffer form
  input  preg_evt_t        rob_alloc_i,
  input  src_evt_t         rob_src_i [NRD],
  input  preg_evt_t        rob_redef_i,
  input  preg_evt_t        rob_unmap_i,
  input  preg_evt_t        rob_restore_i,
  input  rd_req_t          rob_rd_i [NRD],
  input  wr_req_t          rob_wr_i,
  output word_t            rob_rdata_o [NRD],
  output logic             rob_wr_skipped_o,
  output logic             rob_wr_done_o,
  output logic [NREGS-1:0] rob_free_o,
  output logic [NREGS-1:0] rob_dead_o,
  output logic [NREGS-1:0] rob_drowsy_o,
  output reg_state_e       rob_state_o [NREGS],
  // checkpoint form
  input  preg_evt_t        cp_alloc_i,
  input  src_evt_t         cp_src_i [NRD],
  input  logic [NREGS-1:0] cp_unmap_i,
  input  logic [NREGS-1:0] cp_remap_i,
  input  logic [NREGS-1:0] cp_inc_i,
  input  logic [NREGS-1:0] cp_dec_i,
  input  rd_req_t          cp_rd_i [NRD],
  input  wr_req_t          cp_wr_i,
  output word_t            cp_rdata_o [NRD],
  output logic             cp_wr_skipped_o,
  output logic             cp_wr_done_o,
  output logic [NREGS-1:0] cp_free_o,
  output logic [NREGS-1:0] cp_dead_o,
  output logic [NREGS-1:0] cp_drowsy_o,
  output reg_state_e       cp_state_o [NREGS]
);

  rob_trireg_rf #(
    .NREGS           (NREGS),
    .ZERO_WRITE_ELIM (ZERO_WRITE_ELIM)
  ) u_rob (
    .clk          (clk),
    .rst_n        (rst_n),
    .alloc_i      (rob_alloc_i),
    .src_i        (rob_src_i),
    .redef_i      (rob_redef_i),
    .unmap_i      (rob_unmap_i),
    .restore_i    (rob_restore_i),
    .rd_i         (rob_rd_i),
    .wr_i         (rob_wr_i),
    .rdata_o      (rob_rdata_o),
    .wr_skipped_o (rob_wr_skipped_o),
    .wr_done_o    (rob_wr_done_o),
    .free_o       (rob_free_o),
    .dead_o       (rob_dead_o),
    .drowsy_o     (rob_drowsy_o),
    .state_o      (rob_state_o)
  );

  ckpt_trireg_rf #(
    .NREGS           (NREGS),
    .ZERO_WRITE_ELIM (ZERO_WRITE_ELIM)
  ) u_cp (
    .clk          (clk),
    .rst_n        (rst_n),
    .alloc_i      (cp_alloc_i),
    .src_i        (cp_src_i),
    .unmap_i      (cp_unmap_i),
    .remap_i      (cp_remap_i),
    .cp_inc_i     (cp_inc_i),
    .cp_dec_i     (cp_dec_i),
    .rd_i         (cp_rd_i),
    .wr_i         (cp_wr_i),
    .rdata_o      (cp_rdata_o),
    .wr_skipped_o (cp_wr_skipped_o),
    .wr_done_o    (cp_wr_done_o),
    .free_o       (cp_free_o),
    .dead_o       (cp_dead_o),
    .drowsy_o     (cp_drowsy_o),
    .state_o      (cp_state_o)
  );

endmodule
