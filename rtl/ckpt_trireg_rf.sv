// ckpt_trireg_rf: tri-state register file for a core that recovers through
// checkpoints.
//
// One ckpt_reg_mgmt per physical register keeps RegMapped, RegUse and the CP
// counter. A register that is unmapped, has no pending consumer and belongs
// to no checkpoint is released (dead pulse, cells discharged); one that is
// unmapped and unread but still held by a checkpoint is drowsy, keeping its
// data for a rollback at low leakage. The dead and drowsy vectors drive a
// tristate_regfile.
//
// Interface, all events valid for one cycle and sampled on the rising edge:
//   alloc_i            destination register taken from the free list;
//   src_i[NRD]         source operands being renamed (RegUse +1 each; the
//                      last/lconfree fields are not used here);
//   unmap_i            one bit per register: its architectural register
//                      was renamed again, or its producer was squashed
//                      (RegMapped=0);
//   remap_i            one bit per register: a rollback restored the
//                      mapping (RegMapped=1); wins over unmap_i;
//   cp_inc_i, cp_dec_i one bit per register: CP counter +1 / -1, driven by
//                      the checkpoint logic of the core;
//   rd_i[NRD], wr_i    register file reads (consume: RegUse -1) and write.
//   Outputs as in rob_trireg_rf.
module ckpt_trireg_rf
  import trireg_pkg::*;
#(
  parameter int unsigned NREGS           = NREGS_DEF,
  parameter bit          ZERO_WRITE_ELIM = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  preg_evt_t        alloc_i,
  input  src_evt_t         src_i [NRD],
  input  logic [NREGS-1:0] unmap_i,
  input  logic [NREGS-1:0] remap_i,
  input  logic [NREGS-1:0] cp_inc_i,
  input  logic [NREGS-1:0] cp_dec_i,
  input  rd_req_t          rd_i [NRD],
  input  wr_req_t          wr_i,
  output word_t            rdata_o [NRD],
  output logic             wr_skipped_o,
  output logic             wr_done_o,
  output logic [NREGS-1:0] free_o,
  output logic [NREGS-1:0] dead_o,
  output logic [NREGS-1:0] drowsy_o,
  output reg_state_e       state_o [NREGS]
);

  preg_t raddr [NRD];

  for (genvar r = 0; r < NREGS; r++) begin : g_mgmt
    logic [1:0] use_inc, use_dec;

    always_comb begin
      use_inc = '0;
      use_dec = '0;
      for (int p = 0; p < NRD; p++) begin
        if (src_i[p].valid && int'(src_i[p].preg) == r)
          use_inc = use_inc + 2'd1;
        if (rd_i[p].valid && rd_i[p].consume && int'(rd_i[p].preg) == r)
          use_dec = use_dec + 2'd1;
      end
    end

    ckpt_reg_mgmt u_mgmt (
      .clk       (clk),
      .rst_n     (rst_n),
      .alloc_i   (alloc_i.valid && int'(alloc_i.preg) == r),
      .use_inc_i (use_inc),
      .use_dec_i (use_dec),
      .unmap_i   (unmap_i[r]),
      .remap_i   (remap_i[r]),
      .cp_inc_i  (cp_inc_i[r]),
      .cp_dec_i  (cp_dec_i[r]),
      .free_o    (free_o[r]),
      .dead_o    (dead_o[r]),
      .drowsy_o  (drowsy_o[r]),
      .state_o   (state_o[r]),
      .cp_o      ()
    );
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) raddr[p] = rd_i[p].preg;
  end

  tristate_regfile #(
    .NREGS           (NREGS),
    .ZERO_WRITE_ELIM (ZERO_WRITE_ELIM)
  ) u_rf (
    .clk          (clk),
    .rst_n        (rst_n),
    .dead_i       (dead_o),
    .drowsy_i     (drowsy_o),
    .wr_i         (wr_i),
    .raddr_i      (raddr),
    .rdata_o      (rdata_o),
    .wr_skipped_o (wr_skipped_o),
    .wr_done_o    (wr_done_o),
    .clean_o      ()
  );

endmodule
