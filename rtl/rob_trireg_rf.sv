// rob_trireg_rf: tri-state register file for a core that recovers through a
// reorder buffer.
//
// One rob_reg_mgmt per physical register decides, from the rename, read and
// commit events of the core, when that register is released (dead pulse,
// cells discharged) and when it only has to be retained for misprediction
// recovery (drowsy). The resulting dead and drowsy vectors drive a
// tristate_regfile. Release combines the conventional rule (the Redefiner
// has committed and all consumers have read) with compiler-assisted early
// release (Case 1: no unresolved branch between last consumer and
// Redefiner, so the register dies as soon as its last consumer has read
// it). In Case 2 the register sits drowsy from the last read until the
// Redefiner commits.
//
// Interface, all events valid for one cycle and sampled on the rising edge:
//   alloc_i           destination register taken from the free list;
//   src_i[NRD]        source operands being renamed (RegUse +1 each), with
//                     the compiler's last-consumer mark and LConFree hint;
//   redef_i           old register of a renamed destination (Complete=1);
//   unmap_i           old register of a committing instruction (RegMap=0);
//   restore_i         register whose Redefiner was squashed (Complete=0);
//   rd_i[NRD]         register file reads; a read with 'consume' set is a
//                     counted consumer read (RegUse -1);
//   wr_i              register file write.
//   rdata_o           combinational read data.
//   free_o            released registers, for the core's free list;
//   dead_o, drowsy_o  the per-register control signals of the file;
//   state_o           work / drowsy / dead of every register.
// A register that was released early must not get the conventional unmap
// later; the early-release scheme in the core is expected to know this from
// the same LConFree mark. This is a requirement of this design's interface.
module rob_trireg_rf
  import trireg_pkg::*;
#(
  parameter int unsigned NREGS           = NREGS_DEF,
  parameter bit          ZERO_WRITE_ELIM = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  preg_evt_t        alloc_i,
  input  src_evt_t         src_i [NRD],
  input  preg_evt_t        redef_i,
  input  preg_evt_t        unmap_i,
  input  preg_evt_t        restore_i,
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
    logic       last, lconfree;

    always_comb begin
      use_inc  = '0;
      use_dec  = '0;
      last     = 1'b0;
      lconfree = 1'b0;
      for (int p = 0; p < NRD; p++) begin
        if (src_i[p].valid && int'(src_i[p].preg) == r) begin
          use_inc = use_inc + 2'd1;
          if (src_i[p].last) begin
            last     = 1'b1;
            lconfree = lconfree | src_i[p].lconfree;
          end
        end
        if (rd_i[p].valid && rd_i[p].consume && int'(rd_i[p].preg) == r)
          use_dec = use_dec + 2'd1;
      end
    end

    rob_reg_mgmt u_mgmt (
      .clk        (clk),
      .rst_n      (rst_n),
      .alloc_i    (alloc_i.valid   && int'(alloc_i.preg)   == r),
      .use_inc_i  (use_inc),
      .last_i     (last),
      .lconfree_i (lconfree),
      .use_dec_i  (use_dec),
      .redef_i    (redef_i.valid   && int'(redef_i.preg)   == r),
      .unmap_i    (unmap_i.valid   && int'(unmap_i.preg)   == r),
      .restore_i  (restore_i.valid && int'(restore_i.preg) == r),
      .free_o     (free_o[r]),
      .dead_o     (dead_o[r]),
      .drowsy_o   (drowsy_o[r]),
      .state_o    (state_o[r]),
      .reguse_o   ()
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
