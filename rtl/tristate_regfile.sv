// tristate_regfile: physical register file built from tri-state registers.
//
// NREGS registers of DATA_W bits (default 128 x 32), NRD read ports
// (default two) and one write port. Every register has its own dead pulse
// and drowsy level, driven by the per-register management logic; the file
// itself only stores, clears and retains data.
//
// Zero-write elimination: a register that has been discharged holds zeros,
// so writing a zero word into it changes nothing. When ZERO_WRITE_ELIM is
// set, such a write is dropped before it reaches the word line (no decoder,
// word-line or cell activity); wr_skipped_o reports it in the same cycle.
// The zero detection is done here on the write data; in a processor the
// same signal can come from the early zero detection of the functional
// units. A nonzero write, or a zero write into a register that has been
// written since its last discharge, is performed normally.
//
// Timing: writes and dead pulses take effect on the rising clock edge; reads
// are combinational from the stored words (no write-to-read bypass inside
// the file). A dead pulse wins over a write to the same register in the
// same cycle.
module tristate_regfile
  import trireg_pkg::*;
#(
  parameter int unsigned NREGS           = NREGS_DEF,
  parameter bit          ZERO_WRITE_ELIM = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NREGS-1:0]  dead_i,
  input  logic [NREGS-1:0]  drowsy_i,
  input  wr_req_t           wr_i,
  input  preg_t             raddr_i [NRD],
  output word_t             rdata_o [NRD],
  output logic              wr_skipped_o,
  output logic              wr_done_o,
  output logic [NREGS-1:0]  clean_o
);

  word_t             q      [NREGS];
  logic [NREGS-1:0]  we;
  logic              wzero;
  logic              skip;

  assign wzero = (wr_i.data == '0);
  assign skip  = ZERO_WRITE_ELIM && wr_i.valid && wzero &&
                 (int'(wr_i.preg) < NREGS) && clean_o[wr_i.preg];

  always_comb begin
    we = '0;
    if (wr_i.valid && !skip && (int'(wr_i.preg) < NREGS)) we[wr_i.preg] = 1'b1;
  end

  assign wr_skipped_o = skip;
  assign wr_done_o    = |we;

  for (genvar r = 0; r < NREGS; r++) begin : g_reg
    tristate_reg #(.WIDTH(DATA_W)) u_reg (
      .clk      (clk),
      .rst_n    (rst_n),
      .dead_i   (dead_i[r]),
      .drowsy_i (drowsy_i[r]),
      .we_i     (we[r]),
      .wdata_i  (wr_i.data),
      .q_o      (q[r]),
      .clean_o  (clean_o[r])
    );
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rdata_o[p] = (int'(raddr_i[p]) < NREGS) ? q[raddr_i[p]] : '0;
    end
  end

  initial begin
    assert (NREGS <= 2**PREG_W)
      else $fatal(1, "tristate_regfile: NREGS does not fit in PREG_W");
  end

endmodule
