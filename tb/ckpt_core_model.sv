// ckpt_core_model: testbench driver that plays a small in-order core with
// checkpoint recovery against the checkpoint form of the tri-state
// register file.
//
// A random program (initialising instructions, ALU operations
// dst = src0 + src1 + imm, zero-producing operations and branches, some
// mispredicted) is generated first and its source values computed from the
// program alone. Every branch takes a checkpoint of the rename map in an
// in-order checkpoint buffer of CPDEPTH entries (rename stalls while it is
// full); the CP counter of every register in the snapshot is raised, and
// lowered again when the branch commits and its checkpoint is released.
// Renaming a destination unmaps the old register at once. A mispredicted
// branch injects WRONG wrong-path instructions; when it reaches the head
// the core rolls back in one cycle: the snapshot's registers are remapped,
// the wrong-path registers unmapped and the checkpoint released.
//
// Pipeline: rename (cycle c) -> read sources and write the result (c+1) ->
// in-order commit, up to ROBSZ instructions in flight.
//
// Checks: a reference count of RegMapped, RegUse and CP per register gives
// the expected work / drowsy / dead state of all registers every cycle and
// the cycles with a dead pulse; every correct-path read returns the
// program's value and every wrong-path read the value last written; a
// source is never read while drowsy or dead; exactly the zero results are
// dropped by zero-write elimination; at the end NREGS-NLOG registers are
// free and the architectural registers hold the final values.
// Mechanism counters: releases at redefinition, releases delayed by a
// checkpoint, drowsy entries, drowsy registers woken by a rollback and by
// a new consumer (printed only: an unmapped register has no new
// consumers in this core), rollbacks, dropped zero writes, checkpoint-full
// stalls.
module ckpt_core_model
  import trireg_pkg::*;
#(
  parameter int unsigned NREGS   = NREGS_DEF,
  parameter int unsigned NLOG    = 32,
  parameter int unsigned ROBSZ   = 80,
  parameter int unsigned CPDEPTH = 8,
  parameter int unsigned NINSTR  = 2000,
  parameter int unsigned WRONG   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output preg_evt_t        alloc_o,
  output src_evt_t         src_o [NRD],
  output logic [NREGS-1:0] unmap_o,
  output logic [NREGS-1:0] remap_o,
  output logic [NREGS-1:0] cp_inc_o,
  output logic [NREGS-1:0] cp_dec_o,
  output rd_req_t          rd_o [NRD],
  output wr_req_t          wr_o,
  input  word_t            rdata_i [NRD],
  input  logic             wr_skipped_i,
  input  logic [NREGS-1:0] free_i,
  input  logic [NREGS-1:0] dead_i,
  input  reg_state_e       state_i [NREGS],
  output logic             done_o,
  output int               checks_o,
  output int               failures_o
);

  typedef enum logic [1:0] {K_ALU, K_ZERO, K_BR} kind_e;

  kind_e  p_kind [NINSTR];
  int     p_dst  [NINSTR];
  int     p_nsrc [NINSTR];
  int     p_src  [NINSTR][2];
  word_t  p_imm  [NINSTR];
  logic   p_mis  [NINSTR];
  word_t  p_sval [NINSTR][2];
  word_t  p_dval [NINSTR];
  word_t  arch_final [NLOG];

  typedef struct {
    int    idx;       // program index, -1 on the wrong path
    int    nsrc;
    int    sp   [2];
    word_t sval [2];
    logic  has_dst;
    int    dst;
    int    newp;
    word_t dval;
    logic  is_br;
    logic  mis;
    int    ren_cyc;
  } rob_e;

  typedef struct {
    int map [NLOG];
  } ckpt_t;

  rob_e  rob [$];
  ckpt_t cpbuf [$];
  int    freel [$];
  int    map [NLOG];
  word_t pval [NREGS];
  logic  in_free [NREGS];
  // reference counts
  logic  t_mapped [NREGS];
  int    t_use [NREGS];
  int    t_cp [NREGS];
  logic  t_free_prev [NREGS];

  int checks = 0, failures = 0;
  int n_imm_rel = 0, n_cp_rel = 0, n_drowsy = 0, n_rb_wake = 0, n_use_wake = 0;
  int n_rollback = 0, n_zskip = 0, n_cpfull = 0;
  int cyc = 0;

  assign checks_o   = checks;
  assign failures_o = failures;

  function automatic void fail(input string s);
    failures++;
    $display("[ckpt cycle %0d] %s", cyc, s);
  endfunction

  task automatic gen_program();
    word_t arch [NLOG];
    for (int i = 0; i < NINSTR; i++) begin
      p_src[i][0] = 0; p_src[i][1] = 0; p_mis[i] = 0;
      if (i < NLOG) begin
        p_kind[i] = K_ALU; p_dst[i] = i; p_nsrc[i] = 0;
      end else begin
        int k = $urandom_range(0, 9);
        p_kind[i] = (k < 6) ? K_ALU : (k < 8) ? K_ZERO : K_BR;
        p_dst[i]  = $urandom_range(0, NLOG-1);
        p_nsrc[i] = (p_kind[i] == K_ZERO) ? $urandom_range(0, 1) : $urandom_range(1, 2);
        for (int s = 0; s < 2; s++) p_src[i][s] = $urandom_range(0, NLOG-1);
        p_mis[i] = (p_kind[i] == K_BR) && ($urandom_range(0, 3) == 0);
      end
      p_imm[i] = $urandom;
    end
    for (int i = 0; i < NINSTR; i++) begin
      word_t v;
      for (int s = 0; s < 2; s++) p_sval[i][s] = (s < p_nsrc[i]) ? arch[p_src[i][s]] : '0;
      v = p_imm[i];
      for (int s = 0; s < p_nsrc[i]; s++) v = v + p_sval[i][s];
      if (p_kind[i] == K_ZERO) v = '0;
      p_dval[i] = v;
      if (p_kind[i] != K_BR) arch[p_dst[i]] = v;
    end
    for (int d = 0; d < NLOG; d++) arch_final[d] = arch[d];
  endtask

  task automatic clear_outputs();
    alloc_o = '0; wr_o = '0;
    unmap_o = '0; remap_o = '0; cp_inc_o = '0; cp_dec_o = '0;
    for (int p = 0; p < NRD; p++) begin src_o[p] = '0; rd_o[p] = '0; end
  endtask

  // apply this cycle's events to the reference counts
  task automatic update_ref();
    for (int p = 0; p < NRD; p++) begin
      if (src_o[p].valid) t_use[src_o[p].preg]++;
      if (rd_o[p].valid && rd_o[p].consume) t_use[rd_o[p].preg]--;
    end
    for (int r = 0; r < NREGS; r++) begin
      if (alloc_o.valid && int'(alloc_o.preg) == r) begin
        t_mapped[r] = 1; t_use[r] = 0; t_cp[r] = 0;
      end else begin
        if (unmap_o[r]) t_mapped[r] = 0;
        if (remap_o[r]) t_mapped[r] = 1;
        t_cp[r] = t_cp[r] + int'(cp_inc_o[r]) - int'(cp_dec_o[r]);
      end
    end
  endtask

  // compare all registers with the reference, collect released registers
  task automatic observe(input logic [NREGS-1:0] last_cp_dec);
    for (int r = 0; r < NREGS; r++) begin
      logic f, dr;
      reg_state_e e;
      f  = !t_mapped[r] && t_use[r] == 0 && t_cp[r] == 0;
      dr = !t_mapped[r] && t_use[r] == 0 && t_cp[r] != 0;
      e  = f ? RS_DEAD : dr ? RS_DROWSY : RS_WORK;
      checks++;
      if (state_i[r] !== e || dead_i[r] !== (f && !t_free_prev[r]))
        fail($sformatf("preg %0d state %s dead=%b, expected %s dead=%b (mapped=%b use=%0d cp=%0d)",
                       r, state_i[r].name(), dead_i[r], e.name(), f && !t_free_prev[r],
                       t_mapped[r], t_use[r], t_cp[r]));
      t_free_prev[r] = f;
      if (dead_i[r]) begin
        if (in_free[r]) fail($sformatf("preg %0d released twice", r));
        if (last_cp_dec[r]) n_cp_rel++; else n_imm_rel++;
        in_free[r] = 1;
        pval[r]    = '0;
        freel.push_back(r);
      end
    end
  endtask

  task automatic run();
    int   pc, wrong_left, occ_target;
    logic exec_valid, pending_mis, rolled_back;
    logic [NREGS-1:0] last_cp_dec;
    reg_state_e prev_state [NREGS];
    rob_e ex;
    clear_outputs();
    done_o = 0;
    gen_program();
    for (int r = 0; r < NREGS; r++) begin
      in_free[r] = 1; pval[r] = '0; t_mapped[r] = 0; t_use[r] = 0; t_cp[r] = 0;
      t_free_prev[r] = 1; prev_state[r] = RS_DEAD;
      freel.push_back(r);
    end
    for (int d = 0; d < NLOG; d++) map[d] = -1;
    pc = 0; wrong_left = 0; exec_valid = 0; pending_mis = 0; last_cp_dec = '0;
    occ_target = ROBSZ / 2;
    @(posedge rst_n);
    while (pc < NINSTR || rob.size() != 0 || exec_valid) begin
      logic stall;
      @(posedge clk);
      #1;
      cyc++;
      clear_outputs();
      observe(last_cp_dec);
      for (int r = 0; r < NREGS; r++) begin
        if (state_i[r] == RS_DROWSY && prev_state[r] != RS_DROWSY) n_drowsy++;
        prev_state[r] = state_i[r];
      end
      if ($urandom_range(0, 63) == 0) occ_target = $urandom_range(2, ROBSZ - 1);

      // ---- execute ----
      if (exec_valid) begin
        for (int s = 0; s < ex.nsrc; s++) rd_o[s] = '{valid: 1'b1, preg: preg_t'(ex.sp[s]), consume: 1'b1};
        if (ex.has_dst) wr_o = '{valid: 1'b1, preg: preg_t'(ex.newp), data: ex.dval};
        #1;
        for (int s = 0; s < ex.nsrc; s++) begin
          word_t e;
          e = (ex.idx >= 0) ? ex.sval[s] : pval[ex.sp[s]];
          checks += 2;
          if (rdata_i[s] !== e)
            fail($sformatf("instr %0d src %0d preg %0d read %h expected %h", ex.idx, s, ex.sp[s], rdata_i[s], e));
          if (state_i[ex.sp[s]] !== RS_WORK)
            fail($sformatf("instr %0d src %0d preg %0d read while %s", ex.idx, s, ex.sp[s], state_i[ex.sp[s]].name()));
        end
        if (ex.has_dst) begin
          checks++;
          if (wr_skipped_i !== (ex.dval == '0))
            fail($sformatf("write of %h to preg %0d: skipped=%b", ex.dval, ex.newp, wr_skipped_i));
          if (wr_skipped_i) n_zskip++;
          pval[ex.newp] = ex.dval;
        end
      end

      // ---- commit or roll back ----
      rolled_back = 0;
      if (rob.size() != 0 && cyc >= rob[0].ren_cyc + 2 &&
          (rob[0].mis || rob.size() > occ_target || pc >= NINSTR || freel.size() == 0 ||
           rob.size() == ROBSZ || (pending_mis && wrong_left == 0) || cpbuf.size() == CPDEPTH)) begin
        if (rob[0].mis) begin
          if (wrong_left == 0 && cyc >= rob[$].ren_cyc + 2) begin
            ckpt_t c = cpbuf.pop_front();
            for (int d = 0; d < NLOG; d++) begin
              remap_o[c.map[d]]  = 1'b1;
              cp_dec_o[c.map[d]] = 1'b1;
              if (state_i[c.map[d]] == RS_DROWSY) n_rb_wake++;
              map[d] = c.map[d];
            end
            for (int k = 1; k < rob.size(); k++)
              if (rob[k].has_dst) unmap_o[rob[k].newp] = 1'b1;
            rob.delete();
            pending_mis = 0;
            rolled_back = 1;
            n_rollback++;
          end
        end else begin
          rob_e h = rob.pop_front();
          if (h.is_br) begin
            ckpt_t c = cpbuf.pop_front();
            for (int d = 0; d < NLOG; d++) cp_dec_o[c.map[d]] = 1'b1;
          end
        end
      end

      // ---- rename ----
      exec_valid = 0;
      // no rename in the rollback cycle: its remap would mask the unmap
      stall = rolled_back || (pending_mis && wrong_left == 0) || rob.size() >= ROBSZ ||
              (pc >= NINSTR && wrong_left == 0);
      if (!stall) begin
        rob_e n;
        logic wp;
        wp = (wrong_left > 0);
        n.idx = wp ? -1 : pc;
        n.mis = 0;
        n.is_br = 0;
        if (wp) begin
          n.nsrc    = $urandom_range(0, 2);
          n.has_dst = 1;
          n.dst     = $urandom_range(0, NLOG-1);
          n.dval    = ($urandom_range(0, 2) == 0) ? '0 : $urandom;
          for (int s = 0; s < 2; s++) begin
            n.sp[s] = map[$urandom_range(0, NLOG-1)];
            n.sval[s] = '0;
          end
        end else begin
          n.nsrc    = p_nsrc[pc];
          n.is_br   = (p_kind[pc] == K_BR);
          n.has_dst = !n.is_br;
          n.dst     = p_dst[pc];
          n.dval    = p_dval[pc];
          n.mis     = p_mis[pc];
          for (int s = 0; s < 2; s++) begin
            n.sp[s]   = map[p_src[pc][s]];
            n.sval[s] = p_sval[pc][s];
          end
        end
        if (n.has_dst && freel.size() == 0) begin
          // wait for a register; a wrong path simply ends here
          if (wp) wrong_left = 0;
        end else if (n.is_br && cpbuf.size() == CPDEPTH) begin
          n_cpfull++;
        end else begin
          for (int s = 0; s < n.nsrc; s++) begin
            src_o[s] = '{valid: 1'b1, preg: preg_t'(n.sp[s]), last: 1'b0, lconfree: 1'b0};
            if (state_i[n.sp[s]] == RS_DROWSY) n_use_wake++;
          end
          if (n.has_dst) begin
            n.newp = freel.pop_front();
            checks++;
            if (!free_i[n.newp]) fail($sformatf("preg %0d on the free list is not free", n.newp));
            in_free[n.newp] = 0;
            alloc_o = '{valid: 1'b1, preg: preg_t'(n.newp)};
            if (map[n.dst] >= 0) unmap_o[map[n.dst]] = 1'b1;
            map[n.dst] = n.newp;
          end
          if (n.is_br) begin
            ckpt_t c;
            for (int d = 0; d < NLOG; d++) begin
              c.map[d] = map[d];
              cp_inc_o[map[d]] = 1'b1;
            end
            cpbuf.push_back(c);
          end
          n.ren_cyc = cyc;
          rob.push_back(n);
          ex = n;
          exec_valid = 1;
          if (wp) wrong_left--;
          else begin
            if (n.mis) begin
              pending_mis = 1;
              wrong_left  = WRONG;
            end
            pc++;
          end
        end
      end
      last_cp_dec = cp_dec_o;
      update_ref();
    end

    repeat (2) begin
      @(posedge clk);
      #1;
      cyc++;
      clear_outputs();
      observe(last_cp_dec);
      last_cp_dec = '0;
    end
    checks++;
    if (freel.size() != NREGS - NLOG)
      fail($sformatf("%0d registers free at the end, expected %0d", freel.size(), NREGS - NLOG));
    for (int d = 0; d < NLOG; d++) begin
      rd_o[0] = '{valid: 1'b1, preg: preg_t'(map[d]), consume: 1'b0};
      #1;
      checks++;
      if (rdata_i[0] !== arch_final[d])
        fail($sformatf("logical %0d (preg %0d) holds %h, expected %h", d, map[d], rdata_i[0], arch_final[d]));
    end
    clear_outputs();
    $display("ckpt core: %0d instructions in %0d cycles; releases at redefinition %0d, releases after a checkpoint %0d, drowsy entries %0d, rollback wake-ups %0d, consumer wake-ups %0d, rollbacks %0d, zero writes dropped %0d, checkpoint-full stalls %0d",
             NINSTR, cyc, n_imm_rel, n_cp_rel, n_drowsy, n_rb_wake, n_use_wake, n_rollback, n_zskip, n_cpfull);
    checks++;
    if (n_imm_rel == 0 || n_cp_rel == 0 || n_drowsy == 0 || n_rb_wake == 0 ||
        n_rollback == 0 || n_zskip == 0 || n_cpfull == 0)
      fail("a mechanism was never exercised");
    done_o = 1;
  endtask

  initial run();
endmodule
