// rob_core_model: testbench driver that plays a small in-order core with a
// reorder buffer against the ROB form of the tri-state register file.
//
// A random program is generated first: NLOG initialising instructions, then
// ALU operations (dst = src0 + src1 + imm), zero-producing operations and
// branches, some of which are mispredicted. A compiler-style pass over the
// program finds, for every register version, its last consumer and its
// Redefiner, and marks the version Case 1 (LConFree=1) when no branch lies
// between the two (a last consumer that is itself a branch counts as one).
// The architectural value of every source operand is computed from the
// program alone.
//
// Pipeline: rename (cycle c) -> read sources and write the result (c+1) ->
// in-order commit once executed, with up to ROBSZ instructions in flight.
// A mispredicted branch injects WRONG wrong-path instructions after it;
// when the branch reaches the head they are squashed one per cycle,
// youngest first (restore the old register, release the new one), and the
// correct path resumes. Freed registers come back through the dead pulses.
//
// Checks: every correct-path source read returns the program's value and
// every wrong-path read the value last written; a zero result is dropped by
// zero-write elimination and nothing else is; a source read never finds its
// register drowsy or dead; dead pulses come exactly in the cycle after a
// Case-1 last read, a commit-time unmap or a squash release, and nowhere
// else; a Case-2 last read leaves the register drowsy; at the end exactly
// NREGS-NLOG registers are free and the architectural registers hold the
// program's final values.
// Mechanism counters: early (Case 1) releases, drowsy entries (Case 2),
// conventional releases, drowsy registers woken by a new consumer,
// squashed instructions, dropped zero writes, rename stalls on an empty
// free list.
module rob_core_model
  import trireg_pkg::*;
#(
  parameter int unsigned NREGS  = NREGS_DEF,
  parameter int unsigned NLOG   = 32,
  parameter int unsigned ROBSZ  = 80,
  parameter int unsigned NINSTR = 2000,
  parameter int unsigned WRONG  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  output preg_evt_t        alloc_o,
  output src_evt_t         src_o [NRD],
  output preg_evt_t        redef_o,
  output preg_evt_t        unmap_o,
  output preg_evt_t        restore_o,
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

  // the program
  kind_e  p_kind [NINSTR];
  int     p_dst  [NINSTR];
  int     p_nsrc [NINSTR];
  int     p_src  [NINSTR][2];
  word_t  p_imm  [NINSTR];
  logic   p_mis  [NINSTR];
  word_t  p_sval [NINSTR][2];
  word_t  p_dval [NINSTR];
  logic   p_last [NINSTR][2];
  logic   p_lcf  [NINSTR][2];
  logic   v_lcf  [NINSTR];   // version produced by instruction i is Case 1
  word_t  arch_final [NLOG];

  typedef struct {
    int    idx;        // program index, -1 on the wrong path
    int    nsrc;
    int    sp   [2];   // source physical registers
    word_t sval [2];   // expected source values (correct path)
    logic  slast [2];
    logic  slcf [2];
    logic  has_dst;
    int    dst;
    int    newp;
    int    oldp;
    logic  old_skip;   // old version is Case 1: no redef / unmap / restore
    word_t dval;
    logic  mis;
    int    ren_cyc;
  } rob_e;

  rob_e  rob [$];
  int    freel [$];
  int    map [NLOG];
  logic  maplcf [NLOG];
  word_t pval [NREGS];
  logic  exp_dead [NREGS];
  logic  in_free [NREGS];

  int checks = 0, failures = 0;
  int n_early = 0, n_drowsy = 0, n_conv = 0, n_wake = 0, n_squash = 0, n_zskip = 0, n_stall = 0;
  int cyc = 0;

  assign checks_o   = checks;
  assign failures_o = failures;

  function automatic void fail(input string s);
    failures++;
    $display("[rob cycle %0d] %s", cyc, s);
  endfunction

  task automatic gen_program();
    word_t arch [NLOG];
    for (int i = 0; i < NINSTR; i++) begin
      p_last[i][0] = 0; p_last[i][1] = 0; p_lcf[i][0] = 0; p_lcf[i][1] = 0; v_lcf[i] = 0;
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
    // compiler pass: last consumer and Redefiner of every version
    for (int i = 0; i < NINSTR; i++) begin
      int d, j, l, ls;
      logic br;
      if (p_kind[i] == K_BR) continue;
      d = p_dst[i]; j = -1; l = -1; ls = 0;
      for (int n = i + 1; n < NINSTR; n++) begin
        for (int s = 0; s < p_nsrc[n]; s++)
          if (p_src[n][s] == d) begin l = n; ls = s; end
        if (p_kind[n] != K_BR && p_dst[n] == d) begin j = n; break; end
      end
      if (l < 0) continue;
      br = 0;
      for (int n = l; n < j; n++) if (p_kind[n] == K_BR) br = 1;
      v_lcf[i] = (j >= 0) && !br;
      p_last[l][ls] = 1;
      p_lcf[l][ls]  = v_lcf[i];
    end
  endtask

  task automatic clear_outputs();
    alloc_o = '0; redef_o = '0; unmap_o = '0; restore_o = '0; wr_o = '0;
    for (int p = 0; p < NRD; p++) begin src_o[p] = '0; rd_o[p] = '0; end
  endtask

  // observe the dead pulses caused by last cycle's events
  task automatic observe();
    for (int r = 0; r < NREGS; r++) begin
      if (dead_i[r] !== exp_dead[r])
        fail($sformatf("preg %0d dead=%b expected %b", r, dead_i[r], exp_dead[r]));
      if (exp_dead[r]) checks++;
      if (dead_i[r]) begin
        if (in_free[r]) fail($sformatf("preg %0d released twice", r));
        in_free[r] = 1;
        pval[r]    = '0;
        freel.push_back(r);
      end
      exp_dead[r] = 0;
    end
  endtask

  task automatic run();
    int    pc, wrong_left, occ_target;
    logic  exec_valid, pending_mis, squashing;
    rob_e  ex;
    int    drowsy_chk [$];
    logic  rd_last [NRD], rd_lcf [NRD];
    clear_outputs();
    done_o = 0;
    gen_program();
    for (int r = 0; r < NREGS; r++) begin
      exp_dead[r] = 0; in_free[r] = 1; pval[r] = '0;
      freel.push_back(r);
    end
    for (int d = 0; d < NLOG; d++) begin map[d] = 0; maplcf[d] = 1; end
    pc = 0; wrong_left = 0; exec_valid = 0; pending_mis = 0; squashing = 0;
    occ_target = ROBSZ / 2;
    @(posedge rst_n);
    while (pc < NINSTR || rob.size() != 0 || exec_valid) begin
      logic stall;
      @(posedge clk);
      #1;
      cyc++;
      clear_outputs();
      observe();
      foreach (drowsy_chk[k]) begin
        checks++;
        if (state_i[drowsy_chk[k]] !== RS_DROWSY)
          fail($sformatf("preg %0d not drowsy after its Case-2 last read", drowsy_chk[k]));
      end
      drowsy_chk.delete();
      if ($urandom_range(0, 63) == 0) occ_target = $urandom_range(2, ROBSZ - 1);

      // ---- execute: read sources, write the result ----
      for (int s = 0; s < NRD; s++) begin rd_last[s] = 0; rd_lcf[s] = 0; end
      if (exec_valid) begin
        for (int s = 0; s < ex.nsrc; s++) begin rd_last[s] = ex.slast[s]; rd_lcf[s] = ex.slcf[s]; end
        for (int s = 0; s < ex.nsrc; s++) rd_o[s] = '{valid: 1'b1, preg: preg_t'(ex.sp[s]), consume: 1'b1};
        if (ex.has_dst) wr_o = '{valid: 1'b1, preg: preg_t'(ex.newp), data: ex.dval};
        #1;
        for (int s = 0; s < ex.nsrc; s++) begin
          word_t e = (ex.idx >= 0) ? ex.sval[s] : pval[ex.sp[s]];
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

      // ---- commit or squash ----
      if (rob.size() != 0 && cyc >= rob[$].ren_cyc + 2 && squashing) begin
        if (rob.size() > 1) begin
          rob_e y = rob.pop_back();
          if (y.has_dst) begin
            map[y.dst]    = y.oldp;
            maplcf[y.dst] = y.old_skip;
            if (!y.old_skip) restore_o = '{valid: 1'b1, preg: preg_t'(y.oldp)};
            redef_o = '{valid: 1'b1, preg: preg_t'(y.newp)};
            unmap_o = '{valid: 1'b1, preg: preg_t'(y.newp)};
            exp_dead[y.newp] = 1;
          end
          n_squash++;
        end else begin
          void'(rob.pop_front());
          squashing   = 0;
          pending_mis = 0;
        end
      end else if (rob.size() != 0 && cyc >= rob[0].ren_cyc + 2 &&
                   (rob[0].mis || rob.size() > occ_target || pc >= NINSTR || freel.size() == 0 ||
                    rob.size() == ROBSZ || (pending_mis && wrong_left == 0))) begin
        if (rob[0].mis) begin
          // squash once the whole wrong path has been renamed and executed
          if (wrong_left == 0 && cyc >= rob[$].ren_cyc + 2) squashing = 1;
        end else begin
          rob_e h = rob.pop_front();
          if (h.has_dst && !h.old_skip) begin
            unmap_o = '{valid: 1'b1, preg: preg_t'(h.oldp)};
            exp_dead[h.oldp] = 1;
            n_conv++;
          end
        end
      end

      // ---- rename ----
      exec_valid = 0;
      stall = squashing || (pending_mis && wrong_left == 0) || rob.size() >= ROBSZ ||
              (pc >= NINSTR && wrong_left == 0);
      if (!stall) begin
        rob_e n;
        logic wp = (wrong_left > 0);
        n.idx = wp ? -1 : pc;
        n.mis = 0;
        if (wp) begin
          n.nsrc    = $urandom_range(0, 2);
          n.has_dst = 1;
          n.dst     = $urandom_range(0, NLOG-1);
          n.dval    = ($urandom_range(0, 2) == 0) ? '0 : $urandom;
          for (int s = 0; s < 2; s++) begin
            n.sp[s] = map[$urandom_range(0, NLOG-1)];
            n.sval[s] = '0; n.slast[s] = 0; n.slcf[s] = 0;
          end
        end else begin
          n.nsrc    = p_nsrc[pc];
          n.has_dst = (p_kind[pc] != K_BR);
          n.dst     = p_dst[pc];
          n.dval    = p_dval[pc];
          n.mis     = p_mis[pc];
          for (int s = 0; s < 2; s++) begin
            n.sp[s]    = map[p_src[pc][s]];
            n.sval[s]  = p_sval[pc][s];
            n.slast[s] = p_last[pc][s];
            n.slcf[s]  = p_lcf[pc][s];
          end
        end
        if (n.has_dst && freel.size() == 0) begin
          // wait for a register; a wrong path simply ends here
          n_stall++;
          if (wp) wrong_left = 0;
        end else begin
          for (int s = 0; s < n.nsrc; s++) begin
            src_o[s] = '{valid: 1'b1, preg: preg_t'(n.sp[s]), last: n.slast[s], lconfree: n.slcf[s]};
            if (state_i[n.sp[s]] == RS_DROWSY) n_wake++;
          end
          if (n.has_dst) begin
            n.newp = freel.pop_front();
            checks++;
            if (!free_i[n.newp]) fail($sformatf("preg %0d on the free list is not free", n.newp));
            in_free[n.newp] = 0;
            alloc_o    = '{valid: 1'b1, preg: preg_t'(n.newp)};
            n.oldp     = map[n.dst];
            n.old_skip = maplcf[n.dst];
            if (!n.old_skip) redef_o = '{valid: 1'b1, preg: preg_t'(n.oldp)};
            map[n.dst]    = n.newp;
            maplcf[n.dst] = wp ? 1'b0 : v_lcf[pc];
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

      // ---- expectations from this cycle's last reads ----
      for (int s = 0; s < NRD; s++) begin
        if (rd_o[s].valid && rd_last[s]) begin
          int r = rd_o[s].preg;
          if (rd_lcf[s]) begin exp_dead[r] = 1; n_early++; end
          else begin
            logic woken = 0;
            for (int t = 0; t < NRD; t++) if (src_o[t].valid && int'(src_o[t].preg) == r) woken = 1;
            if (!woken) drowsy_chk.push_back(r);
            n_drowsy++;
          end
        end
      end
    end

    // ---- drain: last pulses, free count, final architectural values ----
    repeat (2) begin
      @(posedge clk);
      #1;
      cyc++;
      clear_outputs();
      observe();
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
    $display("rob core: %0d instructions in %0d cycles; early releases %0d, drowsy entries %0d, conventional releases %0d, drowsy wake-ups %0d, squashed %0d, zero writes dropped %0d, free-list stalls %0d",
             NINSTR, cyc, n_early, n_drowsy, n_conv, n_wake, n_squash, n_zskip, n_stall);
    checks++;
    if (n_early == 0 || n_drowsy == 0 || n_conv == 0 || n_wake == 0 || n_squash == 0 || n_zskip == 0)
      fail("a mechanism was never exercised");
    done_o = 1;
  endtask

  initial run();
endmodule
