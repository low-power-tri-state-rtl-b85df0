// tb_power_model: applies the register power model of the scheme to the
// state fractions the RTL actually produces.
//
// The model weights normalised per-register power by how much of the time
// registers spend in each state:
//   P = %RF'1' * NormP'1' + %RF'0' * NormP'0'
//   NormP'x' = NormP_work'x' * %RF_work + NormP_drowsy'x' * %RF_drowsy
//            + NormP_dead'x' * %RF_dead
// with the per-state figures of the tri-state register from its 32 nm
// characterisation (work 1.088 / 1.040, drowsy 0.650 / 0.945,
// dead 0.432 / 0.968 for stored '1' / '0', relative to a conventional
// register) and 24 % of the stored bits being '1'.
//
// First the bench recomputes three published operating points from their
// state fractions to check the formula: ROB Case 1 integer (21 % work,
// 79 % dead -> 0.883), ROB Case 2 integer (21 % work, 45 % drowsy,
// 34 % dead -> 0.899) and checkpoint floating point (13 % work, 41 %
// drowsy, 46 % dead -> 0.882). The checkpoint integer point (56 / 9 / 35 %)
// gives 0.961 with these per-state figures, not the 0.890 listed beside
// it, so it is not used as a check.
//
// Then it runs trireg_top at its defaults under the two core models and
// samples the work / drowsy / dead state of all 128 registers of each form
// every cycle. It prints the fractions, the resulting normalised power and
// the share of writes removed by zero-write elimination. It checks that
// the fractions add up to one, that all three states occur in both forms,
// that the estimate is below a conventional register (1.0), and that some
// but not all writes are dropped. The synthetic programs are not the
// benchmarks behind the published fractions, so only these bounds are
// checked, not the published numbers.
//
// Interface and timing: no ports; 10 ns clock, reset held for three
// cycles, a watchdog ends the run after 100000 cycles. The formula and the
// per-state numbers follow the scheme; the synthetic programs, the
// sampling on the falling edge and the bounds checked are this bench's own
// choices.
module tb_power_model;
  import trireg_pkg::*;
  localparam int N = NREGS_DEF;

  localparam real PW1 = 1.088, PW0 = 1.040;
  localparam real PR1 = 0.650, PR0 = 0.945;
  localparam real PD1 = 0.432, PD0 = 0.968;
  localparam real F1  = 0.24;

  function automatic real norm_power(input real fw, input real fr, input real fd);
    real p1, p0;
    p1 = PW1 * fw + PR1 * fr + PD1 * fd;
    p0 = PW0 * fw + PR0 * fr + PD0 * fd;
    return F1 * p1 + (1.0 - F1) * p0;
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;

  preg_evt_t rob_alloc, rob_redef, rob_unmap, rob_restore;
  src_evt_t  rob_src [NRD];
  rd_req_t   rob_rd [NRD];
  wr_req_t   rob_wr;
  word_t     rob_rdata [NRD];
  logic      rob_skipped, rob_wdone, rob_done;
  logic [N-1:0] rob_free, rob_dead, rob_drowsy;
  reg_state_e rob_state [N];
  int rob_checks, rob_failures;

  preg_evt_t cp_alloc;
  src_evt_t  cp_src [NRD];
  rd_req_t   cp_rd [NRD];
  wr_req_t   cp_wr;
  word_t     cp_rdata [NRD];
  logic      cp_skipped, cp_wdone, cp_done;
  logic [N-1:0] cp_unmap, cp_remap, cp_inc, cp_dec, cp_free, cp_dead, cp_drowsy;
  reg_state_e cp_state [N];
  int cp_checks, cp_failures;

  trireg_top dut (
    .clk(clk), .rst_n(rst_n),
    .rob_alloc_i(rob_alloc), .rob_src_i(rob_src), .rob_redef_i(rob_redef),
    .rob_unmap_i(rob_unmap), .rob_restore_i(rob_restore), .rob_rd_i(rob_rd), .rob_wr_i(rob_wr),
    .rob_rdata_o(rob_rdata), .rob_wr_skipped_o(rob_skipped), .rob_wr_done_o(rob_wdone),
    .rob_free_o(rob_free), .rob_dead_o(rob_dead), .rob_drowsy_o(rob_drowsy), .rob_state_o(rob_state),
    .cp_alloc_i(cp_alloc), .cp_src_i(cp_src), .cp_unmap_i(cp_unmap), .cp_remap_i(cp_remap),
    .cp_inc_i(cp_inc), .cp_dec_i(cp_dec), .cp_rd_i(cp_rd), .cp_wr_i(cp_wr),
    .cp_rdata_o(cp_rdata), .cp_wr_skipped_o(cp_skipped), .cp_wr_done_o(cp_wdone),
    .cp_free_o(cp_free), .cp_dead_o(cp_dead), .cp_drowsy_o(cp_drowsy), .cp_state_o(cp_state));

  rob_core_model #(.NREGS(N), .NINSTR(3000)) rob_core (
    .clk(clk), .rst_n(rst_n), .alloc_o(rob_alloc), .src_o(rob_src), .redef_o(rob_redef),
    .unmap_o(rob_unmap), .restore_o(rob_restore), .rd_o(rob_rd), .wr_o(rob_wr),
    .rdata_i(rob_rdata), .wr_skipped_i(rob_skipped), .free_i(rob_free), .dead_i(rob_dead),
    .state_i(rob_state), .done_o(rob_done), .checks_o(rob_checks), .failures_o(rob_failures));

  ckpt_core_model #(.NREGS(N), .NINSTR(3000)) cp_core (
    .clk(clk), .rst_n(rst_n), .alloc_o(cp_alloc), .src_o(cp_src), .unmap_o(cp_unmap),
    .remap_o(cp_remap), .cp_inc_o(cp_inc), .cp_dec_o(cp_dec), .rd_o(cp_rd), .wr_o(cp_wr),
    .rdata_i(cp_rdata), .wr_skipped_i(cp_skipped), .free_i(cp_free), .dead_i(cp_dead),
    .state_i(cp_state), .done_o(cp_done), .checks_o(cp_checks), .failures_o(cp_failures));

  always #5 clk = ~clk;

  // state occupancy, register-cycles per state, while each core is running
  longint rob_cnt [3], cp_cnt [3];
  int rob_wr_n = 0, rob_skip_n = 0, cp_wr_n = 0, cp_skip_n = 0;
  int checks = 0, failures = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < N; r++) begin
        if (!rob_done) rob_cnt[rob_state[r]]++;
        if (!cp_done)  cp_cnt[cp_state[r]]++;
      end
      if (rob_wdone || rob_skipped) rob_wr_n++;
      if (rob_skipped)              rob_skip_n++;
      if (cp_wdone || cp_skipped)   cp_wr_n++;
      if (cp_skipped)               cp_skip_n++;
    end
  end

  task automatic report(input string name, input longint cnt [3]);
    real tot, fw, fr, fd, p;
    tot = real'(cnt[0] + cnt[1] + cnt[2]);
    fw = real'(cnt[RS_WORK]) / tot;
    fr = real'(cnt[RS_DROWSY]) / tot;
    fd = real'(cnt[RS_DEAD]) / tot;
    p  = norm_power(fw, fr, fd);
    $display("%s: work %.1f %%, drowsy %.1f %%, dead %.1f %% -> normalised register power %.3f",
             name, 100.0 * fw, 100.0 * fr, 100.0 * fd, p);
    checks += 3;
    if (fw + fr + fd < 0.999 || fw + fr + fd > 1.001) begin failures++; $display("%s: fractions do not add up", name); end
    if (cnt[RS_WORK] == 0 || cnt[RS_DROWSY] == 0 || cnt[RS_DEAD] == 0) begin
      failures++; $display("%s: a state never occurred", name);
    end
    if (!(p < 1.0)) begin failures++; $display("%s: no saving against a conventional register", name); end
  endtask

  initial begin
    real p;
    for (int k = 0; k < 3; k++) begin rob_cnt[k] = 0; cp_cnt[k] = 0; end
    // the formula against two published operating points
    p = norm_power(0.21, 0.0, 0.79);
    checks++;
    if (p < 0.882 || p > 0.885) begin failures++; $display("ROB Case 1 point gives %.4f", p); end
    p = norm_power(0.21, 0.45, 0.34);
    checks++;
    if (p < 0.898 || p > 0.901) begin failures++; $display("ROB Case 2 point gives %.4f", p); end
    p = norm_power(0.13, 0.41, 0.46);
    checks++;
    if (p < 0.880 || p > 0.883) begin failures++; $display("checkpoint point gives %.4f", p); end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (rob_done && cp_done);
    #1;
    report("ROB form", rob_cnt);
    report("checkpoint form", cp_cnt);
    // share of register-file writes the zero-write elimination removes
    $display("zero writes dropped: ROB form %0d of %0d, checkpoint form %0d of %0d",
             rob_skip_n, rob_wr_n, cp_skip_n, cp_wr_n);
    checks += 2;
    if (rob_skip_n == 0 || rob_skip_n >= rob_wr_n) begin failures++; $display("ROB form: no zero writes dropped"); end
    if (cp_skip_n == 0 || cp_skip_n >= cp_wr_n) begin failures++; $display("checkpoint form: no zero writes dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + rob_checks + cp_checks,
             failures + rob_failures + cp_failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + rob_checks + cp_checks,
             failures + rob_failures + cp_failures + 1);
    $finish;
  end
endmodule
