// tb_trireg_top: end-to-end test of trireg_top at its default parameters
// (two 128 x 32 tri-state register files). The ROB form is driven by
// rob_core_model and the checkpoint form by ckpt_core_model, each running
// its own random 4000-instruction program with 32 architectural registers,
// 80 instructions in flight and branch mispredictions, at the same time.
// The core models check every read, write, dead pulse and drowsy state and
// count a failure for every mechanism that never happened (Case-1 early
// release, Case-2 drowsy retention, conventional release, wake-up of a
// drowsy register, squash/rollback, checkpoint-delayed release, zero-write
// elimination, full checkpoint buffer). The run ends when both are done.
module tb_trireg_top;
  import trireg_pkg::*;
  localparam int N = NREGS_DEF;
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

  rob_core_model #(.NREGS(N), .NINSTR(4000)) rob_core (
    .clk(clk), .rst_n(rst_n), .alloc_o(rob_alloc), .src_o(rob_src), .redef_o(rob_redef),
    .unmap_o(rob_unmap), .restore_o(rob_restore), .rd_o(rob_rd), .wr_o(rob_wr),
    .rdata_i(rob_rdata), .wr_skipped_i(rob_skipped), .free_i(rob_free), .dead_i(rob_dead),
    .state_i(rob_state), .done_o(rob_done), .checks_o(rob_checks), .failures_o(rob_failures));

  ckpt_core_model #(.NREGS(N), .NINSTR(4000)) cp_core (
    .clk(clk), .rst_n(rst_n), .alloc_o(cp_alloc), .src_o(cp_src), .unmap_o(cp_unmap),
    .remap_o(cp_remap), .cp_inc_o(cp_inc), .cp_dec_o(cp_dec), .rd_o(cp_rd), .wr_o(cp_wr),
    .rdata_i(cp_rdata), .wr_skipped_i(cp_skipped), .free_i(cp_free), .dead_i(cp_dead),
    .state_i(cp_state), .done_o(cp_done), .checks_o(cp_checks), .failures_o(cp_failures));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (rob_done && cp_done);
    #1 $display("TB_RESULT checks=%0d failures=%0d", rob_checks + cp_checks, rob_failures + cp_failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", rob_checks + cp_checks,
             rob_failures + cp_failures + 1);
    $finish;
  end
endmodule
