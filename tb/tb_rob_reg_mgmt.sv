// tb_rob_reg_mgmt: directed scenarios for the management logic of one
// register in a reorder-buffer core, with the expected state after every
// event written out by hand from the release rules:
//   Case 1 (LConFree=1): dead as soon as the last consumer has read;
//   Case 2 (LConFree=0): drowsy after the last read, dead when the
//                        Redefiner commits;
//   no consumers:        work until the Redefiner commits;
//   recovery:            a squashed Redefiner and a re-renamed consumer
//                        take a drowsy register back to work.
// Each dead pulse must last exactly one cycle, in the cycle the register
// becomes free.
module tb_rob_reg_mgmt;
  import trireg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc, last, lconfree, redef, unmap, restore;
  logic [1:0] use_inc, use_dec;
  logic free, dead, drowsy;
  reg_state_e state;
  logic [USE_W-1:0] reguse;
  int checks = 0, failures = 0;

  rob_reg_mgmt dut (.clk(clk), .rst_n(rst_n), .alloc_i(alloc), .use_inc_i(use_inc), .last_i(last),
                    .lconfree_i(lconfree), .use_dec_i(use_dec), .redef_i(redef), .unmap_i(unmap),
                    .restore_i(restore), .free_o(free), .dead_o(dead), .drowsy_o(drowsy),
                    .state_o(state), .reguse_o(reguse));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    alloc = 0; use_inc = 0; last = 0; lconfree = 0; use_dec = 0;
    redef = 0; unmap = 0; restore = 0;
  endtask

  // apply the events set up by the caller for one cycle, then check
  task automatic step(input reg_state_e exp_state, input logic exp_dead, input string what);
    @(posedge clk);
    #1;
    idle();
    checks++;
    if (state !== exp_state || dead !== exp_dead || drowsy !== (exp_state == RS_DROWSY) ||
        free !== (exp_state == RS_DEAD)) begin
      failures++;
      $display("%s: state=%s dead=%b drowsy=%b free=%b, expected %s dead=%b",
               what, state.name(), dead, drowsy, free, exp_state.name(), exp_dead);
    end
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (state !== RS_DEAD || dead !== 1'b0) begin failures++; $display("reset: not released or pulsing"); end

    // ---- Case 1: early release ----
    alloc = 1;                                step(RS_WORK, 0, "c1 alloc");
    use_inc = 2;                              step(RS_WORK, 0, "c1 two consumers renamed");
    use_inc = 1; last = 1; lconfree = 1;      step(RS_WORK, 0, "c1 last consumer renamed");
    use_dec = 2;                              step(RS_WORK, 0, "c1 two reads");
    checks++; if (reguse !== 1) begin failures++; $display("c1 RegUse=%0d exp 1", reguse); end
    use_dec = 1;                              step(RS_DEAD, 1, "c1 last read -> dead pulse");
                                              step(RS_DEAD, 0, "c1 pulse is one cycle");
    redef = 0;                                step(RS_DEAD, 0, "c1 stays released");

    // ---- Case 2: drowsy, then conventional release ----
    alloc = 1;                                step(RS_WORK, 0, "c2 alloc");
    use_inc = 1; last = 1; lconfree = 0;      step(RS_WORK, 0, "c2 last consumer renamed");
    redef = 1;                                step(RS_WORK, 0, "c2 redefiner renamed, consumer pending");
    use_dec = 1;                              step(RS_DROWSY, 0, "c2 last read -> drowsy");
                                              step(RS_DROWSY, 0, "c2 drowsy holds");
    // misprediction squashes the redefiner; a re-renamed consumer wakes it
    restore = 1;                              step(RS_DROWSY, 0, "c2 restore keeps drowsy");
    use_inc = 1;                              step(RS_WORK, 0, "c2 recovery consumer -> work");
    use_dec = 1;                              step(RS_DROWSY, 0, "c2 recovery read -> drowsy");
    redef = 1;                                step(RS_DROWSY, 0, "c2 redefiner renamed again");
    unmap = 1;                                step(RS_DEAD, 1, "c2 redefiner commits -> dead pulse");
                                              step(RS_DEAD, 0, "c2 pulse is one cycle");

    // ---- no compiler-marked last consumer: conventional release only ----
    alloc = 1;                                step(RS_WORK, 0, "nc alloc");
    use_inc = 1;                              step(RS_WORK, 0, "nc consumer renamed");
    use_dec = 1;                              step(RS_WORK, 0, "nc read, 1stMapped still set");
    unmap = 1;                                step(RS_WORK, 0, "nc unmapped but not complete");
    redef = 1;                                step(RS_DEAD, 1, "nc complete -> dead pulse");

    // ---- Case 1 with a consumer that reads in the rename cycle of another ----
    alloc = 1;                                step(RS_WORK, 0, "c1b alloc");
    use_inc = 1;                              step(RS_WORK, 0, "c1b consumer");
    use_inc = 1; use_dec = 1; last = 1; lconfree = 1;
                                              step(RS_WORK, 0, "c1b last renamed, first read");
    checks++; if (reguse !== 1) begin failures++; $display("c1b RegUse=%0d exp 1", reguse); end
    use_dec = 1;                              step(RS_DEAD, 1, "c1b last read -> dead");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
