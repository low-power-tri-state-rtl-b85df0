// tb_ckpt_reg_mgmt: directed scenarios for the management logic of one
// register in a checkpoint core. Expected states follow the rules
//   free (dead pulse) when RegUse = RegMapped = CP = 0,
//   drowsy            when RegUse = RegMapped = 0 and CP != 0,
//   work              otherwise,
// including a rollback that remaps a drowsy register and the release of a
// register held by two checkpoints.
module tb_ckpt_reg_mgmt;
  import trireg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc, unmap, remap, cp_inc, cp_dec;
  logic [1:0] use_inc, use_dec;
  logic free, dead, drowsy;
  reg_state_e state;
  logic [CP_W-1:0] cp;
  int checks = 0, failures = 0;

  ckpt_reg_mgmt dut (.clk(clk), .rst_n(rst_n), .alloc_i(alloc), .use_inc_i(use_inc),
                     .use_dec_i(use_dec), .unmap_i(unmap), .remap_i(remap), .cp_inc_i(cp_inc),
                     .cp_dec_i(cp_dec), .free_o(free), .dead_o(dead), .drowsy_o(drowsy),
                     .state_o(state), .cp_o(cp));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    alloc = 0; use_inc = 0; use_dec = 0; unmap = 0; remap = 0; cp_inc = 0; cp_dec = 0;
  endtask

  task automatic step(input reg_state_e exp_state, input logic exp_dead, input string what);
    @(posedge clk);
    #1;
    idle();
    checks++;
    if (state !== exp_state || dead !== exp_dead || drowsy !== (exp_state == RS_DROWSY) ||
        free !== (exp_state == RS_DEAD)) begin
      failures++;
      $display("%s: state=%s dead=%b drowsy=%b free=%b cp=%0d, expected %s dead=%b",
               what, state.name(), dead, drowsy, free, cp, exp_state.name(), exp_dead);
    end
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (state !== RS_DEAD || dead !== 1'b0) begin failures++; $display("reset state wrong"); end

    // not checkpointed: freed as soon as it is unmapped and unread
    alloc = 1;                       step(RS_WORK, 0, "a alloc");
    use_inc = 2;                     step(RS_WORK, 0, "a two consumers");
    unmap = 1;                       step(RS_WORK, 0, "a unmapped, reads pending");
    use_dec = 1;                     step(RS_WORK, 0, "a one read");
    use_dec = 1;                     step(RS_DEAD, 1, "a last read -> dead pulse");
                                     step(RS_DEAD, 0, "a pulse is one cycle");

    // checkpointed: drowsy until the checkpoint is released
    alloc = 1;                       step(RS_WORK, 0, "b alloc");
    use_inc = 1; cp_inc = 1;         step(RS_WORK, 0, "b consumer, checkpoint taken");
    unmap = 1; use_dec = 1;          step(RS_DROWSY, 0, "b unmapped and read -> drowsy");
    checks++; if (cp !== 1) begin failures++; $display("b CP=%0d exp 1", cp); end
    cp_dec = 1;                      step(RS_DEAD, 1, "b checkpoint released -> dead pulse");

    // held by two checkpoints, rollback remaps it
    alloc = 1;                       step(RS_WORK, 0, "c alloc");
    cp_inc = 1;                      step(RS_WORK, 0, "c checkpoint 1");
    cp_inc = 1;                      step(RS_WORK, 0, "c checkpoint 2");
    unmap = 1;                       step(RS_DROWSY, 0, "c unmapped -> drowsy");
    remap = 1; cp_dec = 1;           step(RS_WORK, 0, "c rollback to checkpoint 1 -> work");
    checks++; if (cp !== 1) begin failures++; $display("c CP=%0d exp 1", cp); end
    unmap = 1;                       step(RS_DROWSY, 0, "c redefined again -> drowsy");
    cp_inc = 1; cp_dec = 1;          step(RS_DROWSY, 0, "c inc and dec together");
    use_inc = 1;                     step(RS_WORK, 0, "c consumer renamed -> work");
    use_dec = 1;                     step(RS_DROWSY, 0, "c consumer read -> drowsy");
    cp_dec = 1;                      step(RS_DEAD, 1, "c last checkpoint released -> dead");
                                     step(RS_DEAD, 0, "c pulse is one cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
