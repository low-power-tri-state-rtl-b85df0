// tb_rob_trireg_rf: runs the ROB form of the tri-state register file under
// rob_core_model (random program with compiler release marks, branch
// mispredictions and zero results) at the default 128 registers, 32
// architectural registers and 80 instructions in flight. All checks are in
// the core model; this bench adds the clock, reset and a watchdog.
module tb_rob_trireg_rf;
  import trireg_pkg::*;
  localparam int N = NREGS_DEF;
  logic clk = 1'b0, rst_n = 1'b0;
  preg_evt_t alloc, redef, unmap, restore;
  src_evt_t  src [NRD];
  rd_req_t   rd [NRD];
  wr_req_t   wr;
  word_t     rdata [NRD];
  logic      skipped, done_w, done;
  logic [N-1:0] free, dead, drowsy;
  reg_state_e state [N];
  int checks, failures;

  rob_trireg_rf dut (.clk(clk), .rst_n(rst_n), .alloc_i(alloc), .src_i(src), .redef_i(redef),
                     .unmap_i(unmap), .restore_i(restore), .rd_i(rd), .wr_i(wr), .rdata_o(rdata),
                     .wr_skipped_o(skipped), .wr_done_o(done_w), .free_o(free), .dead_o(dead),
                     .drowsy_o(drowsy), .state_o(state));

  rob_core_model #(.NREGS(N), .NINSTR(3000)) core (
    .clk(clk), .rst_n(rst_n), .alloc_o(alloc), .src_o(src), .redef_o(redef), .unmap_o(unmap),
    .restore_o(restore), .rd_o(rd), .wr_o(wr), .rdata_i(rdata), .wr_skipped_i(skipped),
    .free_i(free), .dead_i(dead), .state_i(state), .done_o(done), .checks_o(checks),
    .failures_o(failures));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    #1 $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
