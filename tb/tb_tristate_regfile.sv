// tb_tristate_regfile: the full 128 x 32 file with two read ports. Random
// writes (a quarter of them zero), dead pulses and drowsy registers are
// applied; a reference array predicts every read and whether each write is
// dropped by zero-write elimination (zero data into a register that is
// still clean since its last discharge).
module tb_tristate_regfile;
  import trireg_pkg::*;
  localparam int N = NREGS_DEF;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] dead, drowsy, clean;
  wr_req_t wr;
  preg_t   raddr [NRD];
  word_t   rdata [NRD];
  logic    skipped, done;
  word_t   ref_q [N];
  logic    ref_clean [N];
  int checks = 0, failures = 0, n_skip = 0, n_dead = 0;

  tristate_regfile dut (.clk(clk), .rst_n(rst_n), .dead_i(dead), .drowsy_i(drowsy), .wr_i(wr),
                        .raddr_i(raddr), .rdata_o(rdata), .wr_skipped_o(skipped),
                        .wr_done_o(done), .clean_o(clean));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_skip;
    dead = '0; drowsy = '0; wr = '0;
    for (int p = 0; p < NRD; p++) raddr[p] = '0;
    for (int r = 0; r < N; r++) begin ref_q[r] = '0; ref_clean[r] = 1'b1; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // change the drowsy set now and then
      if ($urandom_range(0, 15) == 0) drowsy[$urandom_range(0, N-1)] ^= 1'b1;
      dead = '0;
      if ($urandom_range(0, 3) == 0) begin
        int d = $urandom_range(0, N-1);
        if (!drowsy[d]) dead[d] = 1'b1;
      end
      wr.valid = $urandom_range(0, 3) != 0;
      wr.preg  = preg_t'($urandom_range(0, N-1));
      wr.data  = ($urandom_range(0, 3) == 0) ? '0 : $urandom;
      if (drowsy[wr.preg]) wr.valid = 1'b0;
      for (int p = 0; p < NRD; p++) raddr[p] = preg_t'($urandom_range(0, N-1));
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== ref_q[raddr[p]]) begin
          failures++;
          $display("cycle %0d port %0d reg %0d: got %h exp %h", i, p, raddr[p], rdata[p], ref_q[raddr[p]]);
        end
      end
      exp_skip = wr.valid && wr.data == '0 && ref_clean[wr.preg];
      checks++;
      if (skipped !== exp_skip || done !== (wr.valid && !exp_skip)) begin
        failures++;
        $display("cycle %0d: skipped=%b exp %b done=%b", i, skipped, exp_skip, done);
      end
      if (exp_skip) n_skip++;
      @(posedge clk);
      for (int r = 0; r < N; r++) begin
        if (dead[r]) begin ref_q[r] = '0; ref_clean[r] = 1'b1; n_dead++; end
        else if (wr.valid && !exp_skip && int'(wr.preg) == r) begin
          ref_q[r] = wr.data; ref_clean[r] = 1'b0;
        end
      end
      #1;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (clean[r] !== ref_clean[r]) begin failures++; $display("clean[%0d] wrong", r); end
      end
    end
    checks++;
    if (n_skip == 0 || n_dead == 0) begin failures++; $display("mechanism not exercised"); end
    $display("zero writes dropped: %0d, dead pulses: %0d", n_skip, n_dead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
