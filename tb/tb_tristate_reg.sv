// tb_tristate_reg: random writes, dead pulses and drowsy periods on one
// tri-state register, compared with a reference word: a dead pulse clears
// the word (and wins over a write), drowsy keeps it, writes in work state
// store it; clean_o follows "zero since last discharge and not written".
module tb_tristate_reg;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dead, drowsy, we;
  logic [W-1:0] wdata, q, ref_q;
  logic clean, ref_clean;
  int checks = 0, failures = 0, n_dead = 0, n_drowsy_hold = 0;

  tristate_reg dut (.clk(clk), .rst_n(rst_n), .dead_i(dead), .drowsy_i(drowsy),
                                 .we_i(we), .wdata_i(wdata), .q_o(q), .clean_o(clean));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dead = 0; drowsy = 0; we = 0; wdata = '0;
    ref_q = '0; ref_clean = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (q !== '0 || clean !== 1'b1) begin failures++; $display("reset value wrong"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // drowsy lasts for stretches; no write while drowsy, never with dead
      if ($urandom_range(0, 9) == 0) drowsy = ~drowsy;
      dead  = !drowsy && ($urandom_range(0, 7) == 0);
      we    = !drowsy && ($urandom_range(0, 1) == 0);
      wdata = ($urandom_range(0, 3) == 0) ? '0 : $urandom;
      @(posedge clk);
      if (dead) begin
        ref_q = '0; ref_clean = 1'b1; n_dead++;
      end else if (we) begin
        ref_q = wdata; ref_clean = 1'b0;
      end else if (drowsy) n_drowsy_hold++;
      #1;
      checks++;
      if (q !== ref_q || clean !== ref_clean) begin
        failures++;
        $display("cycle %0d: q=%h exp %h clean=%b exp %b", i, q, ref_q, clean, ref_clean);
      end
    end
    checks++;
    if (n_dead == 0 || n_drowsy_hold == 0) begin failures++; $display("mechanism not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
