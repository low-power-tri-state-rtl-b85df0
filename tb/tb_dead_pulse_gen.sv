// tb_dead_pulse_gen: drives dead_pulse_gen with a random release level and
// checks that dead_o is high exactly in the first cycle of each high
// stretch of free_i (and never right after reset, since the register starts
// released). The expected pulse is computed from the stimulus history.
module tb_dead_pulse_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic free_i = 1'b1, dead_o;
  int   checks = 0, failures = 0, pulses = 0;
  logic prev_free;

  dead_pulse_gen dut (.clk(clk), .rst_n(rst_n), .free_i(free_i), .dead_o(dead_o));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev_free = 1'b1;
    // free_i stays high after reset: no pulse expected
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i > 3) free_i = ($urandom_range(0, 2) != 0) ? ~free_i : free_i;
      #1;
      checks++;
      if (dead_o !== (free_i && !prev_free)) begin
        failures++;
        $display("cycle %0d: free=%b prev=%b dead=%b", i, free_i, prev_free, dead_o);
      end
      if (dead_o) pulses++;
      @(posedge clk);
      prev_free = free_i;
    end
    checks++;
    if (pulses < 20) begin
      failures++;
      $display("too few pulses seen: %0d", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
