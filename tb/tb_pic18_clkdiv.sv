// tb_pic18_clkdiv: self-checking test of the four-phase clock divider.
//
// After reset the divider must be in Q1 and then step Q1, Q2, Q3, Q4 on
// successive clocks, with q one-hot and matching the phase, cyc_end high
// only in Q4, and exactly one instruction cycle per four clocks. A reset in
// the middle of a cycle must return it to Q1.
module tb_pic18_clkdiv;
  import pic18_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  phase_t phase;
  logic [3:0] q;
  logic cyc_end;

  pic18_clkdiv dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    cycles = 0;
    for (int i = 0; i < 400; i++) begin
      chk("phase", int'(phase), i % 4);
      chk("q", int'(q), 1 << (i % 4));
      chk("cyc_end", int'(cyc_end), int'(i % 4 == 3));
      if (cyc_end) cycles++;
      @(posedge clk); #1;
    end
    chk("instruction cycles in 400 clocks", cycles, 100);
    // reset in the middle of a cycle
    @(posedge clk); #1;
    rst = 1; @(posedge clk); #1; rst = 0;
    chk("phase after reset", int'(phase), int'(Q1));
    chk("q after reset", int'(q), 1);
    @(posedge clk); #1;
    chk("phase after reset + 1", int'(phase), int'(Q2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
