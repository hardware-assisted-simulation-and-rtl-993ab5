// tb_pic18_stack: self-checking test of the return-address stack.
//
// Runs random pushes, pops, top-of-stack byte writes and STKPTR writes
// against a queue model, including filling all 31 entries (full flag, the
// dropped 32nd push) and popping an empty stack (underflow flag, TOS = 0).
module tb_pic18_stack;
  int checks = 0, failures = 0;
  localparam int DEPTH = 31, AW = 21;
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0, sp_we = 0;
  logic [AW-1:0] push_data, tos;
  logic [2:0] tos_wsel = 0;
  logic [7:0] wdata;
  logic [4:0] sp;
  logic full, unf;

  pic18_stack #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  logic [AW-1:0] m [$];
  bit mfull, munf;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic compare();
    chk("sp", int'(sp), m.size());
    chk("tos", int'(tos), (m.size() == 0) ? 0 : int'(m[$]));
    chk("full", int'(full), int'(mfull));
    chk("unf", int'(unf), int'(munf));
  endtask

  task automatic step();
    @(posedge clk); #1;
    push = 0; pop = 0; sp_we = 0; tos_wsel = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fulls = 0, unfs = 0;
    push_data = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    compare();
    // fill completely, then one more
    for (int i = 0; i < DEPTH + 1; i++) begin
      push = 1; push_data = AW'(i * 4099 + 2);
      if (m.size() < DEPTH) begin
        m.push_back(push_data);
        if (m.size() == DEPTH) mfull = 1;
      end else mfull = 1;
      step(); compare();
    end
    // empty completely, then one more
    for (int i = 0; i < DEPTH + 1; i++) begin
      pop = 1;
      if (m.size() > 0) void'(m.pop_back()); else munf = 1;
      step(); compare();
    end
    // clear the flags by writing STKPTR = 0
    sp_we = 1; wdata = 8'h00; mfull = 0; munf = 0; step(); compare();
    // random mix
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 5) begin
        push = 1; push_data = AW'($urandom);
        if (m.size() < DEPTH) begin
          m.push_back(push_data);
          if (m.size() == DEPTH) begin mfull = 1; fulls++; end
        end else mfull = 1;
      end else if (r < 8 && m.size() > 0 || r == 7) begin
        pop = 1;
        if (m.size() > 0) void'(m.pop_back()); else begin munf = 1; unfs++; end
      end else if (r == 8) begin
        tos_wsel = 3'b001 << $urandom_range(0, 2); wdata = 8'($urandom);
        if (m.size() > 0) begin
          if (tos_wsel[0]) m[$][7:0]  = wdata;
          if (tos_wsel[1]) m[$][15:8] = wdata;
          if (tos_wsel[2]) m[$][20:16] = wdata[4:0];
        end
      end else begin
        sp_we = 1; wdata = {2'b00, 1'b0, 5'($urandom_range(0, m.size()))};
        mfull = 0; munf = 0;
        while (m.size() > int'(wdata[4:0])) void'(m.pop_back());
      end
      step(); compare();
    end
    $display("random phase: %0d fills, %0d underflows", fulls, unfs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
