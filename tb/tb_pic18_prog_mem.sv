// tb_pic18_prog_mem: self-checking test of the program memory.
//
// Uses a 4096-word instance. Loads every word through the host port, reads
// them back with one clock of latency, then performs byte-enabled table
// writes (low byte, high byte) and random reads against a model.
module tb_pic18_prog_mem;
  int checks = 0, failures = 0;
  localparam int AW = 12;
  logic clk = 0;
  logic [AW-1:0] addr, waddr, ld_addr;
  logic [15:0] rdata, wdata, ld_data;
  logic we = 0, ld_we = 0;
  logic [1:0] be;
  logic [15:0] model [2**AW];

  pic18_prog_mem #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; waddr = 0; wdata = 0; be = 0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < 2**AW; i++) begin
      ld_we = 1; ld_addr = AW'(i); ld_data = 16'(i * 7919 + 3);
      model[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addr = AW'(i);
      @(posedge clk); #1;
      chk("readback", int'(rdata), int'(model[i]));
    end
    for (int i = 0; i < 20000; i++) begin
      addr = AW'($urandom);
      we = 1'($urandom); be = 2'($urandom);
      waddr = AW'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we) begin
        if (be[0]) model[waddr][7:0]  = wdata[7:0];
        if (be[1]) model[waddr][15:8] = wdata[15:8];
      end
      we = 0;
      @(posedge clk); #1;
      chk("read", int'(rdata), int'(model[addr]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
