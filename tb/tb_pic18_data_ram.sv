// tb_pic18_data_ram: self-checking test of the data RAM.
//
// Fills the whole 4096-byte RAM through the load port, then mixes random
// reads and core-port writes against a model array, checking the one-clock
// read latency, read-before-write on a collision and load-port priority.
module tb_pic18_data_ram;
  int checks = 0, failures = 0;
  localparam int AW = 12;
  logic clk = 0;
  logic [AW-1:0] raddr, waddr, ld_addr;
  logic [7:0] rdata, wdata, ld_data;
  logic we = 0, ld_we = 0;
  logic [7:0] model [2**AW];

  pic18_data_ram #(.AW(AW)) dut (.*);

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
    logic [7:0] exp_old;
    raddr = 0; waddr = 0; wdata = 0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < 2**AW; i++) begin
      ld_we = 1; ld_addr = AW'(i); ld_data = 8'((i * 37 + 11) ^ (i >> 4));
      model[i] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int i = 0; i < 20000; i++) begin
      raddr = AW'($urandom);
      we = 1'($urandom);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom);
      wdata = 8'($urandom);
      exp_old = model[raddr];
      @(posedge clk); #1;
      chk("read", int'(rdata), int'(exp_old));
      if (we) model[waddr] = wdata;
    end
    // load port wins over the core write port
    we = 1; waddr = 12'h123; wdata = 8'h11; ld_we = 1; ld_addr = 12'h123; ld_data = 8'h99;
    @(posedge clk); #1; we = 0; ld_we = 0; raddr = 12'h123;
    @(posedge clk); #1; chk("load priority", int'(rdata), 'h99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
