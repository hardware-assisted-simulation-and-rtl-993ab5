// tb_pic18_ports: self-checking test of I/O ports A, B and C.
//
// Checks reset values (TRIS = FF, LAT = 0), latch and direction writes,
// PORTx reads mixing pins (input bits) and latch (output bits), the one
// clock read latency, the out/oe outputs and that other addresses read 0.
module tb_pic18_ports;
  import pic18_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [11:0] raddr, waddr;
  logic [7:0] rdata, wdata;
  logic we = 0;
  logic [7:0] pin_in [3];
  logic [7:0] out [3];
  logic [7:0] oe [3];
  logic [7:0] mlat [3], mtris [3];

  pic18_ports dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  localparam logic [11:0] PORT [3] = '{A_PORTA, A_PORTB, A_PORTC};
  localparam logic [11:0] LAT  [3] = '{A_LATA, A_LATB, A_LATC};
  localparam logic [11:0] TRIS [3] = '{A_TRISA, A_TRISB, A_TRISC};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, k;
    raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 3; i++) begin pin_in[i] = 8'($urandom); mlat[i] = 0; mtris[i] = 8'hFF; end
    @(posedge clk); #1 rst = 0;
    for (int it = 0; it < 5000; it++) begin
      n = $urandom_range(0, 2);
      k = $urandom_range(0, 5);
      for (int i = 0; i < 3; i++) pin_in[i] = 8'($urandom);
      if (k < 3) begin
        we = 1; wdata = 8'($urandom);
        case (k)
          0: begin waddr = PORT[n]; mlat[n] = wdata; end
          1: begin waddr = LAT[n];  mlat[n] = wdata; end
          default: begin waddr = TRIS[n]; mtris[n] = wdata; end
        endcase
        @(posedge clk); #1 we = 0;
      end else begin
        raddr = (k == 3) ? PORT[n] : (k == 4) ? LAT[n] : TRIS[n];
        @(posedge clk); #1;
        case (k)
          3: chk("port", int'(rdata), int'((pin_in[n] & mtris[n]) | (mlat[n] & 8'(~mtris[n]))));
          4: chk("lat", int'(rdata), int'(mlat[n]));
          default: chk("tris", int'(rdata), int'(mtris[n]));
        endcase
      end
      for (int i = 0; i < 3; i++) begin
        chk("out", int'(out[i]), int'(mlat[i]));
        chk("oe", int'(oe[i]), int'(8'(~mtris[i])));
      end
    end
    raddr = 12'hF85; @(posedge clk); #1;
    chk("unmapped", int'(rdata), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
