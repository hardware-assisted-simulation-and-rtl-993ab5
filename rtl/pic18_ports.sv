// pic18_ports: I/O ports A, B and C.
//
// Each port has a latch register LATx (the value driven on output pins), a
// direction register TRISx (1 = input, the reset value) and a PORTx read
// address. Reading PORTx returns the pin for input bits and the latch for
// output bits; writing PORTx or LATx writes the latch. The registers sit on
// the core's peripheral bus at the PIC18 addresses (PORTA..C F80..F82,
// LATA..C F89..F8B, TRISA..C F92..F94); other peripheral addresses read 0.
// The three ports appear in the original data path; their register set
// follows the PIC18 and all ports are 8 bits wide here (this design's choice).
// Timing: rdata is registered, valid one clock after raddr (as the data RAM);
// writes take effect at the clock edge; out/oe are registered.
module pic18_ports
  import pic18_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] raddr,
  output logic [7:0]  rdata,
  input  logic        we,
  input  logic [11:0] waddr,
  input  logic [7:0]  wdata,
  input  logic [7:0]  pin_in [3],
  output logic [7:0]  out    [3],
  output logic [7:0]  oe     [3]
);
  logic [7:0] lat  [3];
  logic [7:0] tris [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 3; i++) begin
        lat[i]  <= 8'h00;
        tris[i] <= 8'hFF;
      end
      rdata <= 8'h00;
    end else begin
      if (we) begin
        unique case (waddr)
          A_PORTA, A_LATA: lat[0]  <= wdata;
          A_PORTB, A_LATB: lat[1]  <= wdata;
          A_PORTC, A_LATC: lat[2]  <= wdata;
          A_TRISA:         tris[0] <= wdata;
          A_TRISB:         tris[1] <= wdata;
          A_TRISC:         tris[2] <= wdata;
          default: ;
        endcase
      end
      unique case (raddr)
        A_PORTA: rdata <= (pin_in[0] & tris[0]) | (lat[0] & ~tris[0]);
        A_PORTB: rdata <= (pin_in[1] & tris[1]) | (lat[1] & ~tris[1]);
        A_PORTC: rdata <= (pin_in[2] & tris[2]) | (lat[2] & ~tris[2]);
        A_LATA:  rdata <= lat[0];
        A_LATB:  rdata <= lat[1];
        A_LATC:  rdata <= lat[2];
        A_TRISA: rdata <= tris[0];
        A_TRISB: rdata <= tris[1];
        A_TRISC: rdata <= tris[2];
        default: rdata <= 8'h00;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      out[i] = lat[i];
      oe[i]  = ~tris[i];
    end
  end
endmodule
