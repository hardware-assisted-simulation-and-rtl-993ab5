// pic18_prog_mem: program memory.
//
// Holds the program as 16-bit instruction words. The core addresses it with
// the word part of the 21-bit byte address (PC or table pointer), so the
// default AW = 20 word-address bits covers the full 2 MB PIC18 program space.
// One synchronous read port serves both instruction fetch and table reads.
// One write port with byte enables serves table writes (TBLWT) and, ahead of
// it, a host load port (ld_*) used to place the program while the core is
// in reset. Byte 0 of a word (be[0]) is the even byte address.
// Timing: rdata is the word at addr one clock after addr is presented.
module pic18_prog_mem #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic [1:0]    be,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [15:0]   ld_data
);
  logic [15:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    else if (we) begin
      if (be[0]) mem[waddr][7:0]  <= wdata[7:0];
      if (be[1]) mem[waddr][15:8] <= wdata[15:8];
    end
    rdata <= mem[addr];
  end
endmodule
