// pic18_data_ram: data memory (general purpose register file).
//
// A block RAM with one synchronous read port and one synchronous write port,
// the structure the original design settled on after a multi-port array did
// not synthesize. Depth is 2**AW bytes; the default AW = 12 gives the 4096
// byte space addressed by the 12-bit data address of the core. The top 128
// addresses are shadowed by special function registers in the core and are
// never accessed here. A second write path (ld_*) lets a host preload the
// register values while the core is held in reset; it takes priority over
// the core's write port. Timing: rdata is the word at raddr one clock after
// raddr is presented; a write takes effect at the clock edge. Reading and
// writing one address on the same edge returns the old data.
module pic18_data_ram #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [7:0]    ld_data
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we)   mem[ld_addr] <= ld_data;
    else if (we) mem[waddr]   <= wdata;
    rdata <= mem[raddr];
  end
endmodule
