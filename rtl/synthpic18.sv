// synthpic18: the SynthPic18 core, a PIC18-compatible microcontroller core.
//
// Top level of the design. It joins the four-phase clock divider, the
// processing unit (pic18_core with its decoder, ALU, FSR unit and return
// stack), the program memory, the data RAM and I/O ports A, B and C.
// The outside view follows the core's block symbol: a clock, a reset, two
// 8-bit data inputs and one 8-bit result. Data1 drives the pins of port A
// and Data2 the pins of port B, so a program reads them from PORTA and
// PORTB; Result shows the port C pins: the output latch on bits whose TRISC
// bit is 0, and 0 on bits left as inputs. Port C's pins read back its
// latch. The program and the initial register values are placed by a host
// through the two load ports while MRST is high, as the original work
// prepares the instruction words and register arrays before execution.
// The divider's one-hot phase outputs are left open here: the core uses
// the encoded phase.
// Parameters: PC_W, the byte-address width of program memory (21, the
// PIC18 program counter), DM_AW, the data-address width (12, 4096 bytes),
// and STACK_DEPTH (31). Timing: one instruction cycle is four clk periods;
// all logic runs on the rising edge of clk; MRST is synchronous, active high,
// and must be held for at least one clk period.
module synthpic18
  import pic18_pkg::*;
#(
  parameter int unsigned PC_W        = 21,
  parameter int unsigned DM_AW       = 12,
  parameter int unsigned STACK_DEPTH = 31
) (
  input  logic            clk,
  input  logic            mrst,
  input  logic [7:0]      data1,
  input  logic [7:0]      data2,
  output logic [7:0]      result,
  // host load ports (use while mrst is high)
  input  logic            ld_prog_we,
  input  logic [PC_W-2:0] ld_prog_addr,   // word address
  input  logic [15:0]     ld_prog_data,
  input  logic            ld_data_we,
  input  logic [DM_AW-1:0] ld_data_addr,
  input  logic [7:0]      ld_data_data
);
  phase_t     phase;
  logic       soft_rst;

  pic18_clkdiv u_clkdiv (.clk(clk), .rst(mrst), .phase(phase), .q(), .cyc_end());

  logic [PC_W-2:0] pm_addr, pm_waddr;
  logic [15:0]     pm_rdata, pm_wdata;
  logic            pm_we;
  logic [1:0]      pm_be;
  logic [11:0]     dm_raddr, dm_waddr, io_raddr, io_waddr;
  logic [7:0]      dm_rdata, dm_wdata, io_rdata, io_wdata;
  logic            dm_we, io_we;

  pic18_core #(.PC_W(PC_W), .STACK_DEPTH(STACK_DEPTH)) u_core (
    .clk(clk), .rst(mrst), .phase(phase),
    .pm_addr(pm_addr), .pm_rdata(pm_rdata), .pm_we(pm_we), .pm_be(pm_be),
    .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
    .dm_raddr(dm_raddr), .dm_rdata(dm_rdata), .dm_we(dm_we), .dm_waddr(dm_waddr),
    .dm_wdata(dm_wdata),
    .io_raddr(io_raddr), .io_rdata(io_rdata), .io_we(io_we), .io_waddr(io_waddr),
    .io_wdata(io_wdata),
    .soft_rst(soft_rst)
  );

  pic18_prog_mem #(.AW(PC_W - 1)) u_pmem (
    .clk(clk), .addr(pm_addr), .rdata(pm_rdata),
    .we(pm_we), .be(pm_be), .waddr(pm_waddr), .wdata(pm_wdata),
    .ld_we(ld_prog_we), .ld_addr(ld_prog_addr), .ld_data(ld_prog_data)
  );

  pic18_data_ram #(.AW(DM_AW)) u_dram (
    .clk(clk), .raddr(dm_raddr[DM_AW-1:0]), .rdata(dm_rdata),
    .we(dm_we), .waddr(dm_waddr[DM_AW-1:0]), .wdata(dm_wdata),
    .ld_we(ld_data_we), .ld_addr(ld_data_addr), .ld_data(ld_data_data)
  );

  logic [7:0] pin_in [3];
  logic [7:0] port_out [3];
  logic [7:0] port_oe  [3];

  always_comb begin
    pin_in[0] = data1;
    pin_in[1] = data2;
    pin_in[2] = port_out[2];
  end

  pic18_ports u_ports (
    .clk(clk), .rst(mrst | soft_rst),
    .raddr(io_raddr), .rdata(io_rdata), .we(io_we), .waddr(io_waddr), .wdata(io_wdata),
    .pin_in(pin_in), .out(port_out), .oe(port_oe)
  );

  // Port C pins that are configured as inputs are not driven and read as 0.
  assign result = port_out[2] & port_oe[2];
endmodule
