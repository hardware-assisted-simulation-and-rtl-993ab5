// pic18_fsr: indirect addressing unit with FSR0, FSR1 and FSR2.
//
// Each 12-bit file select register points into the data address space. When
// an instruction names one of the five indirect addresses of FSRn it reaches
// the location FSRn points to instead:
//   INDFn    FSRn            POSTINCn FSRn, then FSRn+1
//   POSTDECn FSRn, then -1   PREINCn  FSRn+1, and FSRn becomes FSRn+1
//   PLUSWn   FSRn + W (W as a signed offset), FSRn unchanged
// addr_in is the operand address after bank selection; ea is the resolved
// address (addr_in itself for a direct access). ea is combinational. commit
// (one clock, at the end of the instruction cycle) applies the increment or
// decrement of the access that addr_in names. The core also writes FSRnH /
// FSRnL as ordinary registers (sfr_we) and loads a whole FSR with LFSR
// (lfsr_we); such a write to the same FSR wins over the commit.
// The three FSRs with increment/decrement logic are shown in the original
// data path; the addressing modes and addresses are those of the PIC18.
module pic18_fsr
  import pic18_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] addr_in,
  input  logic [7:0]  w,
  output logic [11:0] ea,
  output logic        indirect,
  input  logic        commit,
  input  logic        sfr_we,
  input  logic [11:0] sfr_addr,
  input  logic [7:0]  sfr_wdata,
  input  logic        lfsr_we,
  input  logic [1:0]  lfsr_sel,
  input  logic [11:0] lfsr_val,
  output logic [11:0] fsr [3]
);
  // Indirect addresses: FSR0 at FEF..FEB, FSR1 at FE7..FE3, FSR2 at FDF..FDB.
  logic [1:0]  sel;
  logic [2:0]  mode;   // 7 INDF, 6 POSTINC, 5 POSTDEC, 4 PREINC, 3 PLUSW
  logic [11:0] base;

  always_comb begin
    indirect = 1'b0;
    sel      = 2'd0;
    mode     = addr_in[2:0];
    if (addr_in[11:4] == 8'hFE && addr_in[3] && addr_in[2:0] >= 3'd3) begin
      indirect = 1'b1; sel = 2'd0;
    end else if (addr_in[11:4] == 8'hFE && !addr_in[3] && addr_in[2:0] >= 3'd3) begin
      indirect = 1'b1; sel = 2'd1;
    end else if (addr_in[11:4] == 8'hFD && addr_in[3] && addr_in[2:0] >= 3'd3) begin
      indirect = 1'b1; sel = 2'd2;
    end
    base = fsr[sel];
    ea   = addr_in;
    if (indirect) begin
      unique case (mode)
        3'd4:    ea = base + 12'd1;
        3'd3:    ea = base + {{4{w[7]}}, w};
        default: ea = base;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 3; i++) fsr[i] <= '0;
    end else begin
      if (commit && indirect) begin
        unique case (mode)
          3'd6, 3'd4: fsr[sel] <= base + 12'd1;
          3'd5:       fsr[sel] <= base - 12'd1;
          default:    ;
        endcase
      end
      if (sfr_we) begin
        unique case (sfr_addr)
          A_FSR0L: fsr[0][7:0]  <= sfr_wdata;
          A_FSR0H: fsr[0][11:8] <= sfr_wdata[3:0];
          A_FSR1L: fsr[1][7:0]  <= sfr_wdata;
          A_FSR1H: fsr[1][11:8] <= sfr_wdata[3:0];
          A_FSR2L: fsr[2][7:0]  <= sfr_wdata;
          A_FSR2H: fsr[2][11:8] <= sfr_wdata[3:0];
          default: ;
        endcase
      end
      if (lfsr_we) fsr[lfsr_sel] <= lfsr_val;
    end
  end
endmodule
