// tb_pic18_fsr: self-checking test of the indirect addressing unit.
//
// Loads FSR0..2 with LFSR and byte writes, then checks the resolved address
// and the FSR update of every indirect mode (INDF, POSTINC, POSTDEC, PREINC,
// PLUSW with positive and negative W) of every FSR against a model, plus
// direct addresses passing through unchanged.
module tb_pic18_fsr;
  import pic18_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [11:0] addr_in, ea, sfr_addr, lfsr_val;
  logic [7:0] w, sfr_wdata;
  logic indirect, commit = 0, sfr_we = 0, lfsr_we = 0;
  logic [1:0] lfsr_sel;
  logic [11:0] fsr [3];
  logic [11:0] m [3];

  pic18_fsr dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h (addr %h)", what, got, exp, addr_in);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [11:0] BASE [3] = '{12'hFE8, 12'hFE0, 12'hFD8};

  initial begin
    int n, mode, eexp;
    addr_in = 0; w = 0; sfr_addr = 0; sfr_wdata = 0; lfsr_val = 0; lfsr_sel = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3; i++) m[i] = 0;
    for (int it = 0; it < 4000; it++) begin
      n = $urandom_range(0, 2);
      case ($urandom_range(0, 3))
        0: begin   // LFSR
          lfsr_we = 1; lfsr_sel = 2'(n); lfsr_val = 12'($urandom); m[n] = lfsr_val;
          @(posedge clk); #1 lfsr_we = 0;
        end
        1: begin   // byte write to FSRnL or FSRnH
          sfr_we = 1; sfr_wdata = 8'($urandom);
          if ($urandom_range(0, 1) == 1) begin
            sfr_addr = BASE[n] + 12'd1; m[n][7:0] = sfr_wdata;
          end else begin
            sfr_addr = BASE[n] + 12'd2; m[n][11:8] = sfr_wdata[3:0];
          end
          @(posedge clk); #1 sfr_we = 0;
        end
        default: begin  // indirect access
          mode = $urandom_range(3, 7);
          addr_in = BASE[n] + 12'(mode);
          w = 8'($urandom);
          #1;
          case (mode)
            4: eexp = (int'(m[n]) + 1) % 4096;
            3: eexp = (int'(m[n]) + int'($signed(w)) + 4096) % 4096;
            default: eexp = int'(m[n]);
          endcase
          chk("ea", int'(ea), eexp);
          chk("indirect", int'(indirect), 1);
          commit = 1;
          @(posedge clk); #1 commit = 0;
          if (mode == 6 || mode == 4) m[n] = m[n] + 12'd1;
          if (mode == 5) m[n] = m[n] - 12'd1;
        end
      endcase
      for (int i = 0; i < 3; i++) chk("fsr", int'(fsr[i]), int'(m[i]));
    end
    // direct addresses are not changed and never commit
    foreach (BASE[i]) begin
      addr_in = BASE[i] + 12'd1; #1;   // FSRnL itself
      chk("direct ea", int'(ea), int'(addr_in));
      chk("direct flag", int'(indirect), 0);
    end
    addr_in = 12'h05A; #1;
    chk("ram ea", int'(ea), 'h05A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
