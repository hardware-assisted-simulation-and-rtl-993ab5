// tb_fig7_program: runs a published PIC18 machine-code fragment on the
// full-size SynthPic18 core.
//
// The fragment is 26 program words at byte addresses 0x009E-0x00D0, as
// produced by a PIC18 toolchain: it copies four bytes 0x004-0x007 into
// banked registers 0x090-0x093, ORs the four bytes 0x08C-0x08F together,
// and either (BNZ taken) reloads W from 0x090, or (not taken) moves
// 0x093/0x092/0x091 into FSR0L/PRODH/PRODL with MOVFF, loads W from 0x090
// and branches far to 0x0412. The words are used exactly as the toolchain
// emitted them, so the test also shows that the core's decoder agrees
// with the standard PIC18 encodings (MOVF, MOVLB, MOVWF banked, IORWF,
// BNZ, two-word MOVFF to SFRs, BRA with an 11-bit offset).
//
// Around the fragment the testbench places only what is needed to run it:
// a GOTO 0x009E at the reset vector, and a "BRA $" parking loop at each
// exit (0x00D2 and 0x0412). The data registers are preloaded with random
// values, with 0x08C-0x08F forced to zero in half of the runs so both
// branch directions are taken. Expected register values and the cycle
// count (four clocks per instruction cycle, two cycles for MOVFF) are
// worked out here from the fragment's meaning, not from the core.
module tb_fig7_program;
  import pic18_pkg::*;
  import pic18_asm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, mrst = 1;
  logic [7:0] data1 = 8'hCC, data2 = 8'h33, result;
  logic ld_prog_we = 0, ld_data_we = 0;
  logic [19:0] ld_prog_addr = 0;
  logic [15:0] ld_prog_data = 0;
  logic [11:0] ld_data_addr = 0;
  logic [7:0]  ld_data_data = 0;

  synthpic18 dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  // Machine words of the fragment, starting at byte address 0x009E.
  localparam int FRAG_BASE = 'h9E;
  localparam logic [15:0] FRAG [26] = '{
    16'h5004, 16'h0100, 16'h6F90, 16'h5005, 16'h6F91, 16'h5006, 16'h6F92,
    16'h5007, 16'h6F93, 16'h0100, 16'h518C, 16'h118D, 16'h118E, 16'h118F,
    16'hE109, 16'hC093, 16'hFFE9, 16'hC092, 16'hFFF4, 16'hC091, 16'hFFF3,
    16'h0100, 16'h5190, 16'hD1A2, 16'h0100, 16'h5190};
  localparam int EXIT_NZ  = 'hD2;    // fall-through after the BNZ path
  localparam int EXIT_FAR = 'h412;   // target of the BRA at 0x00CC

  task automatic load_word(int byte_addr, logic [15:0] w);
    ld_prog_we = 1; ld_prog_addr = 20'(byte_addr >> 1); ld_prog_data = w;
    @(posedge clk); #1;
    ld_prog_we = 0;
  endtask

  task automatic load_byte(int a, logic [7:0] v);
    ld_data_we = 1; ld_data_addr = 12'(a); ld_data_data = v;
    @(posedge clk); #1;
    ld_data_we = 0;
  endtask

  // Clock count at the start of each instruction, by byte address.
  longint clk_count = 0;
  longint t_at [int];
  always @(posedge clk) begin
    clk_count <= clk_count + 1;
    if (!mrst && dut.phase == Q1 && dut.u_core.cyc2 == C2_NONE && !dut.u_core.skip)
      if (!t_at.exists(int'(dut.u_core.pc))) t_at[int'(dut.u_core.pc)] = clk_count;
  end

  int n_taken, n_not_taken;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit zero_or);
    logic [7:0] src [4];
    logic [7:0] orv [4];
    logic [31:0] g;
    int guard, exit_addr;
    bit taken;
    mrst = 1;
    t_at.delete();
    g = goto_(21'(FRAG_BASE));
    load_word(0, g[31:16]);
    load_word(2, g[15:0]);
    foreach (FRAG[i]) load_word(FRAG_BASE + 2 * i, FRAG[i]);
    load_word(EXIT_NZ, bra(-1));
    load_word(EXIT_FAR, bra(-1));
    for (int i = 0; i < 4; i++) begin
      src[i] = 8'($urandom);
      orv[i] = zero_or ? 8'h00 : 8'($urandom);
      load_byte('h004 + i, src[i]);
      load_byte('h08C + i, orv[i]);
      load_byte('h090 + i, 8'($urandom));
    end
    if (!zero_or && (orv[0] | orv[1] | orv[2] | orv[3]) == 0) begin
      orv[3] = 8'h01;
      load_byte('h08F, orv[3]);
    end
    taken = (orv[0] | orv[1] | orv[2] | orv[3]) != 0;
    exit_addr = taken ? EXIT_NZ : EXIT_FAR;
    @(posedge clk); #1 mrst = 0;
    guard = 0;
    while (!(int'(dut.u_core.pc) == exit_addr && dut.phase == Q4) && guard < 10000) begin
      @(posedge clk); guard++;
    end
    chk("reached exit", int'(guard < 10000), 1);
    repeat (8) @(posedge clk);
    #1;
    if (taken) n_taken++; else n_not_taken++;
    for (int i = 0; i < 4; i++) chk("copy to bank", int'(dut.u_dram.mem['h090 + i]), int'(src[i]));
    chk("W", int'(dut.u_core.w), int'(src[0]));
    chk("Z flag", int'(dut.u_core.status[ST_Z]), int'(src[0] == 0));
    chk("N flag", int'(dut.u_core.status[ST_N]), int'(src[0][7]));
    chk("BSR", int'(dut.u_core.bsr_r), 0);
    if (taken) begin
      chk("FSR0 untouched", int'(dut.u_core.fsr[0]), 0);
      chk("PROD untouched", int'(dut.u_core.prod), 0);
      // 14 single-cycle instructions, BNZ, MOVLB, MOVF
      chk("cycle count", int'(t_at[EXIT_NZ] - t_at[FRAG_BASE]), 4 * 17);
    end else begin
      chk("FSR0L", int'(dut.u_core.fsr[0][7:0]), int'(src[3]));
      chk("PRODH", int'(dut.u_core.prod[15:8]), int'(src[2]));
      chk("PRODL", int'(dut.u_core.prod[7:0]), int'(src[1]));
      // 15 single-cycle instructions, 3 MOVFF of two cycles, MOVLB, MOVF, BRA
      chk("cycle count", int'(t_at[EXIT_FAR] - t_at[FRAG_BASE]), 4 * 24);
    end
  endtask

  initial begin
    for (int r = 0; r < 20; r++) run(r[0]);
    $display("mechanisms: bnz_taken=%0d bnz_not_taken=%0d", n_taken, n_not_taken);
    checks++;
    if (n_taken == 0 || n_not_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
