// tb_synthpic18: end-to-end test of the SynthPic18 core at its default size.
//
// A host-style test: with MRST held, the program is written into program
// memory and two register values into the data RAM through the load ports;
// then the core runs with Data1/Data2 on its input pins until it parks in a
// final loop, and the testbench checks the Result pins and data memory
// against values it computes itself from Data1, Data2 and the preloaded
// index. The program (assembled by pic18_asm_pkg) exercises every
// mechanism of the core: the RESET instruction, port reads and writes, ALU
// and flags, multiply, MOVFF, LFSR and indirect access (POSTINC, POSTDEC,
// PLUSW), skips, taken and untaken branches, RCALL/CALL/RETURN/RETLW, a
// computed jump through PCL, table read and table write, banked access,
// stack overflow and underflow. Each is counted and must occur. It also
// checks that an instruction cycle is four clocks: single-word
// instructions, two-word MOVFF (two cycles) and TBLRD (two cycles).
module tb_synthpic18;
  import pic18_pkg::*;
  import pic18_asm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, mrst = 1;
  logic [7:0] data1, data2, result;
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

  // ------------------------------------------------------------ program
  logic [15:0] prog [$];
  function automatic void e(logic [15:0] w); prog.push_back(w); endfunction
  function automatic void e2(logic [31:0] w); prog.push_back(w[31:16]); prog.push_back(w[15:0]); endfunction

  localparam int W_DONE = 89, W_SUB = 90, W_LOOKUP = 99, W_TBL = 105;

  function automatic void build();
    prog.delete();
    e(movf(8'h30, W));           // 0  software-reset flag
    e(bcc(1, 2));                // 1  BNZ -> 4
    e(incf(8'h30, F));           // 2
    e(RESET);                    // 3
    e(clrf(8'h94));              // 4  TRISC = 0: port C drives
    e(movf(8'h80, W));           // 5  PORTA (Data1)
    e(movwf(8'h20));             // 6
    e(movf(8'h81, W));           // 7  PORTB (Data2)
    e(addwf(8'h20, W));          // 8
    e(movwf(8'h21));             // 9  sum
    e(movf(8'h20, W));           // 10
    e(mulwf(8'h81));             // 11 PROD = Data1 * Data2
    e2(movff(12'hFF3, 12'h022)); // 12
    e2(movff(12'hFF4, 12'h023)); // 14
    e2(lfsr(0, 12'h100));        // 16
    e(movlw(5));                 // 18
    e(movwf(8'h24));             // 19
    e(movf(8'h24, W));           // 20 loop
    e(movwf(8'hEE));             // 21 POSTINC0
    e(decfsz(8'h24, F));         // 22
    e(bra(-4));                  // 23 -> 20
    e(rcall(W_SUB - 24 - 1));    // 24
    e(movwf(8'h25));             // 25 sum of table = 15
    e(movlw(8'(W_TBL * 2)));     // 26
    e(movwf(8'hF6));             // 27 TBLPTRL
    e(movlw(8'((W_TBL * 2) >> 8)));// 28
    e(movwf(8'hF7));             // 29 TBLPTRH
    e(clrf(8'hF8));              // 30 TBLPTRU
    e(TBLRD_POSTINC);            // 31
    e2(movff(12'hFF5, 12'h026)); // 32
    e(TBLRD_POSTINC);            // 34
    e2(movff(12'hFF5, 12'h027)); // 35
    e(movlw(8'h5A));             // 37
    e(movwf(8'hF5));             // 38 TABLAT
    e(TBLWT);                    // 39 low byte of word W_TBL+1
    e(TBLRD);                    // 40
    e2(movff(12'hFF5, 12'h029)); // 41
    e(movf(8'h31, W));           // 43 preloaded index
    e2(call_(21'(W_LOOKUP * 2)));// 44
    e(movwf(8'h28));             // 46
    e(movlb(2));                 // 47
    e(movf(8'h21, W));           // 48
    e(movwf(8'h10, BNK));        // 49 -> 0x210
    e(movf(8'h81, W));           // 50
    e(cpfsgt(8'h20));            // 51
    e(bra(1));                   // 52 -> 54
    e(movf(8'h20, W));           // 53
    e(movwf(8'h2A));             // 54 max
    e(movf(8'h81, W));           // 55
    e(subwf(8'h20, W));          // 56 Data1 - Data2
    e(bcc(3, 2));                // 57 BNC -> 60
    e(movlw(1));                 // 58
    e(bra(1));                   // 59 -> 61
    e(movlw(0));                 // 60
    e(movwf(8'h2B));             // 61
    e(movlw(32));                // 62
    e(movwf(8'h2C));             // 63
    e(PUSH);                     // 64
    e(decfsz(8'h2C, F));         // 65
    e(bra(-3));                  // 66 -> 64
    e2(movff(12'hFFC, 12'h02D)); // 67 STKPTR
    e(movlw(32));                // 69
    e(movwf(8'h2C));             // 70
    e(POP);                      // 71
    e(decfsz(8'h2C, F));         // 72
    e(bra(-3));                  // 73 -> 71
    e2(movff(12'hFFC, 12'h02E)); // 74
    e(clrf(8'hFC));              // 76
    e(movf(8'h21, W));           // 77
    e(movwf(8'h8B));             // 78 LATC
    e(clrf(8'h2F));              // 79
    e(bsf(8'h2F, 7));            // 80
    e(btg(8'h2F, 0));            // 81
    e(btfss(8'h2F, 7));          // 82
    e(setf(8'h2F));              // 83 skipped
    e2(lfsr(2, 12'h100));        // 84
    e(movlw(3));                 // 86
    e(movf(8'hDB, W));           // 87 PLUSW2
    e(movwf(8'h32));             // 88
    e(bra(-1));                  // 89 done
    e2(lfsr(1, 12'h104));        // 90 sum_sub
    e(movlw(5));                 // 92
    e(movwf(8'h33));             // 93
    e(movlw(0));                 // 94
    e(addwf(8'hE5, W));          // 95 POSTDEC1
    e(decfsz(8'h33, F));         // 96
    e(bra(-3));                  // 97 -> 95
    e(RETURN);                   // 98
    e(rlncf(8'hE8, W));          // 99 lookup: W = 2*W
    e(addwf(8'hF9, F));          // 100 PCL
    e(retlw(8'h11));             // 101
    e(retlw(8'h22));             // 102
    e(retlw(8'h33));             // 103
    e(retlw(8'h44));             // 104
    e(16'hBEEF);                 // 105 table
    e(16'h1234);                 // 106
    if (prog.size() != 107) $fatal(1, "program layout");
  endfunction

  // ------------------------------------------------------------ mechanism counters
  int n_swreset, n_skip, n_br_taken, n_br_not, n_call, n_ret, n_retlw, n_two, n_tblrd,
      n_tblwt, n_indirect, n_mul, n_pclw, n_banked, n_full, n_unf, n_portrd, n_portwr;
  logic full_q, unf_q;

  always @(posedge clk) begin
    if (!mrst && dut.phase == Q4) begin
      if (dut.u_core.soft_rst) n_swreset++;
      if (dut.u_core.skip_next) n_skip++;
      if (dut.u_core.ctrl.br == BR_COND && dut.u_core.cond_taken) n_br_taken++;
      if (dut.u_core.ctrl.br == BR_COND && !dut.u_core.cond_taken) n_br_not++;
      if (dut.u_core.ctrl.br == BR_BRA) n_br_taken++;
      if (dut.u_core.ctrl.br == BR_RCALL || dut.u_core.cyc2 == C2_CALL) n_call++;
      if (dut.u_core.ctrl.br == BR_RETURN) n_ret++;
      if (dut.u_core.ctrl.br == BR_RETLW) n_retlw++;
      if (dut.u_core.cyc2 inside {C2_GOTO, C2_CALL, C2_LFSR, C2_MOVFF}) n_two++;
      if (dut.u_core.cyc2 == C2_TBLRD) n_tblrd++;
      if (dut.u_core.cyc2 == C2_TBLWT) n_tblwt++;
      if (dut.u_core.ea_indirect && (dut.u_core.ctrl.use_f || dut.u_core.cyc2 == C2_MOVFF)) n_indirect++;
      if (dut.u_core.ctrl.mul) n_mul++;
      if (dut.u_core.do_wf && dut.u_core.ea == A_PCL) n_pclw++;
      if (dut.u_core.ctrl.use_f && dut.u_core.ctrl.cyc2 != C2_MOVFF && dut.u_core.ir[8]) n_banked++;
      if (dut.u_core.ctrl.use_f && dut.u_core.ea inside {A_PORTA, A_PORTB}) n_portrd++;
      if (dut.io_we && dut.io_waddr inside {A_LATC, A_TRISC}) n_portwr++;
    end
    full_q <= dut.u_core.stk_full;
    unf_q  <= dut.u_core.stk_unf;
    if (dut.u_core.stk_full && !full_q) n_full++;
    if (dut.u_core.stk_unf && !unf_q) n_unf++;
  end

  // ------------------------------------------------------------ cycle timing
  longint clk_count = 0;
  longint t_at [int];
  always @(posedge clk) begin
    clk_count <= clk_count + 1;
    if (!mrst && dut.phase == Q1 && dut.u_core.cyc2 == C2_NONE && !dut.u_core.skip) begin
      int wi;
      wi = int'(dut.u_core.pc >> 1);
      if (!t_at.exists(wi) && dut.u_dram.mem[12'h030] == 8'h01) t_at[wi] = clk_count;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ one run
  task automatic run(logic [7:0] d1, logic [7:0] d2, logic [1:0] k);
    int guard, s, p;
    mrst = 1; data1 = d1; data2 = d2;
    t_at.delete();
    foreach (prog[i]) begin
      ld_prog_we = 1; ld_prog_addr = 20'(i); ld_prog_data = prog[i];
      @(posedge clk); #1;
    end
    ld_prog_we = 0;
    ld_data_we = 1; ld_data_addr = 12'h030; ld_data_data = 8'h00; @(posedge clk); #1;
    ld_data_addr = 12'h031; ld_data_data = {6'b0, k}; @(posedge clk); #1;
    ld_data_we = 0;
    @(posedge clk); #1 mrst = 0;
    guard = 0;
    while (!(dut.u_core.pc == 21'(W_DONE * 2) && dut.phase == Q4) && guard < 100000) begin
      @(posedge clk); guard++;
    end
    chk("reached end", int'(guard < 100000), 1);
    repeat (8) @(posedge clk);
    #1;
    s = (int'(d1) + int'(d2)) % 256;
    p = int'(d1) * int'(d2);
    chk("Result pins", int'(result), s);
    chk("reset flag", int'(dut.u_dram.mem[12'h030]), 1);
    chk("data1", int'(dut.u_dram.mem[12'h020]), int'(d1));
    chk("sum", int'(dut.u_dram.mem[12'h021]), s);
    chk("prodl", int'(dut.u_dram.mem[12'h022]), p % 256);
    chk("prodh", int'(dut.u_dram.mem[12'h023]), p / 256);
    for (int i = 0; i < 5; i++) chk("postinc table", int'(dut.u_dram.mem[12'h100 + 12'(i)]), 5 - i);
    chk("loop counter", int'(dut.u_dram.mem[12'h024]), 0);
    chk("postdec sum", int'(dut.u_dram.mem[12'h025]), 15);
    chk("tblrd low", int'(dut.u_dram.mem[12'h026]), 'hEF);
    chk("tblrd high", int'(dut.u_dram.mem[12'h027]), 'hBE);
    chk("tblwt readback", int'(dut.u_dram.mem[12'h029]), 'h5A);
    chk("tblwt prog word", int'(dut.u_pmem.mem[W_TBL + 1]), 'h125A);
    chk("computed goto", int'(dut.u_dram.mem[12'h028]), 'h11 * (int'(k) + 1));
    chk("banked write", int'(dut.u_dram.mem[12'h210]), s);
    chk("max", int'(dut.u_dram.mem[12'h02A]), (d1 > d2) ? int'(d1) : int'(d2));
    chk("no borrow", int'(dut.u_dram.mem[12'h02B]), int'(d1 >= d2));
    chk("stkptr full", int'(dut.u_dram.mem[12'h02D]), 'h9F);
    chk("stkptr underflow", int'(dut.u_dram.mem[12'h02E]), 'hC0);
    chk("bit ops", int'(dut.u_dram.mem[12'h02F]), 'h81);
    chk("plusw", int'(dut.u_dram.mem[12'h032]), 2);
    chk("stack cleared", int'(dut.u_core.sp), 0);
    // four clocks per instruction cycle
    chk("8 single-cycle instructions", int'(t_at[12] - t_at[4]), 32);
    chk("MOVFF takes two cycles", int'(t_at[14] - t_at[12]), 8);
    chk("TBLRD takes two cycles", int'(t_at[32] - t_at[31]), 8);
  endtask

  initial begin
    logic [7:0] v1 [6] = '{8'h00, 8'hFF, 8'h37, 8'h80, 8'h12, 8'h01};
    logic [7:0] v2 [6] = '{8'h00, 8'hFF, 8'h37, 8'h7F, 8'h9C, 8'hFE};
    build();
    for (int r = 0; r < 10; r++) begin
      if (r < 6) run(v1[r], v2[r], 2'(r));
      else       run(8'($urandom), 8'($urandom), 2'(r));
    end
    $display("mechanisms: swreset=%0d skip=%0d br_taken=%0d br_not=%0d call=%0d ret=%0d retlw=%0d two_word=%0d",
             n_swreset, n_skip, n_br_taken, n_br_not, n_call, n_ret, n_retlw, n_two);
    $display("            tblrd=%0d tblwt=%0d indirect=%0d mul=%0d pcl_write=%0d banked=%0d full=%0d underflow=%0d port_rd=%0d port_wr=%0d",
             n_tblrd, n_tblwt, n_indirect, n_mul, n_pclw, n_banked, n_full, n_unf, n_portrd, n_portwr);
    chk("software reset happened", int'(n_swreset > 0), 1);
    chk("skip happened", int'(n_skip > 0), 1);
    chk("taken branch happened", int'(n_br_taken > 0), 1);
    chk("untaken branch happened", int'(n_br_not > 0), 1);
    chk("call happened", int'(n_call > 0), 1);
    chk("return happened", int'(n_ret > 0), 1);
    chk("retlw happened", int'(n_retlw > 0), 1);
    chk("two-word instruction happened", int'(n_two > 0), 1);
    chk("table read happened", int'(n_tblrd > 0), 1);
    chk("table write happened", int'(n_tblwt > 0), 1);
    chk("indirect access happened", int'(n_indirect > 0), 1);
    chk("multiply happened", int'(n_mul > 0), 1);
    chk("PCL write happened", int'(n_pclw > 0), 1);
    chk("banked access happened", int'(n_banked > 0), 1);
    chk("stack full happened", int'(n_full > 0), 1);
    chk("stack underflow happened", int'(n_unf > 0), 1);
    chk("port read happened", int'(n_portrd > 0), 1);
    chk("port write happened", int'(n_portwr > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
