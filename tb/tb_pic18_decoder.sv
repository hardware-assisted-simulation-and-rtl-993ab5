// tb_pic18_decoder: self-checking test of the instruction decoder.
//
// Decodes words built by the test assembler, plus the literal machine words
// of a PIC18 example program (MOVF 5004, MOVWF 6F90, IORWF 118D, BNZ E109,
// MOVFF C093, BRA D1A2, MOVLB 0100), and checks each field of the control
// record: ALU operation, operand source, destination, flag mask, skip
// condition, flow class, two-cycle behaviour and table modes.
module tb_pic18_decoder;
  import pic18_pkg::*;
  import pic18_asm_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] ir;
  ctrl_t ctrl;

  pic18_decoder dut (.ir(ir), .ctrl(ctrl));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (ir=%h): got %0h exp %0h", what, ir, got, exp);
    end
  endtask

  // expected: alu op, use_f, lit, wr_w, wr_f, flags, skip, br
  task automatic t(logic [15:0] word, alu_op_t op, bit uf, bit lt, bit ww, bit wf,
                   logic [4:0] fl, skip_t sk = SK_NONE, br_t br = BR_NONE);
    ir = word; #1;
    if (wf || ww) chk("alu_op", int'(ctrl.alu_op), int'(op));
    chk("use_f", int'(ctrl.use_f), int'(uf));
    chk("lit", int'(ctrl.lit), int'(lt));
    chk("wr_w", int'(ctrl.wr_w), int'(ww));
    chk("wr_f", int'(ctrl.wr_f), int'(wf));
    chk("flags", int'(ctrl.flag_mask), int'(fl));
    chk("skip", int'(ctrl.skip), int'(sk));
    chk("br", int'(ctrl.br), int'(br));
  endtask

  task automatic t2(logic [15:0] word, cyc2_t c2, bit two);
    ir = word; #1;
    chk("cyc2", int'(ctrl.cyc2), int'(c2));
    chk("two_word", int'(ctrl.two_word), int'(two));
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // byte-oriented, both destinations
    for (int d = 0; d < 2; d++) begin
      t(addwf (8'h20, 1'(d)), ALU_ADD,   1, 0, !d, d, 5'b11111);
      t(addwfc(8'h20, 1'(d)), ALU_ADDC,  1, 0, !d, d, 5'b11111);
      t(andwf (8'h20, 1'(d)), ALU_AND,   1, 0, !d, d, 5'b10100);
      t(comf  (8'h20, 1'(d)), ALU_COM,   1, 0, !d, d, 5'b10100);
      t(decf  (8'h20, 1'(d)), ALU_DEC,   1, 0, !d, d, 5'b11111);
      t(decfsz(8'h20, 1'(d)), ALU_DEC,   1, 0, !d, d, 5'b00000, SK_ZERO);
      t(dcfsnz(8'h20, 1'(d)), ALU_DEC,   1, 0, !d, d, 5'b00000, SK_NZERO);
      t(incf  (8'h20, 1'(d)), ALU_INC,   1, 0, !d, d, 5'b11111);
      t(incfsz(8'h20, 1'(d)), ALU_INC,   1, 0, !d, d, 5'b00000, SK_ZERO);
      t(infsnz(8'h20, 1'(d)), ALU_INC,   1, 0, !d, d, 5'b00000, SK_NZERO);
      t(iorwf (8'h20, 1'(d)), ALU_IOR,   1, 0, !d, d, 5'b10100);
      t(movf  (8'h20, 1'(d)), ALU_PASSA, 1, 0, !d, d, 5'b10100);
      t(rlcf  (8'h20, 1'(d)), ALU_RLC,   1, 0, !d, d, 5'b10101);
      t(rlncf (8'h20, 1'(d)), ALU_RLN,   1, 0, !d, d, 5'b10100);
      t(rrcf  (8'h20, 1'(d)), ALU_RRC,   1, 0, !d, d, 5'b10101);
      t(rrncf (8'h20, 1'(d)), ALU_RRN,   1, 0, !d, d, 5'b10100);
      t(subfwb(8'h20, 1'(d)), ALU_RSUBB, 1, 0, !d, d, 5'b11111);
      t(subwf (8'h20, 1'(d)), ALU_SUB,   1, 0, !d, d, 5'b11111);
      t(subwfb(8'h20, 1'(d)), ALU_SUBB,  1, 0, !d, d, 5'b11111);
      t(swapf (8'h20, 1'(d)), ALU_SWAP,  1, 0, !d, d, 5'b00000);
      t(xorwf (8'h20, 1'(d)), ALU_XOR,   1, 0, !d, d, 5'b10100);
    end
    t(cpfslt(8'h20), ALU_PASSA, 1, 0, 0, 0, 0, SK_LT);
    t(cpfseq(8'h20), ALU_PASSA, 1, 0, 0, 0, 0, SK_EQ);
    t(cpfsgt(8'h20), ALU_PASSA, 1, 0, 0, 0, 0, SK_GT);
    t(tstfsz(8'h20), ALU_PASSA, 1, 0, 0, 0, 0, SK_ZERO);
    t(setf  (8'h20), ALU_SET,   1, 0, 0, 1, 0);
    t(clrf  (8'h20), ALU_CLR,   1, 0, 0, 1, 5'b00100);
    t(negf  (8'h20), ALU_NEG,   1, 0, 0, 1, 5'b11111);
    t(movwf (8'h20), ALU_PASSB, 1, 0, 0, 1, 0);
    t(btg   (8'h20, 3), ALU_BTG, 1, 0, 0, 1, 0);
    t(bsf   (8'h20, 3), ALU_BSF, 1, 0, 0, 1, 0);
    t(bcf   (8'h20, 3), ALU_BCF, 1, 0, 0, 1, 0);
    t(btfss (8'h20, 3), ALU_PASSA, 1, 0, 0, 0, 0, SK_BSET);
    t(btfsc (8'h20, 3), ALU_PASSA, 1, 0, 0, 0, 0, SK_BCLR);
    ir = mulwf(8'h20); #1; chk("mulwf mul", int'(ctrl.mul), 1); chk("mulwf use_f", int'(ctrl.use_f), 1);
    ir = mullw(8'h20); #1; chk("mullw mul", int'(ctrl.mul), 1); chk("mullw lit", int'(ctrl.lit), 1);
    // literal
    t(sublw(8'h11), ALU_SUB,   0, 1, 1, 0, 5'b11111);
    t(iorlw(8'h11), ALU_IOR,   0, 1, 1, 0, 5'b10100);
    t(xorlw(8'h11), ALU_XOR,   0, 1, 1, 0, 5'b10100);
    t(andlw(8'h11), ALU_AND,   0, 1, 1, 0, 5'b10100);
    t(movlw(8'h11), ALU_PASSA, 0, 1, 1, 0, 0);
    t(addlw(8'h11), ALU_ADD,   0, 1, 1, 0, 5'b11111);
    t(retlw(8'h11), ALU_PASSA, 0, 1, 1, 0, 0, SK_NONE, BR_RETLW);
    t(DAW,          ALU_DAW,   0, 0, 1, 0, 5'b00001);
    ir = movlb(4'h5); #1; chk("movlb", int'(ctrl.movlb), 1);
    // control
    for (int cc = 0; cc < 8; cc++) t(bcc(3'(cc), -3), ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_COND);
    t(bra(100),  ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_BRA);
    t(rcall(-7), ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_RCALL);
    t(RETURN,    ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_RETURN);
    t(RETFIE,    ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_RETFIE);
    t(PUSH,      ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_PUSH);
    t(POP,       ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_POP);
    ir = RETURN_FAST; #1; chk("return fast", int'(ctrl.fast), 1);
    ir = RESET; #1; chk("reset", int'(ctrl.sw_reset), 1);
    t(NOP,    ALU_PASSA, 0, 0, 0, 0, 0);
    t(SLEEP,  ALU_PASSA, 0, 0, 0, 0, 0);
    t(CLRWDT, ALU_PASSA, 0, 0, 0, 0, 0);
    t(16'hF123, ALU_PASSA, 0, 0, 0, 0, 0);
    // two-word and table
    t2(goto_(21'h01234) >> 16, C2_GOTO, 1);
    t2(call_(21'h01234, 1) >> 16, C2_CALL, 1);
    ir = call_(21'h01234, 1) >> 16; #1; chk("call fast", int'(ctrl.fast), 1);
    t2(lfsr(2, 12'h345) >> 16, C2_LFSR, 1);
    t2(movff(12'h123, 12'h456) >> 16, C2_MOVFF, 1);
    t2(TBLRD, C2_TBLRD, 0);
    t2(TBLWT_PREINC, C2_TBLWT, 0);
    ir = TBLRD_PREINC;  #1; chk("tbl pre", int'(ctrl.tbl_pre), 1);  chk("tbl post", int'(ctrl.tbl_post), 0);
    ir = TBLRD_POSTINC; #1; chk("tbl pre", int'(ctrl.tbl_pre), 0);  chk("tbl post", int'(ctrl.tbl_post), 1);
    ir = TBLWT_POSTDEC; #1; chk("tbl pre", int'(ctrl.tbl_pre), 0);  chk("tbl post", int'(ctrl.tbl_post), 2);
    // machine words of the example program
    t(16'h5004, ALU_PASSA, 1, 0, 1, 0, 5'b10100);
    t(16'h6F90, ALU_PASSB, 1, 0, 0, 1, 0);
    t(16'h118D, ALU_IOR,   1, 0, 1, 0, 5'b10100);
    t(16'hE109, ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_COND);
    t(16'hD1A2, ALU_PASSA, 0, 0, 0, 0, 0, SK_NONE, BR_BRA);
    t2(16'hC093, C2_MOVFF, 1);
    ir = 16'h0100; #1; chk("movlb 0", int'(ctrl.movlb), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
