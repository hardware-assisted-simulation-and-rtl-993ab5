// pic18_decoder: instruction decoder of the SynthPic18 core.
//
// Combinational. Turns one 16-bit PIC18 instruction word into the control
// record ctrl_t: which ALU operation runs, whether operand a is a file
// register (read in Q2) or the literal, where the result goes (W and/or the
// file register, from the d bit), which STATUS flags it updates, the skip
// condition, the program-flow class, and what the second cycle of a
// two-cycle instruction does. It follows the flowchart's four instruction
// groups (table, literal, stack/control, register). Encodings and flag
// effects are those of the PIC18 instruction set (75 standard
// instructions); CLRWDT and SLEEP decode as NOP because the core has no
// watchdog or power-down mode. Unlisted words, and the second word of a
// two-word instruction (1111 xxxx xxxx xxxx), decode as NOP.
module pic18_decoder
  import pic18_pkg::*;
(
  input  logic [15:0] ir,
  output ctrl_t       ctrl
);
  logic d;
  assign d = ir[9];

  // Byte-oriented file operation: operand from f, result to W or f.
  function automatic ctrl_t fop(alu_op_t op, logic dd, logic [4:0] fl);
    ctrl_t c;
    c = CTRL_NOP;
    c.alu_op    = op;
    c.use_f     = 1'b1;
    c.wr_w      = ~dd;
    c.wr_f      = dd;
    c.flag_mask = fl;
    return c;
  endfunction

  // Literal operation: operand k, result to W.
  function automatic ctrl_t lop(alu_op_t op, logic [4:0] fl);
    ctrl_t c;
    c = CTRL_NOP;
    c.alu_op    = op;
    c.lit       = 1'b1;
    c.wr_w      = 1'b1;
    c.flag_mask = fl;
    return c;
  endfunction

  // File read with a skip test and no write.
  function automatic ctrl_t sop(alu_op_t op, skip_t sk);
    ctrl_t c;
    c = CTRL_NOP;
    c.alu_op = op;
    c.use_f  = 1'b1;
    c.skip   = sk;
    return c;
  endfunction

  always_comb begin
    ctrl = CTRL_NOP;
    unique casez (ir)
      // ---- control and table operations in the 0000 0000 page
      16'b0000_0000_0000_0000: ctrl = CTRL_NOP;                    // NOP
      16'b0000_0000_0000_0011: ctrl = CTRL_NOP;                    // SLEEP
      16'b0000_0000_0000_0100: ctrl = CTRL_NOP;                    // CLRWDT
      16'b0000_0000_0000_0101: ctrl.br = BR_PUSH;                  // PUSH
      16'b0000_0000_0000_0110: ctrl.br = BR_POP;                   // POP
      16'b0000_0000_0000_0111: begin                               // DAW
        ctrl = lop(ALU_DAW, FL_C);
        ctrl.lit = 1'b0;
      end
      16'b0000_0000_0000_10??: begin                               // TBLRD
        ctrl.cyc2     = C2_TBLRD;
        ctrl.tbl_pre  = (ir[1:0] == 2'b11);
        ctrl.tbl_post = (ir[1:0] == 2'b01) ? 2'd1 : (ir[1:0] == 2'b10) ? 2'd2 : 2'd0;
      end
      16'b0000_0000_0000_11??: begin                               // TBLWT
        ctrl.cyc2     = C2_TBLWT;
        ctrl.tbl_pre  = (ir[1:0] == 2'b11);
        ctrl.tbl_post = (ir[1:0] == 2'b01) ? 2'd1 : (ir[1:0] == 2'b10) ? 2'd2 : 2'd0;
      end
      16'b0000_0000_0001_000?: begin ctrl.br = BR_RETFIE; ctrl.fast = ir[0]; end
      16'b0000_0000_0001_001?: begin ctrl.br = BR_RETURN; ctrl.fast = ir[0]; end
      16'b0000_0000_1111_1111: ctrl.sw_reset = 1'b1;               // RESET
      16'b0000_0001_0000_????: ctrl.movlb = 1'b1;                  // MOVLB
      16'b0000_001?_????_????: begin                               // MULWF
        ctrl       = CTRL_NOP;
        ctrl.use_f = 1'b1;
        ctrl.mul   = 1'b1;
      end
      16'b0000_01??_????_????: ctrl = fop(ALU_DEC, d, FL_ALL);     // DECF
      16'b0000_1000_????_????: ctrl = lop(ALU_SUB, FL_ALL);        // SUBLW
      16'b0000_1001_????_????: ctrl = lop(ALU_IOR, FL_ZN);         // IORLW
      16'b0000_1010_????_????: ctrl = lop(ALU_XOR, FL_ZN);         // XORLW
      16'b0000_1011_????_????: ctrl = lop(ALU_AND, FL_ZN);         // ANDLW
      16'b0000_1100_????_????: begin                               // RETLW
        ctrl    = lop(ALU_PASSA, 5'b0);
        ctrl.br = BR_RETLW;
      end
      16'b0000_1101_????_????: begin                               // MULLW
        ctrl     = CTRL_NOP;
        ctrl.lit = 1'b1;
        ctrl.mul = 1'b1;
      end
      16'b0000_1110_????_????: ctrl = lop(ALU_PASSA, 5'b0);        // MOVLW
      16'b0000_1111_????_????: ctrl = lop(ALU_ADD, FL_ALL);        // ADDLW
      // ---- byte-oriented file register operations
      16'b0001_00??_????_????: ctrl = fop(ALU_IOR,   d, FL_ZN);    // IORWF
      16'b0001_01??_????_????: ctrl = fop(ALU_AND,   d, FL_ZN);    // ANDWF
      16'b0001_10??_????_????: ctrl = fop(ALU_XOR,   d, FL_ZN);    // XORWF
      16'b0001_11??_????_????: ctrl = fop(ALU_COM,   d, FL_ZN);    // COMF
      16'b0010_00??_????_????: ctrl = fop(ALU_ADDC,  d, FL_ALL);   // ADDWFC
      16'b0010_01??_????_????: ctrl = fop(ALU_ADD,   d, FL_ALL);   // ADDWF
      16'b0010_10??_????_????: ctrl = fop(ALU_INC,   d, FL_ALL);   // INCF
      16'b0010_11??_????_????: begin                               // DECFSZ
        ctrl = fop(ALU_DEC, d, 5'b0); ctrl.skip = SK_ZERO;
      end
      16'b0011_00??_????_????: ctrl = fop(ALU_RRC,   d, FL_CZN);   // RRCF
      16'b0011_01??_????_????: ctrl = fop(ALU_RLC,   d, FL_CZN);   // RLCF
      16'b0011_10??_????_????: ctrl = fop(ALU_SWAP,  d, 5'b0);     // SWAPF
      16'b0011_11??_????_????: begin                               // INCFSZ
        ctrl = fop(ALU_INC, d, 5'b0); ctrl.skip = SK_ZERO;
      end
      16'b0100_00??_????_????: ctrl = fop(ALU_RRN,   d, FL_ZN);    // RRNCF
      16'b0100_01??_????_????: ctrl = fop(ALU_RLN,   d, FL_ZN);    // RLNCF
      16'b0100_10??_????_????: begin                               // INFSNZ
        ctrl = fop(ALU_INC, d, 5'b0); ctrl.skip = SK_NZERO;
      end
      16'b0100_11??_????_????: begin                               // DCFSNZ
        ctrl = fop(ALU_DEC, d, 5'b0); ctrl.skip = SK_NZERO;
      end
      16'b0101_00??_????_????: ctrl = fop(ALU_PASSA, d, FL_ZN);    // MOVF
      16'b0101_01??_????_????: ctrl = fop(ALU_RSUBB, d, FL_ALL);   // SUBFWB
      16'b0101_10??_????_????: ctrl = fop(ALU_SUBB,  d, FL_ALL);   // SUBWFB
      16'b0101_11??_????_????: ctrl = fop(ALU_SUB,   d, FL_ALL);   // SUBWF
      16'b0110_000?_????_????: ctrl = sop(ALU_PASSA, SK_LT);       // CPFSLT
      16'b0110_001?_????_????: ctrl = sop(ALU_PASSA, SK_EQ);       // CPFSEQ
      16'b0110_010?_????_????: ctrl = sop(ALU_PASSA, SK_GT);       // CPFSGT
      16'b0110_011?_????_????: ctrl = sop(ALU_PASSA, SK_ZERO);     // TSTFSZ
      16'b0110_100?_????_????: ctrl = fop(ALU_SET,   1'b1, 5'b0);  // SETF
      16'b0110_101?_????_????: ctrl = fop(ALU_CLR,   1'b1, FL_Z);  // CLRF
      16'b0110_110?_????_????: ctrl = fop(ALU_NEG,   1'b1, FL_ALL);// NEGF
      16'b0110_111?_????_????: ctrl = fop(ALU_PASSB, 1'b1, 5'b0);  // MOVWF
      // ---- bit-oriented file register operations
      16'b0111_????_????_????: ctrl = fop(ALU_BTG, 1'b1, 5'b0);    // BTG
      16'b1000_????_????_????: ctrl = fop(ALU_BSF, 1'b1, 5'b0);    // BSF
      16'b1001_????_????_????: ctrl = fop(ALU_BCF, 1'b1, 5'b0);    // BCF
      16'b1010_????_????_????: ctrl = sop(ALU_PASSA, SK_BSET);     // BTFSS
      16'b1011_????_????_????: ctrl = sop(ALU_PASSA, SK_BCLR);     // BTFSC
      // ---- two-word and branch instructions
      16'b1100_????_????_????: begin                               // MOVFF
        ctrl          = sop(ALU_PASSA, SK_NONE);
        ctrl.two_word = 1'b1;
        ctrl.cyc2     = C2_MOVFF;
      end
      16'b1101_0???_????_????: ctrl.br = BR_BRA;                   // BRA
      16'b1101_1???_????_????: ctrl.br = BR_RCALL;                 // RCALL
      16'b1110_0???_????_????: ctrl.br = BR_COND;                  // BZ..BNN
      16'b1110_110?_????_????: begin                               // CALL
        ctrl.two_word = 1'b1; ctrl.cyc2 = C2_CALL; ctrl.fast = ir[8];
      end
      16'b1110_1110_00??_????: begin                               // LFSR
        ctrl.two_word = 1'b1; ctrl.cyc2 = C2_LFSR;
      end
      16'b1110_1111_????_????: begin                               // GOTO
        ctrl.two_word = 1'b1; ctrl.cyc2 = C2_GOTO;
      end
      default: ctrl = CTRL_NOP;                                    // incl. 1111 xxxx
    endcase
  end
endmodule
