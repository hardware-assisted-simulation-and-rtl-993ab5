// pic18_asm_pkg: a small PIC18 assembler for the testbenches.
//
// Functions that return the machine words of PIC18 instructions, written
// from the instruction-set encoding tables: byte-oriented {opcode, d, a, f},
// bit-oriented {opcode, b, a, f}, literal {opcode, k}, and the two-word
// instructions as a 32-bit value {first word, second word}. Branch offsets
// are given in words relative to the following instruction.
package pic18_asm_pkg;
  localparam logic F = 1'b1, W = 1'b0;     // destination
  localparam logic ACC = 1'b0, BNK = 1'b1; // access bank / BSR bank

  function automatic logic [15:0] fop(logic [5:0] opc, logic d, logic a, logic [7:0] f);
    return {opc, d, a, f};
  endfunction
  function automatic logic [15:0] addwf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b001001, d, a, f); endfunction
  function automatic logic [15:0] addwfc(logic [7:0] f, logic d, logic a = ACC); return fop(6'b001000, d, a, f); endfunction
  function automatic logic [15:0] andwf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b000101, d, a, f); endfunction
  function automatic logic [15:0] comf  (logic [7:0] f, logic d, logic a = ACC); return fop(6'b000111, d, a, f); endfunction
  function automatic logic [15:0] decf  (logic [7:0] f, logic d, logic a = ACC); return fop(6'b000001, d, a, f); endfunction
  function automatic logic [15:0] decfsz(logic [7:0] f, logic d, logic a = ACC); return fop(6'b001011, d, a, f); endfunction
  function automatic logic [15:0] dcfsnz(logic [7:0] f, logic d, logic a = ACC); return fop(6'b010011, d, a, f); endfunction
  function automatic logic [15:0] incf  (logic [7:0] f, logic d, logic a = ACC); return fop(6'b001010, d, a, f); endfunction
  function automatic logic [15:0] incfsz(logic [7:0] f, logic d, logic a = ACC); return fop(6'b001111, d, a, f); endfunction
  function automatic logic [15:0] infsnz(logic [7:0] f, logic d, logic a = ACC); return fop(6'b010010, d, a, f); endfunction
  function automatic logic [15:0] iorwf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b000100, d, a, f); endfunction
  function automatic logic [15:0] movf  (logic [7:0] f, logic d, logic a = ACC); return fop(6'b010100, d, a, f); endfunction
  function automatic logic [15:0] rlcf  (logic [7:0] f, logic d, logic a = ACC); return fop(6'b001101, d, a, f); endfunction
  function automatic logic [15:0] rlncf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b010001, d, a, f); endfunction
  function automatic logic [15:0] rrcf  (logic [7:0] f, logic d, logic a = ACC); return fop(6'b001100, d, a, f); endfunction
  function automatic logic [15:0] rrncf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b010000, d, a, f); endfunction
  function automatic logic [15:0] subfwb(logic [7:0] f, logic d, logic a = ACC); return fop(6'b010101, d, a, f); endfunction
  function automatic logic [15:0] subwf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b010111, d, a, f); endfunction
  function automatic logic [15:0] subwfb(logic [7:0] f, logic d, logic a = ACC); return fop(6'b010110, d, a, f); endfunction
  function automatic logic [15:0] swapf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b001110, d, a, f); endfunction
  function automatic logic [15:0] xorwf (logic [7:0] f, logic d, logic a = ACC); return fop(6'b000110, d, a, f); endfunction

  function automatic logic [15:0] cpfslt(logic [7:0] f, logic a = ACC); return {7'b0110000, a, f}; endfunction
  function automatic logic [15:0] cpfseq(logic [7:0] f, logic a = ACC); return {7'b0110001, a, f}; endfunction
  function automatic logic [15:0] cpfsgt(logic [7:0] f, logic a = ACC); return {7'b0110010, a, f}; endfunction
  function automatic logic [15:0] tstfsz(logic [7:0] f, logic a = ACC); return {7'b0110011, a, f}; endfunction
  function automatic logic [15:0] setf  (logic [7:0] f, logic a = ACC); return {7'b0110100, a, f}; endfunction
  function automatic logic [15:0] clrf  (logic [7:0] f, logic a = ACC); return {7'b0110101, a, f}; endfunction
  function automatic logic [15:0] negf  (logic [7:0] f, logic a = ACC); return {7'b0110110, a, f}; endfunction
  function automatic logic [15:0] movwf (logic [7:0] f, logic a = ACC); return {7'b0110111, a, f}; endfunction
  function automatic logic [15:0] mulwf (logic [7:0] f, logic a = ACC); return {7'b0000001, a, f}; endfunction

  function automatic logic [15:0] btg  (logic [7:0] f, logic [2:0] b, logic a = ACC); return {4'b0111, b, a, f}; endfunction
  function automatic logic [15:0] bsf  (logic [7:0] f, logic [2:0] b, logic a = ACC); return {4'b1000, b, a, f}; endfunction
  function automatic logic [15:0] bcf  (logic [7:0] f, logic [2:0] b, logic a = ACC); return {4'b1001, b, a, f}; endfunction
  function automatic logic [15:0] btfss(logic [7:0] f, logic [2:0] b, logic a = ACC); return {4'b1010, b, a, f}; endfunction
  function automatic logic [15:0] btfsc(logic [7:0] f, logic [2:0] b, logic a = ACC); return {4'b1011, b, a, f}; endfunction

  function automatic logic [15:0] sublw(logic [7:0] k); return {8'h08, k}; endfunction
  function automatic logic [15:0] iorlw(logic [7:0] k); return {8'h09, k}; endfunction
  function automatic logic [15:0] xorlw(logic [7:0] k); return {8'h0A, k}; endfunction
  function automatic logic [15:0] andlw(logic [7:0] k); return {8'h0B, k}; endfunction
  function automatic logic [15:0] retlw(logic [7:0] k); return {8'h0C, k}; endfunction
  function automatic logic [15:0] mullw(logic [7:0] k); return {8'h0D, k}; endfunction
  function automatic logic [15:0] movlw(logic [7:0] k); return {8'h0E, k}; endfunction
  function automatic logic [15:0] addlw(logic [7:0] k); return {8'h0F, k}; endfunction
  function automatic logic [15:0] movlb(logic [3:0] k); return {12'h010, k}; endfunction

  // conditional branches: cc = 0 BZ, 1 BNZ, 2 BC, 3 BNC, 4 BOV, 5 BNOV, 6 BN, 7 BNN
  function automatic logic [15:0] bcc(logic [2:0] cc, int n); return {5'b11100, cc, 8'(n)}; endfunction
  function automatic logic [15:0] bra  (int n); return {5'b11010, 11'(n)}; endfunction
  function automatic logic [15:0] rcall(int n); return {5'b11011, 11'(n)}; endfunction

  function automatic logic [31:0] goto_(logic [20:0] adr);
    return {8'hEF, adr[8:1], 4'hF, adr[20:9]};
  endfunction
  function automatic logic [31:0] call_(logic [20:0] adr, logic s = 1'b0);
    return {7'b1110110, s, adr[8:1], 4'hF, adr[20:9]};
  endfunction
  function automatic logic [31:0] lfsr(logic [1:0] n, logic [11:0] k);
    return {8'hEE, 2'b00, n, k[11:8], 8'hF0, k[7:0]};
  endfunction
  function automatic logic [31:0] movff(logic [11:0] fs, logic [11:0] fd);
    return {4'hC, fs, 4'hF, fd};
  endfunction

  localparam logic [15:0] NOP = 16'h0000, PUSH = 16'h0005, POP = 16'h0006, DAW = 16'h0007;
  localparam logic [15:0] TBLRD = 16'h0008, TBLRD_POSTINC = 16'h0009, TBLRD_POSTDEC = 16'h000A;
  localparam logic [15:0] TBLRD_PREINC = 16'h000B, TBLWT = 16'h000C, TBLWT_POSTINC = 16'h000D;
  localparam logic [15:0] TBLWT_POSTDEC = 16'h000E, TBLWT_PREINC = 16'h000F;
  localparam logic [15:0] RETURN = 16'h0012, RETURN_FAST = 16'h0013, RETFIE = 16'h0010;
  localparam logic [15:0] RESET = 16'h00FF, SLEEP = 16'h0003, CLRWDT = 16'h0004;
endpackage
