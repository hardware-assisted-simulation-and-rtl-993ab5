// pic18_pkg: types and constants shared by the SynthPic18 core.
//
// Holds the instruction-cycle phase type, the ALU operation codes, the
// decoded-control record that the instruction decoder hands to the core,
// the STATUS bit positions and the addresses of the special function
// registers (SFRs). The SFR addresses and the instruction encodings are
// those of the PIC18FXX2 family that the core executes; PRODH = 0xFF4,
// PRODL = 0xFF3 and FSR0L = 0xFE9 also appear in the example program of
// the original work. Everything else here is this design's own choice.
package pic18_pkg;

  // Four clock phases of one instruction cycle.
  typedef enum logic [1:0] {Q1 = 2'd0, Q2 = 2'd1, Q3 = 2'd2, Q4 = 2'd3} phase_t;

  // STATUS register bit positions.
  localparam int unsigned ST_C  = 0;
  localparam int unsigned ST_DC = 1;
  localparam int unsigned ST_Z  = 2;
  localparam int unsigned ST_OV = 3;
  localparam int unsigned ST_N  = 4;

  // ALU operations. "a" is the file register or literal, "b" is W.
  typedef enum logic [4:0] {
    ALU_PASSA, ALU_PASSB, ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBB, ALU_RSUBB,
    ALU_NEG, ALU_INC, ALU_DEC, ALU_AND, ALU_IOR, ALU_XOR, ALU_COM,
    ALU_CLR, ALU_SET, ALU_SWAP, ALU_RLC, ALU_RRC, ALU_RLN, ALU_RRN,
    ALU_BCF, ALU_BSF, ALU_BTG, ALU_DAW
  } alu_op_t;

  // Skip conditions of the compare / test / bit-test instructions.
  typedef enum logic [2:0] {
    SK_NONE, SK_ZERO, SK_NZERO, SK_EQ, SK_GT, SK_LT, SK_BCLR, SK_BSET
  } skip_t;

  // Program-flow class of an instruction.
  typedef enum logic [3:0] {
    BR_NONE, BR_COND, BR_BRA, BR_RCALL, BR_GOTO, BR_CALL, BR_RETURN,
    BR_RETLW, BR_RETFIE, BR_PUSH, BR_POP
  } br_t;

  // Second instruction cycle of a two-cycle instruction.
  typedef enum logic [2:0] {
    C2_NONE, C2_GOTO, C2_CALL, C2_LFSR, C2_MOVFF, C2_TBLRD, C2_TBLWT
  } cyc2_t;

  // Decoded control for one instruction word.
  typedef struct packed {
    alu_op_t    alu_op;
    logic       use_f;      // operand a is a file register (read in Q2)
    logic       lit;        // operand a is the literal ir[7:0]
    logic       wr_w;       // result goes to W
    logic       wr_f;       // result goes to the file register
    logic [4:0] flag_mask;  // STATUS bits updated: {N, OV, Z, DC, C}
    skip_t      skip;
    br_t        br;
    logic       fast;       // "s" bit of CALL / RETURN / RETFIE
    logic       mul;        // write PRODH:PRODL
    logic       movlb;
    logic       two_word;   // GOTO, CALL, LFSR, MOVFF
    cyc2_t      cyc2;       // what the second cycle does
    logic       tbl_pre;    // TBLRD/TBLWT +* : pre-increment
    logic [1:0] tbl_post;   // 0 none, 1 post-increment, 2 post-decrement
    logic       sw_reset;   // RESET instruction
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{alu_op: ALU_PASSA, skip: SK_NONE, br: BR_NONE,
                                 cyc2: C2_NONE, default: '0};

  // Flag masks ({N, OV, Z, DC, C}).
  localparam logic [4:0] FL_ALL = 5'b11111;
  localparam logic [4:0] FL_ZN  = 5'b10100;
  localparam logic [4:0] FL_CZN = 5'b10101;
  localparam logic [4:0] FL_Z   = 5'b00100;
  localparam logic [4:0] FL_C   = 5'b00001;

  // Special function register addresses (12-bit data address space).
  localparam logic [11:0] A_TOSU    = 12'hFFF;
  localparam logic [11:0] A_TOSH    = 12'hFFE;
  localparam logic [11:0] A_TOSL    = 12'hFFD;
  localparam logic [11:0] A_STKPTR  = 12'hFFC;
  localparam logic [11:0] A_PCLATU  = 12'hFFB;
  localparam logic [11:0] A_PCLATH  = 12'hFFA;
  localparam logic [11:0] A_PCL     = 12'hFF9;
  localparam logic [11:0] A_TBLPTRU = 12'hFF8;
  localparam logic [11:0] A_TBLPTRH = 12'hFF7;
  localparam logic [11:0] A_TBLPTRL = 12'hFF6;
  localparam logic [11:0] A_TABLAT  = 12'hFF5;
  localparam logic [11:0] A_PRODH   = 12'hFF4;
  localparam logic [11:0] A_PRODL   = 12'hFF3;
  localparam logic [11:0] A_FSR0H   = 12'hFEA;
  localparam logic [11:0] A_FSR0L   = 12'hFE9;
  localparam logic [11:0] A_WREG    = 12'hFE8;
  localparam logic [11:0] A_FSR1H   = 12'hFE2;
  localparam logic [11:0] A_FSR1L   = 12'hFE1;
  localparam logic [11:0] A_BSR     = 12'hFE0;
  localparam logic [11:0] A_FSR2H   = 12'hFDA;
  localparam logic [11:0] A_FSR2L   = 12'hFD9;
  localparam logic [11:0] A_STATUS  = 12'hFD8;
  localparam logic [11:0] A_PORTA   = 12'hF80;
  localparam logic [11:0] A_PORTB   = 12'hF81;
  localparam logic [11:0] A_PORTC   = 12'hF82;
  localparam logic [11:0] A_LATA    = 12'hF89;
  localparam logic [11:0] A_LATB    = 12'hF8A;
  localparam logic [11:0] A_LATC    = 12'hF8B;
  localparam logic [11:0] A_TRISA   = 12'hF92;
  localparam logic [11:0] A_TRISB   = 12'hF93;
  localparam logic [11:0] A_TRISC   = 12'hF94;

  // Lowest address of the SFRs held inside the core; F80..FD7 go to the
  // peripheral bus, everything below F80 to the data RAM.
  localparam logic [11:0] CORE_SFR_BASE = 12'hFD8;
  localparam logic [11:0] SFR_BASE      = 12'hF80;

endpackage
