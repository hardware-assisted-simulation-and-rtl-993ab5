// pic18_alu: 8-bit arithmetic and logic unit with 8x8 multiplier.
//
// Combinational. Operand a is the file register or the literal, operand b is
// W. The unit holds the parts the original block diagram shows inside the
// ALU: an adder/subtractor, a comparator, an 8x8 multiplier and the "other"
// operations (logic, rotates, swap, bit set/clear/toggle, decimal adjust).
// All add and subtract operations share one adder y = x1 + x2 + ci:
//   ADD  a+b        ADDC a+b+C        SUB  a-b (= a+~b+1)
//   SUBB a-b-!C     RSUBB b-a-!C      NEG  0-a
//   INC  a+1        DEC  a-1 (= a+FF)
// C is the adder carry out (for subtraction: no borrow), DC the carry out of
// bit 3, OV the two's-complement overflow of the addition. N and Z follow the
// result. RLC/RRC rotate through cin and put the bit shifted out in C. DAW
// adjusts b (W) to packed BCD using cin (C) and dcin (DC); it checks the upper
// digit after the lower adjustment (a carry out of the lower adjustment also
// forces the upper one), and C stays set once it is set. The
// decoder decides which flags an instruction keeps. The comparator outputs
// (eq, gt, lt: a against b, unsigned) serve CPFSEQ/CPFSGT/CPFSLT and bit_val
// is bit "bitsel" of a for BTFSC/BTFSS. prod = a*b for MULWF/MULLW.
// Encodings of the operations follow the PIC18 instruction set; the shared
// adder and the DAW detail are this design's choices.
module pic18_alu
  import pic18_pkg::*;
(
  input  alu_op_t     op,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic        cin,
  input  logic        dcin,
  input  logic [2:0]  bitsel,
  output logic [7:0]  y,
  output logic        c,
  output logic        dc,
  output logic        z,
  output logic        ov,
  output logic        n,
  output logic        eq,
  output logic        gt,
  output logic        lt,
  output logic        bit_val,
  output logic [15:0] prod
);
  logic [7:0] x1, x2;
  logic       ci;
  logic [8:0] sum;
  logic [4:0] lsum;
  logic       is_arith;
  logic [8:0] daw_t;

  always_comb begin
    is_arith = 1'b1;
    x1 = a; x2 = b; ci = 1'b0;
    unique case (op)
      ALU_ADD:   begin x1 = a;    x2 = b;     ci = 1'b0; end
      ALU_ADDC:  begin x1 = a;    x2 = b;     ci = cin;  end
      ALU_SUB:   begin x1 = a;    x2 = ~b;    ci = 1'b1; end
      ALU_SUBB:  begin x1 = a;    x2 = ~b;    ci = cin;  end
      ALU_RSUBB: begin x1 = b;    x2 = ~a;    ci = cin;  end
      ALU_NEG:   begin x1 = 8'h0; x2 = ~a;    ci = 1'b1; end
      ALU_INC:   begin x1 = a;    x2 = 8'h00; ci = 1'b1; end
      ALU_DEC:   begin x1 = a;    x2 = 8'hFF; ci = 1'b0; end
      default:   is_arith = 1'b0;
    endcase
  end

  assign sum  = {1'b0, x1} + {1'b0, x2} + {8'b0, ci};
  assign lsum = {1'b0, x1[3:0]} + {1'b0, x2[3:0]} + {4'b0, ci};

  always_comb begin
    daw_t = {1'b0, b};
    if (daw_t[3:0] > 4'd9 || dcin) daw_t = daw_t + 9'h006;
    if (daw_t[7:4] > 4'd9 || cin || daw_t[8]) daw_t = daw_t + 9'h060;
  end

  always_comb begin
    y  = a;
    c  = cin;
    dc = dcin;
    ov = 1'b0;
    if (is_arith) begin
      y  = sum[7:0];
      c  = sum[8];
      dc = lsum[4];
      ov = (x1[7] == x2[7]) && (sum[7] != x1[7]);
    end else begin
      unique case (op)
        ALU_PASSA: y = a;
        ALU_PASSB: y = b;
        ALU_AND:   y = a & b;
        ALU_IOR:   y = a | b;
        ALU_XOR:   y = a ^ b;
        ALU_COM:   y = ~a;
        ALU_CLR:   y = 8'h00;
        ALU_SET:   y = 8'hFF;
        ALU_SWAP:  y = {a[3:0], a[7:4]};
        ALU_RLC:   begin y = {a[6:0], cin}; c = a[7]; end
        ALU_RRC:   begin y = {cin, a[7:1]}; c = a[0]; end
        ALU_RLN:   y = {a[6:0], a[7]};
        ALU_RRN:   y = {a[0], a[7:1]};
        ALU_BCF:   y = a & ~(8'h01 << bitsel);
        ALU_BSF:   y = a |  (8'h01 << bitsel);
        ALU_BTG:   y = a ^  (8'h01 << bitsel);
        ALU_DAW:   begin y = daw_t[7:0]; c = daw_t[8] | cin; end
        default:   y = a;
      endcase
    end
  end

  assign z       = (y == 8'h00);
  assign n       = y[7];
  assign eq      = (a == b);
  assign gt      = (a > b);
  assign lt      = (a < b);
  assign bit_val = a[bitsel];
  assign prod    = {8'h00, a} * {8'h00, b};
endmodule
