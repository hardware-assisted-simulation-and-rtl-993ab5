// tb_pic18_alu: self-checking test of the ALU.
//
// Applies random operands, carry inputs and bit numbers to every operation
// and compares result, flags, comparator outputs, bit test and product with
// a reference written with integer arithmetic (borrow-style subtraction and
// signed range checks rather than the unit's shared adder).
module tb_pic18_alu;
  import pic18_pkg::*;

  int checks = 0, failures = 0;
  alu_op_t op;
  logic [7:0] a, b, y;
  logic cin, dcin, c, dc, z, ov, n, eq, gt, lt, bit_val;
  logic [2:0] bitsel;
  logic [15:0] prod;

  pic18_alu dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s op=%s a=%h b=%h cin=%b: got %0h exp %0h", what, op.name(), a, b, cin, got, exp);
    end
  endtask

  function automatic bit sovf(int r);
    return (r > 127) || (r < -128);
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, ic, r, ey, ec, edc, eov, lo, hi, sa, sb;
    for (int it = 0; it < 20000; it++) begin
      op     = alu_op_t'($urandom_range(0, 24));
      a      = 8'($urandom); b = 8'($urandom);
      cin    = 1'($urandom); dcin = 1'($urandom);
      bitsel = 3'($urandom);
      if (it < 64) begin a = 8'(it * 4); b = 8'(255 - it); end
      #1;
      ia = int'(a); ib = int'(b); ic = int'(cin);
      sa = int'($signed(a)); sb = int'($signed(b));
      ec = ic; edc = int'(dcin); eov = 0; ey = ia;
      case (op)
        ALU_ADD:   begin r = ia + ib;          ey = r & 255; ec = int'(r > 255);
                         edc = int'((ia & 15) + (ib & 15) > 15); eov = int'(sovf(sa + sb)); end
        ALU_ADDC:  begin r = ia + ib + ic;     ey = r & 255; ec = int'(r > 255);
                         edc = int'((ia & 15) + (ib & 15) + ic > 15); eov = int'(sovf(sa + sb + ic)); end
        ALU_SUB:   begin r = ia - ib;          ey = r & 255; ec = int'(ia >= ib);
                         edc = int'((ia & 15) >= (ib & 15)); eov = int'(sovf(sa - sb)); end
        ALU_SUBB:  begin r = ia - ib - (1 - ic); ey = r & 255; ec = int'(ia >= ib + 1 - ic);
                         edc = int'((ia & 15) >= (ib & 15) + 1 - ic); eov = int'(sovf(sa - sb - 1 + ic)); end
        ALU_RSUBB: begin r = ib - ia - (1 - ic); ey = r & 255; ec = int'(ib >= ia + 1 - ic);
                         edc = int'((ib & 15) >= (ia & 15) + 1 - ic); eov = int'(sovf(sb - sa - 1 + ic)); end
        ALU_NEG:   begin ey = (256 - ia) & 255; ec = int'(ia == 0); edc = int'((ia & 15) == 0);
                         eov = int'(ia == 128); end
        ALU_INC:   begin ey = (ia + 1) & 255; ec = int'(ia == 255); edc = int'((ia & 15) == 15);
                         eov = int'(ia == 127); end
        ALU_DEC:   begin ey = (ia + 255) & 255; ec = int'(ia != 0); edc = int'((ia & 15) != 0);
                         eov = int'(ia == 128); end
        ALU_PASSA: ey = ia;
        ALU_PASSB: ey = ib;
        ALU_AND:   ey = ia & ib;
        ALU_IOR:   ey = ia | ib;
        ALU_XOR:   ey = ia ^ ib;
        ALU_COM:   ey = 255 - ia;
        ALU_CLR:   ey = 0;
        ALU_SET:   ey = 255;
        ALU_SWAP:  ey = ((ia % 16) * 16) + (ia / 16);
        ALU_RLC:   begin ey = ((ia * 2) & 255) + ic; ec = ia / 128; end
        ALU_RRC:   begin ey = (ia / 2) + 128 * ic;   ec = ia % 2; end
        ALU_RLN:   ey = ((ia * 2) & 255) + ia / 128;
        ALU_RRN:   ey = (ia / 2) + 128 * (ia % 2);
        ALU_BCF:   ey = ia & ~(1 << bitsel) & 255;
        ALU_BSF:   ey = ia | (1 << bitsel);
        ALU_BTG:   ey = ia ^ (1 << bitsel);
        ALU_DAW:   begin
          lo = ib % 16; hi = ib / 16;
          if (lo > 9 || dcin) begin lo = lo + 6; hi = hi + lo / 16; lo = lo % 16; end
          if (hi > 9 || cin) hi = hi + 6;
          ec = int'(hi > 15 || cin); ey = (hi % 16) * 16 + lo;
        end
        default: ;
      endcase
      chk("y", int'(y), ey);
      chk("z", int'(z), int'(ey == 0));
      chk("n", int'(n), ey / 128);
      chk("c", int'(c), ec);
      if (op inside {ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBB, ALU_RSUBB, ALU_NEG, ALU_INC, ALU_DEC}) begin
        chk("dc", int'(dc), edc);
        chk("ov", int'(ov), eov);
      end
      chk("eq", int'(eq), int'(ia == ib));
      chk("gt", int'(gt), int'(ia > ib));
      chk("lt", int'(lt), int'(ia < ib));
      chk("bit", int'(bit_val), (ia >> bitsel) & 1);
      chk("prod", int'(prod), ia * ib);
    end
    // DAW examples from the PIC18 data sheet: A5 -> 05 C=1, CE -> 34 C=1
    op = ALU_DAW; b = 8'hA5; cin = 0; dcin = 0; #1; chk("daw1", int'({c, y}), 'h105);
    b = 8'hCE; #1; chk("daw2", int'({c, y}), 'h134);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
