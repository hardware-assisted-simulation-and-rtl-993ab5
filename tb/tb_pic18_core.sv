// tb_pic18_core: random-program test of the processing unit.
//
// The core runs with behavioural program and data memories (synchronous
// read, like the real ones) and a phase counter in place of the clock
// divider. Each of many random programs mixes byte, bit, literal, skip,
// MOVFF, LFSR, multiply, DAW and forward-branch instructions on access-bank
// RAM, bank 1 (BSR), W, STATUS, PRODH/L and the indirect registers of all
// three FSRs, and ends in a self-loop. An instruction-level model in this
// file, written from the instruction-set descriptions, runs the same
// program; afterwards W, STATUS, BSR, PROD, the FSRs and the RAM must agree,
// and the number of clocks the core took must be four per instruction
// cycle the model counted (two cycles for two-word instructions).
module tb_pic18_core;
  import pic18_pkg::*;
  import pic18_asm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  phase_t phase;
  logic [19:0] pm_addr, pm_waddr;
  logic [15:0] pm_rdata, pm_wdata;
  logic pm_we, dm_we, io_we, soft_rst;
  logic [1:0] pm_be;
  logic [11:0] dm_raddr, dm_waddr, io_raddr, io_waddr;
  logic [7:0] dm_rdata, dm_wdata, io_rdata, io_wdata;

  pic18_core dut (.*);

  always #5 clk = ~clk;

  // behavioural memories
  logic [15:0] pmem [1024];
  logic [7:0]  dmem [4096];
  always_ff @(posedge clk) begin
    pm_rdata <= pmem[pm_addr[9:0]];
    dm_rdata <= dmem[dm_raddr];
    if (dm_we) dmem[dm_waddr] <= dm_wdata;
    io_rdata <= 8'h00;
  end
  always_ff @(posedge clk) phase <= rst ? Q1 : phase_t'(phase + 2'd1);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ reference model
  logic [7:0]  mram [4096];
  logic [7:0]  mw, mbsr;
  logic [4:0]  mst;
  logic [15:0] mprod;
  logic [11:0] mfsr [3];
  int          mpc, mcycles;
  bit          mskip;

  function automatic logic [11:0] m_resolve(logic [11:0] adr);
    int n, md;
    logic [11:0] r;
    n = -1;
    if (adr >= 12'hFEB && adr <= 12'hFEF) begin n = 0; md = 12'hFEF - adr; end
    if (adr >= 12'hFE3 && adr <= 12'hFE7) begin n = 1; md = 12'hFE7 - adr; end
    if (adr >= 12'hFDB && adr <= 12'hFDF) begin n = 2; md = 12'hFDF - adr; end
    if (n < 0) return adr;
    r = mfsr[n];
    case (md)
      1: mfsr[n] = mfsr[n] + 1;                         // POSTINC
      2: mfsr[n] = mfsr[n] - 1;                         // POSTDEC
      3: begin mfsr[n] = mfsr[n] + 1; r = mfsr[n]; end  // PREINC
      4: r = 12'(int'(mfsr[n]) + int'($signed(mw)));     // PLUSW
      default: ;                                        // INDF
    endcase
    return r;
  endfunction

  function automatic logic [7:0] m_rd(logic [11:0] a);
    case (a)
      12'hFE8: return mw;
      12'hFD8: return {3'b0, mst};
      12'hFF3: return mprod[7:0];
      12'hFF4: return mprod[15:8];
      12'hFE0: return mbsr;
      default: return (a < 12'hF80) ? mram[a] : 8'h00;
    endcase
  endfunction

  function automatic void m_wr(logic [11:0] a, logic [7:0] v);
    case (a)
      12'hFE8: mw = v;
      12'hFD8: mst = v[4:0];
      12'hFF3: mprod[7:0] = v;
      12'hFF4: mprod[15:8] = v;
      12'hFE0: mbsr = {4'h0, v[3:0]};
      default: if (a < 12'hF80) mram[a] = v;
    endcase
  endfunction

  // flags: set chosen STATUS bits (mask = {N,OV,Z,DC,C})
  function automatic void m_flags(logic [4:0] mask, int r8, bit c, bit dc, bit ov);
    logic [4:0] f;
    f = {r8[7], ov, (r8 & 255) == 0, dc, c};
    for (int i = 0; i < 5; i++) if (mask[i]) mst[i] = f[i];
  endfunction

  // x + y + ci with flags
  function automatic int m_add(int x, int y, int ci, output bit c, output bit dc, output bit ov);
    int r, sr;
    r  = x + y + ci;
    c  = r > 255;
    dc = (x % 16) + (y % 16) + ci > 15;
    sr = (x > 127 ? x - 256 : x) + (y > 127 ? y - 256 : y) + ci;
    ov = sr > 127 || sr < -128;
    return r & 255;
  endfunction

  // x - y - bi with flags (C = no borrow)
  function automatic int m_sub(int x, int y, int bi, output bit c, output bit dc, output bit ov);
    int r, sr;
    r  = x - y - bi;
    c  = r >= 0;
    dc = (x % 16) - (y % 16) - bi >= 0;
    sr = (x > 127 ? x - 256 : x) - (y > 127 ? y - 256 : y) - bi;
    ov = sr > 127 || sr < -128;
    return (r + 512) & 255;
  endfunction

  // execute the instruction at mpc
  function automatic void m_step(ref logic [15:0] prog [$]);
    logic [15:0] iw, w2;
    logic [11:0] adr, src, dst;
    int f, w, r, c0, lo, hi;
    bit d, c, dc, ov, sk;
    logic [4:0] mask;
    iw = prog[mpc / 2];
    w2 = (mpc / 2 + 1 < prog.size()) ? prog[mpc / 2 + 1] : 16'h0;
    mcycles++;
    if (mskip) begin mskip = 0; mpc += 2; return; end
    d = iw[9];
    adr = iw[8] ? {mbsr[3:0], iw[7:0]} : (iw[7] ? {4'hF, iw[7:0]} : {4'h0, iw[7:0]});
    w = int'(mw); c0 = int'(mst[0]); sk = 0;
    mpc += 2;
    // two-word instructions
    if (iw[15:12] == 4'hC) begin                   // MOVFF
      src = m_resolve(iw[11:0]); r = int'(m_rd(src));
      dst = m_resolve(w2[11:0]); m_wr(dst, 8'(r));
      mpc += 2; mcycles++; return;
    end
    if (iw[15:6] == 10'b1110111000) begin          // LFSR
      mfsr[iw[5:4]] = {iw[3:0], w2[7:0]};
      mpc += 2; mcycles++; return;
    end
    if (iw[15:11] == 5'b11100) begin               // conditional branch
      bit fl;
      case (iw[10:9]) 0: fl = mst[2]; 1: fl = mst[0]; 2: fl = mst[3]; default: fl = mst[4]; endcase
      if (fl != iw[8]) mpc += 2 * int'($signed(iw[7:0]));
      return;
    end
    if (iw[15:11] == 5'b11010) begin mpc += 2 * int'($signed(iw[10:0])); return; end
    if (iw[15:12] == 4'hF || iw == 16'h0000) return;
    if (iw == DAW) begin
      lo = w % 16; hi = w / 16;
      if (lo > 9 || mst[1]) begin lo += 6; hi += lo / 16; lo %= 16; end
      if (hi > 9 || mst[0]) hi += 6;
      if (hi > 15) mst[0] = 1;
      mw = 8'((hi % 16) * 16 + lo);
      return;
    end
    if (iw[15:4] == 12'h010) begin mbsr = {4'h0, iw[3:0]}; return; end
    if (iw[15:8] == 8'h0D) begin mprod = 16'(int'(iw[7:0]) * w); return; end
    if (iw[15:12] == 4'h0 && iw[11:8] >= 4'h8) begin   // literal
      int k;
      k = int'(iw[7:0]);
      case (iw[11:8])
        4'h8: begin r = m_sub(k, w, 0, c, dc, ov); m_flags(5'b11111, r, c, dc, ov); end
        4'h9: begin r = k | w; m_flags(5'b10100, r, 0, 0, 0); end
        4'hA: begin r = k ^ w; m_flags(5'b10100, r, 0, 0, 0); end
        4'hB: begin r = k & w; m_flags(5'b10100, r, 0, 0, 0); end
        4'hE: r = k;
        4'hF: begin r = m_add(k, w, 0, c, dc, ov); m_flags(5'b11111, r, c, dc, ov); end
        default: r = w;
      endcase
      mw = 8'(r);
      return;
    end
    // file register operations
    adr = m_resolve(adr);
    if (iw[15:12] >= 4'h7 && iw[15:12] <= 4'hB) begin  // bit operations
      int b;
      b = int'(iw[11:9]);
      f = int'(m_rd(adr));
      case (iw[15:12])
        4'h7: m_wr(adr, 8'(f ^ (1 << b)));
        4'h8: m_wr(adr, 8'(f | (1 << b)));
        4'h9: m_wr(adr, 8'(f & ~(1 << b)));
        4'hA: mskip = ((f >> b) & 1) == 1;
        default: mskip = ((f >> b) & 1) == 0;
      endcase
      return;
    end
    f = int'(m_rd(adr));
    mask = 5'b00000; c = 0; dc = 0; ov = 0;
    case (iw[15:10])
      6'b000000: begin mprod = 16'(f * w); return; end           // MULWF
      6'b000001: begin r = m_sub(f, 1, 0, c, dc, ov); mask = 5'b11111; end
      6'b000100: begin r = f | w; mask = 5'b10100; end
      6'b000101: begin r = f & w; mask = 5'b10100; end
      6'b000110: begin r = f ^ w; mask = 5'b10100; end
      6'b000111: begin r = 255 - f; mask = 5'b10100; end
      6'b001000: begin r = m_add(f, w, c0, c, dc, ov); mask = 5'b11111; end
      6'b001001: begin r = m_add(f, w, 0, c, dc, ov); mask = 5'b11111; end
      6'b001010: begin r = m_add(f, 1, 0, c, dc, ov); mask = 5'b11111; end
      6'b001011: begin r = (f + 255) % 256; mskip = (r == 0); end
      6'b001100: begin r = f / 2 + 128 * c0; c = f % 2; mask = 5'b10101; end
      6'b001101: begin r = (f * 2) % 256 + c0; c = f / 128; mask = 5'b10101; end
      6'b001110: begin r = (f % 16) * 16 + f / 16; end
      6'b001111: begin r = (f + 1) % 256; mskip = (r == 0); end
      6'b010000: begin r = f / 2 + 128 * (f % 2); mask = 5'b10100; end
      6'b010001: begin r = (f * 2) % 256 + f / 128; mask = 5'b10100; end
      6'b010010: begin r = (f + 1) % 256; mskip = (r != 0); end
      6'b010011: begin r = (f + 255) % 256; mskip = (r != 0); end
      6'b010100: begin r = f; mask = 5'b10100; end
      6'b010101: begin r = m_sub(w, f, 1 - c0, c, dc, ov); mask = 5'b11111; end
      6'b010110: begin r = m_sub(f, w, 1 - c0, c, dc, ov); mask = 5'b11111; end
      6'b010111: begin r = m_sub(f, w, 0, c, dc, ov); mask = 5'b11111; end
      default: begin                                             // 0110 xxxa
        d = 1;
        case (iw[11:9])
          3'd0: begin mskip = f < w;  return; end         // CPFSLT
          3'd1: begin mskip = f == w; return; end         // CPFSEQ
          3'd2: begin mskip = f > w;  return; end         // CPFSGT
          3'd3: begin mskip = f == 0; return; end         // TSTFSZ
          3'd4: r = 255;                                  // SETF
          3'd5: begin r = 0; mask = 5'b00100; end         // CLRF
          3'd6: begin r = m_sub(0, f, 0, c, dc, ov); mask = 5'b11111; end  // NEGF
          default: r = w;                                 // MOVWF
        endcase
      end
    endcase
    if (d) m_wr(adr, 8'(r)); else mw = 8'(r);
    m_flags(mask, r, c, dc, ov);
  endfunction

  // ------------------------------------------------------------ random programs
  logic [15:0] prog [$];
  function automatic void e(logic [15:0] w); prog.push_back(w); endfunction
  function automatic void e2(logic [31:0] w); prog.push_back(w[31:16]); prog.push_back(w[15:0]); endfunction

  localparam logic [7:0] FREGS [14] = '{8'hE8, 8'hD8, 8'hF3, 8'hF4,
                                        8'hEF, 8'hEE, 8'hED, 8'hEC, 8'hEB,
                                        8'hE6, 8'hE5, 8'hE4, 8'hDF, 8'hDB};

  function automatic logic [7:0] rf(output logic a);
    a = 1'($urandom);
    if ($urandom_range(0, 3) == 0) begin a = 0; return FREGS[$urandom_range(0, 13)]; end
    return 8'($urandom_range(0, 15));
  endfunction

  function automatic logic [11:0] rfull();
    case ($urandom_range(0, 4))
      0: return 12'($urandom_range(0, 15));
      1: return 12'h100 + 12'($urandom_range(0, 15));
      2: return 12'hF00 | 12'(FREGS[$urandom_range(0, 13)]);
      default: return 12'($urandom_range(0, 15));
    endcase
  endfunction

  function automatic void gen(int len);
    logic a;
    logic [7:0] f;
    logic [5:0] fops [21] = '{6'b000001, 6'b000100, 6'b000101, 6'b000110, 6'b000111, 6'b001000,
                              6'b001001, 6'b001010, 6'b001011, 6'b001100, 6'b001101, 6'b001110,
                              6'b001111, 6'b010000, 6'b010001, 6'b010010, 6'b010011, 6'b010100,
                              6'b010101, 6'b010110, 6'b010111};
    prog.delete();
    for (int n = 0; n < 3; n++) e2(lfsr(2'(n), 12'h100 + 12'($urandom_range(0, 15))));
    for (int i = 0; i < len; i++) begin
      int k;
      k = $urandom_range(0, 99);
      f = rf(a);
      if (k < 40)      e(fop(fops[$urandom_range(0, 20)], 1'($urandom), a, f));
      else if (k < 48) e({7'b0110000 + 7'($urandom_range(0, 7)), a, f});
      else if (k < 58) e({4'($urandom_range(7, 11)), 3'($urandom), a, f});
      else if (k < 70) begin
        logic [3:0] lop;
        lop = 4'($urandom_range(8, 15));
        if (lop == 4'hC) lop = 4'hE;      // no RETLW in straight-line code
        e({4'h0, lop, 8'($urandom)});
      end
      else if (k < 76) e2(movff(rfull(), rfull()));
      else if (k < 79) e2(lfsr(2'($urandom_range(0, 2)), 12'h100 + 12'($urandom_range(0, 15))));
      else if (k < 82) e(movlb(4'($urandom_range(0, 1))));
      else if (k < 85) e(mulwf(f, a));
      else if (k < 87) e(DAW);
      else if (k < 90) e(NOP);
      else if (k < 96) e(bcc(3'($urandom), $urandom_range(0, 3)));
      else             e(bra($urandom_range(0, 3)));
    end
    repeat (4) e(NOP);
    e(bra(-1));
  endfunction

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int guard, endpc;
    longint t0, t1;
    for (int p = 0; p < 400; p++) begin
      gen(p < 20 ? 10 : 60);
      endpc = 2 * (prog.size() - 1);
      rst = 1;
      foreach (pmem[i]) pmem[i] = (i < prog.size()) ? prog[i] : 16'h0000;
      foreach (dmem[i]) begin dmem[i] = 8'($urandom); mram[i] = dmem[i]; end
      mw = 0; mbsr = 0; mst = 0; mprod = 0; mpc = 0; mcycles = 0; mskip = 0;
      foreach (mfsr[i]) mfsr[i] = 0;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      t0 = longint'($time);
      guard = 0;
      while (!(dut.pc == 21'(endpc) && phase == Q1) && guard < 20000) begin
        @(posedge clk); #1; guard++;
      end
      t1 = longint'($time);
      while (mpc != endpc && mcycles < 10000) m_step(prog);
      chk("reached end", int'(guard < 20000), 1);
      chk("clocks = 4 x instruction cycles", int'((t1 - t0) / 10), 4 * mcycles);
      chk("W", int'(dut.w), int'(mw));
      chk("STATUS", int'(dut.status), int'(mst));
      chk("BSR", int'(dut.bsr_r), int'(mbsr));
      chk("PROD", int'(dut.prod), int'(mprod));
      for (int i = 0; i < 3; i++) chk("FSR", int'(dut.fsr[i]), int'(mfsr[i]));
      for (int i = 0; i < 12'hF80; i++)
        if (dmem[i] != mram[i]) begin
          chk($sformatf("RAM[%h]", i), int'(dmem[i]), int'(mram[i]));
        end
      checks++;
      if (failures > 0 && failures < 30) $display("program %0d failed", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
