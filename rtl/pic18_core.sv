// pic18_core: SynthPic18 processing unit (PIC18 instruction set).
//
// Executes one PIC18 instruction per instruction cycle of four oscillator
// clocks, phase by phase as in the original design:
//   Q1  the program memory is addressed with the PC (its word comes back in Q2)
//   Q2  the word is decoded, the operand address is resolved (bank select,
//       FSR indirection) and the operand is read from the data RAM, the
//       peripheral bus or a core SFR; the word is kept in the instruction
//       register
//   Q3  the ALU computes and its result and flags are latched; a
//       pre-incrementing table instruction updates the table pointer
//   Q4  the result is written to W or the file register, STATUS, PRODH:PRODL,
//       the stack and the PC are updated
// The flowchart's groups map onto this: literal and register instructions go
// through the ALU; stack and control instructions only change PC, stack and
// W; table instructions take a second cycle in which the program memory is
// addressed with the table pointer (TBLRD loads TABLAT in Q2; TBLWT writes
// TABLAT to program memory in Q4) and post-increment/decrement happens.
// The two-word instructions GOTO, CALL, LFSR and MOVFF take two cycles: the
// second fetches the second word (MOVFF reads its source in the first cycle
// and writes its destination in the second). A skip instruction whose test
// holds turns the next fetched word into a NOP; the second word of a
// two-word instruction decodes as NOP by itself. Branches, calls and
// returns take effect at the end of their own cycle, so every single-word
// instruction takes one cycle; this design does not overlap fetch and
// execute and so has no flush cycle (a departure from the PIC18's timing).
// Reading PCL returns the low byte of the address of the next instruction
// and copies its upper bytes into PCLATH/PCLATU; writing PCL loads the PC
// from PCLATU:PCLATH:data (so ADDWF PCL,F jumps within the current 256-byte
// page, while MOVWF PCL uses the PCLATH/PCLATU the program set). There is
// no interrupt controller, watchdog or power-down mode.
// Interfaces: program memory (word address, synchronous read, byte-enable
// write), data RAM (synchronous read, write), and a peripheral bus for the
// SFR addresses F80..FD7, read with the same one-clock latency as the RAM.
// Addresses FD8..FFF are SFRs inside the core. Reset is synchronous; the
// RESET instruction resets the core, and soft_rst tells the rest of the chip.
module pic18_core
  import pic18_pkg::*;
#(
  parameter int unsigned PC_W        = 21,
  parameter int unsigned STACK_DEPTH = 31
) (
  input  logic            clk,
  input  logic            rst,
  input  phase_t          phase,
  // program memory
  output logic [PC_W-2:0] pm_addr,
  input  logic [15:0]     pm_rdata,
  output logic            pm_we,
  output logic [1:0]      pm_be,
  output logic [PC_W-2:0] pm_waddr,
  output logic [15:0]     pm_wdata,
  // data RAM
  output logic [11:0]     dm_raddr,
  input  logic [7:0]      dm_rdata,
  output logic            dm_we,
  output logic [11:0]     dm_waddr,
  output logic [7:0]      dm_wdata,
  // peripheral SFR bus
  output logic [11:0]     io_raddr,
  input  logic [7:0]      io_rdata,
  output logic            io_we,
  output logic [11:0]     io_waddr,
  output logic [7:0]      io_wdata,
  output logic            soft_rst
);
  typedef enum logic [1:0] {R_RAM, R_IO, R_CORE} region_t;

  // ---------------------------------------------------------------- state
  logic [PC_W-1:0] pc, tblptr;
  logic [15:0]     ir, w2;
  cyc2_t           cyc2;
  logic [1:0]      cyc2_post;
  logic            cyc2_fast;
  logic            skip;
  logic [7:0]      w, tablat, pclath, bsr_r;
  logic [4:0]      status, pclatu;
  logic [15:0]     prod;
  logic [7:0]      ws, bsrs;
  logic [4:0]      statuss;
  region_t         rsel;
  logic [7:0]      res, movff_data;
  logic [4:0]      fl;
  logic            eq_r, gt_r, lt_r, bit_r;
  logic [15:0]     prod_r;

  logic rst_i;
  assign rst_i = rst | soft_rst;

  // ---------------------------------------------------------------- decode
  logic [15:0] inst, w2_cur;
  ctrl_t       ctrl_dec, ctrl;
  logic        kill;

  assign inst   = (phase == Q2) ? pm_rdata : ir;
  assign w2_cur = (phase == Q2) ? pm_rdata : w2;

  pic18_decoder u_dec (.ir(inst), .ctrl(ctrl_dec));

  assign kill = skip || (cyc2 != C2_NONE);
  assign ctrl = kill ? CTRL_NOP : ctrl_dec;

  // ---------------------------------------------------------------- operand address
  logic [11:0] addr_in, ea;
  logic        ea_indirect;
  logic [11:0] fsr [3];
  region_t     region;

  always_comb begin
    if (cyc2 == C2_MOVFF)           addr_in = w2_cur[11:0];
    else if (ctrl.cyc2 == C2_MOVFF) addr_in = inst[11:0];
    else if (inst[8])               addr_in = {bsr_r[3:0], inst[7:0]};
    else                            addr_in = {{4{inst[7]}}, inst[7:0]};
  end

  logic do_wf;     // file register write in this cycle
  logic [7:0] wv;  // value written
  logic q4;
  assign q4    = (phase == Q4);
  assign do_wf = ctrl.wr_f || (cyc2 == C2_MOVFF);
  assign wv    = (cyc2 == C2_MOVFF) ? movff_data : res;

  logic sfr_we;
  assign sfr_we = q4 && do_wf && (region == R_CORE);

  // stack
  logic [PC_W-1:0] tos;
  logic [4:0]      sp;
  logic            stk_full, stk_unf;
  logic            push, pop;
  logic [2:0]      tos_wsel;

  pic18_fsr u_fsr (
    .clk(clk), .rst(rst_i), .addr_in(addr_in), .w(w), .ea(ea), .indirect(ea_indirect),
    .commit(q4 && (ctrl.use_f || cyc2 == C2_MOVFF)),
    .sfr_we(sfr_we), .sfr_addr(ea), .sfr_wdata(wv),
    .lfsr_we(q4 && cyc2 == C2_LFSR), .lfsr_sel(ir[5:4]), .lfsr_val({ir[3:0], w2[7:0]}),
    .fsr(fsr)
  );

  always_comb begin
    if (ea >= CORE_SFR_BASE)  region = R_CORE;
    else if (ea >= SFR_BASE)  region = R_IO;
    else                      region = R_RAM;
  end

  // ---------------------------------------------------------------- core SFR read
  logic [PC_W-1:0] pc2;
  logic [23:0]     pc2_x, tos_x, tbl_x;
  logic [7:0]      sfr_rdata;
  assign pc2   = pc + PC_W'(2);
  assign pc2_x = 24'(pc2);
  assign tos_x = 24'(tos);
  assign tbl_x = 24'(tblptr);

  always_comb begin
    unique case (ea)
      A_TOSU:    sfr_rdata = tos_x[23:16];
      A_TOSH:    sfr_rdata = tos_x[15:8];
      A_TOSL:    sfr_rdata = tos_x[7:0];
      A_STKPTR:  sfr_rdata = {stk_full, stk_unf, 1'b0, sp};
      A_PCLATU:  sfr_rdata = {3'b000, pclatu};
      A_PCLATH:  sfr_rdata = pclath;
      A_PCL:     sfr_rdata = pc2_x[7:0];
      A_TBLPTRU: sfr_rdata = tbl_x[23:16];
      A_TBLPTRH: sfr_rdata = tbl_x[15:8];
      A_TBLPTRL: sfr_rdata = tbl_x[7:0];
      A_TABLAT:  sfr_rdata = tablat;
      A_PRODH:   sfr_rdata = prod[15:8];
      A_PRODL:   sfr_rdata = prod[7:0];
      A_FSR0H:   sfr_rdata = {4'h0, fsr[0][11:8]};
      A_FSR0L:   sfr_rdata = fsr[0][7:0];
      A_WREG:    sfr_rdata = w;
      A_FSR1H:   sfr_rdata = {4'h0, fsr[1][11:8]};
      A_FSR1L:   sfr_rdata = fsr[1][7:0];
      A_BSR:     sfr_rdata = bsr_r;
      A_FSR2H:   sfr_rdata = {4'h0, fsr[2][11:8]};
      A_FSR2L:   sfr_rdata = fsr[2][7:0];
      A_STATUS:  sfr_rdata = {3'b000, status};
      default:   sfr_rdata = 8'h00;   // INDFn reached through an FSR, unused
    endcase
  end

  logic [7:0] fval;
  always_comb begin
    unique case (rsel)
      R_RAM:   fval = dm_rdata;
      R_IO:    fval = io_rdata;
      default: fval = sfr_rdata;
    endcase
  end

  // ---------------------------------------------------------------- ALU
  logic [7:0]  alu_y;
  logic        alu_c, alu_dc, alu_z, alu_ov, alu_n, alu_eq, alu_gt, alu_lt, alu_bit;
  logic [15:0] alu_prod;

  pic18_alu u_alu (
    .op(ctrl.alu_op), .a(ctrl.lit ? ir[7:0] : fval), .b(w),
    .cin(status[ST_C]), .dcin(status[ST_DC]), .bitsel(ir[11:9]),
    .y(alu_y), .c(alu_c), .dc(alu_dc), .z(alu_z), .ov(alu_ov), .n(alu_n),
    .eq(alu_eq), .gt(alu_gt), .lt(alu_lt), .bit_val(alu_bit), .prod(alu_prod)
  );

  // ---------------------------------------------------------------- next PC, skip, stack
  logic [PC_W-1:0] pc_next;
  logic            skip_next, cond_taken;
  logic            reads_pcl;
  logic [12:0]     pclat_eff;   // PCLATU:PCLATH as seen by a PCL write

  // MOVWF, CLRF and SETF only write their register; every other file
  // operation on PCL reads it and so refreshes PCLATH/PCLATU first.
  assign reads_pcl = ctrl.use_f && (ea == A_PCL) &&
                     !(ctrl.alu_op inside {ALU_PASSB, ALU_CLR, ALU_SET});
  assign pclat_eff = reads_pcl ? pc2_x[20:8] : {pclatu, pclath};
  logic [PC_W-1:0] goto_tgt;

  assign goto_tgt = PC_W'({w2[11:0], ir[7:0], 1'b0});

  always_comb begin
    unique case (ir[10:9])
      2'b00:   cond_taken = status[ST_Z]  ^ ir[8];
      2'b01:   cond_taken = status[ST_C]  ^ ir[8];
      2'b10:   cond_taken = status[ST_OV] ^ ir[8];
      default: cond_taken = status[ST_N]  ^ ir[8];
    endcase
  end

  always_comb begin
    pc_next = pc2;
    unique case (cyc2)
      C2_TBLRD, C2_TBLWT: pc_next = pc;
      C2_GOTO, C2_CALL:   pc_next = goto_tgt;
      default: begin
        unique case (ctrl.br)
          BR_COND:  if (cond_taken) pc_next = pc2 + PC_W'({{(PC_W-9){ir[7]}}, ir[7:0], 1'b0});
          BR_BRA, BR_RCALL:
                    pc_next = pc2 + PC_W'({{(PC_W-12){ir[10]}}, ir[10:0], 1'b0});
          BR_RETURN, BR_RETLW, BR_RETFIE:
                    pc_next = tos;
          default:  ;
        endcase
        if (do_wf && ea == A_PCL)
          pc_next = PC_W'({pclat_eff, wv[7:1], 1'b0});
      end
    endcase
  end

  always_comb begin
    unique case (ctrl.skip)
      SK_ZERO:  skip_next = (res == 8'h00);
      SK_NZERO: skip_next = (res != 8'h00);
      SK_EQ:    skip_next = eq_r;
      SK_GT:    skip_next = gt_r;
      SK_LT:    skip_next = lt_r;
      SK_BCLR:  skip_next = !bit_r;
      SK_BSET:  skip_next = bit_r;
      default:  skip_next = 1'b0;
    endcase
  end

  assign push = q4 && (ctrl.br == BR_RCALL || ctrl.br == BR_PUSH || cyc2 == C2_CALL);
  assign pop  = q4 && (ctrl.br == BR_RETURN || ctrl.br == BR_RETLW ||
                       ctrl.br == BR_RETFIE || ctrl.br == BR_POP);
  assign tos_wsel = (sfr_we && ea == A_TOSL) ? 3'b001 :
                    (sfr_we && ea == A_TOSH) ? 3'b010 :
                    (sfr_we && ea == A_TOSU) ? 3'b100 : 3'b000;

  pic18_stack #(.DEPTH(STACK_DEPTH), .AW(PC_W)) u_stack (
    .clk(clk), .rst(rst_i), .push(push), .push_data(pc2), .pop(pop),
    .tos_wsel(tos_wsel), .sp_we(sfr_we && ea == A_STKPTR), .wdata(wv),
    .tos(tos), .sp(sp), .full(stk_full), .unf(stk_unf)
  );

  // ---------------------------------------------------------------- memory ports
  logic tbl_cyc;
  assign tbl_cyc  = (cyc2 == C2_TBLRD) || (cyc2 == C2_TBLWT);
  assign pm_addr  = tbl_cyc ? tblptr[PC_W-1:1] : pc[PC_W-1:1];
  assign pm_we    = q4 && (cyc2 == C2_TBLWT);
  assign pm_be    = tblptr[0] ? 2'b10 : 2'b01;
  assign pm_waddr = tblptr[PC_W-1:1];
  assign pm_wdata = {tablat, tablat};

  assign dm_raddr = ea;
  assign dm_waddr = ea;
  assign dm_wdata = wv;
  assign dm_we    = q4 && do_wf && (region == R_RAM);
  assign io_raddr = ea;
  assign io_waddr = ea;
  assign io_wdata = wv;
  assign io_we    = q4 && do_wf && (region == R_IO);

  assign soft_rst = q4 && ctrl.sw_reset;

  // ---------------------------------------------------------------- sequencing
  logic [4:0] status_wr;
  always_comb begin
    status_wr = status;
    if (sfr_we && ea == A_STATUS) status_wr = wv[4:0];
    if (ctrl.wr_w && ctrl.alu_op == ALU_DAW) status_wr[ST_C] = fl[ST_C];
    else
      for (int i = 0; i < 5; i++)
        if (ctrl.flag_mask[i]) status_wr[i] = fl[i];
  end

  always_ff @(posedge clk) begin
    if (rst_i) begin
      pc <= '0; tblptr <= '0; ir <= '0; w2 <= '0;
      cyc2 <= C2_NONE; cyc2_post <= 2'd0; cyc2_fast <= 1'b0; skip <= 1'b0;
      w <= '0; tablat <= '0; pclath <= '0; pclatu <= '0; bsr_r <= '0;
      status <= '0; prod <= '0; ws <= '0; statuss <= '0; bsrs <= '0;
      rsel <= R_RAM; res <= '0; movff_data <= '0; fl <= '0;
      eq_r <= 1'b0; gt_r <= 1'b0; lt_r <= 1'b0; bit_r <= 1'b0; prod_r <= '0;
    end else begin
      unique case (phase)
        Q1: ;
        Q2: begin
          if (cyc2 == C2_NONE) ir <= pm_rdata;
          else                 w2 <= pm_rdata;
          if (cyc2 == C2_TBLRD) tablat <= tblptr[0] ? pm_rdata[15:8] : pm_rdata[7:0];
          rsel <= region;
        end
        Q3: begin
          res    <= alu_y;
          fl     <= {alu_n, alu_ov, alu_z, alu_dc, alu_c};
          eq_r   <= alu_eq; gt_r <= alu_gt; lt_r <= alu_lt; bit_r <= alu_bit;
          prod_r <= alu_prod;
          if (ctrl.cyc2 == C2_MOVFF) movff_data <= fval;
          if (ctrl.tbl_pre) tblptr <= tblptr + PC_W'(1);
        end
        Q4: begin
          pc     <= pc_next;
          skip   <= skip_next;
          status <= status_wr;
          if (ctrl.wr_w) w <= res;
          if (ctrl.mul)  prod <= prod_r;
          if (ctrl.movlb) bsr_r <= {4'h0, ir[3:0]};
          // fast register stack
          if (cyc2 == C2_CALL && cyc2_fast) begin
            ws <= w; statuss <= status; bsrs <= bsr_r;
          end
          if ((ctrl.br == BR_RETURN || ctrl.br == BR_RETFIE) && ctrl.fast) begin
            w <= ws; status <= statuss; bsr_r <= bsrs;
          end
          // core SFR writes
          if (sfr_we) begin
            unique case (ea)
              A_WREG:    w <= wv;
              A_BSR:     bsr_r <= {4'h0, wv[3:0]};
              A_PCLATH:  pclath <= wv;
              A_PCLATU:  pclatu <= wv[4:0];
              A_TABLAT:  tablat <= wv;
              A_PRODH:   prod[15:8] <= wv;
              A_PRODL:   prod[7:0]  <= wv;
              A_TBLPTRL: tblptr <= PC_W'({tbl_x[23:8], wv});
              A_TBLPTRH: tblptr <= PC_W'({tbl_x[23:16], wv, tbl_x[7:0]});
              A_TBLPTRU: tblptr <= PC_W'({wv, tbl_x[15:0]});
              default: ;
            endcase
          end
          if (reads_pcl) begin
            pclath <= pc2_x[15:8];
            pclatu <= pc2_x[20:16];
          end
          // table pointer post-modify in the second cycle
          if (tbl_cyc) begin
            if (cyc2_post == 2'd1)      tblptr <= tblptr + PC_W'(1);
            else if (cyc2_post == 2'd2) tblptr <= tblptr - PC_W'(1);
          end
          // two-cycle sequencing
          if (cyc2 == C2_NONE) begin
            cyc2      <= ctrl.cyc2;
            cyc2_post <= ctrl.tbl_post;
            cyc2_fast <= ctrl.fast;
          end else begin
            cyc2 <= C2_NONE;
          end
        end
        default: ;
      endcase
    end
  end

  // A second cycle never starts a skip, and a killed word never writes.
  a_no_skip_in_cyc2: assert property (@(posedge clk) disable iff (rst_i)
                                      (phase == Q4 && cyc2 != C2_NONE) |-> !skip_next);
  a_pc_even: assert property (@(posedge clk) disable iff (rst_i) pc[0] == 1'b0);
endmodule
