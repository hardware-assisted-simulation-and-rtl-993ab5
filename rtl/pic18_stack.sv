// pic18_stack: hardware return-address stack.
//
// Holds the return addresses of CALL, RCALL and PUSH (and the value the
// program writes to TOSU/TOSH/TOSL). DEPTH entries of AW bits, indexed
// 1..DEPTH by the stack pointer sp; sp = 0 means empty and the top of stack
// then reads as 0. A push with sp < DEPTH stores at sp+1; the push that
// fills the last entry sets the sticky full flag, and a push on a full stack
// is dropped. A pop on an empty stack sets the sticky underflow flag. The
// program may write one byte of the top entry (tos_wsel one-hot: bit 0 low
// byte, bit 1 high byte, bit 2 upper byte) or the STKPTR register (sp from
// bits 4:0; a 0 written to bit 7 or 6 clears full or underflow).
// The stack instructions come from the PIC18 instruction set and the depth
// of 31 from that family; the overflow handling is this design's choice.
// Timing: all updates at the rising clock edge; tos, sp and the flags are
// registered outputs.
module pic18_stack #(
  parameter int unsigned DEPTH = 31,
  parameter int unsigned AW    = 21
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic [AW-1:0] push_data,
  input  logic          pop,
  input  logic [2:0]    tos_wsel,
  input  logic          sp_we,
  input  logic [7:0]    wdata,
  output logic [AW-1:0] tos,
  output logic [4:0]    sp,
  output logic          full,
  output logic          unf
);
  logic [AW-1:0] stk [1:DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp   <= '0;
      full <= 1'b0;
      unf  <= 1'b0;
    end else if (push) begin
      if (32'(sp) < DEPTH) begin
        stk[sp + 5'd1] <= push_data;
        sp <= sp + 5'd1;
        if (32'(sp) + 1 == DEPTH) full <= 1'b1;
      end else begin
        full <= 1'b1;
      end
    end else if (pop) begin
      if (sp != 5'd0) sp  <= sp - 5'd1;
      else            unf <= 1'b1;
    end else if (sp_we) begin
      sp   <= (32'(wdata[4:0]) > DEPTH) ? 5'(DEPTH) : wdata[4:0];
      full <= full & wdata[7];
      unf  <= unf & wdata[6];
    end else if (tos_wsel != 3'b000 && sp != 5'd0) begin
      for (int i = 0; i < 3; i++)
        if (tos_wsel[i])
          for (int j = 0; j < 8; j++)
            if (i * 8 + j < AW) stk[sp][i*8+j] <= wdata[j];
    end
  end

  assign tos = (sp == 5'd0) ? '0 : stk[sp];

  a_push_pop: assert property (@(posedge clk) disable iff (rst) !(push && pop));
endmodule
