// pic18_clkdiv: four-phase instruction-cycle generator.
//
// The oscillator clock is divided by four into the phases Q1, Q2, Q3 and Q4
// of one instruction cycle, as the original design does. Here the phases are
// produced as clock enables inside the single oscillator clock domain: a
// 2-bit counter steps Q1 -> Q2 -> Q3 -> Q4 -> Q1, and one-hot copies q[3:0]
// (q[0] = Q1) are registered with it. A synchronous active-high reset returns
// the divider to Q1. Using enables instead of four derived clocks is this
// design's choice. Timing: phase changes on every rising clock edge; one
// instruction cycle is four oscillator clocks.
module pic18_clkdiv
  import pic18_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output phase_t     phase,   // current phase
  output logic [3:0] q,       // one-hot phase, q[0] = Q1 ... q[3] = Q4
  output logic       cyc_end  // high during Q4: the last clock of a cycle
);
  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= Q1;
      q     <= 4'b0001;
    end else begin
      phase <= phase_t'(phase + 2'd1);
      q     <= {q[2:0], q[3]};
    end
  end

  assign cyc_end = q[3];

  a_onehot: assert property (@(posedge clk) disable iff (rst) (q != 4'b0) && ((q & (q - 4'd1)) == 4'b0));
  a_match:  assert property (@(posedge clk) disable iff (rst) q[phase]);
endmodule
