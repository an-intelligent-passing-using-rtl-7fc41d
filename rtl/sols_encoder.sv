// sols_encoder: fully reused FM0 / Manchester line encoder.
//
// One data bit X is encoded per period of CLK into two half-bit symbols: the
// first is driven while CLK is high, the second while CLK is low. Both codes
// are produced by the same four parts, so every part works in both modes:
//
//   * DFFB, one flip-flop with an asynchronous clear (CLR). In FM0 it holds
//     B(t-1), the second half of the previous FM0 symbol pair.
//   * one XOR of DFFB and X. In FM0 it gives B(t) = B(t-1) ^ X, the second
//     half of the current symbol pair and the next content of DFFB. In
//     Manchester DFFB is held at 0 by CLR, so the XOR passes X through.
//   * a Mode multiplexer choosing the first-half leg: DFFB in FM0, the XOR
//     output in Manchester; that leg is inverted.
//   * a multiplexer selected by CLK: first-half leg while CLK is high,
//     XOR output while CLK is low.
//
// FM0:        A(t) = ~B(t-1),  B(t) = B(t-1) ^ X. There is a transition at
//             every bit boundary, and one mid-bit exactly when X = 0.
// Manchester: enc = X ^ CLK, i.e. ~X in the first half and X in the second.
//
// Interface and timing: a bit period starts at a rising edge of CLK. X must be
// stable from shortly after that edge until the next rising edge, at which
// DFFB takes B(t). The output follows X and CLK combinationally, so the bit
// applied in a CLK period is sent in that same period, at one bit per cycle.
// Mode = 1 (Manchester) requires CLR held high; CLR is also the hardware
// initialisation, after which the first FM0 bit starts with a high half.
// Mode and CLR are separate inputs so that initialisation and mode choice
// cannot conflict.
//
// The FM0 rules, Manchester as the XOR of CLK and X, the Mode values, the
// XOR shared between B(t) and X and the clearing of DFFB by CLR follow the
// specification of this encoder. Keeping only DFFB as storage (the A half
// is the inverse of DFFB rather than a second flip-flop), the bit timing
// and the asynchronous clear are this design's own choices.
//
// Lint note: CLR is both the asynchronous clear of DFFB and a term of the
// clocked assertion below, which only simulation evaluates; verilator flags
// that mix (SYNCASYNCNET) and the warning stands for that reason.
//
// CLK is used as data as well as clock here (the output multiplexer select);
// that is the architecture, not an accident. For a glitch-free line signal
// the multiplexer should be a balanced cell in the physical design.
module sols_encoder
  import sols_pkg::*;
(
  input  logic clk_i,      // CLK: bit clock, first half-bit while high
  input  logic clr_i,      // CLR: asynchronous clear of DFFB, active high
  input  logic mode_i,     // Mode: 0 = FM0, 1 = Manchester (mode_e)
  input  logic x_i,        // X: data bit of the current CLK period
  output logic enc_o,      // encoded line signal
  output logic b_state_o   // DFFB content, B(t-1)
);

  logic dffb_q;     // DFFB
  logic xor_o;      // shared XOR: B(t) in FM0, X in Manchester
  logic first_leg;  // Mode multiplexer output, before inversion

  assign xor_o = dffb_q ^ x_i;

  always_ff @(posedge clk_i or posedge clr_i) begin
    if (clr_i) dffb_q <= 1'b0;
    else       dffb_q <= xor_o;
  end

  always_comb begin
    first_leg = (mode_e'(mode_i) == MODE_MANCHESTER) ? xor_o : dffb_q;
    enc_o     = clk_i ? ~first_leg : xor_o;
  end

  assign b_state_o = dffb_q;

  // Manchester encoding depends on DFFB being held clear.
  a_manchester_needs_clr: assert property (
    @(posedge clk_i) (mode_e'(mode_i) == MODE_MANCHESTER) |-> clr_i
  ) else $error("sols_encoder: Manchester mode selected without CLR");

endmodule
