// lfsr3: three-bit linear feedback shift register that drives algorithm hopping.
//
// Three D flip-flops form a shift chain Q0 -> Q1 -> Q2. The feedback into Q0 is
// Q0 XOR Q2, so the register walks through all seven non-zero states before it
// repeats (period 7). A seed is loaded once at start-up (seed_load); after that
// every cycle with en high advances the register by one step.
//
// Interface: seed_load/seed load the state in the next cycle (seed_load wins
// over en); en advances it; q is the state {Q2,Q1,Q0}.
// Timing: one step per enabled clock edge, q is a register output.
//
// The three-bit width, the D flip-flop chain and the XOR feedback from Q0 and
// Q2 follow the source design. The all-zero state would lock an XOR LFSR, so
// a zero seed is replaced by 3'b001; the reset state 3'b001 is also this
// design's choice.
module lfsr3 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       seed_load,
  input  logic [2:0] seed,
  input  logic       en,
  output logic [2:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= 3'b001;
    else if (seed_load)
      q <= (seed == 3'b000) ? 3'b001 : seed;
    else if (en)
      q <= {q[1], q[0], q[0] ^ q[2]};
  end

endmodule
