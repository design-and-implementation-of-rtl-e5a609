// da_bit_shreg: parallel-in, bit-serial-out register of the DA FIR filter.
//
// Distributed arithmetic consumes the operands one bit position at a time:
// in the cycle that processes bit b, the LUTs are addressed by bit b of every
// pair sum. This register loads all WORDS pair sums at once and then shifts
// every word right by one bit per `shift`, so bits_out[i] is bit b of word i,
// least significant bit first; after W shifts the sign bit has been shown.
//
// Interface and timing: `load` captures par_in at the clock edge and wins over
// `shift` in the same cycle (this lets a new sample be loaded on the edge that
// retires the sign bit of the previous one, with no idle cycle). bits_out is
// the LSB of every word and is valid in the cycle after the load for bit 0.
// No reset: the contents are only looked at after a load.
// LSB-first order follows the accumulation rule of the filter (bit b weighted
// by 2^b, the sign bit last and subtracted); the load-over-shift priority is
// this design's choice.
module da_bit_shreg #(
  parameter int WORDS = da_pkg::DEF_TAPS / 2,
  parameter int W     = da_pkg::DEF_IN_W + 1
) (
  input  logic             clk,
  input  logic             load,
  input  logic             shift,
  input  logic [W-1:0]     par_in  [WORDS],
  output logic [WORDS-1:0] bits_out
);

  logic [W-1:0] sreg [WORDS];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < WORDS; i++) sreg[i] <= par_in[i];
    end else if (shift) begin
      for (int i = 0; i < WORDS; i++) sreg[i] <= sreg[i] >> 1;
    end
  end

  always_comb begin
    for (int i = 0; i < WORDS; i++) bits_out[i] = sreg[i][0];
  end

endmodule
