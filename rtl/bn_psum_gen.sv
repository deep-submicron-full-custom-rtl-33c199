// bn_psum_gen -- partial-sum generator of the MSB-first bit-node adder.
//
// The bit node adds the channel value L(c_i) (W-bit two's complement) and DV
// check-node messages (one's complement, W-1 bits: sign at weight W-2 and
// W-2 magnitude bits) one bit weight per clock, MSB first. This block forms
// the partial sum of the current weight, i.e. the number of ones among the
// operands' bits of that weight.
//
// Sign-extension cycle (msb = 1, weight W-2): everything at or above weight
// W-2 is folded into one signed partial sum. For the message operands the bit
// is a sign, worth -1. The channel value has two bits here (weights W-1 and
// W-2); treating bit W-2 as its sign is right when both bits are equal, and
// off by two otherwise ('10' reads as 0 instead of -2, '01' as -1 instead of
// +1), so an a-priori correction of -2 / +2 is added.
// Magnitude cycles (msb = 0): plain count of the one bits.
//
// Subtraction logic: the message q_ij must leave out r_ij. Only two partial
// sums exist per cycle: `sum` (all operands) and `sub` (sum with one operand
// bit of value 1 removed: +1 in the sign cycle, -1 otherwise). Each
// accumulator picks `sub` when its own operand bit is 1.
//
// Purely combinational.
module bn_psum_gen
  import ldpc_pkg::*;
#(
  parameter int unsigned DV = DV_DEF,
  localparam int unsigned SW = psum_width(DV) + 1   // signed width of the sums
) (
  input  logic                 msb,      // sign-extension cycle
  input  logic [DV-1:0]        oc_bits,  // one's-complement message bits
  input  logic                 lc_hi,    // channel bit W-1 (used when msb)
  input  logic                 lc_bit,   // channel bit of the current weight
  output logic signed [SW-1:0] sum,
  output logic signed [SW-1:0] sub
);
  logic signed [SW-1:0] ones, apc;

  always_comb begin
    ones = '0;
    for (int k = 0; k < DV; k++) ones = ones + SW'(oc_bits[k]);
    if (msb) begin
      // a-priori correction for the two channel MSBs
      if (lc_hi && !lc_bit)      apc = -SW'(2);
      else if (!lc_hi && lc_bit) apc = SW'(2);
      else                       apc = '0;
      sum = -ones - SW'(lc_bit) + apc;
      sub = sum + SW'(1);
    end else begin
      apc = '0;
      sum = ones + SW'(lc_bit);
      sub = sum - SW'(1);
    end
  end
endmodule
