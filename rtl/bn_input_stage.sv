// bn_input_stage -- input registers and sign handling of the bit node.
//
// The DV check-node messages arrive bit-serially in sign-magnitude form,
// sign first, magnitude MSB first. The multi-operand adder works in two's
// complement, but converting sign-magnitude to two's complement needs a +1
// at the LSB, which an MSB-first stream cannot absorb. The stage therefore
// produces one's-complement bits instead: in the sign cycle the sign itself
// (it is also the MSB of the one's-complement word) is passed on and stored;
// in the magnitude cycles each bit is XORed with its stored sign. The missing
// +1 of every negative operand is collected as the number of negative
// operands C = sum of signs, added later as a DV-bit-wide correction that the
// accumulators take in bit-serially during the last CW cycles
// (CW = ceil(log2(DV+1)), weights CW-1 .. 0). Each bit-node message q_ij
// excludes its own r_ij, so for edge j the correction is C-1 if its own sign
// is 1 and C otherwise; cor_j gives that choice, cor_q the bit of C for
// L(Q_i).
//
// Timing (cycles of one iteration; register contents): sign cycle 3
// (ph.bn_msb), magnitude cycles 4..W+1 (ph.bn_mag). oc_bits is valid in
// those cycles, cor_j/cor_q in the last CW of them and zero elsewhere.
module bn_input_stage
  import ldpc_pkg::*;
#(
  parameter int unsigned DV = DV_DEF,
  parameter int unsigned W  = W_DEF
) (
  input  logic          clk,
  input  phase_t        ph,
  input  logic [DV-1:0] r_in,
  output logic [DV-1:0] oc_bits,
  output logic [DV-1:0] cor_j,
  output logic          cor_q
);
  localparam int unsigned CW = cor_width(DV);
  localparam int unsigned LAST = W + 1;

  logic [DV-1:0] in_q, sgn_q;
  logic [CW-1:0] c_all, c_m1;
  logic          cor_cycle;
  int unsigned   bidx;

  always_ff @(posedge clk) begin
    if (ph.run) begin
      in_q <= r_in;
      if (ph.bn_msb) sgn_q <= in_q;
    end
  end

  always_comb begin
    c_all = '0;
    for (int k = 0; k < DV; k++) c_all = c_all + CW'(sgn_q[k]);
    c_m1 = c_all - CW'(1);
  end

  assign oc_bits = ph.bn_msb ? in_q : (in_q ^ sgn_q);

  always_comb begin
    cor_cycle = ph.bn_mag && (int'(ph.cyc) > int'(LAST) - int'(CW));
    bidx      = LAST - int'(ph.cyc);
    cor_q     = 1'b0;
    cor_j     = '0;
    if (cor_cycle && bidx < CW) begin
      cor_q = c_all[bidx];
      for (int k = 0; k < DV; k++) cor_j[k] = sgn_q[k] ? c_m1[bidx] : c_all[bidx];
    end
  end
endmodule
