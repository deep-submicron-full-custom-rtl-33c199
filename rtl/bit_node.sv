// bit_node -- partially bit-serial bit node (variable node) of the decoder.
//
// The node receives DV check-node messages bit-serially (sign-magnitude,
// MSB first) and computes, with a bit-parallel multi-operand adder fed one
// bit weight per clock, both the a-posteriori sum
//     L(Q_i)  = L(c_i) + sum_j L(r_ij)
// and the DV outgoing messages
//     L(q_ij) = L(Q_i) - L(r_ij),
// each in its own accumulator (DV+1 bn_accumulator instances sharing one
// bn_psum_gen and one bn_input_stage). The outgoing messages are normalised
// by 0.5, saturated to W-2 magnitude bits and sent bit-serially, sign first.
// The sign of L(Q_i) is the hard decision `dec`; it is also sent on all DV
// wires after the message, so the check nodes can test the parity of the
// current decisions.
//
// Cycle plan of one iteration (W+2 cycles, W = 6 -> 8):
//   0      q_out = message sign (accumulator MSB); magnitudes are saturated
//          and normalised; dec is updated from L(Q_i)
//   1..W-2 q_out = magnitude bits, MSB first
//   W-1..  q_out = dec (hard decision), held to the end of the iteration
//   3      input registers hold the r_ij signs (sign-extension cycle)
//   4..W+1 input registers hold the r_ij magnitude bits; accumulation
// ph.init loads the channel value and presets every accumulator with it.
module bit_node
  import ldpc_pkg::*;
#(
  parameter int unsigned DV = DV_DEF,
  parameter int unsigned W  = W_DEF
) (
  input  logic                clk,
  input  phase_t              ph,
  input  logic signed [W-1:0] lc_in,
  input  logic [DV-1:0]       r_in,
  output logic [DV-1:0]       q_out,
  output logic                dec
);
  localparam int unsigned SW = psum_width(DV) + 1;

  logic signed [W-1:0]  lc_q;
  logic [DV-1:0]        oc_bits, cor_j, sgn_out;
  logic                 cor_q, q_sign;
  logic                 lc_hi, lc_bit;
  logic signed [SW-1:0] sum, sub;
  logic [W-3:0]         mag    [DV];
  logic [W-3:0]         mag_sr [DV];
  logic [W-3:0]         q_mag_unused;
  logic                 dec_q;

  always_ff @(posedge clk) begin
    if (ph.init) lc_q <= lc_in;
  end

  // channel bits of the current weight
  always_comb begin
    lc_hi  = lc_q[W-1];
    lc_bit = 1'b0;
    if (ph.bn_msb)      lc_bit = lc_q[W-2];
    else if (ph.bn_mag) lc_bit = lc_q[(W + 1 - int'(ph.cyc)) % W];
  end

  bn_input_stage #(.DV(DV), .W(W)) u_in (
    .clk(clk), .ph(ph), .r_in(r_in),
    .oc_bits(oc_bits), .cor_j(cor_j), .cor_q(cor_q)
  );

  bn_psum_gen #(.DV(DV)) u_psum (
    .msb(ph.bn_msb), .oc_bits(oc_bits), .lc_hi(lc_hi), .lc_bit(lc_bit),
    .sum(sum), .sub(sub)
  );

  for (genvar j = 0; j < DV; j++) begin : g_acc
    bn_accumulator #(.DV(DV), .W(W)) u_acc (
      .clk(clk), .ph(ph), .lc(lc_in), .sum(sum), .sub(sub),
      .sel_sub(oc_bits[j]), .cor_bit(cor_j[j]),
      .acc_sign(sgn_out[j]), .mag_o(mag[j])
    );
  end

  // L(Q_i) accumulator: no operand removed
  bn_accumulator #(.DV(DV), .W(W)) u_acc_q (
    .clk(clk), .ph(ph), .lc(lc_in), .sum(sum), .sub(sum),
    .sel_sub(1'b0), .cor_bit(cor_q),
    .acc_sign(q_sign), .mag_o(q_mag_unused)
  );

  // output register stage
  always_ff @(posedge clk) begin
    if (ph.run) begin
      if (ph.bn_sat) dec_q <= q_sign;
      for (int j = 0; j < DV; j++) begin
        if (ph.bn_sat) mag_sr[j] <= mag[j];
        else           mag_sr[j] <= mag_sr[j] << 1;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < DV; j++) begin
      if (ph.cyc == 4'd0)                 q_out[j] = sgn_out[j];
      else if (int'(ph.cyc) <= int'(W) - 2) q_out[j] = mag_sr[j][W-3];
      else                                q_out[j] = dec_q;
    end
  end

  assign dec = dec_q;
endmodule
