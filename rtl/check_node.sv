// check_node -- bit-serial, MSB-first Min-Sum check node with parity sensing.
//
// Each of the DC inputs is a bit-serial wire from a bit node carrying the
// bit-node message L(q_ij) in sign-magnitude form, sign first, then W-2
// magnitude bits MSB first; the message is already normalised by 0.5 in the
// bit node, so no post-processing is needed here. All inputs are captured in
// input registers. In the sign cycle the output signs are formed as the XOR of
// all input signs with the node's own sign (XOR of the others). In the
// magnitude cycles the minimum search (cn_min_search) delivers, bit by bit,
// the minimum of the other inputs' magnitudes. An output multiplexer picks
// the sign or the minimum bit into the output registers, which drive the
// bit-serial wires back to the bit nodes and hold their last bit otherwise.
//
// After the messages, the bit nodes send the signs of L(Q_i) (the current hard
// decisions) on the same wires; one cycle later the node computes the parity
// of these signs (parity_ok = 1 when the check is satisfied). This reuses the
// idle wire cycles for an exact early-termination test.
//
// Timing, in cycles of one iteration (input register contents):
//   1: signs, 2..W-1: magnitude bits, W: hard decisions (parity_ok valid).
// r_out carries sign in cycle 2 and magnitude bits in cycles 3..W.
// Everything advances only while ph.run is high.
module check_node
  import ldpc_pkg::*;
#(
  parameter int unsigned DC = DC_DEF
) (
  input  logic          clk,
  input  phase_t        ph,
  input  logic [DC-1:0] q_in,
  output logic [DC-1:0] r_out,
  output logic          parity_ok
);
  logic [DC-1:0] in_q, out_q, min_bits, sign_bits;

  // Sign calculation: XOR of all other signs.
  assign sign_bits = {DC{^in_q}} ^ in_q;

  cn_min_search #(.DC(DC)) u_min (
    .clk(clk),
    .en (ph.run & ph.cn_mag),
    .clr(ph.run & ph.cn_sign),
    .in_bits(in_q),
    .out_bits(min_bits)
  );

  always_ff @(posedge clk) begin
    if (ph.run) begin
      in_q <= q_in;
      if (ph.cn_sign)     out_q <= sign_bits;
      else if (ph.cn_mag) out_q <= min_bits;
    end
  end

  assign r_out     = out_q;
  // Valid in cycle W, when the input registers hold the hard decisions.
  assign parity_ok = ~(^in_q);
endmodule
