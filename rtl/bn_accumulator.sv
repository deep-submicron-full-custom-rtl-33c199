// bn_accumulator -- MSB-first accumulation unit of the bit node, with
// saturation, 0.5 normalisation and sign-magnitude conversion.
//
// One instance builds one value: a bit-node message L(q_ij) or the a-
// posteriori sum L(Q_i). In the sign-extension cycle (ph.bn_msb) the register
// is loaded with the sign-extended partial sum; in each magnitude cycle it is
// doubled (left shift) and the next partial sum is added. The input multiplexer
// takes `sub` instead of `sum` when the accumulator's own operand bit is 1
// (sel_sub), plus its bit of the two's-complement correction (cor_bit).
// Magnitude-cycle partial sums are non-negative and only PW bits wide, so the
// adder is split: a PW-bit ripple part at the bottom and a carry-select upper
// word that is either the shifted register or the shifted register + 1.
//
// After the last cycle the register holds the ACC_W-bit two's-complement
// value v. In cycle 0 of the next iteration (ph.bn_sat) the outgoing message
// is formed while its sign (acc_sign, the register MSB) is already on the
// wire: magnitude |v| (invert and add the sign at the LSB), halved (the
// hardware-efficient normalisation factor 0.5, truncating toward zero), and
// saturated to W-2 bits. mag_o is combinational from the register.
//
// ph.init presets the register with the channel value (first iteration, when
// all check-node messages are zero).
module bn_accumulator
  import ldpc_pkg::*;
#(
  parameter int unsigned DV    = DV_DEF,
  parameter int unsigned W     = W_DEF,
  parameter int unsigned ACC_W = acc_width(W, DV),
  localparam int unsigned SW   = psum_width(DV) + 1,
  localparam int unsigned PW   = psum_width(DV)
) (
  input  logic                 clk,
  input  phase_t               ph,
  input  logic signed [W-1:0]  lc,
  input  logic signed [SW-1:0] sum,
  input  logic signed [SW-1:0] sub,
  input  logic                 sel_sub,
  input  logic                 cor_bit,
  output logic                 acc_sign,
  output logic [W-3:0]         mag_o
);
  localparam int unsigned MAXMAG = (1 << (W - 2)) - 1;

  logic signed [ACC_W-1:0] acc_q;
  logic signed [SW-1:0]    ps;
  logic [ACC_W-1:0]        sh, nxt;
  logic [PW:0]             lo;
  logic [ACC_W-1:0]        absv;
  logic [ACC_W-2:0]        half;

  assign ps = (sel_sub ? sub : sum) + SW'(cor_bit);

  // carry-select accumulation: acc*2 + ps, ps in [0, 2^PW)
  always_comb begin
    sh  = {acc_q[ACC_W-2:0], 1'b0};
    lo  = {1'b0, sh[PW-1:0]} + {1'b0, ps[PW-1:0]};
    nxt = sh;
    nxt[PW-1:0] = lo[PW-1:0];
    nxt[ACC_W-1:PW] = lo[PW] ? sh[ACC_W-1:PW] + 1'b1 : sh[ACC_W-1:PW];
  end

  always_ff @(posedge clk) begin
    if (ph.init)                  acc_q <= ACC_W'(lc);
    else if (ph.run && ph.bn_msb) acc_q <= ACC_W'(ps);
    else if (ph.run && ph.bn_mag) acc_q <= nxt;
  end

  // saturation / normalisation / sign-magnitude conversion
  always_comb begin
    absv  = (acc_q ^ {ACC_W{acc_q[ACC_W-1]}}) + ACC_W'(acc_q[ACC_W-1]);
    half  = absv[ACC_W-1:1];
    mag_o = (half > (ACC_W-1)'(MAXMAG)) ? (W-2)'(MAXMAG) : half[W-3:0];
  end

  assign acc_sign = acc_q[ACC_W-1];
endmodule
