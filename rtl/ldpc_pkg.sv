// ldpc_pkg -- shared constants, types and code-structure functions of the
// partially bit-serial Min-Sum LDPC decoder.
//
// Code: a regular (N, K) code with bit-node degree DV and check-node degree DC,
// N = 2048, M = 384, DV = 6, DC = 32 by default, the size of the IEEE 802.3an
// (2048,1723) code. The parity-check matrix is built from DV x DC blocks of
// Z x Z permutation matrices. The standard's own permutations (derived from a
// Reed-Solomon code) are not reproduced here; block (r,c) is instead a cyclic
// shift by h_shift(r,c). Every function below that touches the code structure
// goes through h_shift, so another table of shifts can be dropped in there.
//
// Message format: channel values are W-bit two's complement. Bit-node and
// check-node messages are sign-magnitude with W-2 magnitude bits (one bit less
// than W-bit sign-magnitude, because the 0.5 normalisation of the Min-Sum
// check-node output is applied at the bit-node output). One iteration takes
// W+2 clock cycles; the phase_t strobes tell every node where in the
// iteration the decoder is.
package ldpc_pkg;

  // Default code and word-length parameters.
  localparam int unsigned N_DEF  = 2048;
  localparam int unsigned DV_DEF = 6;
  localparam int unsigned DC_DEF = 32;
  localparam int unsigned W_DEF  = 6;
  localparam int unsigned Z_DEF  = N_DEF / DC_DEF;   // 64

  // Cycles per decoding iteration (cycle indices 0 .. W+1).
  function automatic int unsigned iter_cycles(int unsigned w);
    return w + 2;
  endfunction

  // Width of the bit-node accumulators: holds Lc + DV * max|r| in two's
  // complement (8 bits for W = 6, DV = 6).
  function automatic int unsigned acc_width(int unsigned w, int unsigned dv);
    int unsigned maxabs;
    maxabs = (1 << (w - 1)) + dv * ((1 << (w - 2)) - 1);
    return $clog2(maxabs + 1) + 1;
  endfunction

  // Width of the sign counter (two's-complement correction term).
  function automatic int unsigned cor_width(int unsigned dv);
    return $clog2(dv + 1);
  endfunction

  // Width of the non-negative partial sums of the magnitude cycles:
  // DV one's-complement bits + one channel bit + one correction bit.
  function automatic int unsigned psum_width(int unsigned dv);
    return $clog2(dv + 3);
  endfunction

  // Cyclic shift of block (r, c) of the parity-check matrix.
  function automatic int unsigned h_shift(int unsigned r, int unsigned c, int unsigned z);
    return (r * (c + 1) + c) % z;
  endfunction

  // Check node that edge (block row r) of bit node i connects to.
  function automatic int unsigned bn_edge_cn(int unsigned i, int unsigned r, int unsigned z);
    int unsigned c, y;
    c = i / z;
    y = i % z;
    return r * z + ((y + z - h_shift(r, c, z)) % z);
  endfunction

  // Bit node that input c (block column c) of check node j connects to.
  function automatic int unsigned cn_edge_bn(int unsigned j, int unsigned c, int unsigned z);
    int unsigned r, x;
    r = j / z;
    x = j % z;
    return c * z + ((x + h_shift(r, c, z)) % z);
  endfunction

  // Iteration phase strobes broadcast by the controller. Cycle numbers are
  // those of one iteration, 0 .. W+1.
  typedef struct packed {
    logic [3:0] cyc;   // cycle index inside the iteration, 0 .. W+1
    logic run;         // decoder active: node registers advance (clock enable)
    logic init;        // block start: load channel values, preset accumulators
    logic bn_sat;      // cycle 0: bit node saturates/normalises the new messages
    logic cn_sign;     // cycle 1: check node sees the message signs
    logic cn_mag;      // cycles 2 .. W-1: check node sees magnitude bits
    logic bn_msb;      // cycle 3: bit node sees the check-node message signs
    logic bn_mag;      // cycles 4 .. W+1: bit node sees magnitude bits
    logic bn_last;     // cycle W+1: last accumulation cycle
  } phase_t;

endpackage
