// ldpc_decoder -- message-parallel, partially bit-serial Min-Sum LDPC decoder.
//
// All N bit nodes and M = N*DV/DC check nodes are instantiated and joined by a
// hard-wired, bit-serial interconnect: one wire per edge and direction
// (2*N*DV wires, 24,576 for the default 2048-bit code). Check nodes work
// bit-serially MSB first (minimum search of 90 two-operand cells), bit nodes
// bit-parallel on one bit weight per clock, so one iteration takes W+2 = 8
// clock cycles. The Min-Sum check-node output is normalised by 0.5, done as a
// shift at the bit-node output, which also shortens the messages to W-1 bits.
// The hard decisions are sent to the check nodes in an idle wire cycle of
// every iteration, giving an exact parity test used for early termination.
//
// Interfaces:
//   in_*   P channel values (W-bit two's complement, positive = bit 0) per
//          beat, valid/ready, N/P beats per block, natural bit order.
//   out_*  P hard decisions per beat, valid/ready, N/P beats per block, with
//          the iteration count and convergence flag of the block.
//   max_iter  maximum number of iterations I_MAX (0 .. 2^ITW-1);
//   et_en     enables early termination when all parity checks hold.
//   urng_*, ber_*  the two test-bench building blocks (uniform random number
//          generator and bit/frame error counter). They are independent of
//          the decoder and only placed here side by side with their own
//          ports; see tausworthe_urng and ber_analyzer.
// Timing: a block starts one cycle after the input buffer is full, decodes in
// (iters+1)*(W+2) cycles and is handed to the output buffer; the next block
// can be loaded meanwhile.
//
// Code structure: block row r / block column c of the parity-check matrix is
// a Z x Z cyclic shift (ldpc_pkg::h_shift). Edge r of bit node i goes to
// check node bn_edge_cn(i, r), input c = i / Z of that check node.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned DV  = DV_DEF,
  parameter int unsigned DC  = DC_DEF,
  parameter int unsigned W   = W_DEF,
  parameter int unsigned P   = 64,
  parameter int unsigned ITW = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_llr [P],
  input  logic [ITW-1:0]      max_iter,
  input  logic                et_en,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [P-1:0]        out_bits,
  output logic                out_last,
  output logic [ITW-1:0]      out_iters,
  output logic                out_conv,
  output logic                busy,
  // uniform random number generator (independent of the decoder)
  input  logic                urng_en,
  input  logic                urng_seed_load,
  input  logic [31:0]         urng_seed [3],
  output logic [31:0]         urng_u,
  // bit / frame error counter (independent of the decoder)
  input  logic                ber_clr,
  input  logic                ber_valid,
  input  logic [P-1:0]        ber_dec,
  input  logic [P-1:0]        ber_ref,
  input  logic                ber_last,
  output logic [47:0]         ber_bit_errors,
  output logic [47:0]         ber_frame_errors,
  output logic [47:0]         ber_frames
);
  localparam int unsigned Z = N / DC;
  localparam int unsigned M = DV * Z;

  phase_t              ph;
  logic signed [W-1:0] llr_all [N];
  logic                in_full, take_in, store, out_free, parity_all;
  logic [ITW-1:0]      iters;
  logic                conv;

  logic [DV-1:0] q_wire [N];    // bit node -> check node, per bit-node edge
  logic [DC-1:0] r_wire [M];    // check node -> bit node, per check-node edge
  logic [DV-1:0] r_to_bn [N];
  logic [DC-1:0] q_to_cn [M];
  logic [N-1:0]  dec;
  logic [M-1:0]  par_ok;

  initial assert (N % DC == 0) else $error("ldpc_decoder: DC must divide N");

  llr_input_buffer #(.N(N), .W(W), .P(P)) u_inbuf (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_llr(in_llr), .take(take_in), .full(in_full), .llr_all(llr_all)
  );

  ldpc_ctrl #(.W(W), .ITW(ITW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_full(in_full), .out_free(out_free),
    .max_iter(max_iter), .et_en(et_en), .parity_all(parity_all),
    .ph(ph), .take_in(take_in), .store(store), .iters_o(iters),
    .conv_o(conv), .busy(busy)
  );

  // bit-serial interconnect
  for (genvar i = 0; i < N; i++) begin : g_bn_wire
    for (genvar r = 0; r < DV; r++) begin : g_e
      assign r_to_bn[i][r] = r_wire[bn_edge_cn(i, r, Z)][i / Z];
    end
  end
  for (genvar j = 0; j < M; j++) begin : g_cn_wire
    for (genvar c = 0; c < DC; c++) begin : g_e
      assign q_to_cn[j][c] = q_wire[cn_edge_bn(j, c, Z)][j / Z];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_bn
    bit_node #(.DV(DV), .W(W)) u_bn (
      .clk(clk), .ph(ph), .lc_in(llr_all[i]), .r_in(r_to_bn[i]),
      .q_out(q_wire[i]), .dec(dec[i])
    );
  end

  for (genvar j = 0; j < M; j++) begin : g_cn
    check_node #(.DC(DC)) u_cn (
      .clk(clk), .ph(ph), .q_in(q_to_cn[j]), .r_out(r_wire[j]),
      .parity_ok(par_ok[j])
    );
  end

  assign parity_all = &par_ok;

  dec_output_buffer #(.N(N), .P(P), .ITW(ITW)) u_outbuf (
    .clk(clk), .rst_n(rst_n), .store(store), .dec_in(dec),
    .iters_in(iters), .conv_in(conv), .free(out_free),
    .out_valid(out_valid), .out_ready(out_ready), .out_bits(out_bits),
    .out_last(out_last), .out_iters(out_iters), .out_conv(out_conv)
  );

  tausworthe_urng u_urng (
    .clk(clk), .rst_n(rst_n), .en(urng_en), .seed_load(urng_seed_load),
    .seed(urng_seed), .u(urng_u)
  );

  ber_analyzer #(.P(P), .CW(48)) u_ber (
    .clk(clk), .rst_n(rst_n), .clr(ber_clr), .in_valid(ber_valid),
    .in_dec(ber_dec), .in_ref(ber_ref), .in_last(ber_last),
    .bit_errors(ber_bit_errors), .frame_errors(ber_frame_errors), .frames(ber_frames)
  );
endmodule
