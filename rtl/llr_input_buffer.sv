// llr_input_buffer -- input shift register for the channel values.
//
// The channel values L(c_i) of a block (N values, W-bit two's complement)
// arrive P per beat over a valid/ready handshake, value b*P+p in lane p of
// beat b. Beats are shifted in at the top of an N/P-word shift register.
// After N/P beats the buffer is full and in_ready drops; the controller then
// copies all values into the bit nodes in one cycle (take), which empties the
// buffer, so the next block is loaded while the current one is decoded.
module llr_input_buffer #(
  parameter int unsigned N = 2048,
  parameter int unsigned W = 6,
  parameter int unsigned P = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_llr [P],
  input  logic                take,
  output logic                full,
  output logic signed [W-1:0] llr_all [N]
);
  localparam int unsigned NB = N / P;

  logic signed [W-1:0]     sr [NB][P];
  logic [$clog2(NB+1)-1:0] cnt_q;

  initial assert (N % P == 0) else $error("llr_input_buffer: P must divide N");

  assign full     = (cnt_q == ($clog2(NB+1))'(NB));
  assign in_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cnt_q <= '0;
    else if (take)                   cnt_q <= '0;
    else if (in_valid && in_ready)   cnt_q <= cnt_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      for (int b = 0; b < int'(NB) - 1; b++) sr[b] <= sr[b+1];
      sr[NB-1] <= in_llr;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) llr_all[i] = sr[i / P][i % P];
  end
endmodule
