// dec_output_buffer -- output register for the decoded block.
//
// On `store` it captures the N hard decisions (bit i = 1 means the decoded
// bit is 1, i.e. L(Q_i) < 0), the number of iterations used and the
// convergence flag (all parity checks held). It then streams the decisions
// out P per beat over a valid/ready handshake, bit b*P+p in lane p of beat
// b, with out_last on the last beat; out_iters / out_conv stay valid while
// out_valid is high. `free` tells the controller a new block may be stored.
module dec_output_buffer #(
  parameter int unsigned N   = 2048,
  parameter int unsigned P   = 64,
  parameter int unsigned ITW = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           store,
  input  logic [N-1:0]   dec_in,
  input  logic [ITW-1:0] iters_in,
  input  logic           conv_in,
  output logic           free,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [P-1:0]   out_bits,
  output logic           out_last,
  output logic [ITW-1:0] out_iters,
  output logic           out_conv
);
  localparam int unsigned NB = N / P;
  localparam int unsigned CW = $clog2(NB + 1);

  logic [N-1:0]   sr_q;
  logic [CW-1:0]  left_q;     // beats still to send
  logic [ITW-1:0] iters_q;
  logic           conv_q;

  initial assert (N % P == 0) else $error("dec_output_buffer: P must divide N");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q <= '0;
    end else if (store) begin
      left_q <= CW'(NB);
    end else if (out_valid && out_ready) begin
      left_q <= left_q - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (store) begin
      sr_q    <= dec_in;
      iters_q <= iters_in;
      conv_q  <= conv_in;
    end else if (out_valid && out_ready) begin
      sr_q <= sr_q >> P;
    end
  end

  assign free      = (left_q == '0);
  assign out_valid = (left_q != '0);
  assign out_bits  = sr_q[P-1:0];
  assign out_last  = (left_q == CW'(1));
  assign out_iters = iters_q;
  assign out_conv  = conv_q;

  // a block must not be stored while the previous one is still streaming
  always_ff @(posedge clk) if (store) assert (free) else $error("dec_output_buffer: store while busy");
endmodule
