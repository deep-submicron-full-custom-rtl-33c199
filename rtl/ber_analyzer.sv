// ber_analyzer -- bit and frame error counter of the hardware-accelerated
// decoder simulator.
//
// The decoded hard decisions of each block arrive in beats of P bits,
// together with the bits that were sent. Every differing bit counts as a bit
// error; a block with at least one bit error counts as a frame error. The
// counters accumulate over all blocks since the last clear, so BER = bit
// errors / (frames * N) and FER = frame errors / frames can be read out (the
// division is left to whoever reads the counters). That the analyzer
// accumulates bit and frame errors follows the simulator description; the
// beat interface, the counter widths and the clear input are this design's
// own choices.
//
// Interface: `in_valid` with `in_dec` and `in_ref` (P bits each) and `in_last`
// on the final beat of a block; one beat per cycle, no back-pressure.
// `clr` zeroes all counters. Counts are registered: they include a beat one
// cycle after it was presented.
module ber_analyzer #(
  parameter int unsigned P  = 64,
  parameter int unsigned CW = 48   // counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          in_valid,
  input  logic [P-1:0]  in_dec,
  input  logic [P-1:0]  in_ref,
  input  logic          in_last,
  output logic [CW-1:0] bit_errors,
  output logic [CW-1:0] frame_errors,
  output logic [CW-1:0] frames
);
  logic                   err_in_frame_q;
  logic [$clog2(P+1)-1:0] beat_errs;

  always_comb begin
    beat_errs = '0;
    for (int i = 0; i < int'(P); i++) beat_errs = beat_errs + ($clog2(P+1))'(in_dec[i] ^ in_ref[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_errors     <= '0;
      frame_errors   <= '0;
      frames         <= '0;
      err_in_frame_q <= 1'b0;
    end else if (clr) begin
      bit_errors     <= '0;
      frame_errors   <= '0;
      frames         <= '0;
      err_in_frame_q <= 1'b0;
    end else if (in_valid) begin
      bit_errors <= bit_errors + CW'(beat_errs);
      if (in_last) begin
        frames         <= frames + 1'b1;
        err_in_frame_q <= 1'b0;
        if (err_in_frame_q || beat_errs != '0) frame_errors <= frame_errors + 1'b1;
      end else if (beat_errs != '0) begin
        err_in_frame_q <= 1'b1;
      end
    end
  end
endmodule
