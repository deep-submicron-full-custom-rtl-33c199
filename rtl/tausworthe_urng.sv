// tausworthe_urng -- combined Tausworthe uniform random number generator of
// the hardware noise source (AWGN channel emulator).
//
// Three linear feedback shift registers with the primitive characteristic
// polynomials P1(z) = z^31 - z^13 - 1, P2(z) = z^29 - z^2 - 1 and
// P3(z) = z^28 - z^3 - 1 are each advanced by a whole word per clock cycle,
// and the output is the XOR of the three 32-bit states. The combined sequence
// has a period of about 2^88. The polynomials and the combination follow the
// noise generator description; the step sizes of the word-wise recurrence
// (s = 12, 4 and 17 bits per step) are the usual ones for these three
// polynomials and are this design's own choice.
//
// Interface: `seed_load` copies seed[0..2] into the three component states
// (the components need seed[0] > 1, seed[1] > 7, seed[2] > 15, otherwise
// their significant bits are all zero and they stay stuck). While `en` is
// high every cycle produces a new 32-bit uniform number on `u`, which is
// registered (one cycle after the step that makes it). Reset loads fixed
// non-zero seeds.
module tausworthe_urng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        seed_load,
  input  logic [31:0] seed [3],
  output logic [31:0] u
);
  logic [31:0] s1_q, s2_q, s3_q;
  logic [31:0] s1_n, s2_n, s3_n;

  // One word step of a component generator with degree k and step s: the
  // k significant bits (top of the word) move s places further along the
  // sequence defined by the polynomial z^k - z^q - 1.
  always_comb begin
    s1_n = ((s1_q & 32'hFFFF_FFFE) << 12) ^ (((s1_q << 13) ^ s1_q) >> 19);
    s2_n = ((s2_q & 32'hFFFF_FFF8) << 4)  ^ (((s2_q << 2)  ^ s2_q) >> 25);
    s3_n = ((s3_q & 32'hFFFF_FFF0) << 17) ^ (((s3_q << 3)  ^ s3_q) >> 11);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= 32'd12345;
      s2_q <= 32'd67890;
      s3_q <= 32'd13579;
      u    <= '0;
    end else if (seed_load) begin
      s1_q <= seed[0];
      s2_q <= seed[1];
      s3_q <= seed[2];
    end else if (en) begin
      s1_q <= s1_n;
      s2_q <= s2_n;
      s3_q <= s3_n;
      u    <= s1_n ^ s2_n ^ s3_n;
    end
  end
endmodule
