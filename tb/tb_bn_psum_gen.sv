// tb_bn_psum_gen -- exhaustive test of the partial-sum generator for DV = 6:
// all operand-bit patterns, channel bits and both cycle types. Expected sums
// are computed from the bit weights directly: in the sign-extension cycle a
// message bit counts -1 and the two channel bits -2*hi + lo; otherwise every
// one bit counts +1. sub must be sum + 1 (sign cycle) or sum - 1.
module tb_bn_psum_gen;
  import ldpc_pkg::*;
  localparam int DV = 6;
  localparam int SW = psum_width(DV) + 1;
  logic msb, lc_hi, lc_bit;
  logic [DV-1:0] oc_bits;
  logic signed [SW-1:0] sum, sub;
  int checks = 0, failures = 0;

  bn_psum_gen #(.DV(DV)) dut (.msb, .oc_bits, .lc_hi, .lc_bit, .sum, .sub);

  initial begin
    int e, ones;
    for (int m = 0; m < 2; m++)
      for (int h = 0; h < 2; h++)
        for (int l = 0; l < 2; l++)
          for (int o = 0; o < (1 << DV); o++) begin
            msb = 1'(m); lc_hi = 1'(h); lc_bit = 1'(l); oc_bits = DV'(o);
            #1;
            ones = $countones(o);
            if (m) e = -ones - 2 * h + l;
            else   e = ones + l;
            checks += 2;
            if (int'(sum) != e) begin
              failures++;
              $display("FAIL msb=%0d hi=%0d lo=%0d oc=%b: sum %0d expected %0d", m, h, l, oc_bits, sum, e);
            end
            if (int'(sub) != (m ? e + 1 : e - 1)) begin
              failures++;
              $display("FAIL sub %0d for sum %0d", sub, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
