// tb_bn_input_stage -- feeds DV = 6 random sign-magnitude messages through the
// input stage over whole iterations and checks the one's-complement bits
// (cycle 3: sign, cycles 4..7: magnitude XOR sign) and the serial correction
// bits of the last three cycles: C = number of negative messages for L(Q),
// C or C-1 (own sign 1) for each message, MSB first. No correction bits may
// appear outside those cycles.
module tb_bn_input_stage;
  import ldpc_pkg::*;
  import tb_util_pkg::*;
  localparam int DV = 6, W = 6, MB = W - 2, CW = 3;
  logic clk = 0;
  phase_t ph;
  logic [DV-1:0] r_in = '0, oc_bits, cor_j;
  logic cor_q;
  int checks = 0, failures = 0;

  bn_input_stage #(.DV(DV), .W(W)) dut (.clk, .ph, .r_in, .oc_bits, .cor_j, .cor_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s [DV];
    logic [MB-1:0] m [DV];
    int c_all, bidx;
    logic [CW-1:0] ccq, ccj [DV];
    ph = mk_phase(0, 0, 0, W);
    for (int t = 0; t < 300; t++) begin
      c_all = 0;
      for (int j = 0; j < DV; j++) begin
        s[j] = 1'($urandom); m[j] = MB'($urandom);
        if (t % 9 == 0) s[j] = 1;
        c_all += s[j];
      end
      for (int c = 0; c < W + 2; c++) begin
        @(negedge clk);
        ph = mk_phase(c, 1, 0, W);
        // the stage sees in cycle c what was on the wire in cycle c-1
        if (c == 2)                 for (int j = 0; j < DV; j++) r_in[j] = s[j];
        else if (c >= 3 && c <= 6)  for (int j = 0; j < DV; j++) r_in[j] = m[j][MB - 1 - (c - 3)];
        else                        r_in = DV'($urandom);
        #1;
        if (c == 3) begin
          checks++;
          for (int j = 0; j < DV; j++) if (oc_bits[j] !== s[j]) begin failures++; $display("FAIL oc sign t=%0d", t); end
        end
        if (c >= 4 && c <= W + 1) begin
          checks++;
          for (int j = 0; j < DV; j++)
            if (oc_bits[j] !== (m[j][W + 1 - c] ^ s[j])) begin failures++; $display("FAIL oc t=%0d c=%0d j=%0d", t, c, j); end
        end
        if (c >= W + 2 - CW && c <= W + 1) begin
          bidx = W + 1 - c;
          ccq[bidx] = cor_q;
          for (int j = 0; j < DV; j++) ccj[j][bidx] = cor_j[j];
        end else begin
          checks++;
          if (cor_q !== 1'b0 || cor_j !== '0) begin failures++; $display("FAIL stray correction t=%0d c=%0d", t, c); end
        end
      end
      checks++;
      if (int'(ccq) != c_all) begin failures++; $display("FAIL C=%0d expected %0d", ccq, c_all); end
      for (int j = 0; j < DV; j++) begin
        checks++;
        if (int'(ccj[j]) != c_all - s[j]) begin failures++; $display("FAIL C_%0d=%0d expected %0d", j, ccj[j], c_all - s[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
