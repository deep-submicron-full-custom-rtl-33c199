// tb_cn_min_search -- DC = 32 inputs of 4-bit magnitudes, fed MSB first;
// output i must be the minimum of all inputs except i. Vectors include
// repeated minima, a unique minimum and all-equal inputs.
module tb_cn_min_search;
  localparam int DC = 32, MB = 4;
  logic clk = 0, en = 0, clr = 0;
  logic [DC-1:0] in_bits = '0, out_bits;
  int checks = 0, failures = 0;

  cn_min_search #(.DC(DC)) dut (.clk, .en, .clr, .in_bits, .out_bits);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MB-1:0] v [DC];
    logic [MB-1:0] got [DC];
    int exp;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < DC; i++) v[i] = MB'($urandom);
      if (t % 5 == 1) v[$urandom % DC] = 0;                        // unique-ish minimum
      if (t % 5 == 2) begin v[3] = 1; v[20] = 1; end               // shared minimum
      if (t % 7 == 3) for (int i = 0; i < DC; i++) v[i] = 4'd9;    // all equal
      if (t % 11 == 4) for (int i = 0; i < DC; i++) v[i] = 4'd8 + MB'($urandom % 8);
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0; en = 1;
      for (int k = MB - 1; k >= 0; k--) begin
        for (int i = 0; i < DC; i++) in_bits[i] = v[i][k];
        #1;
        for (int i = 0; i < DC; i++) got[i][k] = out_bits[i];
        @(negedge clk);
      end
      en = 0;
      for (int i = 0; i < DC; i++) begin
        exp = 1 << MB;
        for (int k = 0; k < DC; k++) if (k != i && int'(v[k]) < exp) exp = v[k];
        checks++;
        if (int'(got[i]) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d out %0d = %0d expected %0d", t, i, got[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
