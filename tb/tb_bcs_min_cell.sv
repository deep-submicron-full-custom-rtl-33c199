// tb_bcs_min_cell -- random operand pairs (8 bits, many with equal prefixes)
// are fed MSB first; the output stream must equal min(a, b).
module tb_bcs_min_cell;
  logic clk = 0, en = 0, clr = 0, a = 0, b = 0, min_o;
  int checks = 0, failures = 0;

  bcs_min_cell dut (.clk, .en, .clr, .a, .b, .min_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, y, got, exp;
    for (int t = 0; t < 500; t++) begin
      x = 8'($urandom);
      y = (t % 3 == 0) ? {x[7:4], 4'($urandom)} : 8'($urandom);
      if (t % 17 == 0) y = x;
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0; en = 1;
      for (int k = 7; k >= 0; k--) begin
        a = x[k]; b = y[k];
        #1 got[k] = min_o;
        @(negedge clk);
      end
      en = 0;
      exp = (x < y) ? x : y;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL min(%0d,%0d) = %0d, got %0d", x, y, exp, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
