// tb_llr_input_buffer -- loads blocks (N = 64, P = 8) with random gaps in
// in_valid, checks that in_ready drops exactly when the block is complete,
// that every value lands at index beat*P + lane, and that take empties the
// buffer for the next block.
module tb_llr_input_buffer;
  localparam int N = 64, W = 6, P = 8, NB = N / P;
  logic clk = 0, rst_n = 0, in_valid = 0, take = 0;
  logic in_ready, full;
  logic signed [W-1:0] in_llr [P];
  logic signed [W-1:0] llr_all [N];
  int checks = 0, failures = 0;

  llr_input_buffer #(.N(N), .W(W), .P(P)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_llr, .take, .full, .llr_all);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] ref_v [N];
    for (int p = 0; p < P; p++) in_llr[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      int b;
      b = 0;
      for (int i = 0; i < N; i++) ref_v[i] = W'($urandom);
      while (b < NB) begin
        @(negedge clk);
        checks++;
        if (!in_ready || full) begin failures++; $display("FAIL not ready at beat %0d", b); end
        in_valid = ($urandom % 4) != 0;
        for (int p = 0; p < P; p++) in_llr[p] = ref_v[b * P + p];
        if (in_valid) b++;
      end
      @(negedge clk);
      in_valid = 1;             // must be refused while full
      for (int p = 0; p < P; p++) in_llr[p] = W'($urandom);
      checks++;
      if (in_ready || !full) begin failures++; $display("FAIL ready/full after last beat blk %0d cnt %0d", blk, dut.cnt_q); end
      @(negedge clk);
      in_valid = 0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (llr_all[i] !== ref_v[i]) begin failures++; $display("FAIL blk %0d value %0d", blk, i); end
      end
      take = 1;
      @(negedge clk);
      take = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
