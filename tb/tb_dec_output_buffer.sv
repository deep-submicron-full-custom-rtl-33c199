// tb_dec_output_buffer -- stores blocks of hard decisions (N = 64, P = 8)
// and reads them back with random back-pressure: beats must come out in
// order (bit beat*P + lane), out_last only on the final beat, status held
// while streaming, and `free` low exactly while a block is pending.
module tb_dec_output_buffer;
  localparam int N = 64, P = 8, ITW = 5, NB = N / P;
  logic clk = 0, rst_n = 0, store = 0, conv_in = 0, out_ready = 0;
  logic [N-1:0] dec_in = '0;
  logic [ITW-1:0] iters_in = '0;
  logic free, out_valid, out_last, out_conv;
  logic [P-1:0] out_bits;
  logic [ITW-1:0] out_iters;
  int checks = 0, failures = 0;

  dec_output_buffer #(.N(N), .P(P), .ITW(ITW)) dut (.clk, .rst_n, .store, .dec_in, .iters_in, .conv_in,
    .free, .out_valid, .out_ready, .out_bits, .out_last, .out_iters, .out_conv);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] blkv;
    logic [ITW-1:0] it;
    logic cv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      int b;
      b = 0;
      @(negedge clk);
      checks++;
      if (!free || out_valid) begin failures++; $display("FAIL not free"); end
      blkv = {$urandom, $urandom};
      it = ITW'($urandom); cv = 1'($urandom);
      dec_in = blkv; iters_in = it; conv_in = cv; store = 1;
      @(negedge clk);
      store = 0; dec_in = '0;
      while (b < NB) begin
        out_ready = ($urandom % 3) != 0;
        #1;
        checks++;
        if (free || !out_valid || out_iters !== it || out_conv !== cv) begin failures++; $display("FAIL status beat %0d", b); end
        if (out_ready) begin
          checks++;
          if (out_bits !== blkv[b * P +: P] || out_last !== (b == NB - 1)) begin
            failures++; $display("FAIL blk %0d beat %0d", blk, b);
          end
          b++;
        end
        @(negedge clk);
      end
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
