// tb_tausworthe_urng -- checks the combined Tausworthe generator.
//
// Each component is modelled independently at bit level: a component of
// degree k holds the last k bits x[n-k+1..n] of the sequence
// x[n] = x[n-k] ^ x[n-k+q] (characteristic polynomial z^k - z^q - 1) and
// one step advances it by s bits. The model's bits are compared with the top
// k bits of the RTL component state after every step, and the XOR of the
// components with the output word. A histogram of the top 4 output bits over
// 16384 samples must be roughly flat, and en = 0 must freeze the output.
module tb_tausworthe_urng;
  logic clk = 0, rst_n = 0, en = 0, seed_load = 0;
  logic [31:0] seed [3];
  logic [31:0] u;
  int checks = 0, failures = 0;

  tausworthe_urng dut (.clk, .rst_n, .en, .seed_load, .seed, .u);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int K [3] = '{31, 29, 28};
  localparam int Q [3] = '{13, 2, 3};
  localparam int S [3] = '{12, 4, 17};

  // bit model: hist[c][i] = x[n-i], i = 0 .. k-1 (i = 0 newest)
  bit hist [3][31];

  // load from a word: the top k bits, MSB = oldest bit x[n-k+1]
  function automatic void load_model(int c, logic [31:0] w);
    for (int i = 0; i < K[c]; i++) hist[c][i] = w[32 - K[c] + i];
  endfunction

  function automatic logic [31:0] model_word(int c);
    logic [31:0] w = '0;
    for (int i = 0; i < K[c]; i++) w[32 - K[c] + i] = hist[c][i];
    return w;
  endfunction

  function automatic void step_model(int c);
    for (int t = 0; t < S[c]; t++) begin
      bit nb = hist[c][K[c] - 1] ^ hist[c][K[c] - 1 - Q[c]];
      for (int i = K[c] - 1; i > 0; i--) hist[c][i] = hist[c][i - 1];
      hist[c][0] = nb;
    end
  endfunction

  function automatic logic [31:0] topmask(int c);
    return ~((32'd1 << (32 - K[c])) - 1);
  endfunction

  initial begin
    int hbin [16];
    logic [31:0] comb, held;
    logic [31:0] st [3];
    seed[0] = 32'd0; seed[1] = 32'd0; seed[2] = 32'd0;
    for (int b = 0; b < 16; b++) hbin[b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk);
      seed[0] = $urandom | 32'h100; seed[1] = $urandom | 32'h100; seed[2] = $urandom | 32'h100;
      seed_load = 1;
      @(negedge clk);
      seed_load = 0;
      load_model(0, dut.s1_q); load_model(1, dut.s2_q); load_model(2, dut.s3_q);
      checks++;
      if (dut.s1_q != seed[0] || dut.s2_q != seed[1] || dut.s3_q != seed[2]) begin
        failures++; $display("FAIL seed load");
      end
      en = 1;
      for (int n = 0; n < 4096; n++) begin
        @(negedge clk);
        st[0] = dut.s1_q; st[1] = dut.s2_q; st[2] = dut.s3_q;
        comb = '0;
        for (int c = 0; c < 3; c++) begin
          step_model(c);
          checks++;
          if ((st[c] & topmask(c)) != model_word(c)) begin
            failures++;
            if (failures < 10) $display("FAIL component %0d step %0d: %h vs %h", c, n, st[c] & topmask(c), model_word(c));
          end
        end
        checks++;
        if (u != (st[0] ^ st[1] ^ st[2])) begin failures++; $display("FAIL output word step %0d", n); end
        hbin[u[31:28]]++;
      end
      en = 0;
      @(negedge clk);
      held = u;
      repeat (5) @(negedge clk);
      checks++;
      if (u != held) begin failures++; $display("FAIL output moved with en = 0"); end
    end
    for (int b = 0; b < 16; b++) begin
      checks++;
      if (hbin[b] < 850 || hbin[b] > 1200) begin failures++; $display("FAIL histogram bin %0d = %0d", b, hbin[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
