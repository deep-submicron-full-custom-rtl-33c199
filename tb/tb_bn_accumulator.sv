// tb_bn_accumulator -- random partial-sum sequences (sign-extension cycle 3,
// magnitude cycles 4..7, W = 6, DV = 6) are accumulated; afterwards, in
// cycle 0, acc_sign must be the sign of the value
//   v = 16*ps3 + 8*ps4 + 4*ps5 + 2*ps6 + ps7
// and mag_o = min(|v| >> 1, 15). Each cycle's partial sum is (sel_sub ? sub
// : sum) + cor_bit, with all three chosen at random. A block start (init)
// preset with a channel value is checked the same way.
module tb_bn_accumulator;
  import ldpc_pkg::*;
  import tb_util_pkg::*;
  localparam int DV = 6, W = 6;
  localparam int SW = psum_width(DV) + 1;
  logic clk = 0;
  phase_t ph;
  logic signed [W-1:0] lc = '0;
  logic signed [SW-1:0] sum = '0, sub = '0;
  logic sel_sub = 0, cor_bit = 0;
  logic acc_sign;
  logic [W-3:0] mag_o;
  int checks = 0, failures = 0, n_sat = 0;

  bn_accumulator #(.DV(DV), .W(W)) dut (.clk, .ph, .lc, .sum, .sub, .sel_sub, .cor_bit, .acc_sign, .mag_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_val(int v, string tag);
    int a = (v < 0 ? -v : v) >> 1;
    if (a > 15) begin a = 15; n_sat++; end
    checks += 2;
    if (acc_sign !== (v < 0)) begin failures++; $display("FAIL %s sign v=%0d", tag, v); end
    if (int'(mag_o) != a) begin failures++; $display("FAIL %s mag v=%0d got %0d exp %0d", tag, v, mag_o, a); end
  endtask

  initial begin
    int v, ps;
    ph = mk_phase(0, 0, 0, W);
    for (int t = 0; t < 400; t++) begin
      if (t % 10 == 0) begin
        @(negedge clk);
        lc = W'($urandom);
        ph = mk_phase(0, 0, 1, W);
        @(negedge clk);
        ph = mk_phase(0, 1, 0, W);
        #1 expect_val(int'(lc), "init");
      end
      v = 0;
      for (int c = 1; c < W + 2; c++) begin
        @(negedge clk);
        ph = mk_phase(c, 1, 0, W);
        if (c >= 3) begin
          sel_sub = 1'($urandom);
          if (c == 3) begin
            sum = SW'(-int'(1 + $urandom % 7));
            sub = sum + 1;
            cor_bit = 0;
          end else begin
            sum = SW'(1 + $urandom % 7);
            sub = sum - 1;
            cor_bit = (c >= 5) ? 1'($urandom) : 1'b0;
          end
          ps = int'(sel_sub ? sub : sum) + int'(cor_bit);
          v = (c == 3) ? ps : 2 * v + ps;
        end
      end
      @(negedge clk);
      ph = mk_phase(0, 1, 0, W);
      #1 expect_val(v, "acc");
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
