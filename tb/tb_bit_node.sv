// tb_bit_node -- runs the bit node (DV = 6, W = 6) through several blocks of
// several iterations. Each iteration the testbench sends DV random check-node
// messages (sign in wire cycle 2, magnitude MSB first in cycles 3..6) and
// checks the node's serial output of the next iteration against a word-level
// model:  Q = Lc + sum r,  v_j = Q - r_j,  q_j = sign(v_j), then
// min(|v_j| >> 1, 15) MSB first in cycles 1..4, then the hard decision
// sign(Q) in cycles 5..7; `dec` must equal sign(Q) from cycle 1 on.
module tb_bit_node;
  import ldpc_pkg::*;
  import tb_util_pkg::*;
  localparam int DV = 6, W = 6, MB = W - 2;
  logic clk = 0;
  phase_t ph;
  logic signed [W-1:0] lc_in = '0;
  logic [DV-1:0] r_in = '0, q_out;
  logic dec;
  int checks = 0, failures = 0;

  bit_node #(.DV(DV), .W(W)) dut (.clk, .ph, .lc_in, .r_in, .q_out, .dec);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lc, q, v [DV], rv [DV], a;
    logic rs [DV];
    logic [MB-1:0] rm [DV];
    logic exp_bit;
    ph = mk_phase(0, 0, 0, W);
    for (int blk = 0; blk < 60; blk++) begin
      @(negedge clk);
      lc = int'($urandom % 64) - 32;
      lc_in = W'(lc);
      ph = mk_phase(0, 0, 1, W);
      q = lc;
      for (int j = 0; j < DV; j++) v[j] = lc;
      for (int it = 0; it < 5; it++) begin
        for (int j = 0; j < DV; j++) begin
          rs[j] = 1'($urandom); rm[j] = MB'($urandom);
          if (blk % 3 == 0) rs[j] = 1'(lc < 0);
          rv[j] = rs[j] ? -int'(rm[j]) : int'(rm[j]);
        end
        for (int c = 0; c < W + 2; c++) begin
          @(negedge clk);
          ph = mk_phase(c, 1, 0, W);
          if (c == 2)                     for (int j = 0; j < DV; j++) r_in[j] = rs[j];
          else if (c >= 3 && c <= W)      for (int j = 0; j < DV; j++) r_in[j] = rm[j][W - c];
          else                            r_in = DV'($urandom);
          #1;
          for (int j = 0; j < DV; j++) begin
            a = (v[j] < 0 ? -v[j] : v[j]) >> 1;
            if (a > 15) a = 15;
            if (c == 0)           exp_bit = (v[j] < 0);
            else if (c <= MB)     exp_bit = a[MB - c];
            else                  exp_bit = (q < 0);
            checks++;
            if (q_out[j] !== exp_bit) begin
              failures++;
              if (failures < 10) $display("FAIL blk=%0d it=%0d c=%0d j=%0d: q_out %0d expected %0d (v=%0d)", blk, it, c, j, q_out[j], exp_bit, v[j]);
            end
          end
          if (c >= 1) begin
            checks++;
            if (dec !== (q < 0)) begin failures++; $display("FAIL dec blk=%0d it=%0d", blk, it); end
          end
        end
        // word-level update for the next iteration
        q = lc;
        for (int j = 0; j < DV; j++) q += rv[j];
        for (int j = 0; j < DV; j++) v[j] = q - rv[j];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
