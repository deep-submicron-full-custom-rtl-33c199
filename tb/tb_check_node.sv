// tb_check_node -- drives the 32 bit-serial inputs through whole iterations
// (sign in cycle 1, magnitude bits MSB first in cycles 2..5, hard decisions
// in cycle 6, W = 6) and checks the outgoing messages against the Min-Sum
// rule (sign = XOR of the other signs, magnitude = minimum of the other
// magnitudes), their cycle positions on r_out (sign in cycle 2, magnitude in
// 3..6, held in 7) and the parity output in cycle 6.
module tb_check_node;
  import ldpc_pkg::*;
  import tb_util_pkg::*;
  localparam int DC = 32, W = 6, MB = W - 2;
  logic clk = 0;
  phase_t ph;
  logic [DC-1:0] q_in = '0, r_out;
  logic parity_ok;
  int checks = 0, failures = 0;

  check_node #(.DC(DC)) dut (.clk, .ph, .q_in, .r_out, .parity_ok);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s [DC];
    logic [MB-1:0] m [DC];
    logic d [DC];
    logic [MB:0] got [DC];
    logic held [DC];
    bit par, exp_s;
    int exp_m;
    ph = mk_phase(0, 0, 0, W);
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < DC; i++) begin
        s[i] = 1'($urandom); m[i] = MB'($urandom); d[i] = 1'($urandom);
        if (t % 4 == 0) m[i] = MB'(8 + $urandom % 8);
      end
      if (t % 6 == 0) for (int i = 0; i < DC; i++) s[i] = 0;
      for (int c = 0; c < W + 2; c++) begin
        @(negedge clk);
        ph = mk_phase(c, 1, 0, W);
        // wire contents in cycle c, seen by the input registers in cycle c+1
        if (c == 0)            q_in = {<<{s}};
        else if (c <= MB)      for (int i = 0; i < DC; i++) q_in[i] = m[i][MB - c];
        else                   for (int i = 0; i < DC; i++) q_in[i] = d[i];
        #1;
        if (c == W) begin
          par = 0;
          for (int i = 0; i < DC; i++) par ^= d[i - 0];
          checks++;
          // input registers hold what was on the wire in cycle W-1: decisions
          if (parity_ok !== !par) begin failures++; $display("FAIL parity t=%0d", t); end
        end
        if (c == 2) for (int i = 0; i < DC; i++) got[i][MB] = r_out[i];
        if (c >= 3 && c <= W) for (int i = 0; i < DC; i++) got[i][W - c] = r_out[i];
        if (c == W + 1) for (int i = 0; i < DC; i++) held[i] = r_out[i];
      end
      for (int i = 0; i < DC; i++) begin
        exp_s = 0; exp_m = 1 << MB;
        for (int k = 0; k < DC; k++) if (k != i) begin
          exp_s ^= s[k];
          if (int'(m[k]) < exp_m) exp_m = m[k];
        end
        checks += 2;
        if (got[i] !== {exp_s, MB'(exp_m)}) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d r[%0d] = %b expected %b", t, i, got[i], {exp_s, MB'(exp_m)});
        end
        if (held[i] !== got[i][0]) begin failures++; $display("FAIL hold t=%0d i=%0d", t, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
