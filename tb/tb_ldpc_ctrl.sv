// tb_ldpc_ctrl -- checks the controller's block flow and iteration plan
// (W = 6): INIT one cycle after in_full, take_in during INIT, a repeating
// 8-cycle phase sequence while running, the finishing decision in cycle W of
// iteration it+1 on parity (early termination on) or it = max_iter, the
// reported iteration count and convergence flag, HOLD with frozen nodes
// while out_free is low, and no run after the block.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int W = 6, ITW = 5;
  logic clk = 0, rst_n = 0;
  logic in_full = 0, out_free = 1, et_en = 1, parity_all = 0;
  logic [ITW-1:0] max_iter = 5'd4;
  phase_t ph;
  logic take_in, store, conv_o, busy;
  logic [ITW-1:0] iters_o;
  int checks = 0, failures = 0, n_hold = 0;

  ldpc_ctrl #(.W(W), .ITW(ITW)) dut (.clk, .rst_n, .in_full, .out_free, .max_iter, .et_en,
    .parity_all, .ph, .take_in, .store, .iters_o, .conv_o, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t ", msg, $time); end
  endtask

  // parity_at: iteration whose cycle W sees parity_all = 1 (0 = never)
  task automatic run_block(int mi, bit et, int parity_at, int free_delay);
    int it, exp_iters;
    bit exp_conv;
    max_iter = ITW'(mi); et_en = et;
    if (parity_at > 0 && et) exp_iters = (parity_at - 1 < mi) ? parity_at - 1 : mi;
    else exp_iters = mi;
    exp_conv = (parity_at > 0) && (parity_at - 1 <= exp_iters);
    @(negedge clk); in_full = 1;
    @(negedge clk);
    chk(ph.init && take_in && !ph.run, "INIT after in_full");
    in_full = 0;
    it = 1;
    forever begin
      for (int c = 0; c < W + 2; c++) begin
        @(negedge clk);
        parity_all = (parity_at > 0 && it >= parity_at && c == W);
        if (c == W && it - 1 == exp_iters) out_free = (free_delay == 0);
        #1;
        chk(ph.run && int'(ph.cyc) == c, "phase counter");
        chk(ph.bn_sat == (c == 0) && ph.cn_sign == (c == 1) && ph.bn_msb == (c == 3) &&
            ph.cn_mag == (c >= 2 && c <= W - 1) && ph.bn_mag == (c >= 4) && ph.bn_last == (c == W + 1),
            "phase strobes");
        if (c == W) begin
          if (it - 1 == exp_iters) begin
            chk(store == (free_delay == 0), "store in finishing cycle");
            chk(int'(iters_o) == exp_iters && conv_o == exp_conv, "iterations / convergence");
            break;
          end else chk(!store, "no early store");
        end
      end
      if (it - 1 == exp_iters) break;
      it++;
    end
    if (free_delay > 0) begin
      repeat (free_delay) begin
        @(negedge clk); parity_all = 0; #1;
        chk(!ph.run && busy && !store, "hold");
        n_hold++;
      end
      out_free = 1; #1;
      chk(store && int'(iters_o) == exp_iters, "store from hold");
    end
    @(negedge clk); parity_all = 0; #1;
    chk(!ph.run && !busy, "idle after block");
    out_free = 1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_block(4, 1, 0, 0);   // no convergence: stops at max_iter
    run_block(10, 1, 3, 0);  // early termination after 2 iterations
    run_block(10, 1, 1, 0);  // input already a code word: 0 iterations
    run_block(5, 0, 2, 0);   // early termination off: runs to max_iter
    run_block(3, 1, 0, 4);   // output busy: hold
    run_block(0, 1, 0, 0);   // max_iter 0
    chk(n_hold > 0, "hold exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
