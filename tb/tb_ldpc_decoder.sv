// tb_ldpc_decoder -- end-to-end test of the decoder at reduced block length.
//
// Code: DV = 6, DC = 32 as in the full design, but Z = 8 (N = 256, M = 48)
// and P = 16 channel values per beat, so the run stays short. Every block is
// decoded by the bit-true reference (ldpc_ref_pkg) and the hardware output
// (all hard decisions, iteration count, convergence flag) must match it
// exactly. Blocks: noisy all-zero code words at several noise levels, pure
// noise, strong channel values that saturate, an input that is already a code
// word (0 iterations), runs with early termination off, max_iter = 0 and
// max_iter = 31. The decode latency of an idle decoder must be
// 3 + iters*(W+2) + W cycles (8 cycles per iteration). A final phase streams
// blocks back to back with random output back-pressure, so blocks are loaded
// while another is decoded and the controller has to hold finished blocks.
// Each mechanism is counted and must occur at least once.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int unsigned DV = 6, DC = 32, W = 6, Z = 8, N = DC * Z, P = 16, ITW = 5;
  localparam int unsigned NB = N / P;

  typedef ldpc_ref #(N, DV, DC, W) ref_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [W-1:0] in_llr [P];
  logic [ITW-1:0] max_iter = 5'd10;
  logic et_en = 1;
  logic out_valid, out_ready = 0, out_last, out_conv, busy;
  logic [P-1:0] out_bits;
  logic [ITW-1:0] out_iters;

  int checks = 0, failures = 0;
  int n_early = 0, n_maxit = 0, n_zero_it = 0, n_hold = 0, n_overlap = 0, n_noet = 0;
  longint cyc = 0;

  ldpc_decoder #(.N(N), .DV(DV), .DC(DC), .W(W), .P(P), .ITW(ITW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr, .max_iter, .et_en,
    .out_valid, .out_ready, .out_bits, .out_last, .out_iters, .out_conv, .busy,
    .urng_en(1'b1), .urng_seed_load(1'b0), .urng_seed(urng_seed), .urng_u,
    .ber_clr(1'b0), .ber_valid(out_valid && out_ready), .ber_dec(out_bits), .ber_ref('0), .ber_last(out_last),
    .ber_bit_errors, .ber_frame_errors, .ber_frames
  );

  // side-by-side blocks: the error counter watches the decoder output (all
  // blocks carry the all-zero code word), the random number generator runs
  logic [31:0] urng_seed [3];
  logic [31:0] urng_u, urng_prev;
  logic [47:0] ber_bit_errors, ber_frame_errors, ber_frames;
  int n_blocks = 0, n_urng_same = 0;
  longint exp_bit_errors = 0;
  assign urng_seed[0] = 32'd1; assign urng_seed[1] = 32'd1; assign urng_seed[2] = 32'd1;
  always @(posedge clk) begin
    urng_prev <= urng_u;
    if (rst_n && urng_u == urng_prev) n_urng_same++;
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.u_ctrl.state_q == 2'd3) n_hold++;
    if (in_valid && in_ready && busy) n_overlap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  // channel values for the all-zero code word: mean mu, noise sigma*mu
  function automatic void mk_noisy(ref_t rf, real mu, real sigma);
    for (int i = 0; i < int'(N); i++) begin
      int v = $rtoi(mu * (1.0 + sigma * gauss()) + ((($urandom % 2) != 0) ? 0.5 : -0.5));
      if (v > 31) v = 31;
      if (v < -32) v = -32;
      rf.lc[i] = v;
    end
  endfunction

  task automatic send(ref_t rf);
    // drive on the falling edge, transfer on the rising edge
    for (int b = 0; b < int'(NB); b++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1;
      for (int p = 0; p < int'(P); p++) in_llr[p] = W'(rf.lc[b * P + p]);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic receive(ref_t rf, input bit random_ready, string tag);
    int errs = 0;
    int b = 0;
    // called on a falling edge; a beat transfers at the next rising edge
    while (b < int'(NB)) begin
      out_ready = random_ready ? (($urandom % 3) != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        for (int p = 0; p < int'(P); p++) if (out_bits[p] !== rf.dec[b * P + p]) errs++;
        if (b == 0) begin
          checks += 2;
          if (out_iters != ITW'(rf.iters)) begin
            failures++;
            $display("FAIL %s: iters %0d expected %0d", tag, out_iters, rf.iters);
          end
          if (out_conv != rf.conv) begin
            failures++;
            $display("FAIL %s: conv %0d expected %0d", tag, out_conv, rf.conv);
          end
        end
        checks++;
        if (out_last != (b == int'(NB) - 1)) begin
          failures++;
          $display("FAIL %s: out_last at beat %0d", tag, b);
        end
        b++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    n_blocks++;
    for (int i = 0; i < int'(N); i++) exp_bit_errors += rf.dec[i];
    checks++;
    if (errs != 0) begin
      failures++;
      $display("FAIL %s: %0d decision bits differ from reference", tag, errs);
    end
    if (rf.conv && rf.iters < int'(max_iter) && et_en) n_early++;
    if (rf.iters == int'(max_iter)) n_maxit++;
    if (rf.iters == 0) n_zero_it++;
    if (!et_en) n_noet++;
  endtask

  // one block on an idle decoder, with latency check
  task automatic run_one(ref_t rf, input int mi, input bit et, string tag);
    longint t0;
    max_iter = ITW'(mi);
    et_en    = et;
    rf.decode(mi, et);
    out_ready = 1;
    send(rf);                 // returns on the falling edge after the last beat
    t0 = cyc;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cyc - t0 != longint'(3 + rf.iters * int'(W + 2) + int'(W))) begin
      failures++;
      $display("FAIL %s: latency %0d cycles, expected %0d", tag, cyc - t0, 3 + rf.iters * (W + 2) + W);
    end
    receive(rf, 0, tag);
    $display("%s: iters=%0d conv=%0d latency=%0d", tag, rf.iters, rf.conv, cyc - t0);
  endtask

  ref_t rf;
  ref_t q3 [3];
  int tot_sat = 0, tot_neg = 0, tot_apn = 0, tot_app = 0;

  task automatic tally(ref_t r);
    tot_sat += r.n_sat; tot_neg += r.n_neg_r; tot_apn += r.n_apc_neg; tot_app += r.n_apc_pos;
  endtask

  initial begin
    for (int p = 0; p < int'(P); p++) in_llr[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    rf = new(); mk_noisy(rf, 6.0, 0.3);  run_one(rf, 20, 1, "low noise");     tally(rf);
    rf = new(); mk_noisy(rf, 6.0, 0.4);  run_one(rf, 20, 1, "medium noise");  tally(rf);
    rf = new(); mk_noisy(rf, 6.0, 0.5);  run_one(rf, 12, 1, "high noise");    tally(rf);
    rf = new(); mk_noisy(rf, 0.0, 1.0);
    for (int i = 0; i < int'(N); i++) rf.lc[i] = int'($urandom % 64) - 32;
    run_one(rf, 6, 1, "pure noise"); tally(rf);
    rf = new(); mk_noisy(rf, 24.0, 0.45); run_one(rf, 10, 1, "strong values"); tally(rf);
    rf = new(); for (int i = 0; i < int'(N); i++) rf.lc[i] = 5 + int'($urandom % 20);
    run_one(rf, 10, 1, "code word at input"); tally(rf);
    rf = new(); mk_noisy(rf, 6.0, 0.4);  run_one(rf, 7, 0, "no early termination"); tally(rf);
    rf = new(); mk_noisy(rf, 4.0, 1.1);  run_one(rf, 0, 1, "max_iter 0");    tally(rf);
    rf = new(); mk_noisy(rf, 2.0, 1.8);  run_one(rf, 31, 1, "max_iter 31");   tally(rf);

    // back-to-back blocks with output back-pressure
    max_iter = 5'd8; et_en = 1;
    for (int k = 0; k < 3; k++) begin
      q3[k] = new();
      mk_noisy(q3[k], 6.0, 0.3 + 0.05 * k);
      q3[k].decode(8, 1);
      tally(q3[k]);
    end
    fork
      begin
        for (int k = 0; k < 3; k++) send(q3[k]);
      end
      begin
        for (int k = 0; k < 3; k++) begin
          repeat (30) @(negedge clk);
          receive(q3[k], 1, $sformatf("stream %0d", k));
        end
      end
    join

    // every mechanism must have happened
    checks++; if (n_early   == 0) begin failures++; $display("FAIL: no early termination"); end
    checks++; if (n_maxit   == 0) begin failures++; $display("FAIL: no stop at max_iter"); end
    checks++; if (n_zero_it == 0) begin failures++; $display("FAIL: no zero-iteration block"); end
    checks++; if (n_noet    == 0) begin failures++; $display("FAIL: no run without early termination"); end
    checks++; if (n_hold    == 0) begin failures++; $display("FAIL: controller never held a block"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL: no load during decoding"); end
    checks++; if (tot_sat   == 0) begin failures++; $display("FAIL: no saturated message"); end
    checks++; if (tot_neg   == 0) begin failures++; $display("FAIL: no negative check-node message"); end
    checks++; if (tot_apn == 0 || tot_app == 0) begin failures++; $display("FAIL: a-priori correction not exercised"); end
    @(negedge clk);
    checks++;
    if (ber_frames != 48'(n_blocks) || ber_bit_errors != 48'(exp_bit_errors)) begin
      failures++;
      $display("FAIL error counter: %0d frames %0d bit errors, expected %0d / %0d", ber_frames, ber_bit_errors, n_blocks, exp_bit_errors);
    end
    checks++; if (n_urng_same > 2) begin failures++; $display("FAIL: random number generator repeats"); end
    $display("error counter: frames=%0d frame_errors=%0d bit_errors=%0d", ber_frames, ber_frame_errors, ber_bit_errors);
    $display("mechanisms: early=%0d maxit=%0d zero_it=%0d no_et=%0d hold_cycles=%0d overlap_beats=%0d sat=%0d neg_r=%0d apc-=%0d apc+=%0d",
             n_early, n_maxit, n_zero_it, n_noet, n_hold, n_overlap, tot_sat, tot_neg, tot_apn, tot_app);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
