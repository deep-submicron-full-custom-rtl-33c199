// tb_ber_analyzer -- feeds blocks of N = 512 bits (P = 64 per beat) with a
// random number of injected bit errors (often none), with random idle cycles
// between beats, and compares the bit error, frame error and frame counters
// with counts kept by the testbench. Also checks clear.
module tb_ber_analyzer;
  localparam int P = 64, CW = 48, NB = 8;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0, in_last = 0;
  logic [P-1:0] in_dec = '0, in_ref = '0;
  logic [CW-1:0] bit_errors, frame_errors, frames;
  int checks = 0, failures = 0;
  longint e_bits = 0, e_frames = 0, e_ferr = 0;

  ber_analyzer #(.P(P), .CW(CW)) dut (.clk, .rst_n, .clr, .in_valid, .in_dec, .in_ref, .in_last,
    .bit_errors, .frame_errors, .frames);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string tag);
    checks++;
    if (bit_errors != CW'(e_bits) || frame_errors != CW'(e_ferr) || frames != CW'(e_frames)) begin
      failures++;
      $display("FAIL %s: %0d/%0d/%0d expected %0d/%0d/%0d", tag, bit_errors, frame_errors, frames, e_bits, e_ferr, e_frames);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 300; blk++) begin
      int nerr, ferr;
      nerr = (($urandom % 3) == 0) ? int'($urandom % 6) : 0;
      ferr = 0;
      for (int b = 0; b < NB; b++) begin
        while (($urandom % 4) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_ref = {$urandom, $urandom};
        in_dec = in_ref;
        for (int e = 0; e < nerr; e++) if (($urandom % NB) == 0) in_dec[$urandom % P] ^= 1'b1;
        e_bits += $countones(in_dec ^ in_ref);
        if (in_dec != in_ref) ferr = 1;
        in_valid = 1;
        in_last = (b == NB - 1);
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      e_frames++;
      e_ferr += ferr;
      compare($sformatf("block %0d", blk));
      if (blk == 150) begin
        clr = 1;
        @(negedge clk);
        clr = 0;
        e_bits = 0; e_frames = 0; e_ferr = 0;
        compare("after clear");
      end
    end
    checks++;
    if (e_ferr == 0 || e_ferr == e_frames) begin failures++; $display("FAIL frame error mix not exercised"); end
    $display("errors: bits=%0d frames=%0d of %0d", e_bits, e_ferr, e_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
