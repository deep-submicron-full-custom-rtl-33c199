// bcs_min_cell -- bit-serial, MSB-first two-operand minimum cell.
//
// Derived from the bit compare-and-swap (BCS) cell by dropping the maximum
// output. Two status registers carry the decision from one bit weight to the
// next: `found` says the operands already differed in a higher bit, `bmin`
// says that operand B was the smaller one at that point. While nothing is
// found the output bit is a AND b (it is 1 only if both operands are 1); once
// found, the output follows the smaller operand. The first differing bit sets
// found, and bmin = a (a = 1, b = 0 means B is smaller).
//
// Timing: `clr` (one cycle before the MSB) clears the status; then one bit per
// cycle with `en` high, MSB first. min_o is combinational in a, b and the
// status, so cells can be chained within one clock cycle as in the minimum
// search tree. Operands of equal value leave found at 0, which is harmless.
module bcs_min_cell (
  input  logic clk,
  input  logic en,
  input  logic clr,
  input  logic a,
  input  logic b,
  output logic min_o
);
  logic found_q, bmin_q;

  always_comb begin
    if (found_q) min_o = bmin_q ? b : a;
    else         min_o = a & b;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      found_q <= 1'b0;
      bmin_q  <= 1'b0;
    end else if (en && !found_q && (a != b)) begin
      found_q <= 1'b1;
      bmin_q  <= a;
    end
  end
endmodule
