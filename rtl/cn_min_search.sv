// cn_min_search -- MSB-first minimum search of a bit-serial Min-Sum check node.
//
// For every input i it delivers, one bit per clock and immediately (in the
// same cycle as the input bit), the minimum of all *other* inputs' magnitudes,
// i.e. the check-node message magnitude |L(r_ij)| before normalisation.
//
// Structure (two-operand minimum cells, see bcs_min_cell):
//   tree:         level l = 1 .. L-1 holds the minima of aligned groups of 2^l
//                 inputs (min_0-1, min_2-3, ..., min_0-15, min_16-31 for
//                 DC = 32); DC-2 cells.
//   inverse tree: ext(l,g) = minimum of every input outside group (l,g).
//                 At level L-1 it is simply the other half; below it
//                 ext(l,g) = min(ext(l+1, g/2), tree(l, g^1)); 2*DC-4 cells.
//   out_bits[i] = ext(0,i).
// Internal minima are shared between outputs, so DC = 32 needs 90 cells, the
// count of the reference design. DC must be a power of two (>= 4).
//
// Timing: clr one cycle before the MSB, then one bit per cycle with en high.
// The path from in_bits to out_bits crosses 2*log2(DC)-2 cells.
module cn_min_search #(
  parameter int unsigned DC = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic          clr,
  input  logic [DC-1:0] in_bits,
  output logic [DC-1:0] out_bits
);
  localparam int unsigned L = $clog2(DC);

  // tree_b[l][g]: bit of the minimum of group g at level l (level 0 = inputs)
  // ext_b[l][g]:  bit of the minimum of everything outside group g at level l
  logic [DC-1:0] tree_b [L];
  logic [DC-1:0] ext_b  [L];

  initial begin
    assert (DC >= 4 && (1 << L) == DC) else $error("cn_min_search: DC must be a power of two >= 4");
  end

  assign tree_b[0] = in_bits;

  for (genvar l = 1; l < L; l++) begin : g_tree
    for (genvar g = 0; g < (DC >> l); g++) begin : g_cell
      bcs_min_cell u_min (
        .clk(clk), .en(en), .clr(clr),
        .a(tree_b[l-1][2*g]), .b(tree_b[l-1][2*g+1]),
        .min_o(tree_b[l][g])
      );
    end
    if ((DC >> l) < DC) begin : g_pad
      assign tree_b[l][DC-1:(DC >> l)] = '0;
    end
  end

  // Top of the inverse tree: each half sees the other half.
  assign ext_b[L-1][0] = tree_b[L-1][1];
  assign ext_b[L-1][1] = tree_b[L-1][0];
  if (L > 1) begin : g_pad_top
    if (DC > 2) begin : g_p
      assign ext_b[L-1][DC-1:2] = '0;
    end
  end

  for (genvar l = 0; l < L - 1; l++) begin : g_inv
    for (genvar g = 0; g < (DC >> l); g++) begin : g_cell
      bcs_min_cell u_min (
        .clk(clk), .en(en), .clr(clr),
        .a(ext_b[l+1][g/2]), .b(tree_b[l][g ^ 1]),
        .min_o(ext_b[l][g])
      );
    end
    if (l > 0) begin : g_pad
      assign ext_b[l][DC-1:(DC >> l)] = '0;
    end
  end

  assign out_bits = ext_b[0];
endmodule
