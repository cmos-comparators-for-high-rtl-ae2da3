// N-input AND built as a balanced tree of 2-input NAND and NOR gates.
//
// Level 0 holds the inputs, padded with ones up to the next power of two P.
// Odd levels are NAND gates: they take true-polarity signals and produce
// inverted ones. Even levels are NOR gates: they take the inverted signals and
// produce true ones again, since NOR(~x, ~y) = x & y. After K = clog2(N)
// levels the root equals the AND of all inputs, inverted once more if K is odd.
// This is the equality tree used by both comparators; the gate alternation is
// the structure described for them, the padding and final inverter are this
// design's way of handling any N.
//
// nodes_o exposes every node in true polarity: nodes_o[L][j] is the AND of
// in_i[j*2^L +: 2^L] (padding counts as one). The look-behind comparator
// builds its suffix-AND signals from these nodes.
//
// Purely combinational, no clock.
module nand_nor_and_tree #(
  parameter int N = 8,
  localparam int K = (N > 1) ? $clog2(N) : 0,
  localparam int P = 1 << K
) (
  input  logic             [N-1:0] in_i,
  output logic                     and_o,
  output logic [K:0][P-1:0]        nodes_o
);

  // Physical tree levels, in the polarity the gates actually produce.
  logic [K:0][P-1:0] lvl;

  always_comb begin
    lvl = '1;
    lvl[0][N-1:0] = in_i;
    for (int l = 1; l <= K; l++) begin
      for (int j = 0; j < P; j++) begin
        if (j < (P >> l)) begin
          if (l % 2 == 1) lvl[l][j] = ~(lvl[l-1][2*j] & lvl[l-1][2*j+1]);  // NAND
          else            lvl[l][j] = ~(lvl[l-1][2*j] | lvl[l-1][2*j+1]);  // NOR
        end else begin
          lvl[l][j] = 1'b0;  // no gate at this position
        end
      end
    end
  end

  // Odd levels carry inverted values; restore true polarity for the taps.
  always_comb begin
    for (int l = 0; l <= K; l++) begin
      nodes_o[l] = (l % 2 == 1) ? ~lvl[l] : lvl[l];
    end
  end

  assign and_o = (K % 2 == 1) ? ~lvl[K][0] : lvl[K][0];

endmodule
