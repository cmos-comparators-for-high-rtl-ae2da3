// Suffix-equality network of the look-behind comparator.
//
// For every bit position i (0 = least significant) it produces
// eq_o[i] = Equal[N-1] & ... & Equal[i+1], "all more significant bits are
// equal"; eq_o[N-1] is one (empty product). It works in two steps, as the
// look-behind comparator does:
//   1. One NAND/NOR tree ANDs all Equal bits (nand_nor_and_tree), keeping every
//      internal node.
//   2. The range i+1 .. N-1 is split into aligned power-of-two blocks, each of
//      which is exactly one node of that tree; a second small NAND/NOR tree per
//      bit ANDs the selected nodes (at most clog2(N) of them).
// Which nodes form each range is fixed at elaboration by node_index().
// all_o is the root of the first tree, the AND of every Equal bit.
//
// The circuit computes these signals while the dynamic output stage is
// precharging. Buffering of high-fanout nodes is an electrical matter and has
// no logical counterpart here. Purely combinational.
module eq_suffix_tree #(
  parameter int N = 8,
  localparam int K = (N > 1) ? $clog2(N) : 0,
  localparam int P = 1 << K
) (
  input  logic [N-1:0] equal_i,
  output logic [N-1:0] eq_o,
  output logic         all_o
);

  logic [K:0][P-1:0] nodes;

  nand_nor_and_tree #(.N(N)) u_tree (
    .in_i    (equal_i),
    .and_o   (all_o),
    .nodes_o (nodes)
  );

  // Index of the level-l node that covers part of the range [s0, P), or -1
  // when that level contributes no node. The range is walked from its low end:
  // whenever the running start has bit l set, the aligned 2^l block starting
  // there is taken and the start moves past it.
  function automatic int node_index(int s0, int l);
    int s;
    s = s0;
    for (int k = 0; k < l; k++) begin
      if (s[k]) s += (1 << k);
    end
    return s[l] ? (s >> l) : -1;
  endfunction

  if (K == 0) begin : g_single
    assign eq_o = 1'b1;
  end else begin : g_multi
    for (genvar i = 0; i < N; i++) begin : g_bit
      logic [K-1:0] sel;
      for (genvar l = 0; l < K; l++) begin : g_lvl
        localparam int IDX = node_index(i + 1, l);
        if (IDX >= 0) begin : g_take
          assign sel[l] = nodes[l][IDX];
        end else begin : g_skip
          assign sel[l] = 1'b1;
        end
      end
      nand_nor_and_tree #(.N(K)) u_and (
        .in_i    (sel),
        .and_o   (eq_o[i]),
        .nodes_o ()
      );
    end
  end

endmodule
