// One comparator of a hierarchical stage, with its output adapter.
//
// KIND selects the circuit: the look-behind comparator, which yields A<B and
// A=B, or the ripple comparator, which yields A<=B and A=B. The adapter turns
// either pair into the one-hot three-way result {lt, eq, gt} that the pipeline
// flip-flops hold and the next stage consumes. The adapter is this design's
// own choice of the glue logic that sits between stages. Combinational.
module cmp_core
  import cmp_pkg::*;
#(
  parameter int        WIDTH = 8,
  parameter cmp_kind_e KIND  = CMP_HIGH_SPEED
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output cmp_result_t      res_o
);

  if (KIND == CMP_HIGH_SPEED) begin : g_hs
    logic lt, eq;
    logic [WIDTH-1:0] lt_bits, equal, eq_bits;
    highspeed_comparator #(.WIDTH(WIDTH)) u_cmp (
      .a_i       (a_i),
      .b_i       (b_i),
      .lt_o      (lt),
      .eq_o      (eq),
      .lt_bits_o (lt_bits),
      .equal_o   (equal),
      .eq_bits_o (eq_bits)
    );
    assign res_o = '{lt: lt, eq: eq, gt: ~(lt | eq)};
  end else begin : g_lp
    logic le, eq;
    lowpower_comparator #(.WIDTH(WIDTH)) u_cmp (
      .a_i  (a_i),
      .b_i  (b_i),
      .le_o (le),
      .eq_o (eq)
    );
    assign res_o = '{lt: le & ~eq, eq: eq, gt: ~le};
  end

endmodule
