// Ripple comparator for unsigned operands (the small, low-power design).
//
// One precharged output node with one pulldown stack per bit. Stack i can
// discharge when A_i > B_i (A_i & ~B_i). The stacks are chained from the most
// significant bit down through pass transistors: the transistor below stack i
// conducts when Equal_i = A_i XNOR B_i, so stack i-1 reaches the output only if
// every more significant bit is equal. The node therefore discharges exactly
// when A > B, and le_o (the node after precharge/evaluate) is high iff A <= B.
// Equality comes from a separate NAND/NOR tree over the Equal bits.
//
// The loop below walks the chain from the top bit down: "path" is whether the
// pass transistors above the current stack all conduct. This ripple is the
// long delay path of the circuit. In the circuit the XNOR outputs settle
// during precharge; here the module is purely combinational.
// Bit 0 is the least significant bit.
module lowpower_comparator #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic             le_o,  // A <= B (output node stays high)
  output logic             eq_o   // A = B
);

  localparam int K = (WIDTH > 1) ? $clog2(WIDTH) : 0;
  localparam int P = 1 << K;

  logic [WIDTH-1:0] equal;    // XNOR gates driving the pass transistors
  logic [WIDTH-1:0] gt_bits;  // pulldown stack conditions
  logic             discharge;
  logic [K:0][P-1:0] eq_nodes;

  assign equal   = ~(a_i ^ b_i);
  assign gt_bits = a_i & ~b_i;

  always_comb begin
    logic path;
    path      = 1'b1;
    discharge = 1'b0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      discharge = discharge | (path & gt_bits[i]);
      path      = path & equal[i];
    end
  end

  assign le_o = ~discharge;

  nand_nor_and_tree #(.N(WIDTH)) u_eq (
    .in_i    (equal),
    .and_o   (eq_o),
    .nodes_o (eq_nodes)
  );

endmodule
