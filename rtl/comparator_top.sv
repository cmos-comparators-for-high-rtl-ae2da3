// 64-bit unsigned comparator unit: two pipelined hierarchical realizations.
//
// Both compare the same operand pair and report A<B, A=B or A>B two clock
// periods later, accepting one operand pair per cycle.
//   fast  : eight 8-bit look-behind comparators, then one 8-bit look-behind
//           comparator. This is the lowest-latency 64-bit arrangement.
//   small : sixteen 4-bit ripple (low-power) comparators, then one 16-bit
//           look-behind comparator. This is the smallest-area 64-bit
//           arrangement.
// Placing the two side by side is this design's choice, so that one unit
// exposes both comparator circuits; a user keeps whichever realization meets
// its cost target and drops the other. Ports are plain signals; results use
// cmp_pkg::cmp_result_t {lt, eq, gt}, of which exactly one bit is set.
module comparator_top
  import cmp_pkg::*;
#(
  parameter int WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic             fast_valid_o,
  output cmp_result_t      fast_res_o,
  output logic             small_valid_o,
  output cmp_result_t      small_res_o
);

  hier_comparator #(
    .WIDTH    (WIDTH),
    .S1_WIDTH (8),
    .S1_KIND  (CMP_HIGH_SPEED),
    .S2_KIND  (CMP_HIGH_SPEED)
  ) u_fast (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_i),
    .a_i     (a_i),
    .b_i     (b_i),
    .valid_o (fast_valid_o),
    .res_o   (fast_res_o)
  );

  hier_comparator #(
    .WIDTH    (WIDTH),
    .S1_WIDTH (4),
    .S1_KIND  (CMP_LOW_POWER),
    .S2_KIND  (CMP_HIGH_SPEED)
  ) u_small (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_i),
    .a_i     (a_i),
    .b_i     (b_i),
    .valid_o (small_valid_o),
    .res_o   (small_res_o)
  );

endmodule
