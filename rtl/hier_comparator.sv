// Two-stage pipelined hierarchical comparator for wide unsigned operands.
//
// Stage 1 splits A and B into GROUPS = WIDTH / S1_WIDTH groups of S1_WIDTH
// bits and compares every group pair in parallel with one comparator each
// (S1_KIND). Flip-flops hold the group results. Stage 2 treats the groups as
// the digits of a GROUPS-bit comparison: group j supplies A'_j = gt_j and
// B'_j = lt_j, so an equal group gives A'_j = B'_j = 0 and a decided group a
// differing bit pair. One comparator of width GROUPS (S2_KIND) then finds the
// most significant decided group, which is the answer. Its result is
// registered again.
//
// Timing: operands presented with valid_i during cycle k are compared by
// stage 1 in cycle k and by stage 2 in cycle k+1; the result is on res_o with
// valid_o in cycle k+2 (latency two clock periods). A new operand pair can be
// accepted every cycle, so throughput is set by the slower of the
// two stage comparators. The defaults are the fastest 64-bit configuration:
// eight 8-bit look-behind comparators followed by one 8-bit look-behind
// comparator. The valid flags, the active-low asynchronous reset (valid flags
// only) and the load enables on the data flip-flops are this design's own.
module hier_comparator
  import cmp_pkg::*;
#(
  parameter int        WIDTH    = 64,
  parameter int        S1_WIDTH = 8,
  parameter cmp_kind_e S1_KIND  = CMP_HIGH_SPEED,
  parameter cmp_kind_e S2_KIND  = CMP_HIGH_SPEED,
  localparam int       GROUPS   = WIDTH / S1_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  output logic             valid_o,
  output cmp_result_t      res_o
);

  if (WIDTH % S1_WIDTH != 0 || GROUPS < 1) begin : g_bad_width
    $error("hier_comparator: WIDTH must be a multiple of S1_WIDTH");
  end

  // ---------------- stage 1: group comparators ----------------
  cmp_result_t [GROUPS-1:0] s1_res;
  cmp_result_t [GROUPS-1:0] s1_q;
  logic                     s1_valid_q;

  for (genvar g = 0; g < GROUPS; g++) begin : g_s1
    cmp_core #(.WIDTH(S1_WIDTH), .KIND(S1_KIND)) u_core (
      .a_i   (a_i[g*S1_WIDTH +: S1_WIDTH]),
      .b_i   (b_i[g*S1_WIDTH +: S1_WIDTH]),
      .res_o (s1_res[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid_q <= 1'b0;
    else        s1_valid_q <= valid_i;
  end

  always_ff @(posedge clk) begin
    if (valid_i) s1_q <= s1_res;
  end

  // ---------------- stage 2: compare the group outcomes ----------------
  logic [GROUPS-1:0] a2, b2;
  cmp_result_t       s2_res;

  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      a2[g] = s1_q[g].gt;
      b2[g] = s1_q[g].lt;
    end
  end

  cmp_core #(.WIDTH(GROUPS), .KIND(S2_KIND)) u_s2 (
    .a_i   (a2),
    .b_i   (b2),
    .res_o (s2_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= s1_valid_q;
  end

  always_ff @(posedge clk) begin
    if (s1_valid_q) res_o <= s2_res;
  end

  // A stage result is always exactly one of lt / eq / gt.
  always_ff @(posedge clk) begin
    if (rst_n && s1_valid_q) begin
      for (int g = 0; g < GROUPS; g++) begin
        a_s1_onehot : assert (cmp_valid_result(s1_q[g]))
          else $error("stage-1 group %0d result is not one-hot", g);
      end
    end
    if (rst_n && valid_o) begin
      a_out_onehot : assert (cmp_valid_result(res_o))
        else $error("comparator result is not one-hot");
    end
  end

endmodule
