// Runs every evaluated two-stage arrangement of the hierarchical comparator.
//
// 64-bit arrangements (stage 1 / stage 2):
//   8 HS / 8 HS, 16 HS / 4 LP, 4 LP / 16 HS, 16 HS / 4 HS, 4 HS / 16 HS
// 128-bit arrangements:
//   16 HS / 8 HS, 8 HS / 16 HS, 16 HS / 8 LP, 8 LP / 16 HS
// (HS = look-behind comparator, LP = ripple comparator). All instances see
// the same operand stream (the 64-bit ones its low half); each result is
// checked against the built-in unsigned comparison two cycles after issue.
module tb_table_configs;
  import cmp_pkg::*;

  localparam int N64 = 5;
  localparam int N128 = 4;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  logic [127:0] a = '0, b = '0;

  logic        v64 [N64];
  cmp_result_t r64 [N64];
  logic        v128[N128];
  cmp_result_t r128[N128];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  `define CMP64(I, W1, K1, K2) \
    hier_comparator #(.WIDTH(64), .S1_WIDTH(W1), .S1_KIND(K1), .S2_KIND(K2)) u64_``I ( \
      .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .a_i(a[63:0]), .b_i(b[63:0]), \
      .valid_o(v64[I]), .res_o(r64[I]));
  `define CMP128(I, W1, K1, K2) \
    hier_comparator #(.WIDTH(128), .S1_WIDTH(W1), .S1_KIND(K1), .S2_KIND(K2)) u128_``I ( \
      .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .a_i(a), .b_i(b), \
      .valid_o(v128[I]), .res_o(r128[I]));

  `CMP64(0, 8,  CMP_HIGH_SPEED, CMP_HIGH_SPEED)
  `CMP64(1, 16, CMP_HIGH_SPEED, CMP_LOW_POWER)
  `CMP64(2, 4,  CMP_LOW_POWER,  CMP_HIGH_SPEED)
  `CMP64(3, 16, CMP_HIGH_SPEED, CMP_HIGH_SPEED)
  `CMP64(4, 4,  CMP_HIGH_SPEED, CMP_HIGH_SPEED)
  `CMP128(0, 16, CMP_HIGH_SPEED, CMP_HIGH_SPEED)
  `CMP128(1, 8,  CMP_HIGH_SPEED, CMP_HIGH_SPEED)
  `CMP128(2, 16, CMP_HIGH_SPEED, CMP_LOW_POWER)
  `CMP128(3, 8,  CMP_LOW_POWER,  CMP_HIGH_SPEED)

  `undef CMP64
  `undef CMP128

  typedef struct {
    cmp_result_t r64;
    cmp_result_t r128;
    int          issued;
  } expect_t;

  expect_t q[$];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && v64[0]) begin
      expect_t e;
      if (q.size() == 0) check("unexpected valid", 1, 0);
      else begin
        e = q.pop_front();
        check("latency", cycle - e.issued, 2);
        for (int i = 0; i < N64; i++) begin
          check($sformatf("64-bit arrangement %0d valid", i), 32'(v64[i]), 1);
          check($sformatf("64-bit arrangement %0d", i), 32'(r64[i]), 32'(e.r64));
        end
        for (int i = 0; i < N128; i++) begin
          check($sformatf("128-bit arrangement %0d valid", i), 32'(v128[i]), 1);
          check($sformatf("128-bit arrangement %0d", i), 32'(r128[i]), 32'(e.r128));
        end
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] m;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      #1;
      a = {$urandom, $urandom, $urandom, $urandom};
      b = a;
      case ($urandom_range(4))
        0: b = {$urandom, $urandom, $urandom, $urandom};
        1: b[$urandom_range(127)] ^= 1'b1;
        2: b[$urandom_range(63)] ^= 1'b1;
        3: begin
             m = {128{1'b1}} >> $urandom_range(127);
             b = (a & ~m) | ({$urandom, $urandom, $urandom, $urandom} & m);
           end
        default: ;
      endcase
      valid_i = 1'b1;
      q.push_back('{r64:  '{lt: a[63:0] < b[63:0], eq: a[63:0] == b[63:0], gt: a[63:0] > b[63:0]},
                    r128: '{lt: a < b, eq: a == b, gt: a > b},
                    issued: cycle});
    end
    @(negedge clk);
    #1 valid_i = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    check("queue drained", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
