// Self-checking testbench for hier_comparator.
//
// Two instances: the default (64 bits, 8-bit look-behind stage 1, 8-bit
// look-behind stage 2) and a 64-bit one with a 16-bit look-behind stage 1
// and a 4-bit ripple stage 2, so that both output adapters are used in stage
// 2. Random operand pairs, many sharing long equal prefixes, are issued with
// valid_i mostly high and sometimes low. For every accepted pair the
// expected result is queued with its issue cycle; each valid_o must carry
// the oldest queued result and arrive exactly two cycles after issue. Runs of
// back-to-back results show one result per cycle.
module tb_hier_comparator;
  import cmp_pkg::*;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  logic [63:0] a, b;
  logic v_a, v_b;
  cmp_result_t r_a, r_b;

  hier_comparator u_a (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .a_i(a), .b_i(b),
    .valid_o(v_a), .res_o(r_a)
  );
  hier_comparator #(
    .WIDTH(64), .S1_WIDTH(16), .S1_KIND(CMP_HIGH_SPEED), .S2_KIND(CMP_LOW_POWER)
  ) u_b (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .a_i(a), .b_i(b),
    .valid_o(v_b), .res_o(r_b)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    cmp_result_t res;
    int          issued;
  } expect_t;

  expect_t q_a[$];
  expect_t q_b[$];
  int back_to_back = 0;
  logic prev_v_a = 1'b0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  function automatic cmp_result_t ref_cmp(logic [63:0] x, logic [63:0] y);
    return '{lt: x < y, eq: x == y, gt: x > y};
  endfunction

  // Compare outputs against the queues just before each rising edge.
  always @(negedge clk) begin
    if (rst_n) begin
      expect_t e;
      if (v_a) begin
        if (q_a.size() == 0) begin
          check("u_a unexpected valid", 1, 0);
        end else begin
          e = q_a.pop_front();
          check("u_a result", 32'(r_a), 32'(e.res));
          check("u_a latency", cycle - e.issued, 2);
          if (prev_v_a) back_to_back++;
        end
      end
      prev_v_a = v_a;
      if (v_b) begin
        if (q_b.size() == 0) begin
          check("u_b unexpected valid", 1, 0);
        end else begin
          e = q_b.pop_front();
          check("u_b result", 32'(r_b), 32'(e.res));
          check("u_b latency", cycle - e.issued, 2);
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
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      #1;
      valid_i = ($urandom_range(9) != 0);
      a = {$urandom, $urandom};
      b = a;
      case ($urandom_range(4))
        0: b = {$urandom, $urandom};
        1: b[$urandom_range(63)] ^= 1'b1;
        2: begin
             b[$urandom_range(63)] ^= 1'b1;
             b[$urandom_range(63)] ^= 1'b1;
           end
        3: begin
             logic [63:0] m;
             m = {64{1'b1}} >> $urandom_range(63);
             b = (a & ~m) | ({$urandom, $urandom} & m);
           end
        default: ;
      endcase
      if (valid_i) begin
        // Presented during cycle "cycle"; the result must be seen in cycle+2.
        q_a.push_back('{res: ref_cmp(a, b), issued: cycle});
        q_b.push_back('{res: ref_cmp(a, b), issued: cycle});
      end
    end
    @(negedge clk);
    #1 valid_i = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    check("queue a drained", q_a.size(), 0);
    check("queue b drained", q_b.size(), 0);
    checks++;
    if (back_to_back < 1000) begin
      failures++;
      $display("FAIL too few back-to-back results: %0d", back_to_back);
    end
    $display("back-to-back results: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
