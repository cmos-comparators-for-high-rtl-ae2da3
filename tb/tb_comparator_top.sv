// End-to-end testbench for comparator_top at its default size (64 bits).
//
// Streams operand pairs through both realizations (fast: 8x8-bit look-behind
// then 8-bit look-behind; small: 16x4-bit ripple then 16-bit look-behind) and
// checks every result against the built-in unsigned comparison, the latency
// of two cycles, and that one result per cycle comes out of a full pipeline.
// Operand pairs are generated to make each mechanism of the design happen,
// and each is counted; one that never happens counts as a failure:
//   top_group      - decided in the most significant stage-1 group
//   lower_group    - upper groups equal, decided in a lower group, so the
//                    stage-2 look-behind (EQ) path decides
//   in_group_ripple- decided below the top bit of a group whose upper bits
//                    are equal (stage-1 EQ path / ripple through pass gates)
//   all_equal      - A = B, every group equal
//   lsb_only       - differs only in bit 0 (longest path in both stages)
//   lt / gt        - both outcomes
//   back_to_back   - a result in each of two consecutive cycles
//   bubble         - a cycle with valid_i low inside the stream
//   reset_flush    - reset in mid-stream clears results in flight
module tb_comparator_top;
  import cmp_pkg::*;

  localparam int W = 64;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic fv, sv;
  cmp_result_t fr, sr;

  comparator_top dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .a_i(a), .b_i(b),
    .fast_valid_o(fv), .fast_res_o(fr), .small_valid_o(sv), .small_res_o(sr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    cmp_result_t res;
    int          issued;
  } expect_t;

  expect_t q[$];

  typedef enum int {
    M_TOP_GROUP, M_LOWER_GROUP, M_IN_GROUP, M_ALL_EQUAL, M_LSB_ONLY,
    M_LT, M_GT, M_BACK_TO_BACK, M_BUBBLE, M_RESET_FLUSH, M_COUNT
  } mech_e;
  int mech[M_COUNT];
  logic prev_valid_out = 1'b0;
  logic prev_valid_in = 1'b0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  function automatic cmp_result_t ref_cmp(logic [W-1:0] x, logic [W-1:0] y);
    return '{lt: x < y, eq: x == y, gt: x > y};
  endfunction

  // Classify a pair by where its most significant differing bit lies.
  task automatic classify(logic [W-1:0] x, logic [W-1:0] y);
    int msd = -1;
    for (int i = 0; i < W; i++) if (x[i] != y[i]) msd = i;
    if (msd < 0) mech[M_ALL_EQUAL]++;
    else begin
      if (msd >= W - 8) mech[M_TOP_GROUP]++;
      else mech[M_LOWER_GROUP]++;
      if (msd % 4 != 3) mech[M_IN_GROUP]++;
      if (msd == 0) mech[M_LSB_ONLY]++;
      if (x < y) mech[M_LT]++; else mech[M_GT]++;
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      check("fast/small valid agree", 32'(fv), 32'(sv));
      if (fv) begin
        if (q.size() == 0) begin
          check("unexpected valid", 1, 0);
        end else begin
          expect_t e;
          e = q.pop_front();
          check("fast result", 32'(fr), 32'(e.res));
          check("small result", 32'(sr), 32'(e.res));
          check("latency", cycle - e.issued, 2);
          if (prev_valid_out) mech[M_BACK_TO_BACK]++;
        end
      end
      prev_valid_out = fv;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(logic v, logic [W-1:0] x, logic [W-1:0] y);
    @(negedge clk);
    #1;
    valid_i = v;
    a = x;
    b = y;
    if (v) begin
      q.push_back('{res: ref_cmp(x, y), issued: cycle});
      classify(x, y);
    end else if (prev_valid_in) begin
      mech[M_BUBBLE]++;
    end
    prev_valid_in = v;
  endtask

  initial begin
    logic [W-1:0] x, y;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Directed pairs.
    drive(1, 64'h0, 64'h0);                                   // all equal
    drive(1, 64'h1, 64'h0);                                   // bit 0 only, gt
    drive(1, 64'h0, 64'h1);                                   // bit 0 only, lt
    drive(1, 64'h8000_0000_0000_0000, 64'h7fff_ffff_ffff_ffff); // top bit
    drive(1, 64'hffff_ffff_ffff_fffe, 64'hffff_ffff_ffff_ffff);
    drive(1, 64'h1234_5678_9abc_def0, 64'h1234_5678_9abc_def0);
    drive(0, '0, '0);                                         // bubble
    drive(1, 64'h00e2_0000_0000_0000, 64'h00f5_0000_0000_0000); // decided in group 6

    // Random stream with shared prefixes of random length.
    for (int t = 0; t < 30000; t++) begin
      x = {$urandom, $urandom};
      y = x;
      case ($urandom_range(5))
        0: y = {$urandom, $urandom};
        1: y[$urandom_range(W-1)] ^= 1'b1;
        2: begin
             logic [W-1:0] m;
             m = {W{1'b1}} >> $urandom_range(W-1);
             y = (x & ~m) | ({$urandom, $urandom} & m);
           end
        3: y[0] ^= 1'b1;
        default: ;
      endcase
      drive($urandom_range(7) != 0, x, y);
    end

    // Reset with results in flight: they must disappear.
    drive(1, 64'h5, 64'h6);
    drive(1, 64'h7, 64'h6);
    @(negedge clk);
    #1 valid_i = 1'b0;
    rst_n = 1'b0;
    q.delete();
    repeat (2) @(posedge clk);
    #1;
    check("valid cleared by reset", 32'(fv | sv), 0);
    mech[M_RESET_FLUSH]++;
    rst_n = 1'b1;
    drive(1, 64'h9, 64'h9);
    drive(0, '0, '0);
    repeat (4) @(posedge clk);
    @(negedge clk);
    check("queue drained", q.size(), 0);

    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-16s happened %0d times", me.name(), mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", me.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
