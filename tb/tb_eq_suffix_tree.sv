// Self-checking testbench for eq_suffix_tree.
//
// eq_o[i] must equal the AND of equal_i[N-1:i+1] (one for the top bit) and
// all_o the AND of every bit. Checked against a loop computed here:
// exhaustively for N = 8 (including the worked example 8'b11101000 whose
// expected EQ vector is 8'b11110000), exhaustively for N = 6 (padded tree),
// and randomly for N = 64.
module tb_eq_suffix_tree;

  int checks = 0;
  int failures = 0;

  logic [7:0]  e8;  logic [7:0]  q8;  logic a8;
  logic [5:0]  e6;  logic [5:0]  q6;  logic a6;
  logic [63:0] e64; logic [63:0] q64; logic a64;

  eq_suffix_tree #(.N(8))  u8  (.equal_i(e8),  .eq_o(q8),  .all_o(a8));
  eq_suffix_tree #(.N(6))  u6  (.equal_i(e6),  .eq_o(q6),  .all_o(a6));
  eq_suffix_tree #(.N(64)) u64 (.equal_i(e64), .eq_o(q64), .all_o(a64));

  function automatic logic [63:0] ref_suffix(logic [63:0] e, int n);
    logic [63:0] r = '0;
    logic run = 1'b1;
    for (int i = n - 1; i >= 0; i--) begin
      r[i] = run;
      run &= e[i];
    end
    return r;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: Equal = bits 8,7,6,4 (1-based) -> EQ high for bits 8..5.
    e8 = 8'b1110_1000;
    #1;
    check("example EQ", 64'(q8), 64'(8'b1111_0000));
    check("example all", 64'(a8), 64'(0));
    for (int v = 0; v < 256; v++) begin
      e8 = 8'(v);
      #1;
      check($sformatf("eq8 %b", e8), 64'(q8), ref_suffix(64'(e8), 8));
      check("all8", 64'(a8), 64'(&e8));
    end
    for (int v = 0; v < 64; v++) begin
      e6 = 6'(v);
      #1;
      check($sformatf("eq6 %b", e6), 64'(q6), ref_suffix(64'(e6), 6));
      check("all6", 64'(a6), 64'(&e6));
    end
    for (int t = 0; t < 3000; t++) begin
      // Mostly-ones words with a few zeros, so long equal runs occur.
      e64 = '1;
      repeat ($urandom_range(3)) e64[$urandom_range(63)] = 1'b0;
      #1;
      check("eq64", q64, ref_suffix(e64, 64));
      check("all64", 64'(a64), 64'(&e64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
