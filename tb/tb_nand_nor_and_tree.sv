// Self-checking testbench for nand_nor_and_tree.
//
// Checks the AND output and every true-polarity node against a plain
// reduction computed here, exhaustively for a 5-input tree (odd size, padded,
// three levels so the final inverter is exercised) and a 4-input tree (two
// levels, no final inverter), and with random vectors for a 64-input tree.
module tb_nand_nor_and_tree;

  int checks = 0;
  int failures = 0;

  logic [4:0]  in5;  logic and5;  logic [3:0][7:0]  nodes5;
  logic [3:0]  in4;  logic and4;  logic [2:0][3:0]  nodes4;
  logic [63:0] in64; logic and64; logic [6:0][63:0] nodes64;

  nand_nor_and_tree #(.N(5))  u5  (.in_i(in5),  .and_o(and5),  .nodes_o(nodes5));
  nand_nor_and_tree #(.N(4))  u4  (.in_i(in4),  .and_o(and4),  .nodes_o(nodes4));
  nand_nor_and_tree #(.N(64)) u64 (.in_i(in64), .and_o(and64), .nodes_o(nodes64));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // AND of bits [lo, lo+len) of v, bits at or above n counting as one.
  function automatic logic ref_and(logic [63:0] v, int n, int lo, int len);
    logic r = 1'b1;
    for (int k = lo; k < lo + len; k++) if (k < n) r &= v[k];
    return r;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      in5 = 5'(v);
      #1;
      check($sformatf("and5 %b", in5), and5, &in5);
      for (int l = 0; l <= 3; l++)
        for (int j = 0; j < (8 >> l); j++)
          check($sformatf("nodes5[%0d][%0d] in=%b", l, j, in5), nodes5[l][j],
                ref_and(64'(in5), 5, j << l, 1 << l));
    end
    for (int v = 0; v < 16; v++) begin
      in4 = 4'(v);
      #1;
      check($sformatf("and4 %b", in4), and4, &in4);
    end
    for (int t = 0; t < 2000; t++) begin
      in64 = {$urandom, $urandom};
      // Bias towards all-ones words so the AND is often true.
      if (t % 2 == 0) in64 = '1;
      if (t % 4 == 0) in64[$urandom_range(63)] = 1'b0;
      #1;
      check("and64", and64, &in64);
      for (int l = 0; l <= 6; l++)
        for (int j = 0; j < (64 >> l); j++)
          check("nodes64", nodes64[l][j], ref_and(in64, 64, j << l, 1 << l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
