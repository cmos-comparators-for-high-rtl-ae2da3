// Self-checking testbench for lowpower_comparator.
//
// The output node must stay high exactly when A <= B, and eq_o must be
// high exactly when A = B. Checked against the built-in unsigned comparison
// for every 4-bit and every 8-bit operand pair, and for random 64-bit pairs
// biased to share long equal prefixes, so that the ripple through the pass
// transistors is exercised over its full length.
module tb_lowpower_comparator;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;   logic le4, eq4;
  logic [7:0]  a8, b8;   logic le8, eq8;
  logic [63:0] a64, b64; logic le64, eq64;

  lowpower_comparator #(.WIDTH(4))  u4  (.a_i(a4),  .b_i(b4),  .le_o(le4),  .eq_o(eq4));
  lowpower_comparator #(.WIDTH(8))  u8  (.a_i(a8),  .b_i(b8),  .le_o(le8),  .eq_o(eq8));
  lowpower_comparator #(.WIDTH(64)) u64 (.a_i(a64), .b_i(b64), .le_o(le64), .eq_o(eq64));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        check($sformatf("le4 %0d %0d", x, y), le4, x <= y);
        check($sformatf("eq4 %0d %0d", x, y), eq4, x == y);
      end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        check($sformatf("le8 %0d %0d", x, y), le8, x <= y);
        check($sformatf("eq8 %0d %0d", x, y), eq8, x == y);
      end
    for (int t = 0; t < 20000; t++) begin
      a64 = {$urandom, $urandom};
      b64 = a64;
      case (t % 4)
        0: b64 = {$urandom, $urandom};
        1: b64[$urandom_range(63)] ^= 1'b1;
        2: begin
             b64[$urandom_range(63)] ^= 1'b1;
             b64[$urandom_range(63)] ^= 1'b1;
           end
        default: ;
      endcase
      #1;
      check("le64", le64, a64 <= b64);
      check("eq64", eq64, a64 == b64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
