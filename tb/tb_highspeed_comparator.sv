// Self-checking testbench for highspeed_comparator.
//
// 1. The worked 8-bit example A = 11100010, B = 11110101: LT = 00010101,
//    Equal = 11101000, EQ = 11110000, and A < B.
// 2. Every 8-bit operand pair (65,536 pairs): lt_o and eq_o against the
//    built-in unsigned comparison, and the LT/Equal/EQ vectors against
//    their definitions.
// 3. Random 64-bit pairs, biased to share long equal prefixes.
module tb_highspeed_comparator;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8, lt8, eqv8, eqb8;
  logic        lt_o8, eq_o8;
  logic [63:0] a64, b64, lt64, eqv64, eqb64;
  logic        lt_o64, eq_o64;

  highspeed_comparator #(.WIDTH(8)) u8 (
    .a_i(a8), .b_i(b8), .lt_o(lt_o8), .eq_o(eq_o8),
    .lt_bits_o(lt8), .equal_o(eqv8), .eq_bits_o(eqb8)
  );
  highspeed_comparator #(.WIDTH(64)) u64 (
    .a_i(a64), .b_i(b64), .lt_o(lt_o64), .eq_o(eq_o64),
    .lt_bits_o(lt64), .equal_o(eqv64), .eq_bits_o(eqb64)
  );

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] ref_suffix(logic [63:0] a, logic [63:0] b, int n);
    logic [63:0] r = '0;
    logic run = 1'b1;
    for (int i = n - 1; i >= 0; i--) begin
      r[i] = run;
      run &= (a[i] == b[i]);
    end
    return r;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = 8'b1110_0010;
    b8 = 8'b1111_0101;
    #1;
    check("example LT", 64'(lt8), 64'(8'b0001_0101));
    check("example Equal", 64'(eqv8), 64'(8'b1110_1000));
    check("example EQ", 64'(eqb8), 64'(8'b1111_0000));
    check("example A<B", 64'(lt_o8), 64'(1));
    check("example A=B", 64'(eq_o8), 64'(0));

    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        check($sformatf("lt %0d %0d", x, y), 64'(lt_o8), 64'(x < y));
        check($sformatf("eq %0d %0d", x, y), 64'(eq_o8), 64'(x == y));
        check("LT bits", 64'(lt8), 64'(~a8 & b8));
        check("Equal bits", 64'(eqv8), 64'(8'(~(a8 ^ b8))));
        check("EQ bits", 64'(eqb8), ref_suffix(64'(a8), 64'(b8), 8));
      end
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
      check("lt64", 64'(lt_o64), 64'(a64 < b64));
      check("eq64", 64'(eq_o64), 64'(a64 == b64));
      check("EQ64 bits", eqb64, ref_suffix(a64, b64, 64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
