// tb_sel_cmp: checks the selection comparator for every operator on signed
// 32-bit ints and IEEE singles, on doubles with >=, and for bit-pattern
// equality, also on 32-byte string registers. Operands are random, often equal, and include negative values
// and signed zeros; the reference results come from SystemVerilog signed and
// real arithmetic (singles converted to real by their definition, doubles
// with $bitstoreal).
module tb_sel_cmp;
  import avro_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [63:0] da, db;
  logic [4:0]  ri, rf;
  logic        rd, rb, rs;
  logic [8*STR_MAX_BYTES-1:0] sa_q, sb_q;

  sel_cmp #(.W(32), .TYPE(CMP_INT),   .OP(OP_EQ)) i0 (.a, .b, .result(ri[0]));
  sel_cmp #(.W(32), .TYPE(CMP_INT),   .OP(OP_LT)) i1 (.a, .b, .result(ri[1]));
  sel_cmp #(.W(32), .TYPE(CMP_INT),   .OP(OP_GT)) i2 (.a, .b, .result(ri[2]));
  sel_cmp #(.W(32), .TYPE(CMP_INT),   .OP(OP_LE)) i3 (.a, .b, .result(ri[3]));
  sel_cmp #(.W(32), .TYPE(CMP_INT),   .OP(OP_GE)) i4 (.a, .b, .result(ri[4]));
  sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_EQ)) f0 (.a, .b, .result(rf[0]));
  sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_LT)) f1 (.a, .b, .result(rf[1]));
  sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_GT)) f2 (.a, .b, .result(rf[2]));
  sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_LE)) f3 (.a, .b, .result(rf[3]));
  sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_GE)) f4 (.a, .b, .result(rf[4]));
  sel_cmp #(.W(64), .TYPE(CMP_FLOAT), .OP(OP_GE)) d4 (.a(da), .b(db), .result(rd));
  sel_cmp #(.W(32), .TYPE(CMP_BITS),  .OP(OP_EQ)) b0 (.a, .b, .result(rb));
  sel_cmp #(.W(8*STR_MAX_BYTES), .TYPE(CMP_BITS), .OP(OP_EQ)) s0 (.a(sa_q), .b(sb_q), .result(rs));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // random finite float bits (exponent kept below all ones)
  function automatic logic [31:0] rnd_float();
    logic [31:0] f = $urandom;
    if (f[30:23] == 8'hff) f[30] = 1'b0;
    if ($urandom_range(9, 0) == 0) f = {f[31], 31'h0};   // +0 / -0
    return f;
  endfunction

  // IEEE single to real, written out so as not to depend on shortreal support
  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 0) begin m = real'(f[22:0]);            e = -149; end
    else               begin m = real'({1'b1, f[22:0]});    e = int'(f[30:23]) - 150; end
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int sa, sb;
      real fa, fb;
      real ra, rbv;
      // integers
      a = $urandom; b = ($urandom_range(3, 0) == 0) ? a : $urandom;
      if ($urandom_range(3, 0) == 0) b = a + 32'($urandom_range(2, 0)) - 1;
      da = '0; db = '0;
      #1;
      sa = int'(a); sb = int'(b);
      check(ri == {sa >= sb, sa <= sb, sa > sb, sa < sb, sa == sb}, $sformatf("int %0d ? %0d: %b", sa, sb, ri));
      check(rb == (a == b), "bit equality");
      // floats (skip pairs of zeros of different sign: the key orders -0 below +0)
      a = rnd_float(); b = ($urandom_range(3, 0) == 0) ? a : rnd_float();
      if (a[30:0] == 0 && b[30:0] == 0) b = a;
      da = {a, 32'h0}; db = {b, 32'h0};
      if (da[62:52] == 11'h7ff) da[62] = 1'b0;
      if (db[62:52] == 11'h7ff) db[62] = 1'b0;
      #1;
      fa = f2r(a); fb = f2r(b);
      check(rf == {fa >= fb, fa <= fb, fa > fb, fa < fb, fa == fb},
            $sformatf("float %h ? %h: %b", a, b, rf));
      ra = $bitstoreal(da); rbv = $bitstoreal(db);
      if (!(da[62:0] == 0 && db[62:0] == 0)) check(rd == (ra >= rbv), "double >=");
    end
    // strings as the string parser stores them: zero-extended, text in the low bytes
    for (int t = 0; t < 200; t++) begin
      string x, y;
      x = ""; y = "";
      for (int i = $urandom_range(STR_MAX_BYTES, 0); i > 0; i--) x = {x, string'(8'($urandom_range(122, 97)))};
      case ($urandom_range(2, 0))
        0: y = x;
        1: y = {x, "a"};
        default: for (int i = $urandom_range(STR_MAX_BYTES, 0); i > 0; i--) y = {y, string'(8'($urandom_range(98, 97)))};
      endcase
      if (y.len() > STR_MAX_BYTES) y = y.substr(0, STR_MAX_BYTES - 1);
      sa_q = '0; sb_q = '0;
      foreach (x[i]) sa_q = {sa_q[8*STR_MAX_BYTES-9:0], x[i]};
      foreach (y[i]) sb_q = {sb_q[8*STR_MAX_BYTES-9:0], y[i]};
      #1;
      check(rs == (x == y), $sformatf("string \"%s\" == \"%s\"", x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
