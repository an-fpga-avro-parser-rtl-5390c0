// tb_union_ctrl: a union {int, fixed(4), string} built from a union
// controller and three parser blocks, plus out-of-range indexes that must
// end the union with the index byte. Only the selected branch may be active,
// sel must equal the index, out_valid must come exactly with the last byte,
// and the selected branch must parse the value correctly.
module tb_union_ctrl;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid = 1'b0;
  logic [7:0]   in_byte = '0;
  logic [2:0]   bv, bd;
  logic         ov;
  logic [1:0]   sel;
  logic [31:0]  a, b, slen;
  logic [255:0] s;

  union_ctrl #(.NBR(3)) dut (.clk, .rst_n, .in_valid, .in_byte, .br_valid(bv), .br_done(bd), .out_valid(ov), .sel);
  int_parser #(.W(32)) b0 (.clk, .rst_n, .in_valid(bv[0]), .in_byte, .out_valid(bd[0]), .out_data(a));
  fixed_parser #(.N(4)) b1 (.clk, .rst_n, .in_valid(bv[1]), .in_byte, .out_valid(bd[1]), .out_data(b));
  string_parser b2 (.clk, .rst_n, .in_valid(bv[2]), .in_byte, .out_valid(bd[2]), .out_data(s), .out_len(slen));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int got;
  logic [255:0] got_s;
  always @(posedge clk) begin
    if (bd[0]) got <= a;
    if (bd[1]) got <= b;
    if (bd[2]) got_s <= s;
  end

  int seen[4] = '{0, 0, 0, 0};
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      int idx, va;
      string vs;
      bq_t q;
      idx = $urandom_range(3, 0);
      seen[idx]++;
      va = $urandom;
      vs = (idx == 2) ? $sformatf("s%0d", va) : "";
      q.delete();
      put_long(q, idx);
      case (idx)
        0: put_long(q, va);
        1: put_fixed(q, 128'(va), 4);
        2: put_string(q, vs);
        default: ;
      endcase
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
        #1 check(ov == (i == q.size() - 1), $sformatf("idx %0d out_valid at byte %0d", idx, i));
        if (i > 0) check(bv == (3'b1 << idx), "only the selected branch is active");
        else       check(bv == '0, "no branch active during the index");
      end
      @(negedge clk);
      in_valid = 1'b0;
      if (idx < 3) check(sel == 2'(idx), "sel holds the index");
      if (idx < 2)  check(got == va, $sformatf("branch %0d value", idx));
      if (idx == 2) check(got_s == str_val(vs), "string branch value");
    end
    check(seen[3] > 0, "out-of-range index exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
