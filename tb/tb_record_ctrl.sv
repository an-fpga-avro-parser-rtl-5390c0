// tb_record_ctrl: a record of three fields (int, 4-byte fixed, string) built
// from a record controller and the three parser blocks. Random records are
// sent back to back with random idle cycles. Each child must see its bytes
// and complete with the right value, and out_valid must come exactly with
// the record's last byte.
module tb_record_ctrl;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid = 1'b0;
  logic [7:0]   in_byte = '0;
  logic [2:0]   cv, cd;
  logic         ov;
  logic [31:0]  a, b, slen;
  logic [255:0] s;

  record_ctrl #(.NCHILD(3)) dut (.clk, .rst_n, .in_valid, .child_valid(cv), .child_done(cd), .out_valid(ov));
  int_parser #(.W(32)) c0 (.clk, .rst_n, .in_valid(cv[0]), .in_byte, .out_valid(cd[0]), .out_data(a));
  fixed_parser #(.N(4)) c1 (.clk, .rst_n, .in_valid(cv[1]), .in_byte, .out_valid(cd[1]), .out_data(b));
  string_parser c2 (.clk, .rst_n, .in_valid(cv[2]), .in_byte, .out_valid(cd[2]), .out_data(s), .out_len(slen));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int got_a, got_b;
  logic [255:0] got_s;
  always @(posedge clk) begin
    if (cd[0]) got_a <= a;
    if (cd[1]) got_b <= b;
    if (cd[2]) got_s <= s;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) begin
      int va, vb;
      string vs;
      bq_t q;
      va = int'(rand_long());
      vb = $urandom;
      vs = "";
      repeat ($urandom_range(6, 0)) vs = {vs, "x"};
      q.delete();
      put_long(q, va); put_fixed(q, 128'(vb), 4); put_string(q, vs);
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
        #1 check(ov == (i == q.size() - 1), $sformatf("out_valid at byte %0d of %0d", i, q.size()));
        check($countones(cv) == 1, "exactly one child active");
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(got_a == va, "field 0 value");
      check(got_b == vb, "field 1 value");
      check(got_s == str_val(vs), "field 2 value");
    end
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
