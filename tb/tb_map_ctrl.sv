// tb_map_ctrl: a map<int> built from a map controller whose key_value item
// is a record controller over a string parser (key) and an int parser
// (value). Maps of 0..9 entries are sent, written as one block or as two
// blocks, each closed by a zero count. out_valid must come exactly with the
// map's last byte, and every item's value must be parsed correctly.
module tb_map_ctrl;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid = 1'b0;
  logic [7:0]   in_byte = '0;
  logic         kvv, kvd, ov;
  logic [1:0]   cv, cd;
  logic [255:0] key;
  logic [31:0]  klen, val;

  map_ctrl dut (.clk, .rst_n, .in_valid, .in_byte, .kv_valid(kvv), .kv_done(kvd), .out_valid(ov));
  record_ctrl #(.NCHILD(2)) kv (.clk, .rst_n, .in_valid(kvv), .child_valid(cv), .child_done(cd), .out_valid(kvd));
  string_parser k (.clk, .rst_n, .in_valid(cv[0]), .in_byte, .out_valid(cd[0]), .out_data(key), .out_len(klen));
  int_parser #(.W(32)) v (.clk, .rst_n, .in_valid(cv[1]), .in_byte, .out_valid(cd[1]), .out_data(val));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int vals[$];
  always @(posedge clk) if (cd[1]) vals.push_back(val);

  int n_split = 0, n_empty = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (150) begin
      int n, h;
      bit split;
      int ev[$];
      bq_t q;
      n = $urandom_range(9, 0);
      split = (n > 1) && $urandom_range(1, 0);
      h = split ? n / 2 : n;
      n_split += split; n_empty += (n == 0);
      q.delete(); ev.delete(); vals.delete();
      if (n > 0) put_long(q, h);
      for (int i = 0; i < n; i++) begin
        if (split && i == h) begin put_long(q, n - h); end
        put_string(q, $sformatf("k%0d", i));
        ev.push_back(int'(rand_long()));
        put_long(q, ev[i]);
      end
      put_long(q, 0);
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
        #1 check(ov == (i == q.size() - 1), $sformatf("n=%0d split=%0d out_valid at byte %0d of %0d", n, split, i, q.size()));
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(vals.size() == n, "item count");
      foreach (ev[i]) check(vals.size() > i && vals[i] == ev[i], "item value");
    end
    check(n_split > 0 && n_empty > 0, "split and empty maps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
