// tb_string_parser: sends random strings of length 0..40 (length varint plus
// characters) back to back with random idle cycles. out_valid must come
// exactly with the last byte (with the length byte for an empty string);
// out_len must be the length and out_data the last min(len, 32) characters.
module tb_string_parser;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid = 1'b0;
  logic [7:0]   in_byte = '0;
  logic         ov;
  logic [255:0] od;
  logic [31:0]  ol;

  string_parser dut (.clk, .rst_n, .in_valid, .in_byte, .out_valid(ov), .out_data(od), .out_len(ol));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      int n;
      string s;
      bq_t q;
      n = ($urandom_range(4, 0) == 0) ? 0 : $urandom_range(40, 1);
      s = "";
      q.delete();
      for (int i = 0; i < n; i++) s = {s, string'(8'($urandom_range(126, 33)))};
      put_string(q, s);
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
        #1;
        check(ov == (i == q.size() - 1), $sformatf("len %0d: out_valid at byte %0d", n, i));
        if (i == q.size() - 1) begin
          check(ol == 32'(n), $sformatf("out_len %0d exp %0d", ol, n));
          check(od == str_val(s.substr((n > 32) ? n - 32 : 0, n - 1)) || n == 0 && od == '0,
                $sformatf("len %0d data %h", n, od));
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
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
