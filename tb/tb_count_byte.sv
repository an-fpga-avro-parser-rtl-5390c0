// tb_count_byte: loads the byte counter with random lengths 1..45 and sends
// that many random bytes. out_valid must come exactly with the last byte,
// out_len must equal the length, and out_data must hold the last
// min(len, 32) bytes with the last one in bits [7:0] and zeros above.
module tb_count_byte;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         load = 1'b0, in_valid = 1'b0;
  logic [31:0]  len = '0;
  logic [7:0]   in_byte = '0;
  logic         ov;
  logic [255:0] od;
  logic [31:0]  ol;

  count_byte #(.MAX_BYTES(32), .LW(32)) dut (
    .clk, .rst_n, .load, .len, .in_valid, .in_byte, .out_valid(ov), .out_data(od), .out_len(ol)
  );

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) begin
      int n;
      logic [255:0] exp;
      n = $urandom_range(45, 1);
      exp = '0;
      @(negedge clk);
      load = 1'b1; len = n; in_valid = 1'b0;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < n; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = b;
        exp = {exp[247:0], b};
        #1;
        check(ov == (i == n - 1), $sformatf("len %0d: out_valid at byte %0d", n, i));
        if (i == n - 1) begin
          check(od == exp, $sformatf("len %0d: data %h exp %h", n, od, exp));
          check(ol == 32'(n), "out_len");
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
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
