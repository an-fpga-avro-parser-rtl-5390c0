// tb_fixed_parser: sends random fields through fixed parser blocks of 1, 4
// 8 and 16 bytes (boolean, float, double, fixed(16)) with random idle cycles. out_valid
// must be 1 exactly with the field's last byte and out_data must hold the
// field with its first byte in bits [7:0].
module tb_fixed_parser;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]   in_valid = '0;
  logic [7:0]   in_byte = '0;
  logic [3:0]   ov;
  logic [63:0]  d8;
  logic [7:0]   d1;
  logic [31:0]  d4;
  logic [127:0] d16;

  fixed_parser #(.N(1))  u1  (.clk, .rst_n, .in_valid(in_valid[0]), .in_byte, .out_valid(ov[0]), .out_data(d1));
  fixed_parser #(.N(4))  u4  (.clk, .rst_n, .in_valid(in_valid[1]), .in_byte, .out_valid(ov[1]), .out_data(d4));
  fixed_parser #(.N(8))  u8  (.clk, .rst_n, .in_valid(in_valid[3]), .in_byte, .out_valid(ov[3]), .out_data(d8));
  fixed_parser #(.N(16)) u16 (.clk, .rst_n, .in_valid(in_valid[2]), .in_byte, .out_valid(ov[2]), .out_data(d16));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input int sel, input int n);
    logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
    bq_t q;
    put_fixed(q, v, n);
    foreach (q[i]) begin
      @(negedge clk);
      in_valid = '0;
      if ($urandom_range(3, 0) == 0) @(negedge clk);
      in_valid[sel] = 1'b1;
      in_byte = q[i];
      #1;
      check(ov[sel] == (i == n - 1), $sformatf("N=%0d out_valid at byte %0d", n, i));
      if (i == n - 1) begin
        case (sel)
          0: check(d1  == v[7:0],  "N=1 data");
          1: check(d4  == v[31:0], $sformatf("N=4 data %h exp %h", d4, v[31:0]));
          3: check(d8  == v[63:0], $sformatf("N=8 data %h exp %h", d8, v[63:0]));
          default: check(d16 == v, $sformatf("N=16 data %h exp %h", d16, v));
        endcase
      end
    end
    @(negedge clk);
    in_valid = '0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) begin
      send(0, 1);
      send(1, 4);
      send(2, 16);
      send(3, 8);
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
