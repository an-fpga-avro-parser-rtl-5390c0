// tb_int_parser: checks the zigzag integer parser block at widths 64, 32 and
// 3 against a reference encoder. Random positive and negative values of every
// magnitude are sent with random idle cycles between bytes; out_valid must be
// 1 exactly with the last byte (zero latency) and the value must equal the
// original, truncated to each instance's width.
module tb_int_parser;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 1'b0;
  logic [7:0]  in_byte = '0;
  logic        ov64, ov32, ov3;
  logic [63:0] d64;
  logic [31:0] d32;
  logic [2:0]  d3;

  int_parser #(.W(64)) u64 (.clk, .rst_n, .in_valid, .in_byte, .out_valid(ov64), .out_data(d64));
  int_parser #(.W(32)) u32 (.clk, .rst_n, .in_valid, .in_byte, .out_valid(ov32), .out_data(d32));
  int_parser #(.W(3))  u3  (.clk, .rst_n, .in_valid, .in_byte, .out_valid(ov3),  .out_data(d3));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_value(input longint v);
    bq_t q;
    put_long(q, v);
    foreach (q[i]) begin
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom_range(3, 0) == 0) begin @(negedge clk); end
      in_valid = 1'b1;
      in_byte  = q[i];
      #1;
      if (i == q.size() - 1) begin
        check(ov64 && ov32 && ov3, $sformatf("out_valid missing at last byte of %0d", v));
        check(d64 == 64'(v), $sformatf("W=64 value %0d got %0d", v, $signed(d64)));
        check(d32 == v[31:0], $sformatf("W=32 value %0d got %h", v, d32));
        check(d3  == v[2:0],  $sformatf("W=3 value %0d got %h", v, d3));
      end else begin
        check(!ov64 && !ov32 && !ov3, $sformatf("early out_valid at byte %0d of %0d", i, v));
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  longint edge_vals[13] = '{0, 1, -1, 2, -2, 63, -64, 64, -65, 8191, -8192, 42, -12345};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (edge_vals[i]) send_value(edge_vals[i]);
    send_value(64'sh7fff_ffff_ffff_ffff);
    send_value(-64'sh8000_0000_0000_0000);
    repeat (400) send_value(rand_long());
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
