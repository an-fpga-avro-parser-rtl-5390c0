// tb_car_pps: sends random car objects (id 42 in about half of them) to the
// car PPS module, back to back with random idle cycles. For every object one
// res_valid must arrive exactly two cycles after its last byte, res_keep
// must be (id == 42), and res_data must be {horsepower, id}.
module tb_car_pps;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 1'b0;
  logic [7:0]  in_byte = '0;
  logic        rv, rk;
  logic [63:0] rd;

  car_pps dut (.clk, .rst_n, .in_valid, .in_byte, .res_valid(rv), .res_keep(rk), .res_data(rd));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit keep; logic [63:0] data; longint due; } exp_t;
  exp_t expq[$];
  int n_keep = 0, n_drop = 0;

  always @(posedge clk) begin
    if (rst_n && rv) begin
      check(expq.size() > 0, "unexpected result");
      if (expq.size() > 0) begin
        exp_t e;
        e = expq.pop_front();
        check(cyc == e.due, $sformatf("result at cycle %0d, expected %0d", cyc, e.due));
        check(rk == e.keep, "selection id == 42");
        check(rd == e.data, $sformatf("tuple %h exp %h", rd, e.data));
        if (rk) n_keep++; else n_drop++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      int id, serial;
      logic [31:0] hp;
      string name;
      bq_t q;
      exp_t e;
      id = $urandom_range(1, 0) ? 42 : int'(rand_long());
      serial = $urandom;
      hp = $urandom;
      name = "";
      repeat ($urandom_range(12, 0)) name = {name, "g"};
      q.delete();
      car_obj(q, id, name, serial, hp);
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(3, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
      end
      e.keep = (id == 42); e.data = {hp, 32'(id)}; e.due = cyc + 2;
      expq.push_back(e);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all objects produced a result");
    check(n_keep > 0 && n_drop > 0, "objects kept and discarded");
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
