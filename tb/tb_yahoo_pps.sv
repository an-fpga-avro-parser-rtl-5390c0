// tb_yahoo_pps: sends random Yahoo ad events (event_type view/click/purchase,
// ad_type 0..4, random UUIDs, timestamps and IP strings) to the Yahoo PPS
// module with random idle cycles. Every object must give one res_valid two
// cycles after its last byte, res_keep = (event_type == view) and
// res_data = {event_time, ad_id}.
module tb_yahoo_pps;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid = 1'b0;
  logic [7:0]   in_byte = '0;
  logic         rv, rk;
  logic [191:0] rd;

  yahoo_pps dut (.clk, .rst_n, .in_valid, .in_byte, .res_valid(rv), .res_keep(rk), .res_data(rd));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit keep; logic [191:0] data; longint due; } exp_t;
  exp_t expq[$];
  int n_keep = 0, n_drop = 0;

  always @(posedge clk) begin
    if (rst_n && rv) begin
      check(expq.size() > 0, "unexpected result");
      if (expq.size() > 0) begin
        exp_t e;
        e = expq.pop_front();
        check(cyc == e.due, $sformatf("result at cycle %0d, expected %0d", cyc, e.due));
        check(rk == e.keep, "selection event_type == view");
        check(rd == e.data, $sformatf("tuple %h exp %h", rd, e.data));
        if (rk) n_keep++; else n_drop++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) begin
      logic [127:0] u, p, a;
      int at, et;
      longint t;
      string ip;
      bq_t q;
      exp_t e;
      u = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      a = {$urandom, $urandom, $urandom, $urandom};
      at = $urandom_range(4, 0);
      et = $urandom_range(2, 0);
      t = 64'd1_600_000_000_000 + longint'($urandom);
      ip = $sformatf("%0d.%0d.%0d.%0d", $urandom_range(255, 0), $urandom_range(255, 0),
                     $urandom_range(255, 0), $urandom_range(255, 0));
      q.delete();
      yahoo_obj(q, u, p, a, at, et, t, ip);
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(7, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
      end
      e.keep = (et == 0); e.data = {t, a}; e.due = cyc + 2;
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
