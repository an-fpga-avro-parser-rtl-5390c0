// tb_riot_pps: sends SenML objects to the RIOTBench PPS module: a timestamp
// and a map of the five queried sensors plus three other entries (source,
// latitude, longitude), in random order, as one or two map blocks. Sensor
// values are drawn inside or just outside the query ranges, and now and then
// a sensor comes in the wrong union branch or is left out. Every object must
// give one res_valid two cycles after its last byte; res_keep must follow a
// reference evaluation of the ten comparisons, and when kept res_data must
// hold the five values.
module tb_riot_pps;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid = 1'b0;
  logic [7:0]   in_byte = '0;
  logic         rv, rk;
  logic [159:0] rd;

  riot_pps dut (.clk, .rst_n, .in_valid, .in_byte, .res_valid(rv), .res_keep(rk), .res_data(rd));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // query ranges (SmartCity), as IEEE singles: temperature, humidity, light, dust, airquality_raw
  logic [31:0] lo[5] = '{32'hc148_0000, 32'h412b_3333, 32'h44a8_2000, 32'h433a_9c29, 32'h4188_0000};
  logic [31:0] hi[5] = '{32'h422c_6666, 32'h42be_6666, 32'h46cd_5400, 32'h45a2_21ae, 32'h43b5_8000};
  // an inside value per sensor and an outside one (both sides)
  logic [31:0] in_v[5]  = '{32'h41a0_0000, 32'h4248_0000, 32'h453b_8000, 32'h447a_0000, 32'h42c8_0000};
  logic [31:0] out_v[5] = '{32'h4248_0000, 32'h3f00_0000, 32'h4700_0000, 32'h42c8_0000, 32'h4480_0000};
  string       names[5] = '{"temperature", "humidity", "light", "dust", "airquality_raw"};
  int          brn[5]   = '{0, 1, 1, 1, 1};

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { bit keep; logic [159:0] data; longint due; } exp_t;
  exp_t expq[$];
  int n_keep = 0, n_drop = 0;

  always @(posedge clk) begin
    if (rst_n && rv) begin
      check(expq.size() > 0, "unexpected result");
      if (expq.size() > 0) begin
        exp_t e;
        e = expq.pop_front();
        check(cyc == e.due, $sformatf("result at cycle %0d, expected %0d", cyc, e.due));
        check(rk == e.keep, "selection");
        if (e.keep) check(rd == e.data, $sformatf("tuple %h exp %h", rd, e.data));
        if (rk) n_keep++; else n_drop++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) begin
      typedef struct { string key; int br; logic [31:0] val; } ent_t;
      ent_t ents[$];
      string keys[$];
      int br[$];
      logic [31:0] vals[$];
      logic [31:0] v[5];
      bit keep;
      bq_t q;
      exp_t e;
      ents.delete(); keys.delete(); br.delete(); vals.delete(); q.delete();
      keep = 1'b1;
      for (int k = 0; k < 5; k++) begin
        int r;
        bit ok;
        r = $urandom_range(19, 0);
        v[k] = (r < 2) ? out_v[k] : in_v[k];
        if (r == 2) v[k] = (k == 0) ? 32'hc248_0000 : 32'hbf80_0000;  // -50.0 / -1.0, below
        ok = 1'b1;
        if (r == 3) ok = 1'b0;                                          // left out
        else if (r == 4) begin ents.push_back('{names[k], 1 - brn[k], v[k]}); ok = 1'b0; end
        else ents.push_back('{names[k], brn[k], v[k]});
        keep &= ok && (fkey(v[k]) >= fkey(lo[k])) && (fkey(v[k]) <= fkey(hi[k]));
      end
      ents.push_back('{"source", 1, $urandom});
      ents.push_back('{"latitude", 0, $urandom});
      ents.push_back('{"longitude", 1, $urandom});
      ents.shuffle();
      foreach (ents[i]) begin
        keys.push_back(ents[i].key); br.push_back(ents[i].br); vals.push_back(ents[i].val);
      end
      riot_obj(q, longint'($urandom), keys, br, vals, $urandom_range(1, 0));
      foreach (q[i]) begin
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom_range(7, 0) == 0) @(negedge clk);
        in_valid = 1'b1; in_byte = q[i];
      end
      e.keep = keep; e.data = {v[4], v[3], v[2], v[1], v[0]}; e.due = cyc + 2;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
