// tb_riot_workload: the RIOTBench SmartCity query run through the RIOT
// accelerator at its default size (8 channels, 64-bit input). Each object is
// one SenML message: a timestamp and a map of 8 measurements (the five queried
// sensors plus source, latitude and longitude, in random order), each a union
// of senml_fahrenheit and senml_percentage. Objects are generated, one per
// wire-format buffer, until NBYTES bytes of stream exist (the benchmark's data
// set is 1.5 MB; plusarg +nbytes=N sets the amount, default 1,500,000). About
// half of the objects carry one value outside its range. The stream is sent
// with the input always valid and the output always ready. Output tuples are
// checked in order against a reference evaluation of the query, and the input
// rate must reach 0.95 beat (7.6 bytes) per cycle.
module tb_riot_workload;
  import avro_tb_pkg::*;
  import avro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0]  s_tdata;
  logic [7:0]   s_tkeep;
  logic         s_tvalid, s_tready, m_tvalid, m_tready;
  logic [159:0] m_tdata;
  logic [31:0]  n_objects, n_dropped, n_stalls, n_msg_end;

  avro_accel #(.SCHEMA(SCH_RIOT)) dut (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .m_tdata, .m_tvalid, .m_tready,
    .n_objects, .n_dropped, .n_stalls, .n_msg_end
  );
  axis_port #(.OW(160)) port (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .m_tdata, .m_tvalid, .m_tready
  );

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // query ranges as IEEE singles: temperature -12.5..43.1, humidity 10.7..95.2,
  // light 1345..26282, dust 186.61..5188.21, airquality_raw 17..363
  logic [31:0] lo[5] = '{32'hc148_0000, 32'h412b_3333, 32'h44a8_2000, 32'h433a_9c29, 32'h4188_0000};
  logic [31:0] hi[5] = '{32'h422c_6666, 32'h42be_6666, 32'h46cd_5400, 32'h45a2_21ae, 32'h43b5_8000};
  string       names[5] = '{"temperature", "humidity", "light", "dust", "airquality_raw"};
  int          brn[5]   = '{0, 1, 1, 1, 1};

  typedef struct { string key; int br; logic [31:0] val; } ent_t;

  // a value inside [lo, hi]: the mantissa of a bound moved towards the other
  function automatic logic [31:0] inside_val(int k);
    return (hi[k][31] == 1'b0) ? (hi[k] - 32'($urandom_range(1000, 1))) : hi[k];
  endfunction

  initial begin
    int nbytes, nobj, nkept, t;
    bq_t stream;
    real rate;
    if (!$value$plusargs("nbytes=%d", nbytes)) nbytes = 1_500_000;
    nobj = 0; nkept = 0;
    while (stream.size() < nbytes) begin
      bq_t o;
      ent_t ents[$];
      string keys[$];
      int br[$];
      logic [31:0] vals[$], v[5];
      int bad;
      bit keep;
      o.delete(); ents.delete(); keys.delete(); br.delete(); vals.delete();
      bad = $urandom_range(9, 0);          // 0..4: that sensor is out of range
      keep = 1'b1;
      for (int k = 0; k < 5; k++) begin
        v[k] = inside_val(k);
        if (k == bad) v[k] = ($urandom_range(1, 0) == 1) ? 32'h4b00_0000 : 32'hc2c8_0000;
        ents.push_back('{names[k], brn[k], v[k]});
        keep &= (fkey(v[k]) >= fkey(lo[k])) && (fkey(v[k]) <= fkey(hi[k]));
      end
      ents.push_back('{"source", 1, $urandom});
      ents.push_back('{"latitude", 0, $urandom});
      ents.push_back('{"longitude", 0, $urandom});
      ents.shuffle();
      foreach (ents[j]) begin keys.push_back(ents[j].key); br.push_back(ents[j].br); vals.push_back(ents[j].val); end
      riot_obj(o, 64'd1_422_748_800_000 + longint'(nobj) * 1000, keys, br, vals, 1'b0);
      put_buffer(stream, o);
      nobj++;
      if (keep) begin port.expq.push_back({v[4], v[3], v[2], v[1], v[0]}); nkept++; end
    end
    put_end(stream);
    pack_beats(port.beats, stream, 1'b0);
    $display("RIOT stream: %0d bytes, %0d objects, %0d selected", stream.size(), nobj, nkept);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    t = 0;
    while ((port.beats.size() > 0 || port.expq.size() > 0) && t < 1_000_000) begin
      @(negedge clk); t++;
    end
    repeat (600) @(negedge clk);
    rate = real'(port.n_beats) / real'(port.last_beat - port.first_beat + 1);
    $display("input rate %0.3f beats/cycle = %0.2f bytes/cycle", rate, rate * 8.0);
    check(port.beats.size() == 0 && port.expq.size() == 0, "stream consumed and all selected objects seen");
    check(port.n_err == 0 && port.n_out == nkept, "projected tuples in order");
    check(n_objects == 32'(nobj), "all objects parsed");
    check(n_dropped == 32'(nobj - nkept), "all other objects discarded");
    check(rate >= 0.95, "input rate of at least 0.95 beat per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
