// tb_avro_top: end-to-end test of the whole design at its default sizes.
// All three accelerators (car example, Yahoo, RIOTBench) run at the same time,
// each fed a wire-format stream of buffers with end-of-message markers (one
// object per buffer, except that some car buffers hold two), sparse beats
// and idle cycles, and drained with random and long output stops. Every output tuple is compared, in order, with a reference
// evaluation of the query. The test also counts that each mechanism occurred:
// selection discards, input stalls from back-pressure, output back-pressure,
// end-of-message markers, all eight channels used, maps written as two
// blocks, sensors in a union branch the query does not project, sensors
// missing from the map, and buffers with two objects.
module tb_avro_top;
  import avro_tb_pkg::*;
  import avro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] car_s_tdata, yahoo_s_tdata, riot_s_tdata;
  logic [7:0]  car_s_tkeep, yahoo_s_tkeep, riot_s_tkeep;
  logic        car_s_tvalid, car_s_tready, car_m_tvalid, car_m_tready;
  logic        yahoo_s_tvalid, yahoo_s_tready, yahoo_m_tvalid, yahoo_m_tready;
  logic        riot_s_tvalid, riot_s_tready, riot_m_tvalid, riot_m_tready;
  logic [CAR_OUT_W-1:0]   car_m_tdata;
  logic [YAHOO_OUT_W-1:0] yahoo_m_tdata;
  logic [RIOT_OUT_W-1:0]  riot_m_tdata;
  logic [3:0][31:0] car_events, yahoo_events, riot_events;

  avro_top dut (.*);

  axis_port #(.OW(CAR_OUT_W)) p_car (
    .clk, .rst_n, .s_tdata(car_s_tdata), .s_tkeep(car_s_tkeep), .s_tvalid(car_s_tvalid),
    .s_tready(car_s_tready), .m_tdata(car_m_tdata), .m_tvalid(car_m_tvalid), .m_tready(car_m_tready));
  axis_port #(.OW(YAHOO_OUT_W)) p_yahoo (
    .clk, .rst_n, .s_tdata(yahoo_s_tdata), .s_tkeep(yahoo_s_tkeep), .s_tvalid(yahoo_s_tvalid),
    .s_tready(yahoo_s_tready), .m_tdata(yahoo_m_tdata), .m_tvalid(yahoo_m_tvalid), .m_tready(yahoo_m_tready));
  axis_port #(.OW(RIOT_OUT_W)) p_riot (
    .clk, .rst_n, .s_tdata(riot_s_tdata), .s_tkeep(riot_s_tkeep), .s_tvalid(riot_s_tvalid),
    .s_tready(riot_s_tready), .m_tdata(riot_m_tdata), .m_tvalid(riot_m_tvalid), .m_tready(riot_m_tready));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference query ranges of the SmartCity query
  logic [31:0] lo[5] = '{32'hc148_0000, 32'h412b_3333, 32'h44a8_2000, 32'h433a_9c29, 32'h4188_0000};
  logic [31:0] hi[5] = '{32'h422c_6666, 32'h42be_6666, 32'h46cd_5400, 32'h45a2_21ae, 32'h43b5_8000};
  string       names[5] = '{"temperature", "humidity", "light", "dust", "airquality_raw"};
  int          brn[5]   = '{0, 1, 1, 1, 1};

  typedef struct { string key; int br; logic [31:0] val; } ent_t;

  int n_obj[3] = '{0, 0, 0}, n_kept[3] = '{0, 0, 0}, n_ends = 0;
  int n_split = 0, n_wrong_branch = 0, n_missing = 0, n_multi = 0;

  function automatic void car_stream(int n);
    bq_t stream;
    for (int i = 0; i < n; i++) begin
      bq_t o;
      int id;
      logic [31:0] hp;
      id = ($urandom_range(1, 0) == 0) ? 42 : int'(rand_long());
      hp = $urandom;
      car_obj(o, id, "Golf", $urandom_range(9999, 0), hp);
      n_obj[0]++;
      if (id == 42) begin p_car.expq.push_back({hp, 32'(id)}); n_kept[0]++; end
      // every fourth buffer or so carries a second object
      if ($urandom_range(3, 0) == 0) begin
        id = ($urandom_range(1, 0) == 0) ? 42 : int'(rand_long());
        hp = $urandom;
        car_obj(o, id, "Polo", $urandom_range(9999, 0), hp);
        n_obj[0]++; n_multi++;
        if (id == 42) begin p_car.expq.push_back({hp, 32'(id)}); n_kept[0]++; end
      end
      put_buffer(stream, o);
    end
    put_end(stream); n_ends++;
    pack_beats(p_car.beats, stream, 1'b1);
  endfunction

  function automatic void yahoo_stream(int n);
    bq_t stream;
    for (int i = 0; i < n; i++) begin
      bq_t o;
      logic [127:0] ad;
      int et;
      longint t;
      ad = {$urandom, $urandom, $urandom, $urandom};
      et = $urandom_range(2, 0);
      t  = 64'd1_670_000_000_000 + longint'($urandom);
      yahoo_obj(o, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
                ad, $urandom_range(4, 0), et, t,
                $sformatf("10.%0d.%0d.%0d", $urandom_range(255, 0), $urandom_range(255, 0), $urandom_range(255, 0)));
      put_buffer(stream, o);
      n_obj[1]++;
      if (et == 0) begin p_yahoo.expq.push_back({t, ad}); n_kept[1]++; end
    end
    put_end(stream); n_ends++;
    pack_beats(p_yahoo.beats, stream, 1'b1);
  endfunction

  function automatic void riot_stream(int n);
    bq_t stream;
    for (int i = 0; i < n; i++) begin
      bq_t o;
      ent_t ents[$];
      string keys[$];
      int br[$];
      logic [31:0] vals[$], v[5];
      bit keep, split;
      keep = 1'b1;
      for (int k = 0; k < 5; k++) begin
        int r;
        bit ok;
        r = $urandom_range(39, 0);
        // inside the range most of the time, otherwise below it
        v[k] = (r < 3) ? lo[k] ^ 32'h0040_0000 : hi[k] & 32'hffc0_0000;
        if (r == 1) v[k] = 32'hc2c8_0000;    // -100.0
        ok = 1'b1;
        if (r == 3) begin ok = 1'b0; n_missing++; end
        else if (r == 4) begin ents.push_back('{names[k], 1 - brn[k], v[k]}); ok = 1'b0; n_wrong_branch++; end
        else ents.push_back('{names[k], brn[k], v[k]});
        keep &= ok && (fkey(v[k]) >= fkey(lo[k])) && (fkey(v[k]) <= fkey(hi[k]));
      end
      ents.push_back('{"source", 1, $urandom});
      ents.push_back('{"latitude", 0, $urandom});
      ents.push_back('{"longitude", 1, $urandom});
      ents.shuffle();
      foreach (ents[j]) begin keys.push_back(ents[j].key); br.push_back(ents[j].br); vals.push_back(ents[j].val); end
      split = $urandom_range(1, 0);
      n_split += split;
      riot_obj(o, 64'd1_422_748_800_000 + longint'($urandom), keys, br, vals, split);
      put_buffer(stream, o);
      n_obj[2]++;
      if (keep) begin p_riot.expq.push_back({v[4], v[3], v[2], v[1], v[0]}); n_kept[2]++; end
    end
    put_end(stream); n_ends++;
    pack_beats(p_riot.beats, stream, 1'b1);
  endfunction

  function automatic bit busy();
    return p_car.beats.size() > 0 || p_car.expq.size() > 0 ||
           p_yahoo.beats.size() > 0 || p_yahoo.expq.size() > 0 ||
           p_riot.beats.size() > 0 || p_riot.expq.size() > 0;
  endfunction

  initial begin
    int t;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      p_car.in_idle_pct = 10 * round;   p_car.out_stop_pct = 25;
      p_yahoo.in_idle_pct = 10 * round; p_yahoo.out_stop_pct = 25;
      p_riot.in_idle_pct = 10 * round;  p_riot.out_stop_pct = 25;
      car_stream(150);
      yahoo_stream(150);
      riot_stream(150);
      repeat (20) @(negedge clk);
      p_car.out_hold = 1'b1; p_yahoo.out_hold = 1'b1; p_riot.out_hold = 1'b1;
      repeat (2000) @(negedge clk);
      p_car.out_hold = 1'b0; p_yahoo.out_hold = 1'b0; p_riot.out_hold = 1'b0;
      t = 0;
      while (busy() && t < 400000) begin @(negedge clk); t++; end
      repeat (600) @(negedge clk);
      $display("round %0d: riot objects %0d of %0d, dropped %0d", round, riot_events[0], n_obj[2], riot_events[1]);
    end
    check(!busy(), "all streams consumed and all results seen");
    check(p_car.n_err == 0 && p_car.n_out == n_kept[0], "car outputs");
    check(p_yahoo.n_err == 0 && p_yahoo.n_out == n_kept[1], "yahoo outputs");
    check(p_riot.n_err == 0 && p_riot.n_out == n_kept[2], "riot outputs");
    $display("objects %0d %0d %0d exp %0d %0d %0d", car_events[0], yahoo_events[0], riot_events[0], n_obj[0], n_obj[1], n_obj[2]);
    check(car_events[0] == 32'(n_obj[0]) && yahoo_events[0] == 32'(n_obj[1]) && riot_events[0] == 32'(n_obj[2]),
          "objects parsed");
    check(car_events[1] == 32'(n_obj[0] - n_kept[0]) && yahoo_events[1] == 32'(n_obj[1] - n_kept[1]) &&
          riot_events[1] == 32'(n_obj[2] - n_kept[2]), "objects discarded");
    check(car_events[3] + yahoo_events[3] + riot_events[3] == 32'(n_ends), "end-of-message markers");
    // mechanisms
    $display("discards car/yahoo/riot: %0d %0d %0d", car_events[1], yahoo_events[1], riot_events[1]);
    $display("input stalls car/yahoo/riot: %0d %0d %0d", car_events[2], yahoo_events[2], riot_events[2]);
    $display("output back-pressure cycles: %0d %0d %0d", p_car.n_backpressure, p_yahoo.n_backpressure, p_riot.n_backpressure);
    $display("two-block maps %0d, wrong union branch %0d, missing sensors %0d", n_split, n_wrong_branch, n_missing);
    check(car_events[1] > 0 && yahoo_events[1] > 0 && riot_events[1] > 0, "selection discard occurred");
    check(car_events[2] > 0 && yahoo_events[2] > 0 && riot_events[2] > 0, "input stall occurred");
    check(p_car.n_backpressure > 0 && p_yahoo.n_backpressure > 0 && p_riot.n_backpressure > 0, "output back-pressure occurred");
    check(n_split > 0 && n_wrong_branch > 0 && n_missing > 0, "map blocks, union branches, missing keys occurred");
    $display("car buffers with two objects: %0d", n_multi);
    check(n_multi > 0, "buffers with several objects occurred");
    check(n_kept[2] > 0 && n_kept[1] > 0 && n_kept[0] > 0, "objects kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
