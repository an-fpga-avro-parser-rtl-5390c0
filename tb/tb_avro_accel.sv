// tb_avro_accel: the accelerator with the car schema (8 channels, 64-bit
// input). Phase 1 streams one car object per wire-format buffer, followed by
// an end-of-message marker, with the input always valid and the output always
// ready, and measures the input rate: 8 parallel one-byte-per-cycle channels
// must take close to one 64-bit beat per cycle. Phase 2 repeats with random
// idle input cycles, sparse beats and random output back-pressure, including
// a long output stop that must stall the input. In both phases the output
// must be exactly the tuples {horsepower, id} of the objects with id == 42,
// in input order. Phase 3 packs 2 to 4 objects into each buffer, with a
// short output stop; the order must still be kept.
module tb_avro_accel;
  import avro_tb_pkg::*;
  import avro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] s_tdata;
  logic [7:0]  s_tkeep;
  logic        s_tvalid, s_tready, m_tvalid, m_tready;
  logic [63:0] m_tdata;
  logic [31:0] n_objects, n_dropped, n_stalls, n_msg_end;

  avro_accel #(.SCHEMA(SCH_CAR)) dut (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .m_tdata, .m_tvalid, .m_tready,
    .n_objects, .n_dropped, .n_stalls, .n_msg_end
  );
  axis_port #(.OW(64)) port (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .m_tdata, .m_tvalid, .m_tready
  );

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_total = 0, n_kept = 0;

  task automatic make_stream(input int n, input bit holes);
    bq_t stream;
    stream.delete();
    for (int i = 0; i < n; i++) begin
      bq_t obj;
      int id, serial;
      logic [31:0] hp;
      string name;
      obj.delete();
      id = ($urandom_range(2, 0) == 0) ? 42 : $urandom_range(1000, 0);
      serial = $urandom;
      hp = $urandom;
      name = "";
      repeat ($urandom_range(10, 2)) name = {name, "c"};
      car_obj(obj, id, name, serial, hp);
      put_buffer(stream, obj);
      n_total++;
      if (id == 42) begin port.expq.push_back({hp, 32'(id)}); n_kept++; end
    end
    put_end(stream);
    pack_beats(port.beats, stream, holes);
  endtask

  task automatic make_multi(input int nbuf);
    bq_t stream;
    stream.delete();
    for (int i = 0; i < nbuf; i++) begin
      bq_t buf_q;
      buf_q.delete();
      for (int j = $urandom_range(4, 2); j > 0; j--) begin
        int id;
        logic [31:0] hp;
        id = ($urandom_range(2, 0) == 0) ? 42 : $urandom_range(1000, 0);
        hp = $urandom;
        car_obj(buf_q, id, "Passat", $urandom, hp);
        n_total++;
        if (id == 42) begin port.expq.push_back({hp, 32'(id)}); n_kept++; end
      end
      put_buffer(stream, buf_q);
    end
    put_end(stream);
    pack_beats(port.beats, stream, 1'b1);
  endtask

  task automatic drain();
    int t = 0;
    while ((port.beats.size() > 0 || port.expq.size() > 0) && t < 200000) begin
      @(negedge clk); t++;
    end
    repeat (600) @(negedge clk);
  endtask

  initial begin
    int beats0;
    real rate;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: full rate
    make_stream(400, 1'b0);
    beats0 = port.beats.size();
    drain();
    rate = real'(port.n_beats) / real'(port.last_beat - port.first_beat + 1);
    $display("input rate %0.3f beats/cycle over %0d beats", rate, beats0);
    check(rate >= 0.90, $sformatf("input rate %0.3f below 0.90 beat/cycle", rate));
    // phase 2: idle cycles, sparse beats, back-pressure
    port.in_idle_pct = 20;
    port.out_stop_pct = 30;
    make_stream(300, 1'b1);
    repeat (300) @(negedge clk);
    port.out_hold = 1'b1;
    repeat (3000) @(negedge clk);
    port.out_hold = 1'b0;
    drain();
    // phase 3: several objects per buffer
    make_multi(150);
    repeat (200) @(negedge clk);
    port.out_hold = 1'b1;
    repeat (1000) @(negedge clk);
    port.out_hold = 1'b0;
    drain();
    check(port.beats.size() == 0 && port.expq.size() == 0, "all input taken and all results seen");
    check(port.n_err == 0, "output tuples and order");
    check(port.n_out == n_kept, $sformatf("%0d outputs, %0d expected", port.n_out, n_kept));
    check(n_objects == 32'(n_total), $sformatf("objects %0d of %0d", n_objects, n_total));
    check(n_dropped == 32'(n_total - n_kept), "discarded objects counted");
    check(n_msg_end == 32'd3, "end-of-message markers");
    check(n_stalls > 0 && port.n_in_stall > 0, "input stalled under back-pressure");
    check(port.n_backpressure > 0, "output back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
