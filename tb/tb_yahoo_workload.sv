// tb_yahoo_workload: the Yahoo Streaming Benchmark run through the Yahoo
// accelerator at its default size (8 channels, 64-bit input). Ad events are
// generated, one per wire-format buffer, until NBYTES bytes of stream have
// been produced (the benchmark's data set is 3.6 MB; plusarg +nbytes=N sets
// the amount, default 3,600,000). The stream is sent with the input always
// valid and the output always ready. Every output tuple {event_time, ad_id}
// is checked in order against the view events, and the input rate must reach
// 0.95 beat (7.6 bytes) per cycle, i.e. the 8 one-byte-per-cycle channels
// must keep up with the 64-bit stream.
module tb_yahoo_workload;
  import avro_tb_pkg::*;
  import avro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0]  s_tdata;
  logic [7:0]   s_tkeep;
  logic         s_tvalid, s_tready, m_tvalid, m_tready;
  logic [191:0] m_tdata;
  logic [31:0]  n_objects, n_dropped, n_stalls, n_msg_end;

  avro_accel dut (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .m_tdata, .m_tvalid, .m_tready,
    .n_objects, .n_dropped, .n_stalls, .n_msg_end
  );
  axis_port #(.OW(192)) port (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .m_tdata, .m_tvalid, .m_tready
  );

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int nbytes, nobj, nkept, t;
    bq_t stream;
    real rate;
    if (!$value$plusargs("nbytes=%d", nbytes)) nbytes = 3_600_000;
    nobj = 0; nkept = 0;
    while (stream.size() < nbytes) begin
      bq_t o;
      logic [127:0] ad;
      int et;
      longint ts;
      o.delete();
      ad = {$urandom, $urandom, $urandom, $urandom};
      et = $urandom_range(2, 0);
      ts = 64'd1_670_000_000_000 + longint'(nobj) * 7;
      yahoo_obj(o, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
                ad, $urandom_range(4, 0), et, ts,
                $sformatf("%0d.%0d.%0d.%0d", $urandom_range(255, 1), $urandom_range(255, 0),
                          $urandom_range(255, 0), $urandom_range(255, 0)));
      put_buffer(stream, o);
      nobj++;
      if (et == 0) begin port.expq.push_back({ts, ad}); nkept++; end
    end
    put_end(stream);
    pack_beats(port.beats, stream, 1'b0);
    $display("Yahoo stream: %0d bytes, %0d objects, %0d views", stream.size(), nobj, nkept);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    t = 0;
    while ((port.beats.size() > 0 || port.expq.size() > 0) && t < 2_500_000) begin
      @(negedge clk); t++;
    end
    repeat (600) @(negedge clk);
    rate = real'(port.n_beats) / real'(port.last_beat - port.first_beat + 1);
    $display("input rate %0.3f beats/cycle = %0.2f bytes/cycle", rate, rate * 8.0);
    check(port.beats.size() == 0 && port.expq.size() == 0, "stream consumed and all views seen");
    check(port.n_err == 0 && port.n_out == nkept, "projected tuples in order");
    check(n_objects == 32'(nobj), "all objects parsed");
    check(n_dropped == 32'(nobj - nkept), "all other events discarded");
    check(rate >= 0.95, "input rate of at least 0.95 beat per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
