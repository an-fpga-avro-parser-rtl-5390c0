// tb_wire_splitter: feeds a wire-format stream of buffers of 1..40 bytes (and
// now and then 256..700 bytes, so that all length bytes matter) and
// zero-length end markers, packed into 64-bit beats with random empty lanes,
// random s_tvalid gaps and random fifo_ready. The bytes flagged for each
// channel must be exactly the buffers that the round-robin order assigns to
// it, in order; msg_end must count the end markers, and s_tready must follow
// fifo_ready. lane_last must flag exactly the last byte of each buffer.
module tb_wire_splitter;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0]      s_tdata = '0;
  logic [7:0]       s_tkeep = '0;
  logic             s_tvalid = 1'b0, fifo_ready = 1'b0;
  logic             s_tready;
  logic [1:0]       msg_end;
  logic [7:0][7:0]  lane_we;
  logic [7:0]       lane_last;
  logic [2:0]       cur_ch;

  wire_splitter dut (.clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready, .fifo_ready,
                     .lane_we, .lane_last, .msg_end, .cur_ch);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  bq_t   exp_ch[8], got_ch[8];
  bit    exp_last[8][$], got_last[8][$];
  beat_t beats[$];
  int    n_end = 0, got_end = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      check(s_tready == fifo_ready, "s_tready follows fifo_ready");
      got_end += msg_end;
      for (int c = 0; c < 8; c++)
        for (int l = 0; l < 8; l++)
          if (lane_we[c][l]) begin
            got_ch[c].push_back(s_tdata[8*l +: 8]);
            got_last[c].push_back(lane_last[l]);
            if (!(s_tvalid && s_tready)) check(0, "lane_we without handshake");
          end
      for (int l = 0; l < 8; l++) begin
        bit any_we;
        any_we = 1'b0;
        for (int c = 0; c < 8; c++) any_we |= lane_we[c][l];
        if (lane_last[l] && !any_we) check(0, "lane_last on a lane not written");
      end
    end
  end

  initial begin
    bq_t stream;
    int ch;
    ch = 0;
    stream.delete();
    for (int b = 0; b < 300; b++) begin
      if ($urandom_range(9, 0) == 0) begin
        put_end(stream);
        n_end++;
      end else begin
        bq_t d;
        d.delete();
        repeat (($urandom_range(9, 0) == 0) ? $urandom_range(700, 256) : $urandom_range(40, 1))
          d.push_back(8'($urandom));
        put_buffer(stream, d);
        foreach (d[i]) begin
          exp_ch[ch].push_back(d[i]);
          exp_last[ch].push_back(i == d.size() - 1);
        end
        ch = (ch + 1) % 8;
      end
    end
    pack_beats(beats, stream, 1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (beats.size() > 0) begin
      @(negedge clk);
      fifo_ready = ($urandom_range(3, 0) != 0);
      s_tvalid   = ($urandom_range(4, 0) != 0);
      s_tdata    = beats[0].data;
      s_tkeep    = beats[0].keep;
      @(posedge clk);
      if (s_tvalid && s_tready) void'(beats.pop_front());
    end
    @(negedge clk);
    s_tvalid = 1'b0;
    repeat (3) @(negedge clk);
    for (int c = 0; c < 8; c++) begin
      check(got_ch[c].size() == exp_ch[c].size(),
            $sformatf("channel %0d got %0d bytes, expected %0d", c, got_ch[c].size(), exp_ch[c].size()));
      check(got_ch[c] == exp_ch[c], $sformatf("channel %0d byte sequence", c));
      check(got_last[c] == exp_last[c], $sformatf("channel %0d buffer ends", c));
    end
    check(got_end == n_end && n_end > 0, $sformatf("end markers %0d of %0d", got_end, n_end));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
