// tb_rr_merger: results numbered 0, 1, 2, ... are grouped into buffers of
// 1 to 3 results; buffer b goes to the queue of channel (b mod 4), the last
// result of each buffer is tagged, and each result is marked kept or
// discarded. Results arrive with random delays; the output is stalled at
// random. The merger must emit exactly the kept results in number order and
// pop every discarded one.
module tb_rr_merger;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCH = 4;
  logic [NCH-1:0]        head_valid, head_keep, head_last, pop;
  logic [NCH-1:0][15:0]  head_data;
  logic [15:0]           m_tdata;
  logic                  m_tvalid, dropped;
  logic                  m_tready = 1'b0;

  rr_merger #(.NCH(NCH), .W(16)) dut (.clk, .rst_n, .head_valid, .head_keep, .head_last, .head_data, .pop,
                                      .m_tdata, .m_tvalid, .m_tready, .dropped);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef struct { bit keep; bit last; logic [15:0] num; } item_t;
  item_t pending[NCH][$];   // not yet visible
  item_t q[NCH][$];         // visible queue contents
  logic [15:0] expq[$];
  int n_drop = 0, n_disc = 0;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      head_valid[c] = q[c].size() > 0;
      head_keep[c]  = head_valid[c] ? q[c][0].keep : 1'b0;
      head_last[c]  = head_valid[c] ? q[c][0].last : 1'b0;
      head_data[c]  = head_valid[c] ? q[c][0].num  : '0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_tvalid && m_tready) begin
        check(expq.size() > 0 && m_tdata == expq[0], $sformatf("output %0d", m_tdata));
        if (expq.size() > 0) void'(expq.pop_front());
      end
      if (dropped) n_drop++;
      for (int c = 0; c < NCH; c++) begin
        if (pop[c]) begin
          check(q[c].size() > 0, "pop of an empty queue");
          if (q[c].size() > 0) void'(q[c].pop_front());
        end
        if (pending[c].size() > 0 && $urandom_range(2, 0) == 0) q[c].push_back(pending[c].pop_front());
      end
      m_tready <= ($urandom_range(3, 0) != 0);
    end
  end

  initial begin
    int num;
    num = 0;
    for (int b = 0; b < 200; b++) begin
      int n;
      n = ($urandom_range(1, 0) == 0) ? 1 : $urandom_range(3, 2);
      for (int j = 0; j < n; j++) begin
        item_t it;
        it.keep = ($urandom_range(2, 0) != 0);
        it.last = (j == n - 1);
        it.num  = 16'(num);
        pending[b % NCH].push_back(it);
        if (it.keep) expq.push_back(16'(num));
        else n_disc++;
        num++;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4000) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d results never emitted", expq.size()));
    check(n_drop == n_disc, $sformatf("%0d of %0d discarded results skipped", n_drop, n_disc));
    for (int c = 0; c < NCH; c++)
      check(q[c].size() == 0 && pending[c].size() == 0, $sformatf("queue %0d drained", c));
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
