// tb_chan_fifo: random multi-lane writes (any subset of the 8 lanes, only
// when has_room) and random single-byte reads against a reference queue.
// Read data and its buffer-end tag must come out in write order (lane order
// within a beat), and
// has_room and rd_valid must match the reference fill level; the FIFO is
// driven to full and to empty.
module tb_chan_fifo;
  import avro_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 32;
  logic [7:0]  wr_mask = '0;
  logic [63:0] wr_data = '0;
  logic [7:0]  wr_last = '0;
  logic        rd_last;
  logic        rd_en = 1'b0;
  logic        has_room, rd_valid;
  logic [7:0]  rd_byte;

  chan_fifo #(.NB(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_mask, .wr_data, .wr_last, .has_room,
                                                .rd_en, .rd_valid, .rd_byte, .rd_last);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [8:0] model[$];   // {last, byte}
  int  n_full = 0, n_empty = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int phase;
      @(negedge clk);
      phase = (t / 500) % 2;   // alternate write-heavy and read-heavy phases
      #1;
      check(has_room == (DEPTH - model.size() >= 8), "has_room");
      check(rd_valid == (model.size() > 0), "rd_valid");
      if (model.size() > 0) check({rd_last, rd_byte} == model[0], "read data order");
      if (DEPTH - model.size() < 8) n_full++;
      if (model.size() == 0) n_empty++;
      wr_mask = (has_room && $urandom_range(3, 0) < (phase ? 1 : 3)) ? 8'($urandom) : '0;
      wr_data = {$urandom, $urandom};
      wr_last = 8'($urandom);
      rd_en   = ($urandom_range(3, 0) < (phase ? 3 : 1));
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      for (int l = 0; l < 8; l++) if (wr_mask[l]) model.push_back({wr_last[l], wr_data[8*l +: 8]});
    end
    check(n_full > 0 && n_empty > 0, "full and empty reached");
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
