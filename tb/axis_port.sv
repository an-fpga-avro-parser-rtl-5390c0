// axis_port: testbench helper that plays the DMA side of one accelerator.
// It sends queued 64-bit beats on the input stream (with a settable
// probability of idle cycles) and receives output tuples (with a settable
// probability of m_tready low), comparing each with the queue of expected
// tuples. It counts beats, cycles with s_tvalid high and s_tready low
// (input stalls), cycles with output back-pressure, and mismatches.
module axis_port #(
  parameter int unsigned OW = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [63:0]   s_tdata,
  output logic [7:0]    s_tkeep,
  output logic          s_tvalid,
  input  logic          s_tready,
  input  logic [OW-1:0] m_tdata,
  input  logic          m_tvalid,
  output logic          m_tready
);
  import avro_tb_pkg::*;

  beat_t       beats[$];
  logic [OW-1:0] expq[$];
  int in_idle_pct  = 0;    // percent of cycles without s_tvalid
  int out_stop_pct = 0;    // percent of cycles with m_tready low
  bit out_hold     = 0;    // hold m_tready low
  int n_beats = 0, n_out = 0, n_err = 0, n_in_stall = 0, n_backpressure = 0;
  longint first_beat = -1, last_beat = -1, cyc = 0;

  initial begin
    s_tvalid = 1'b0; s_tdata = '0; s_tkeep = '0; m_tready = 1'b0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (s_tvalid && s_tready) begin
        void'(beats.pop_front());
        n_beats++;
        if (first_beat < 0) first_beat = cyc;
        last_beat = cyc;
      end
      if (s_tvalid && !s_tready) n_in_stall++;
      if (m_tvalid && !m_tready) n_backpressure++;
      if (m_tvalid && m_tready) begin
        n_out++;
        if (expq.size() == 0) begin
          n_err++;
          $display("FAIL: unexpected output %h", m_tdata);
        end else begin
          if (m_tdata != expq[0]) begin
            n_err++;
            $display("FAIL: output %h expected %h", m_tdata, expq[0]);
          end
          void'(expq.pop_front());
        end
      end
    end
  end

  // drive at the falling edge; a presented beat is held until it is taken
  bit taken = 1'b1;
  always @(posedge clk) if (rst_n && s_tvalid && s_tready) taken = 1'b1;
  always @(negedge clk) begin
    if (!s_tvalid || taken) begin
      if (beats.size() > 0 && $urandom_range(99, 0) >= in_idle_pct) begin
        s_tvalid = 1'b1;
        s_tdata  = beats[0].data;
        s_tkeep  = beats[0].keep;
        taken    = 1'b0;
      end else begin
        s_tvalid = 1'b0;
      end
    end
    m_tready = !out_hold && ($urandom_range(99, 0) >= out_stop_pct);
  end
endmodule
