// wire_splitter: decoder of the Avro wire format on a DW-bit AXI-Stream and
// round-robin distributor of its buffers to NCH parallel channels.
//
// The stream is a sequence of buffers, each a 4-byte big-endian length
// followed by that many bytes of Avro objects; a buffer of length zero marks
// the end of a message and carries no data. Byte lane 0 (s_tdata[7:0]) is
// the first byte of a beat; lanes whose s_tkeep bit is 0 carry nothing.
// The splitter handles all NB = DW/8 lanes of a beat in one cycle: it walks
// the lanes in order, collecting header bytes and counting down the data
// bytes of the current buffer. Every data byte is flagged in lane_we[c] of
// the channel c that owns the current buffer; after a buffer's last byte the
// channel number advances by one (modulo NCH), and lane_last flags that
// byte so that the results of a buffer can later be told apart from those of
// the next one. Zero-length buffers do not use a channel; msg_end counts the
// ones that end in the current beat. A beat is taken when s_tvalid and
// s_tready are both 1; s_tready is fifo_ready, which must guarantee that
// every channel can take NB bytes in that cycle. lane_we is combinational
// and qualified with the handshake.
module wire_splitter #(
  parameter int unsigned DW  = 64,
  parameter int unsigned NCH = 8,
  parameter int unsigned NB  = DW / 8,
  parameter int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [DW-1:0]          s_tdata,
  input  logic [NB-1:0]          s_tkeep,
  input  logic                   s_tvalid,
  output logic                   s_tready,
  input  logic                   fifo_ready,
  output logic [NCH-1:0][NB-1:0] lane_we,
  output logic [NB-1:0]          lane_last,
  output logic [1:0]             msg_end,
  output logic [CHW-1:0]         cur_ch
);
  logic [1:0]     hdr_q,  hdr_n;     // header bytes collected so far
  logic [23:0]    lacc_q, lacc_n;    // first three header bytes
  logic [31:0]    rem_q,  rem_n;     // data bytes left in the current buffer
  logic [CHW-1:0] ch_q,   ch_n;
  logic           fire;
  logic [31:0]    len;

  assign s_tready = fifo_ready;
  assign fire     = s_tvalid && s_tready;
  assign cur_ch   = ch_q;

  always_comb begin
    hdr_n   = hdr_q;
    lacc_n  = lacc_q;
    rem_n   = rem_q;
    ch_n    = ch_q;
    lane_we = '0;
    lane_last = '0;
    msg_end = '0;
    len     = '0;
    if (fire) begin
      for (int unsigned i = 0; i < NB; i++) begin
        if (s_tkeep[i]) begin
          if (rem_n != '0) begin
            lane_we[ch_n][i] = 1'b1;
            rem_n = rem_n - 1'b1;
            if (rem_n == '0) begin
              lane_last[i] = 1'b1;
              ch_n = (ch_n == CHW'(NCH - 1)) ? '0 : ch_n + 1'b1;
            end
          end else if (hdr_n != 2'd3) begin
            lacc_n = {lacc_n[15:0], s_tdata[8*i +: 8]};
            hdr_n  = hdr_n + 1'b1;
          end else begin
            len    = {lacc_n, s_tdata[8*i +: 8]};
            hdr_n  = 2'd0;
            rem_n  = len;
            if (len == '0) msg_end = msg_end + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hdr_q  <= '0;
      lacc_q <= '0;
      rem_q  <= '0;
      ch_q   <= '0;
    end else begin
      hdr_q  <= hdr_n;
      lacc_q <= lacc_n;
      rem_q  <= rem_n;
      ch_q   <= ch_n;
    end
  end
endmodule
