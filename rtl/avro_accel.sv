// avro_accel: accelerator generated around a PPS module. A PPS module
// reads one byte per cycle, so NCH copies run in parallel to keep up with a
// DW-bit input stream (8 channels x 1 byte/cycle = one 64-bit beat/cycle).
//
// Input: AXI-Stream (s_*) carrying Avro objects in the wire format
// (4-byte big-endian length, buffer data; zero length ends a message).
// wire_splitter decodes the framing and hands buffers to the channels in
// round-robin order. Each channel is a chan_fifo (up to NB bytes in, one byte
// out per cycle), the PPS module selected by SCHEMA, and a sync_fifo for its
// results {last, keep, tuple}. A channel reads a byte from its chan_fifo in
// every cycle in which one is there and its result queue has room for the
// results still in flight. The chan_fifo tags the last byte of each buffer;
// since a PPS result appears exactly two cycles after the object's last byte,
// the tag is delayed by two cycles and stored with the result as 'last'.
// rr_merger takes the results back in round-robin order, a whole buffer at a
// time, and emits the kept tuples on the output AXI-Stream (m_*), one tuple
// of out_width(SCHEMA) bits per beat, in input order. The buffer tag is this
// design's addition: the published scheme restores the order only when each
// buffer holds one object. s_tready is low while any channel FIFO
// has fewer than NB free bytes. Events are counted for observation:
// objects completed, objects discarded by the selection, input stall cycles
// and end-of-message markers.
module avro_accel #(
  parameter avro_pkg::schema_e SCHEMA = avro_pkg::SCH_YAHOO,
  parameter int unsigned NCH      = 8,
  parameter int unsigned DW       = 64,
  parameter int unsigned CH_DEPTH = 128,
  parameter int unsigned RES_DEPTH = 4,
  parameter int unsigned OW       = avro_pkg::out_width(SCHEMA)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [DW-1:0]   s_tdata,
  input  logic [DW/8-1:0] s_tkeep,
  input  logic            s_tvalid,
  output logic            s_tready,
  output logic [OW-1:0]   m_tdata,
  output logic            m_tvalid,
  input  logic            m_tready,
  output logic [31:0]     n_objects,
  output logic [31:0]     n_dropped,
  output logic [31:0]     n_stalls,
  output logic [31:0]     n_msg_end
);
  import avro_pkg::*;
  localparam int unsigned NB  = DW / 8;
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [NCH-1:0][NB-1:0] lane_we;
  logic [NB-1:0]          lane_last;
  logic [NCH-1:0]         room, feed, byte_valid, res_valid, res_keep;
  logic [NCH-1:0]         rq_empty, rq_full, pop;
  logic                   dropped;
  logic [NCH-1:0][7:0]    ch_byte;
  logic [NCH-1:0][OW-1:0] res_data, head_data;
  logic [NCH-1:0]         head_keep, head_last;
  logic [1:0]             msg_end;
  logic [CHW-1:0]         cur_ch;

  wire_splitter #(.DW(DW), .NCH(NCH)) u_split (
    .clk, .rst_n, .s_tdata, .s_tkeep, .s_tvalid, .s_tready,
    .fifo_ready(&room), .lane_we, .lane_last, .msg_end, .cur_ch
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [$clog2(RES_DEPTH):0] rq_count;
    logic                       byte_last;
    logic [1:0]                 last_d;   // buffer-end tag, aligned with res_valid

    chan_fifo #(.NB(NB), .DEPTH(CH_DEPTH)) u_in (
      .clk, .rst_n, .wr_mask(lane_we[c]), .wr_data(s_tdata), .wr_last(lane_last),
      .has_room(room[c]), .rd_en(feed[c]), .rd_valid(byte_valid[c]), .rd_byte(ch_byte[c]),
      .rd_last(byte_last)
    );

    // Two results can still be in the PPS pipeline when feeding stops.
    assign feed[c] = byte_valid[c] && (rq_count <= ($clog2(RES_DEPTH)+1)'(RES_DEPTH - 3));

    if (SCHEMA == SCH_CAR) begin : g_pps
      car_pps u_pps (
        .clk, .rst_n, .in_valid(feed[c]), .in_byte(ch_byte[c]),
        .res_valid(res_valid[c]), .res_keep(res_keep[c]), .res_data(res_data[c])
      );
    end else if (SCHEMA == SCH_YAHOO) begin : g_pps
      yahoo_pps u_pps (
        .clk, .rst_n, .in_valid(feed[c]), .in_byte(ch_byte[c]),
        .res_valid(res_valid[c]), .res_keep(res_keep[c]), .res_data(res_data[c])
      );
    end else begin : g_pps
      riot_pps u_pps (
        .clk, .rst_n, .in_valid(feed[c]), .in_byte(ch_byte[c]),
        .res_valid(res_valid[c]), .res_keep(res_keep[c]), .res_data(res_data[c])
      );
    end

    always_ff @(posedge clk) begin
      if (!rst_n) last_d <= '0;
      else        last_d <= {last_d[0], feed[c] && byte_last};
    end

    sync_fifo #(.W(OW + 2), .DEPTH(RES_DEPTH)) u_res (
      .clk, .rst_n, .push(res_valid[c]), .din({last_d[1], res_keep[c], res_data[c]}),
      .pop(pop[c]), .dout({head_last[c], head_keep[c], head_data[c]}),
      .empty(rq_empty[c]), .full(rq_full[c]), .count(rq_count)
    );
  end

  rr_merger #(.NCH(NCH), .W(OW)) u_merge (
    .clk, .rst_n, .head_valid(~rq_empty), .head_keep, .head_last, .head_data, .pop,
    .m_tdata, .m_tvalid, .m_tready, .dropped
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_objects <= '0;
      n_dropped <= '0;
      n_stalls  <= '0;
      n_msg_end <= '0;
    end else begin
      n_objects <= n_objects + 32'($countones(res_valid));
      n_dropped <= n_dropped + 32'(dropped);
      n_stalls  <= n_stalls  + 32'(s_tvalid && !s_tready);
      n_msg_end <= n_msg_end + 32'(msg_end);
    end
  end

  // A result must never arrive at a full queue, and a buffer can only end
  // where an object ends.
  always_ff @(posedge clk) begin
    if (rst_n) a_no_res_overflow: assert (!(|(res_valid & rq_full)));
  end
  for (genvar c = 0; c < NCH; c++) begin : g_chk
    always_ff @(posedge clk) begin
      if (rst_n) a_last_at_object_end: assert (!g_ch[c].last_d[1] || res_valid[c]);
    end
  end
endmodule
