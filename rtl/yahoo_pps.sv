// yahoo_pps: Parse, Project & Select (PPS) module for the Yahoo Streaming
// Benchmark ad event schema
//   event : record { user_id : fixed(16), page_id : fixed(16), ad_id : fixed(16),
//                    ad_type : enum(5), event_type : enum(3),
//                    event_time : long, ip_address : string }
// and the query  $[?event_type == 'view'].(ad_id | event_time).
//
// Object parser: a record_ctrl activates seven parser blocks in schema order:
// three 16-byte fixed_parsers, two int_parsers sized for the enums
// (3 and 2 bits), a 64-bit int_parser for the long and a string_parser.
// Stage 1: registers for ad_id, event_type and event_time, each written on
// its block's out_valid, and a valid bit set when the object is complete.
// Stage 2: the enum comparison event_type == VIEW_IDX (a sel_cmp), registered as res_keep with
// the projected tuple. res_valid pulses two cycles after the object's last
// byte. Tuple layout: res_data = {event_time[63:0], ad_id[127:0]}, the first
// UUID byte of ad_id in bits [7:0].
module yahoo_pps #(
  parameter int unsigned AD_TYPES    = 5,
  parameter int unsigned EVENT_TYPES = 3,
  parameter int unsigned VIEW_IDX    = 0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [7:0]                        in_byte,
  output logic                              res_valid,
  output logic                              res_keep,
  output logic [avro_pkg::YAHOO_OUT_W-1:0]  res_data
);
  localparam int unsigned ATW = (AD_TYPES    > 2) ? $clog2(AD_TYPES)    : 1;
  localparam int unsigned ETW = (EVENT_TYPES > 2) ? $clog2(EVENT_TYPES) : 1;

  logic [6:0]   v, d;
  logic         obj_done;
  logic [127:0] user_id, page_id, ad_id;
  logic [ATW-1:0] ad_type;
  logic [ETW-1:0] event_type;
  logic [63:0]  event_time;
  logic [8*avro_pkg::STR_MAX_BYTES-1:0] ip;
  logic [31:0]  ip_len;

  record_ctrl #(.NCHILD(7)) u_event (
    .clk, .rst_n, .in_valid, .child_valid(v), .child_done(d), .out_valid(obj_done)
  );
  fixed_parser #(.N(16)) u_user_id (
    .clk, .rst_n, .in_valid(v[0]), .in_byte, .out_valid(d[0]), .out_data(user_id)
  );
  fixed_parser #(.N(16)) u_page_id (
    .clk, .rst_n, .in_valid(v[1]), .in_byte, .out_valid(d[1]), .out_data(page_id)
  );
  fixed_parser #(.N(16)) u_ad_id (
    .clk, .rst_n, .in_valid(v[2]), .in_byte, .out_valid(d[2]), .out_data(ad_id)
  );
  int_parser #(.W(ATW)) u_ad_type (
    .clk, .rst_n, .in_valid(v[3]), .in_byte, .out_valid(d[3]), .out_data(ad_type)
  );
  int_parser #(.W(ETW)) u_event_type (
    .clk, .rst_n, .in_valid(v[4]), .in_byte, .out_valid(d[4]), .out_data(event_type)
  );
  int_parser #(.W(64)) u_event_time (
    .clk, .rst_n, .in_valid(v[5]), .in_byte, .out_valid(d[5]), .out_data(event_time)
  );
  string_parser u_ip (
    .clk, .rst_n, .in_valid(v[6]), .in_byte, .out_valid(d[6]), .out_data(ip), .out_len(ip_len)
  );

  // ---------------- stage 1 ----------------
  logic [127:0]   s1_ad_id;
  logic [ETW-1:0] s1_event_type;
  logic [63:0]    s1_event_time;
  logic           s1_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid      <= 1'b0;
      s1_ad_id      <= '0;
      s1_event_type <= '0;
      s1_event_time <= '0;
    end else begin
      s1_valid <= obj_done;
      if (d[2]) s1_ad_id      <= ad_id;
      if (d[4]) s1_event_type <= event_type;
      if (d[5]) s1_event_time <= event_time;
    end
  end

  // ---------------- selection and stage 2 ----------------
  logic is_view;
  sel_cmp #(.W(ETW), .TYPE(avro_pkg::CMP_BITS), .OP(avro_pkg::OP_EQ)) u_cmp_view (
    .a(s1_event_type), .b(ETW'(VIEW_IDX)), .result(is_view)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_keep  <= 1'b0;
      res_data  <= '0;
    end else begin
      res_valid <= s1_valid;
      res_keep  <= s1_valid && is_view;
      if (s1_valid) res_data <= {s1_event_time, s1_ad_id};
    end
  end
endmodule
