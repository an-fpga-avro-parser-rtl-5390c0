// riot_pps: Parse, Project & Select (PPS) module for the RIOTBench SmartCity
// sensor schema
//   senml : record { timestamp : long,
//                    values : map< union { senml_fahrenheit : record{v:float},
//                                          senml_percentage : record{v:float} } > }
// and the SmartCity query: the five map entries temperature (fahrenheit
// branch) and humidity, light, dust, airquality_raw (percentage branch) are
// projected, and an object is kept only if each of them lies in [LO, HI].
//
// Object parser: a record_ctrl over a 64-bit int_parser and the map. The map
// is a map_ctrl whose key_value item is a record_ctrl over a string_matcher
// (dictionary of the five keys) and a union_ctrl with one 4-byte
// fixed_parser per branch.
// Stage 1: one 32-bit register per queried key, written when a branch parser
// completes, the key of the current pair matched that entry (key_match) and
// the union index is the branch the query names; a seen bit per key, and a
// valid bit set when the object is complete.
// Stage 2: the ten float comparisons (sel_cmp, on order-preserving keys of
// the IEEE words) and the seen bits are and-ed into res_keep, registered with the
// tuple. res_valid pulses two cycles after the object's last byte.
// Tuple layout: res_data = {airquality_raw, dust, light, humidity,
// temperature}, temperature in bits [31:0].
module riot_pps #(
  parameter logic [4:0][31:0] LO = {32'h4188_0000,   //  17      airquality_raw
                                    32'h433a_9c29,   //  186.61  dust
                                    32'h44a8_2000,   //  1345    light
                                    32'h412b_3333,   //  10.7    humidity
                                    32'hc148_0000},  // -12.5    temperature
  parameter logic [4:0][31:0] HI = {32'h43b5_8000,   //  363
                                    32'h45a2_21ae,   //  5188.21
                                    32'h46cd_5400,   //  26282
                                    32'h42be_6666,   //  95.2
                                    32'h422c_6666}   //  43.1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [7:0]                       in_byte,
  output logic                             res_valid,
  output logic                             res_keep,
  output logic [avro_pkg::RIOT_OUT_W-1:0]  res_data
);
  import avro_pkg::*;

  localparam int unsigned NK = 5;
  localparam logic [NK-1:0][8*STR_MAX_BYTES-1:0] KEYS = {
    (8*STR_MAX_BYTES)'("airquality_raw"),
    (8*STR_MAX_BYTES)'("dust"),
    (8*STR_MAX_BYTES)'("light"),
    (8*STR_MAX_BYTES)'("humidity"),
    (8*STR_MAX_BYTES)'("temperature")};
  // union branch each key is projected from: 0 = senml_fahrenheit, 1 = senml_percentage
  localparam logic [NK-1:0] BRANCH = 5'b11110;

  // ---------------- object parser ----------------
  logic [1:0]  top_v, top_d;
  logic        obj_done;
  logic [63:0] timestamp;
  logic        kv_valid, kv_done;
  logic [1:0]  kvv, kvd;
  logic [NK-1:0] match_now, key_match;
  logic [1:0]  br_v, br_d;
  logic [0:0]  sel;
  logic [31:0] br_val [2];

  record_ctrl #(.NCHILD(2)) u_senml (
    .clk, .rst_n, .in_valid, .child_valid(top_v), .child_done(top_d), .out_valid(obj_done)
  );
  int_parser #(.W(64)) u_timestamp (
    .clk, .rst_n, .in_valid(top_v[0]), .in_byte, .out_valid(top_d[0]), .out_data(timestamp)
  );
  map_ctrl u_values (
    .clk, .rst_n, .in_valid(top_v[1]), .in_byte,
    .kv_valid, .kv_done, .out_valid(top_d[1])
  );
  record_ctrl #(.NCHILD(2)) u_key_value (
    .clk, .rst_n, .in_valid(kv_valid), .child_valid(kvv), .child_done(kvd), .out_valid(kv_done)
  );
  string_matcher #(.NKEYS(NK), .KEYS(KEYS)) u_key (
    .clk, .rst_n, .in_valid(kvv[0]), .in_byte,
    .out_valid(kvd[0]), .match_now, .key_match
  );
  union_ctrl #(.NBR(2)) u_value (
    .clk, .rst_n, .in_valid(kvv[1]), .in_byte,
    .br_valid(br_v), .br_done(br_d), .out_valid(kvd[1]), .sel
  );
  for (genvar b = 0; b < 2; b++) begin : g_branch
    fixed_parser #(.N(4)) u_float (
      .clk, .rst_n, .in_valid(br_v[b]), .in_byte, .out_valid(br_d[b]), .out_data(br_val[b])
    );
  end

  // ---------------- stage 1 ----------------
  logic [NK-1:0][31:0] s1_val;
  logic [NK-1:0]       s1_seen;
  logic                s1_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_val   <= '0;
      s1_seen  <= '0;
    end else begin
      s1_valid <= obj_done;
      if (s1_valid) s1_seen <= '0;
      for (int k = 0; k < NK; k++) begin
        if (br_d[BRANCH[k]] && key_match[k] && sel == BRANCH[k]) begin
          s1_val[k]  <= br_val[BRANCH[k]];
          s1_seen[k] <= 1'b1;
        end
      end
    end
  end

  // ---------------- stage 2 ----------------
  logic [NK-1:0] ge_lo, le_hi, in_range;
  for (genvar k = 0; k < NK; k++) begin : g_cmp
    sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_GE)) u_lo (.a(s1_val[k]), .b(LO[k]), .result(ge_lo[k]));
    sel_cmp #(.W(32), .TYPE(CMP_FLOAT), .OP(OP_LE)) u_hi (.a(s1_val[k]), .b(HI[k]), .result(le_hi[k]));
  end
  assign in_range = s1_seen & ge_lo & le_hi;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_keep  <= 1'b0;
      res_data  <= '0;
    end else begin
      res_valid <= s1_valid;
      res_keep  <= s1_valid && (&in_range);
      if (s1_valid) res_data <= s1_val;
    end
  end
endmodule
