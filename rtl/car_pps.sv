// car_pps: Parse, Project & Select (PPS) module for the example car schema
//   car : record { id : int, name : string,
//                  engine : record { serialNr : int, horsepower : float } }
// and the query  $[?(id == 42)].(id | engine.horsepower).
//
// Object parser: a record_ctrl activates the id int_parser, the name
// string_parser and the engine record (itself a record_ctrl over a serialNr
// int_parser and a 4-byte horsepower fixed_parser) one byte per cycle.
// Stage 1: registers for id and horsepower, each written on the out_valid of
// its parser block, and a valid bit set when the whole object has been read.
// Stage 2: the comparison id == SEL_ID (a sel_cmp) on the stage-1 value, registered as
// res_keep together with the projected tuple and res_valid.
// res_valid pulses two cycles after the object's last byte, for every
// object; res_keep says whether the selection kept it. Tuple layout:
// res_data = {horsepower[31:0], id[31:0]}.
module car_pps #(
  parameter int signed SEL_ID = 42
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [7:0]                      in_byte,
  output logic                            res_valid,
  output logic                            res_keep,
  output logic [avro_pkg::CAR_OUT_W-1:0]  res_data
);
  // ---------------- object parser ----------------
  logic [2:0]  top_v, top_d;
  logic        obj_done;
  logic [1:0]  eng_v, eng_d;
  logic        eng_done;
  logic [31:0] id_val, serial_val, hp_val;
  logic [8*avro_pkg::STR_MAX_BYTES-1:0] name_val;
  logic [31:0] name_len;

  record_ctrl #(.NCHILD(3)) u_car (
    .clk, .rst_n, .in_valid, .child_valid(top_v), .child_done(top_d), .out_valid(obj_done)
  );
  int_parser #(.W(32)) u_id (
    .clk, .rst_n, .in_valid(top_v[0]), .in_byte, .out_valid(top_d[0]), .out_data(id_val)
  );
  string_parser u_name (
    .clk, .rst_n, .in_valid(top_v[1]), .in_byte, .out_valid(top_d[1]),
    .out_data(name_val), .out_len(name_len)
  );
  record_ctrl #(.NCHILD(2)) u_engine (
    .clk, .rst_n, .in_valid(top_v[2]), .child_valid(eng_v), .child_done(eng_d), .out_valid(eng_done)
  );
  assign top_d[2] = eng_done;
  int_parser #(.W(32)) u_serial (
    .clk, .rst_n, .in_valid(eng_v[0]), .in_byte, .out_valid(eng_d[0]), .out_data(serial_val)
  );
  fixed_parser #(.N(4)) u_hp (
    .clk, .rst_n, .in_valid(eng_v[1]), .in_byte, .out_valid(eng_d[1]), .out_data(hp_val)
  );

  // ---------------- stage 1 ----------------
  logic [31:0] s1_id, s1_hp;
  logic        s1_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_id    <= '0;
      s1_hp    <= '0;
    end else begin
      s1_valid <= obj_done;
      if (top_d[0]) s1_id <= id_val;
      if (eng_d[1]) s1_hp <= hp_val;
    end
  end

  // ---------------- selection and stage 2 ----------------
  logic sel_id;
  sel_cmp #(.W(32), .TYPE(avro_pkg::CMP_INT), .OP(avro_pkg::OP_EQ)) u_cmp_id (
    .a(s1_id), .b(32'(SEL_ID)), .result(sel_id)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_keep  <= 1'b0;
      res_data  <= '0;
    end else begin
      res_valid <= s1_valid;
      res_keep  <= s1_valid && sel_id;
      if (s1_valid) res_data <= {s1_hp, s1_id};
    end
  end
endmodule
