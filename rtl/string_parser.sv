// string_parser: parser block for an Avro string (or bytes) field: an int
// length field followed by a count_byte block that reads that many bytes.
//
// Two states: LEN, in which bytes go to the int_parser, and DATA, in which they
// go to count_byte. When the length is parsed and is positive, count_byte is
// loaded and the block moves to DATA; a length of zero (and, as an
// implementation choice, a negative length) ends the field in the same cycle.
// out_valid is 1 in the cycle of the last byte of the field, with out_data
// (last byte in bits [7:0], upper unused bytes zero) and out_len valid.
module string_parser #(
  parameter int unsigned MAX_BYTES = avro_pkg::STR_MAX_BYTES,
  parameter int unsigned LW        = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [7:0]             in_byte,
  output logic                   out_valid,
  output logic [8*MAX_BYTES-1:0] out_data,
  output logic [LW-1:0]          out_len
);
  typedef enum logic { S_LEN, S_DATA } state_e;
  state_e state_q;

  logic          len_valid, data_valid, cb_valid;
  logic [LW-1:0] len_val, cb_len;
  logic          empty;
  logic [8*MAX_BYTES-1:0] cb_data;

  int_parser #(.W(LW)) u_len (
    .clk, .rst_n,
    .in_valid (in_valid && state_q == S_LEN),
    .in_byte,
    .out_valid(len_valid),
    .out_data (len_val)
  );

  assign empty = len_val[LW-1] || (len_val == '0);

  count_byte #(.MAX_BYTES(MAX_BYTES), .LW(LW)) u_data (
    .clk, .rst_n,
    .load     (len_valid && !empty),
    .len      (len_val),
    .in_valid (data_valid),
    .in_byte,
    .out_valid(cb_valid),
    .out_data (cb_data),
    .out_len  (cb_len)
  );

  assign data_valid = in_valid && state_q == S_DATA;
  assign out_valid  = cb_valid || (len_valid && empty);
  assign out_data   = (state_q == S_DATA) ? cb_data : '0;
  assign out_len    = (state_q == S_DATA) ? cb_len  : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= S_LEN;
    else if (state_q == S_LEN && len_valid && !empty) state_q <= S_DATA;
    else if (state_q == S_DATA && cb_valid) state_q <= S_LEN;
  end
endmodule
