// string_matcher: parser block for the key of a map entry. It parses an Avro
// string like string_parser and compares it with a dictionary of NKEYS key
// strings that the query needs.
//
// KEYS[i] holds key i as a string literal (last character in bits [7:0],
// unused upper bytes zero); its length is taken as the number of bytes up to
// its highest non-zero byte, so keys may not contain NUL characters. In the
// cycle of the key's last byte out_valid is 1 and match_now shows which
// dictionary entries equal the parsed key (data and length both equal).
// key_match is the registered copy of match_now: it is valid from the cycle
// after the key until the next key completes, i.e. while the value of the
// key-value pair is parsed, and serves as write condition for the stage-1
// registers. Reset clears key_match.
module string_matcher #(
  parameter int unsigned MAX_BYTES = avro_pkg::STR_MAX_BYTES,
  parameter int unsigned NKEYS     = 1,
  parameter logic [NKEYS-1:0][8*MAX_BYTES-1:0] KEYS = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [7:0]       in_byte,
  output logic             out_valid,
  output logic [NKEYS-1:0] match_now,
  output logic [NKEYS-1:0] key_match
);
  localparam int unsigned LW = 32;

  function automatic int unsigned key_len(logic [8*MAX_BYTES-1:0] k);
    int unsigned l = 0;
    for (int unsigned b = 0; b < MAX_BYTES; b++)
      if (k[8*b +: 8] != 8'h00) l = b + 1;
    return l;
  endfunction

  logic [8*MAX_BYTES-1:0] str;
  logic [LW-1:0]          len;

  string_parser #(.MAX_BYTES(MAX_BYTES), .LW(LW)) u_str (
    .clk, .rst_n, .in_valid, .in_byte,
    .out_valid, .out_data(str), .out_len(len)
  );

  always_comb begin
    for (int unsigned i = 0; i < NKEYS; i++)
      match_now[i] = (str == KEYS[i]) && (len == LW'(key_len(KEYS[i])));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         key_match <= '0;
    else if (out_valid) key_match <= match_now;
  end
endmodule
