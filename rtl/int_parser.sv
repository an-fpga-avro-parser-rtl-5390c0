// int_parser: zigzag variable-length integer parser block (Avro int, long,
// enum, and the length / count / index fields inside string, map and union).
//
// Interface (common to all parser blocks): in_valid marks a cycle in which
// the block is active and in_byte holds the next byte of its field. When the
// last byte of the field arrives (continuation bit 7 clear), out_valid is 1 in
// that same cycle and out_data holds the decoded value (combinational from
// in_byte and the partial result register).
//
// Decoding is done byte by byte as in the Avro zigzag scheme: bit 0 of the
// first byte is the sign; when it is 1 every payload bit is inverted. The six
// remaining payload bits of the first byte fill b[5:0] and every further byte
// adds seven payload bits above them. For a negative number the bits above
// the ones already written are preset to 1 (sign extension). Payload bits
// beyond W are dropped, so W may be chosen as small as the field needs
// (e.g. ceil(log2(#symbols)) for an enum). Reset only clears the
// "first byte" state; the value register needs no reset.
module int_parser #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [7:0]   in_byte,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  // Wide working copy so that shifts past the top simply fall off.
  localparam int unsigned WW = W + 7;
  localparam int unsigned PW = $clog2(WW + 8);

  logic          first_q;   // next byte is the first byte of a field
  logic          neg_q;     // sign of the field being parsed
  logic [PW-1:0] pos_q;     // bit position of the next payload group
  logic [WW-1:0] acc_q;     // partial result

  logic          neg;
  logic [6:0]    payload;
  logic [WW-1:0] base, mask, acc_n;

  always_comb begin
    neg     = first_q ? in_byte[0] : neg_q;
    base    = '0;
    if (first_q) begin
      payload = {1'b0, in_byte[6:1] ^ {6{neg}}};
      base    = neg ? '1 : '0;
      mask    = WW'(7'h3f);
      acc_n   = (base & ~mask) | WW'(payload);
    end else begin
      payload = in_byte[6:0] ^ {7{neg}};
      base    = acc_q;
      mask    = WW'(7'h7f) << pos_q;
      acc_n   = (base & ~mask) | (WW'(payload) << pos_q);
    end
  end

  assign out_valid = in_valid && !in_byte[7];
  assign out_data  = acc_n[W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first_q <= 1'b1;
      neg_q   <= 1'b0;
      pos_q   <= '0;
    end else if (in_valid) begin
      if (!in_byte[7]) begin
        first_q <= 1'b1;
        pos_q   <= '0;
      end else begin
        first_q <= 1'b0;
        neg_q   <= neg;
        // saturate so that very long encodings do not wrap the position
        pos_q   <= first_q ? PW'(6) : ((pos_q >= PW'(WW)) ? pos_q : pos_q + PW'(7));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) acc_q <= acc_n;
  end
endmodule
