// fixed_parser: parser block for a field of a fixed number N of bytes (Avro
// fixed, float with N=4, double with N=8, boolean with N=1).
//
// A down counter starts at N-1 and is decremented in every cycle in which
// in_valid is 1; each byte is shifted into an (N-1)-byte shift register. In the
// cycle the counter is zero the field is complete: out_valid is 1 and out_data
// is {in_byte, shift register}. The first byte of the field therefore lands in
// out_data[7:0], i.e. the bytes are read little-endian, which is the byte order
// Avro uses for float and double, so the IEEE 754 word needs no conversion.
// The counter is reset to N-1; the shift register needs no reset.
module fixed_parser #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [7:0]     in_byte,
  output logic           out_valid,
  output logic [8*N-1:0] out_data
);
  generate
    if (N == 1) begin : g_one
      assign out_valid = in_valid;
      assign out_data  = in_byte;
    end else begin : g_multi
      localparam int unsigned CW  = $clog2(N);
      localparam int unsigned SRW = 8 * (N - 1);
      logic [CW-1:0]        cnt_q;
      logic [8*(N-1)-1:0]   sr_q;

      assign out_valid = in_valid && (cnt_q == '0);
      assign out_data  = {in_byte, sr_q};

      always_ff @(posedge clk) begin
        if (!rst_n) cnt_q <= CW'(N - 1);
        else if (in_valid) cnt_q <= (cnt_q == '0) ? CW'(N - 1) : cnt_q - 1'b1;
      end

      always_ff @(posedge clk) begin
        if (in_valid) begin
          sr_q <= SRW'({in_byte, sr_q} >> 8);
        end
      end
    end
  endgenerate
endmodule
