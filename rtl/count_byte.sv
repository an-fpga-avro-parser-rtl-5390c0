// count_byte: byte counter of the string parser block. It stays active for
// `len` valid bytes and shifts every byte into a shift register of MAX_BYTES
// bytes.
//
// load (with len > 0) starts a new field: the counter takes len and the shift
// register is cleared. Each following in_valid cycle shifts in_byte in at the
// low end and decrements the counter; in the cycle of the last byte out_valid
// is 1 and out_data = {shift register, in_byte}. The last byte is thus in
// out_data[7:0] and the first one 8*(len-1) bits above it, so a string reads
// like a SystemVerilog string literal and unused upper bytes are zero.
// Strings longer than MAX_BYTES keep only their last MAX_BYTES bytes.
// out_len is the length of the current field.
module count_byte #(
  parameter int unsigned MAX_BYTES = 32,
  parameter int unsigned LW        = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [LW-1:0]          len,
  input  logic                   in_valid,
  input  logic [7:0]             in_byte,
  output logic                   out_valid,
  output logic [8*MAX_BYTES-1:0] out_data,
  output logic [LW-1:0]          out_len
);
  logic [LW-1:0]            cnt_q;
  logic [8*MAX_BYTES-1:0]   sr_q;

  assign out_data  = {sr_q[8*MAX_BYTES-9:0], in_byte};
  assign out_valid = in_valid && (cnt_q == LW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      sr_q    <= '0;
      out_len <= '0;
    end else if (load) begin
      cnt_q   <= len;
      sr_q    <= '0;
      out_len <= len;
    end else if (in_valid && cnt_q != '0) begin
      cnt_q   <= cnt_q - 1'b1;
      sr_q    <= out_data;
    end
  end
endmodule
