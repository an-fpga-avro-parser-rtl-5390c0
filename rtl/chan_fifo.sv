// chan_fifo: input byte FIFO of one channel. It accepts up to NB bytes per
// cycle from the lanes of a wide input beat and delivers one byte per cycle
// to the channel's PPS module. Each byte carries a one-bit tag (wr_last /
// rd_last) that marks the last byte of a wire-format buffer.
//
// Write: every lane i whose wr_mask bit is set is written at the write
// pointer plus the number of set mask bits below lane i, so the bytes keep
// their lane order. The writer must check has_room (at least NB free
// entries) before writing. Read: rd_valid/rd_byte show the oldest byte
// (first-word-fall-through); rd_en pops it. DEPTH must be a power of two.
// Reset empties the FIFO; the storage itself is not reset.
module chan_fifo #(
  parameter int unsigned NB    = 8,
  parameter int unsigned DEPTH = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NB-1:0]   wr_mask,
  input  logic [8*NB-1:0] wr_data,
  input  logic [NB-1:0]   wr_last,
  output logic            has_room,
  input  logic            rd_en,
  output logic            rd_valid,
  output logic [7:0]      rd_byte,
  output logic            rd_last
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic          last_mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic [AW:0]   n_wr;
  logic          pop;

  always_comb begin
    n_wr = '0;
    for (int unsigned i = 0; i < NB; i++) n_wr = n_wr + (AW+1)'(wr_mask[i]);
  end

  assign rd_valid = (count != '0);
  assign rd_byte  = mem[rd_ptr];
  assign rd_last  = last_mem[rd_ptr];
  assign pop      = rd_en && rd_valid;
  assign has_room = ((AW+1)'(DEPTH) - count) >= (AW+1)'(NB);

  always_ff @(posedge clk) begin
    logic [AW-1:0] wa;
    wa = wr_ptr;
    for (int unsigned i = 0; i < NB; i++) begin
      if (wr_mask[i]) begin
        mem[wa]      <= wr_data[8*i +: 8];
        last_mem[wa] <= wr_last[i];
        wa = wa + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wr_ptr + AW'(n_wr);
      rd_ptr <= rd_ptr + AW'(pop);
      count  <= count + n_wr - (AW+1)'(pop);
    end
  end
endmodule
