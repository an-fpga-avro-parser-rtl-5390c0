// map_ctrl: controller of a map parser block. An Avro map is an int item
// count obj_cnt followed by that many key_value items; the key_value block
// (string_matcher followed by the value's parser block) sits outside this
// module and is driven through kv_valid / kv_done.
//
// State COUNT: bytes go to the internal int_parser. A count of zero ends the
// map in the same cycle. Otherwise the loop counter is loaded with obj_cnt
// and the state moves to ITEMS, where kv_valid follows in_valid and every
// kv_done decrements the loop counter. After the last item the map ends, or,
// with BLOCK_TERMINATED=1, the FSM returns to COUNT to read the next block
// count; Avro writes maps as a series of such blocks closed by a zero count.
// Negative counts (byte-size form of a block) are not supported: their
// absolute value is taken as the item count. out_valid is 1 in the cycle of
// the map's last byte.
module map_ctrl #(
  parameter int unsigned CW               = 32,
  parameter bit          BLOCK_TERMINATED = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       kv_valid,
  input  logic       kv_done,
  output logic       out_valid
);
  typedef enum logic { S_COUNT, S_ITEMS } state_e;
  state_e        state_q;
  logic [CW-1:0] loop_q;
  logic          cnt_valid;
  logic [CW-1:0] cnt_val, cnt_abs;
  logic          last_item;

  int_parser #(.W(CW)) u_cnt (
    .clk, .rst_n,
    .in_valid (in_valid && state_q == S_COUNT),
    .in_byte,
    .out_valid(cnt_valid),
    .out_data (cnt_val)
  );

  assign cnt_abs   = cnt_val[CW-1] ? (~cnt_val + 1'b1) : cnt_val;
  assign kv_valid  = in_valid && state_q == S_ITEMS;
  assign last_item = kv_valid && kv_done && (loop_q == CW'(1));
  assign out_valid = (cnt_valid && cnt_abs == '0) || (!BLOCK_TERMINATED && last_item);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_COUNT;
      loop_q  <= '0;
    end else begin
      if (cnt_valid && cnt_abs != '0) begin
        state_q <= S_ITEMS;
        loop_q  <= cnt_abs;
      end else if (kv_valid && kv_done) begin
        loop_q <= loop_q - 1'b1;
        if (loop_q == CW'(1)) state_q <= S_COUNT;
      end
    end
  end
endmodule
