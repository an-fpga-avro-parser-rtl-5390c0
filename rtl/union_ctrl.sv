// union_ctrl: controller of a union parser block. An Avro union field is an
// int index union_idx followed by the value encoded with the branch type it
// selects; one parser block per branch sits outside this module and is driven
// through br_valid / br_done.
//
// State IDX: bytes go to the internal int_parser. When the index is parsed
// it is stored in sel and the FSM moves to BODY, where only br_valid[sel]
// follows in_valid. out_valid is the or-reduction of the branches' done
// signals. An index outside 0..NBR-1 is treated as an empty branch (e.g.
// null) and ends the union with the index byte. sel stays valid after the
// union ends until the next index is parsed, so that it can qualify the
// stage-1 register writes of a projected branch.
module union_ctrl #(
  parameter int unsigned NBR = 2,
  parameter int unsigned SW  = (NBR > 1) ? $clog2(NBR) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [7:0]     in_byte,
  output logic [NBR-1:0] br_valid,
  input  logic [NBR-1:0] br_done,
  output logic           out_valid,
  output logic [SW-1:0]  sel
);
  typedef enum logic { S_IDX, S_BODY } state_e;
  state_e        state_q;
  logic          idx_valid;
  logic [31:0]   idx_val;
  logic          in_range;

  int_parser #(.W(32)) u_idx (
    .clk, .rst_n,
    .in_valid (in_valid && state_q == S_IDX),
    .in_byte,
    .out_valid(idx_valid),
    .out_data (idx_val)
  );

  assign in_range = !idx_val[31] && (idx_val < 32'(NBR));

  always_comb begin
    for (int unsigned i = 0; i < NBR; i++)
      br_valid[i] = in_valid && state_q == S_BODY && (sel == SW'(i));
  end

  assign out_valid = |(br_done & br_valid) || (idx_valid && !in_range);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDX;
      sel     <= '0;
    end else if (state_q == S_IDX) begin
      if (idx_valid) begin
        sel <= SW'(idx_val);
        if (in_range) state_q <= S_BODY;
      end
    end else if (|(br_done & br_valid)) begin
      state_q <= S_IDX;
    end
  end
endmodule
