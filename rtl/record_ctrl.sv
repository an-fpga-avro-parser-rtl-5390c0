// record_ctrl: controller of a record parser block (the common
// "sequential parser" FSM). A record parser block contains one parser block
// per field; this FSM activates them one after the other.
//
// The state is the index of the active child. child_valid[i] is in_valid
// while child i is active; when the active child reports child_done (its
// out_valid, in the cycle of its last byte) the index moves to the next child
// from the following cycle on. out_valid is 1 in the cycle the last child
// completes, after which the FSM is back at child 0, ready for the next
// record. Children are assumed to read at least one byte each.
module record_ctrl #(
  parameter int unsigned NCHILD = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic [NCHILD-1:0] child_valid,
  input  logic [NCHILD-1:0] child_done,
  output logic              out_valid
);
  localparam int unsigned IW = (NCHILD > 1) ? $clog2(NCHILD) : 1;
  logic [IW-1:0] idx_q;
  logic          done;

  always_comb begin
    for (int unsigned i = 0; i < NCHILD; i++)
      child_valid[i] = in_valid && (idx_q == IW'(i));
  end

  assign done      = |(child_done & child_valid);
  assign out_valid = done && (idx_q == IW'(NCHILD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) idx_q <= '0;
    else if (done) idx_q <= (idx_q == IW'(NCHILD - 1)) ? '0 : idx_q + 1'b1;
  end
endmodule
