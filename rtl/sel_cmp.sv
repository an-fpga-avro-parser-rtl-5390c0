// sel_cmp: one comparison of the selection logic that sits between the
// stage-1 and stage-2 registers of a PPS module.
//
// result = (a OP b), purely combinational. TYPE chooses how the W-bit
// operands are read:
//   CMP_BITS  - strings, booleans, enums: only OP_EQ (bit-pattern equality)
//   CMP_INT   - int / long: two's complement, any operator
//   CMP_FLOAT - float (W=32) / double (W=64): IEEE 754, any operator
// Floats are compared through an order-preserving unsigned key (sign bit
// set: invert all bits; clear: set the sign bit), so -0 sorts below +0 and
// NaN is not treated specially. For CMP_BITS an operator other than OP_EQ
// also tests equality. One operand is usually a constant from the query.
module sel_cmp #(
  parameter int unsigned         W    = 32,
  parameter avro_pkg::cmp_type_e TYPE = avro_pkg::CMP_INT,
  parameter avro_pkg::cmp_op_e   OP   = avro_pkg::OP_EQ
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         result
);
  import avro_pkg::*;

  logic [W-1:0] ka, kb;
  logic         eq, lt;

  always_comb begin
    ka = a;
    kb = b;
    if (TYPE == CMP_INT) begin
      ka[W-1] = ~a[W-1];   // offset binary: signed order as unsigned order
      kb[W-1] = ~b[W-1];
    end else if (TYPE == CMP_FLOAT) begin
      ka = a[W-1] ? ~a : (a | {1'b1, {(W-1){1'b0}}});
      kb = b[W-1] ? ~b : (b | {1'b1, {(W-1){1'b0}}});
    end
    eq = (ka == kb);
    lt = (ka < kb);
    if (TYPE == CMP_BITS) begin
      result = eq;
    end else begin
      case (OP)
        OP_EQ:   result = eq;
        OP_LT:   result = lt;
        OP_GT:   result = !lt && !eq;
        OP_LE:   result = lt || eq;
        default: result = !lt;
      endcase
    end
  end
endmodule
