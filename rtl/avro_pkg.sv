// avro_pkg: types and constants shared by the Avro parse/project/select (PPS)
// modules and the accelerator around them.
//
// schema_e names the three generated accelerators: the car example schema,
// the Yahoo Streaming Benchmark schema and the RIOTBench SmartCity schema.
// out_width() gives the width of the fixed output tuple of each PPS module
// (the concatenation of its projected attributes). cmp_type_e and cmp_op_e
// configure the selection comparators (sel_cmp).
package avro_pkg;

  typedef enum logic [1:0] {
    SCH_CAR   = 2'd0,
    SCH_YAHOO = 2'd1,
    SCH_RIOT  = 2'd2
  } schema_e;

  // Operand types and operators of the selection comparators. Strings,
  // booleans and enums are compared for equality of their bit patterns;
  // ints/longs as signed numbers; floats/doubles by IEEE 754 value.
  typedef enum logic [1:0] {
    CMP_BITS  = 2'd0,
    CMP_INT   = 2'd1,
    CMP_FLOAT = 2'd2
  } cmp_type_e;

  typedef enum logic [2:0] {
    OP_EQ = 3'd0,
    OP_LT = 3'd1,
    OP_GT = 3'd2,
    OP_LE = 3'd3,
    OP_GE = 3'd4
  } cmp_op_e;

  // Maximum string length held by a string parser block (document default).
  localparam int unsigned STR_MAX_BYTES = 32;

  // Output tuple widths of the PPS modules.
  localparam int unsigned CAR_OUT_W   = 64;   // id:int | horsepower:float
  localparam int unsigned YAHOO_OUT_W = 192;  // ad_id:fixed16 | event_time:long
  localparam int unsigned RIOT_OUT_W  = 160;  // five float sensor values

  function automatic int unsigned out_width(schema_e s);
    case (s)
      SCH_CAR:   return CAR_OUT_W;
      SCH_YAHOO: return YAHOO_OUT_W;
      default:   return RIOT_OUT_W;
    endcase
  endfunction

endpackage
