// avro_top: the three generated Avro parser accelerators side by side, each
// with its own input and output stream and event counters:
//   car_*   : example car schema, query $[?(id==42)].(id | engine.horsepower)
//   yahoo_* : Yahoo Streaming Benchmark, $[?event_type='view'].(ad_id | event_time)
//   riot_*  : RIOTBench SmartCity, range selection and projection of five sensors
// Each is an avro_accel with 8 channels on a 64-bit AXI-Stream input in the
// Avro wire format and a tuple-wide AXI-Stream output. In the system the
// accelerators are meant for, one of them sits in a reconfigurable region
// and is fed and drained by that region's DMA engine; the DMA, crossbar, CPU
// and memory are outside this design and appear here only as these ports.
module avro_top #(
  parameter int unsigned NCH      = 8,
  parameter int unsigned CH_DEPTH = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  // car example accelerator
  input  logic [63:0]  car_s_tdata,
  input  logic [7:0]   car_s_tkeep,
  input  logic         car_s_tvalid,
  output logic         car_s_tready,
  output logic [avro_pkg::CAR_OUT_W-1:0] car_m_tdata,
  output logic         car_m_tvalid,
  input  logic         car_m_tready,
  output logic [3:0][31:0] car_events,
  // Yahoo accelerator
  input  logic [63:0]  yahoo_s_tdata,
  input  logic [7:0]   yahoo_s_tkeep,
  input  logic         yahoo_s_tvalid,
  output logic         yahoo_s_tready,
  output logic [avro_pkg::YAHOO_OUT_W-1:0] yahoo_m_tdata,
  output logic         yahoo_m_tvalid,
  input  logic         yahoo_m_tready,
  output logic [3:0][31:0] yahoo_events,
  // RIOTBench accelerator
  input  logic [63:0]  riot_s_tdata,
  input  logic [7:0]   riot_s_tkeep,
  input  logic         riot_s_tvalid,
  output logic         riot_s_tready,
  output logic [avro_pkg::RIOT_OUT_W-1:0] riot_m_tdata,
  output logic         riot_m_tvalid,
  input  logic         riot_m_tready,
  output logic [3:0][31:0] riot_events
);
  import avro_pkg::*;

  // events[0] objects parsed, [1] objects discarded by the selection,
  // [2] input stall cycles, [3] end-of-message markers
  avro_accel #(.SCHEMA(SCH_CAR), .NCH(NCH), .CH_DEPTH(CH_DEPTH)) u_car (
    .clk, .rst_n,
    .s_tdata(car_s_tdata), .s_tkeep(car_s_tkeep), .s_tvalid(car_s_tvalid), .s_tready(car_s_tready),
    .m_tdata(car_m_tdata), .m_tvalid(car_m_tvalid), .m_tready(car_m_tready),
    .n_objects(car_events[0]), .n_dropped(car_events[1]),
    .n_stalls(car_events[2]), .n_msg_end(car_events[3])
  );

  avro_accel #(.SCHEMA(SCH_YAHOO), .NCH(NCH), .CH_DEPTH(CH_DEPTH)) u_yahoo (
    .clk, .rst_n,
    .s_tdata(yahoo_s_tdata), .s_tkeep(yahoo_s_tkeep), .s_tvalid(yahoo_s_tvalid), .s_tready(yahoo_s_tready),
    .m_tdata(yahoo_m_tdata), .m_tvalid(yahoo_m_tvalid), .m_tready(yahoo_m_tready),
    .n_objects(yahoo_events[0]), .n_dropped(yahoo_events[1]),
    .n_stalls(yahoo_events[2]), .n_msg_end(yahoo_events[3])
  );

  avro_accel #(.SCHEMA(SCH_RIOT), .NCH(NCH), .CH_DEPTH(CH_DEPTH)) u_riot (
    .clk, .rst_n,
    .s_tdata(riot_s_tdata), .s_tkeep(riot_s_tkeep), .s_tvalid(riot_s_tvalid), .s_tready(riot_s_tready),
    .m_tdata(riot_m_tdata), .m_tvalid(riot_m_tvalid), .m_tready(riot_m_tready),
    .n_objects(riot_events[0]), .n_dropped(riot_events[1]),
    .n_stalls(riot_events[2]), .n_msg_end(riot_events[3])
  );
endmodule
