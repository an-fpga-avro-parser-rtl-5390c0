// rr_merger: reassembles the results of the NCH parallel PPS modules in the
// order in which the buffers were handed to the channels (round robin), so
// that the output keeps the input order of the objects.
//
// Each channel presents the head of its result queue: head_valid, head_keep
// (the selection kept the object), head_last (the object ended its
// wire-format buffer) and head_data. A pointer names the channel whose
// result is due. When that head is present and was discarded by the
// selection it is popped without output; when it was kept it is offered on
// the AXI-Stream output (m_tvalid) and popped on m_tready. The pointer moves
// to the next channel after the result that ends a buffer, so all objects of
// one buffer leave before those of the next. (Moving on after every result
// would be enough for one object per buffer, which is what the published
// round-robin scheme assumes; with several objects per buffer it would mix up
// the order and can stall the channels for good.) Output is combinational
// from the queue heads.
module rr_merger #(
  parameter int unsigned NCH = 8,
  parameter int unsigned W   = 64,
  parameter int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NCH-1:0]        head_valid,
  input  logic [NCH-1:0]        head_keep,
  input  logic [NCH-1:0]        head_last,
  input  logic [NCH-1:0][W-1:0] head_data,
  output logic [NCH-1:0]        pop,
  output logic [W-1:0]          m_tdata,
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic                  dropped
);
  logic [CHW-1:0] ptr_q;
  logic           take;

  assign m_tvalid = head_valid[ptr_q] && head_keep[ptr_q];
  assign m_tdata  = head_data[ptr_q];
  assign dropped  = head_valid[ptr_q] && !head_keep[ptr_q];
  assign take     = dropped || (m_tvalid && m_tready);

  always_comb begin
    pop = '0;
    pop[ptr_q] = take;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr_q <= '0;
    else if (take && head_last[ptr_q]) ptr_q <= (ptr_q == CHW'(NCH - 1)) ? '0 : ptr_q + 1'b1;
  end
endmodule
