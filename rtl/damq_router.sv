// damq_router: an NP x NP DAMQ switch with self-compacting buffers.
//
// Each input port owns one N-flit buffer shared dynamically by all NP output
// channels (dynamically allocated multi-queue): a packet blocked on a busy
// output does not block packets behind it that go elsewhere. The buffer keeps
// one FIFO region per output channel, packed in channel order and kept
// compact by shifting entries up or down on every insertion and deletion.
//
// Structure: NP input_controllers (bypass buffer, routing handler, packet
// flow controller with its self-compacting buffer), a multiplexer crossbar
// and NP output_controllers. An input asks for one output at a time; an idle
// output grants round robin and then belongs to that input until the
// packet's end-of-packet flit has passed. Flow control is virtual cut-
// through with valid/ready links whose ready is registered.
//
// Latency with no contention: a flit accepted from the input link at clock
// edge t sits in the bypass buffer during the following cycle, crosses the
// crossbar in that same cycle (cut-through) and is on out_valid/out_data
// from edge t+1: two clock edges from the link input to the link output.
//
// Defaults: one 4x4 switch of a radix-4 Omega network (digit routing, stage
// 0, 8-bit node addresses), 16-flit buffers, 64-bit (8-byte) flits,
// single-flit packets.
module damq_router
  import damq_pkg::*;
#(
  parameter int unsigned NP      = 4,
  parameter int unsigned N       = 16,
  parameter int unsigned FLIT_W  = 64,
  parameter int unsigned PKT_LEN = 1,
  parameter int unsigned ADDR_W  = 8,
  parameter routing_e    ROUTING = ROUTE_DELTA,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned K       = 8,
  localparam int unsigned P  = $clog2(N),
  localparam int unsigned CW = $clog2(NP)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] node_id,
  input  logic [NP-1:0]     in_valid,
  input  logic [FLIT_W-1:0] in_data [NP],
  input  logic [NP-1:0]     in_tail,
  output logic [NP-1:0]     in_ready,
  output logic [NP-1:0]     out_valid,
  output logic [FLIT_W-1:0] out_data [NP],
  output logic [NP-1:0]     out_tail,
  input  logic [NP-1:0]     out_ready
);

  logic [NP-1:0]     req_valid;
  logic [CW-1:0]     req_ch [NP];
  logic [NP-1:0]     x_valid, x_tail, x_pull;
  logic [FLIT_W-1:0] x_data [NP];
  logic [CW-1:0]     sel [NP];
  logic [NP-1:0]     sel_valid;
  logic [NP-1:0]     f_valid, f_tail, pull;
  logic [FLIT_W-1:0] f_data [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    logic [P:0] free_space, occupancy;
    buf_case_e  op;
    logic       cut_through;
    input_controller #(
      .NP(NP), .N(N), .FLIT_W(FLIT_W), .PKT_LEN(PKT_LEN), .ADDR_W(ADDR_W),
      .ROUTING(ROUTING), .STAGE(STAGE), .K(K)
    ) u_in (
      .clk, .rst_n, .node_id,
      .in_valid(in_valid[i]), .in_data(in_data[i]), .in_tail(in_tail[i]),
      .in_ready(in_ready[i]),
      .req_valid(req_valid[i]), .req_ch(req_ch[i]),
      .x_valid(x_valid[i]), .x_data(x_data[i]), .x_tail(x_tail[i]), .x_pull(x_pull[i]),
      .free_space, .occupancy, .op, .cut_through
    );
  end

  crossbar #(.NP(NP), .FLIT_W(FLIT_W)) u_xbar (
    .in_valid(x_valid), .in_data(x_data), .in_tail(x_tail),
    .sel(sel), .sel_valid(sel_valid),
    .out_valid(f_valid), .out_data(f_data), .out_tail(f_tail)
  );

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic [NP-1:0] req;
    for (genvar i = 0; i < NP; i++) begin : g_req
      assign req[i] = req_valid[i] && req_ch[i] == CW'(o);
    end
    output_controller #(.NP(NP), .FLIT_W(FLIT_W)) u_out (
      .clk, .rst_n,
      .req(req), .sel(sel[o]), .sel_valid(sel_valid[o]),
      .f_valid(f_valid[o]), .f_data(f_data[o]), .f_tail(f_tail[o]),
      .pull(pull[o]),
      .out_valid(out_valid[o]), .out_data(out_data[o]), .out_tail(out_tail[o]),
      .out_ready(out_ready[o])
    );
  end

  // return each output's pull to the input it is connected to; an input
  // asks for one output at a time, so at most one output pulls from it
  logic [NP-1:0] multi_pull;
  always_comb begin
    x_pull     = '0;
    multi_pull = '0;
    for (int o = 0; o < NP; o++) begin
      if (pull[o]) begin
        if (x_pull[sel[o]]) multi_pull[sel[o]] = 1'b1;
        x_pull[sel[o]] = 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) multi_pull == '0)
    else $error("damq_router: two outputs took a flit from the same input");

endmodule
