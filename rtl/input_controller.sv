// input_controller: one input port of the switch: the packet flow
// controller (self-compacting DAMQ buffer and its management) plus the
// routing algorithm handler, which turns the new header register into the
// output channel number.
//
// Timing: a head flit spends one cycle in the bypass buffer while its route
// is computed; see packet_flow_controller for the handshakes.
module input_controller
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
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_data,
  input  logic              in_tail,
  output logic              in_ready,
  output logic              req_valid,
  output logic [CW-1:0]     req_ch,
  output logic              x_valid,
  output logic [FLIT_W-1:0] x_data,
  output logic              x_tail,
  input  logic              x_pull,
  output logic [P:0]        free_space,
  output logic [P:0]        occupancy,
  output buf_case_e         op,
  output logic              cut_through
);

  logic [FLIT_W-1:0] hdr;
  logic [CW-1:0]     route_ch;

  routing_handler #(
    .NP(NP), .FLIT_W(FLIT_W), .ADDR_W(ADDR_W), .ROUTING(ROUTING), .STAGE(STAGE), .K(K)
  ) u_route (
    .header(hdr), .node_id(node_id), .out_ch(route_ch)
  );

  packet_flow_controller #(
    .NP(NP), .N(N), .FLIT_W(FLIT_W), .PKT_LEN(PKT_LEN)
  ) u_pfc (
    .clk, .rst_n,
    .in_valid, .in_data, .in_tail, .in_ready,
    .hdr(hdr), .route_ch(route_ch),
    .req_valid, .req_ch, .x_valid, .x_data, .x_tail, .x_pull,
    .free_space, .occupancy, .op, .cut_through
  );

endmodule
