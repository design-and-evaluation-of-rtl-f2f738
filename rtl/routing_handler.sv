// routing_handler: the routing algorithm handler of an input controller.
//
// Computes the output channel of a packet from its head flit. The
// destination address occupies the low ADDR_W bits of the head flit (this
// design's packet format). Two routing functions, chosen by ROUTING:
//  * ROUTE_DELTA (default): digit routing for a Delta / Omega network built of
//    NP x NP switches. Stage STAGE uses one base-NP digit of the destination,
//    the most significant digit at stage 0.
//  * ROUTE_KCUBE: dimension-ordered routing for a unidirectional k-ary n-cube
//    with n = NP-1 dimensions. The address holds one $clog2(K)-bit coordinate
//    per dimension, dimension 0 lowest. The packet leaves on the lowest
//    dimension whose coordinate differs from this node's (node_id); when all
//    agree it leaves on channel NP-1, the local processor port. The virtual
//    channels used against deadlock in wrap-around networks are not part of
//    this module.
//
// Interface: combinational.
module routing_handler
  import damq_pkg::*;
#(
  parameter int unsigned NP      = 4,
  parameter int unsigned FLIT_W  = 64,
  parameter int unsigned ADDR_W  = 8,
  parameter routing_e    ROUTING = ROUTE_DELTA,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned K       = 8,
  localparam int unsigned CW = $clog2(NP)
) (
  input  logic [FLIT_W-1:0] header,
  input  logic [ADDR_W-1:0] node_id,
  output logic [CW-1:0]     out_ch
);

  localparam int unsigned NSTAGES = ADDR_W / CW;
  localparam int unsigned KW      = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned NDIM    = NP - 1;

  logic [ADDR_W-1:0] dest;
  assign dest = header[ADDR_W-1:0];

  if (ROUTING == ROUTE_DELTA) begin : g_delta
    initial assert (STAGE < NSTAGES && NSTAGES * CW <= ADDR_W)
      else $error("routing_handler: STAGE out of range");
    assign out_ch = dest[(NSTAGES-1-STAGE)*CW +: CW];
  end else begin : g_kcube
    initial assert (NDIM * KW <= ADDR_W)
      else $error("routing_handler: address too narrow for NP-1 dimensions");
    always_comb begin
      out_ch = CW'(NDIM);
      for (int d = NDIM - 1; d >= 0; d--) begin
        if (dest[d*KW +: KW] != node_id[d*KW +: KW]) out_ch = CW'(d);
      end
    end
  end

endmodule
