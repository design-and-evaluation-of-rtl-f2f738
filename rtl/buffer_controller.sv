// buffer_controller: sets the u (shift up), d (shift down) tags and the load
// strobe of every storage location, all in parallel, from the case chosen by
// the case selector and the read / insertion addresses.
//
// "Up" moves a location's content to address i-1, "down" to i+1. Two bit-
// setting comparator trees compute the address thresholds: tree W gives
// geW[i] = (i >= waddr); tree R gives gtR[i] = (i > raddr), or i >= raddr in
// case 4. Then:
//   case 1 write      : d = geW                 load at waddr
//   case 2 read       : u = gtR                 (entry at raddr leaves)
//   case 3 read<write : u = gtR & ~geW          load at waddr-1
//   case 4 write<=read: d = geW & ~geR          load at waddr
// The load position is the edge of the geW thermometer. Cases 1-3 follow the
// scheme as described; in case 4 the entries between the two addresses move
// down (toward higher addresses), which is the only direction that both
// opens the insertion slot and closes the hole left by the read.
//
// Interface: combinational. waddr must be below N whenever a write is
// requested (the buffer is never written when full).
module buffer_controller
  import damq_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned P = $clog2(N)
) (
  input  buf_case_e    op,
  input  logic [P-1:0] raddr,
  input  logic [P-1:0] waddr,
  output logic [N-1:0] up,
  output logic [N-1:0] dn,
  output logic [N-1:0] load
);

  logic [N-1:0] ge_w;
  logic [N-1:0] t_r;      // i > raddr, or i >= raddr in case 4
  logic [N-1:0] at_w;     // one-hot: i == waddr
  logic [N-1:0] below_w;  // one-hot: i == waddr-1

  bit_setting_tree #(.N(N)) u_tree_w (.key(waddr), .s_root(1'b1), .tag(ge_w));
  bit_setting_tree #(.N(N)) u_tree_r (.key(raddr), .s_root(op == OP_RW_WLOW), .tag(t_r));

  assign at_w    = ge_w & ~{ge_w[N-2:0], 1'b0};
  assign below_w = {1'b0, ge_w[N-1:1]} & ~ge_w;

  always_comb begin
    up   = '0;
    dn   = '0;
    load = '0;
    unique case (op)
      OP_WRITE: begin
        dn   = ge_w;
        load = at_w;
      end
      OP_READ: begin
        up = t_r;
      end
      OP_RW_RLOW: begin
        up   = t_r & ~ge_w;
        load = below_w;
      end
      OP_RW_WLOW: begin
        dn   = ge_w & ~t_r;
        load = at_w;
      end
      default: ;
    endcase
  end

endmodule
