// self_compacting_buffer: N storage locations wired as a two-way shift
// structure with a random-access read port.
//
// Location i can pass its content up (to i-1) or down (to i+1), load a new
// flit, or hold, as tagged by the buffer controller (up/dn/load vectors).
// Per-channel regions stay packed one after the other in channel order, so
// inserting into or deleting from the middle of the buffer moves only the
// entries between the two addresses involved, in a single clock.
//
// Interface: rdata/re show the entry at raddr combinationally; the read
// takes effect (the entry disappears) at the clock edge that performs the
// shift tagged for it. One operation per clock.
module self_compacting_buffer #(
  parameter int unsigned N      = 16,
  parameter int unsigned FLIT_W = 64,
  localparam int unsigned P = $clog2(N)
) (
  input  logic              clk,
  input  logic [N-1:0]      up,
  input  logic [N-1:0]      dn,
  input  logic [N-1:0]      load,
  input  logic [FLIT_W-1:0] w_data,
  input  logic              w_e,
  input  logic [P-1:0]      raddr,
  output logic [FLIT_W-1:0] rdata,
  output logic              re
);

  logic [FLIT_W-1:0] q_data [N];
  logic [N-1:0]      q_e;

  for (genvar i = 0; i < N; i++) begin : g_loc
    logic              fa, fb, ae, be;
    logic [FLIT_W-1:0] ad, bd;
    if (i == 0) begin : g_top
      assign fa = 1'b0; assign ad = '0; assign ae = 1'b0;
    end else begin : g_mid_a
      assign fa = dn[i-1]; assign ad = q_data[i-1]; assign ae = q_e[i-1];
    end
    if (i == N - 1) begin : g_bot
      assign fb = 1'b0; assign bd = '0; assign be = 1'b0;
    end else begin : g_mid_b
      assign fb = up[i+1]; assign bd = q_data[i+1]; assign be = q_e[i+1];
    end
    storage_location #(.FLIT_W(FLIT_W)) u_loc (
      .clk       (clk),
      .load      (load[i]),
      .w_data    (w_data),
      .w_e       (w_e),
      .from_above(fa),
      .above_data(ad),
      .above_e   (ae),
      .from_below(fb),
      .below_data(bd),
      .below_e   (be),
      .q_data    (q_data[i]),
      .q_e       (q_e[i])
    );
  end

  assign rdata = q_data[raddr];
  assign re    = q_e[raddr];

endmodule
