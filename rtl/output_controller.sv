// output_controller: one output port of the switch.
//
// While idle it arbitrates round robin among the inputs that ask for this
// output (req) and connects the winner through the crossbar (sel). Whenever
// the output register is free (empty or being emptied by out_ready) and the
// connected input offers a flit, the flit is taken (pull) and registered onto
// the outgoing link. Taking a flit that is not the end of a packet locks the
// output to that input until the packet's end-of-packet flit has passed, so
// packets never interleave on a link (virtual cut-through). The arbitration
// policy and the one-flit output register are this design's choices.
//
// Interface: grant and pull can happen in the same cycle as the request.
// out_valid/out_data/out_tail are registers; a flit leaves when out_valid and
// out_ready are both high.
module output_controller #(
  parameter int unsigned NP     = 4,
  parameter int unsigned FLIT_W = 64,
  localparam int unsigned CW = $clog2(NP)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NP-1:0]     req,
  output logic [CW-1:0]     sel,
  output logic              sel_valid,
  input  logic              f_valid,
  input  logic [FLIT_W-1:0] f_data,
  input  logic              f_tail,
  output logic              pull,
  output logic              out_valid,
  output logic [FLIT_W-1:0] out_data,
  output logic              out_tail,
  input  logic              out_ready
);

  logic          locked;
  logic [CW-1:0] owner;
  logic [CW-1:0] rr;     // highest priority input when idle
  logic [CW-1:0] pick;
  logic          any_req;
  logic          reg_free;

  // round-robin pick: first requesting input at or after rr
  always_comb begin
    pick    = rr;
    any_req = 1'b0;
    for (int k = NP - 1; k >= 0; k--) begin
      logic [CW-1:0] idx;
      idx = CW'((int'(rr) + k) % NP);
      if (req[idx]) begin
        pick    = idx;
        any_req = 1'b1;
      end
    end
  end

  assign sel       = locked ? owner : pick;
  assign sel_valid = locked | any_req;
  assign reg_free  = !out_valid || out_ready;
  assign pull      = sel_valid && f_valid && reg_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked    <= 1'b0;
      owner     <= '0;
      rr        <= '0;
      out_valid <= 1'b0;
    end else begin
      if (pull) begin
        locked <= !f_tail;
        owner  <= sel;
        if (f_tail) rr <= CW'((int'(sel) + 1) % NP);
      end
      if (pull)           out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (pull) begin
      out_data <= f_data;
      out_tail <= f_tail;
    end
  end

  // a flit waiting on the link is held unchanged until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_tail))
    else $error("output_controller: link flit changed before it was taken");

endmodule
