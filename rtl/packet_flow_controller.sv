// packet_flow_controller: buffer management of one input port of a DAMQ
// (dynamically allocated multi-queue) switch built on a self-compacting
// buffer.
//
// Parts (as in the self-compacting scheme): bypass buffer, new header
// register, output channel number register, free space register, channel
// pointers, case selector, buffer controller and the self-compacting buffer.
// One buffer of N flits is shared by the NP output channels; each channel's
// flits form a FIFO region, regions packed in channel order.
//
// Receive side: a flit accepted from the link goes into the bypass buffer; a
// head flit is also copied into the new header register, from which the
// (external, combinational) routing handler returns route_ch. Next cycle the
// flit leaves the bypass buffer: straight to the crossbar when this input is
// sending that channel's packet and the channel's region is empty (cut-
// through), otherwise into the tail of its channel's region. The channel of
// the rest of a packet is kept in the output channel number register.
//
// Flow control (this design's choice): virtual cut-through. The free space
// register holds N - occupancy - (flit in bypass) - (flits still to come of
// the packet being received). A head flit is accepted only when it is at
// least PKT_LEN, so a whole packet always fits; in_ready is a register.
// Packets must not be longer than PKT_LEN; the e (end-of-packet) bit is
// in_tail.
//
// Send side: when not sending, the controller offers the head of one
// non-empty channel (round robin, moving on after each refusal) and asks its
// output for it (req_valid/req_ch). Once a flit that is not the packet's end
// is taken (x_pull) the input stays on that channel until the end-of-packet
// flit is taken. One flit per cycle is written and one read; both in the
// same cycle use cases 3/4 of the buffer.
module packet_flow_controller
  import damq_pkg::*;
#(
  parameter int unsigned NP      = 4,
  parameter int unsigned N       = 16,
  parameter int unsigned FLIT_W  = 64,
  parameter int unsigned PKT_LEN = 1,
  localparam int unsigned P  = $clog2(N),
  localparam int unsigned CW = $clog2(NP)
) (
  input  logic              clk,
  input  logic              rst_n,
  // input link
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_data,
  input  logic              in_tail,
  output logic              in_ready,
  // routing algorithm handler
  output logic [FLIT_W-1:0] hdr,
  input  logic [CW-1:0]     route_ch,
  // crossbar side
  output logic              req_valid,
  output logic [CW-1:0]     req_ch,
  output logic              x_valid,
  output logic [FLIT_W-1:0] x_data,
  output logic              x_tail,
  input  logic              x_pull,
  // status
  output logic [P:0]        free_space,
  output logic [P:0]        occupancy,
  output buf_case_e         op,
  output logic              cut_through
);

  initial assert (PKT_LEN >= 1 && PKT_LEN <= N)
    else $error("packet_flow_controller: PKT_LEN must be 1..N");

  // ---------------- receive side ----------------
  logic              in_pkt_q;     // inside a packet on the link
  logic [P:0]        reserved_q;   // flits of that packet still to come
  logic              accept;
  logic              byp_valid, byp_tail, byp_head, byp_take;
  logic [FLIT_W-1:0] byp_data;
  logic [CW-1:0]     in_ch_q;      // output channel number register
  logic [CW-1:0]     byp_ch;

  assign accept = in_valid && in_ready;

  bypass_buffer #(.FLIT_W(FLIT_W)) u_bypass (
    .clk, .rst_n,
    .in_valid(accept), .in_data(in_data), .in_tail(in_tail), .in_head(!in_pkt_q),
    .take(byp_take),
    .valid(byp_valid), .data(byp_data), .tail(byp_tail), .head(byp_head)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hdr <= '0;
    else if (accept && !in_pkt_q) hdr <= in_data;   // new header register
  end

  assign byp_ch = byp_head ? route_ch : in_ch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_ch_q <= '0;
    else if (byp_valid && byp_head) in_ch_q <= route_ch;
  end

  // ---------------- pointers and buffer ----------------
  logic [P:0]    count [NP];
  logic [P-1:0]  raddr, waddr;
  logic          rd, wr;
  logic [CW-1:0] cur_ch;
  logic [N-1:0]  tag_up, tag_dn, tag_load;
  logic [FLIT_W-1:0] buf_rdata;
  logic          buf_re;

  channel_pointers #(.NCH(NP), .N(N)) u_ptrs (
    .clk, .rst_n,
    .rd(rd), .rd_ch(cur_ch), .wr(wr), .wr_ch(byp_ch),
    .raddr(raddr), .waddr(waddr), .count(count), .occupancy(occupancy)
  );

  case_selector #(.N(N)) u_case (
    .rd(rd), .wr(wr), .raddr(raddr), .waddr(waddr), .op(op)
  );

  buffer_controller #(.N(N)) u_ctrl (
    .op(op), .raddr(raddr), .waddr(waddr), .up(tag_up), .dn(tag_dn), .load(tag_load)
  );

  self_compacting_buffer #(.N(N), .FLIT_W(FLIT_W)) u_buf (
    .clk, .up(tag_up), .dn(tag_dn), .load(tag_load),
    .w_data(byp_data), .w_e(byp_tail),
    .raddr(raddr), .rdata(buf_rdata), .re(buf_re)
  );

  // ---------------- send side ----------------
  logic          locked_q;
  logic [CW-1:0] lock_ch_q;
  logic [CW-1:0] rr_q;
  logic [NP-1:0] avail;
  logic [CW-1:0] pick;
  logic          any_avail;
  logic          from_buf;
  logic          byp_to_xbar;

  for (genvar c = 0; c < NP; c++) begin : g_avail
    assign avail[c] = (count[c] != '0) || (byp_valid && byp_ch == CW'(c));
  end

  always_comb begin
    pick      = rr_q;
    any_avail = 1'b0;
    for (int k = NP - 1; k >= 0; k--) begin
      logic [CW-1:0] idx;
      idx = CW'((int'(rr_q) + k) % NP);
      if (avail[idx]) begin
        pick      = idx;
        any_avail = 1'b1;
      end
    end
  end

  assign cur_ch    = locked_q ? lock_ch_q : pick;
  assign req_valid = !locked_q && any_avail;
  assign req_ch    = pick;
  assign from_buf  = count[cur_ch] != '0;
  assign x_valid   = from_buf || (byp_valid && byp_ch == cur_ch);
  assign x_data    = from_buf ? buf_rdata : byp_data;
  assign x_tail    = from_buf ? buf_re : byp_tail;

  assign rd          = x_pull && from_buf;
  assign byp_to_xbar = x_pull && !from_buf;
  assign wr          = byp_valid && !byp_to_xbar;
  assign byp_take    = byp_valid;
  assign cut_through = byp_to_xbar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q  <= 1'b0;
      lock_ch_q <= '0;
      rr_q      <= '0;
    end else if (x_pull) begin
      locked_q  <= !x_tail;
      lock_ch_q <= cur_ch;
      if (x_tail) rr_q <= CW'((int'(cur_ch) + 1) % NP);
    end else if (req_valid) begin
      rr_q <= CW'((int'(pick) + 1) % NP);
    end
  end

  // ---------------- free space register and link ready ----------------
  logic       in_pkt_d;
  logic [P:0] reserved_d;
  logic [P:0] occ_d;
  logic [P+1:0] free_d;

  always_comb begin
    in_pkt_d   = in_pkt_q;
    reserved_d = reserved_q;
    if (accept) begin
      in_pkt_d = !in_tail;
      if (in_tail)        reserved_d = '0;
      else if (!in_pkt_q) reserved_d = (P+1)'(PKT_LEN - 1);
      else                reserved_d = reserved_q - 1'b1;
    end
    occ_d  = occupancy + (P+1)'(wr) - (P+1)'(rd);
    free_d = (P+2)'(N) - (P+2)'(occ_d) - (P+2)'(accept) - (P+2)'(reserved_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt_q   <= 1'b0;
      reserved_q <= '0;
      free_space <= '0;
      in_ready   <= 1'b0;
    end else begin
      in_pkt_q   <= in_pkt_d;
      reserved_q <= reserved_d;
      free_space <= free_d[P:0];
      in_ready   <= in_pkt_d || (free_d >= (P+2)'(PKT_LEN));
    end
  end

  // ---------------- rules ----------------
  assert property (@(posedge clk) disable iff (!rst_n) wr |-> occupancy < (P+1)'(N))
    else $error("packet_flow_controller: write into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n)
                   accept && in_pkt_q && !in_tail |-> reserved_q != '0)
    else $error("packet_flow_controller: packet longer than PKT_LEN");
  assert property (@(posedge clk) disable iff (!rst_n) x_pull |-> x_valid)
    else $error("packet_flow_controller: pull without a flit");

endmodule
