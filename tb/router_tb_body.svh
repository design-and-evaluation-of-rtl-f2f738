// Shared body of the damq_router end-to-end testbenches. The including
// module defines NP, FLIT_W, PKT_LEN, NPKT and instantiates the router as
// `dut` (digit routing, stage 0: output = top base-4 digit of the 8-bit
// destination in the low byte of every flit).
//
// Each input sends NPKT packets of 1..PKT_LEN flits to random destinations
// with random gaps; outputs stall at random, in phases of light and heavy
// back-pressure. Flit layout: [63:52] packet number of its source,
// [51:48] flit index, [47:46] source input, [7:0] destination.
// Checks: every flit leaves on the output its destination names; packets of
// one source to one output keep their order; flits of a packet are
// contiguous on a link; every packet arrives; an idle switch passes a flit
// from input link to output link one clock after accepting it. Counts every mechanism of the
// switch and fails if one never occurred.

  logic clk = 0, rst_n = 0;
  logic [7:0] node_id = '0;
  logic [NP-1:0] in_valid, in_tail, in_ready, out_valid, out_tail, out_ready;
  logic [FLIT_W-1:0] in_data [NP];
  logic [FLIT_W-1:0] out_data [NP];
  int checks = 0, failures = 0;
  bit tb_done = 1'b0;   // the including module reports and stops

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ---------------- sources ----------------
  int sp [NP], sf [NP];
  int dst [NP][NPKT];
  int len [NP][NPKT];
  int exp_q [NP][NP][$];        // [src][out] packet numbers in order
  int got [NP];                 // packets received per output
  int total_got = 0;
  int cur_src [NP], cur_pkt [NP], cur_fl [NP];
  bit enable = 0;
  int send_rate = 80, ready_rate = 100;

  function automatic logic [FLIT_W-1:0] flit(int s, int p, int f);
    logic [FLIT_W-1:0] d = '0;
    d[63:52] = 12'(p); d[51:48] = 4'(f); d[47:46] = 2'(s); d[7:0] = 8'(dst[s][p]);
    return d;
  endfunction

  always @(negedge clk) if (enable) begin
    for (int s = 0; s < NP; s++) begin
      in_valid[s] = enable && sp[s] < NPKT && ($urandom_range(99) < send_rate);
      in_data[s]  = (sp[s] < NPKT) ? flit(s, sp[s], sf[s]) : '0;
      in_tail[s]  = (sp[s] < NPKT) && sf[s] == len[s][sp[s]] - 1;
    end
  end
  always @(negedge clk)
    for (int o = 0; o < NP; o++) out_ready[o] = $urandom_range(99) < ready_rate;

  // ---------------- mechanism counters ----------------
  int n_case [5];
  int n_cut = 0, n_block = 0, n_stall = 0, n_contend = 0, n_pass = 0;
  logic [NP-1:0] ev_cut, ev_pass;
  logic [2:0] ev_op [NP];

  for (genvar i = 0; i < NP; i++) begin : g_probe
    assign ev_op[i]  = 3'(dut.g_in[i].op);
    assign ev_cut[i] = dut.g_in[i].cut_through;
    // DAMQ: a flit of one channel leaves while another channel of the same
    // buffer holds flits whose output is busy with another input
    always_comb begin
      ev_pass[i] = 1'b0;
      if (dut.x_pull[i])
        for (int c = 0; c < NP; c++)
          if (c != int'(dut.g_in[i].u_in.u_pfc.cur_ch) && dut.g_in[i].u_in.u_pfc.count[c] != 0)
            ev_pass[i] = 1'b1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    int nreq [NP];
    for (int i = 0; i < NP; i++) begin
      n_case[ev_op[i]]++;
      if (ev_cut[i]) n_cut++;
      if (ev_pass[i]) n_pass++;
      if (!in_ready[i] && enable && sp[i] < NPKT && sf[i] == 0) n_block++;
      if (out_valid[i] && !out_ready[i]) n_stall++;
      nreq[i] = 0;
    end
    for (int i = 0; i < NP; i++) if (dut.req_valid[i]) nreq[dut.req_ch[i]]++;
    for (int o = 0; o < NP; o++) if (nreq[o] > 1) n_contend++;
    // sources
    for (int s = 0; s < NP; s++) if (in_valid[s] && in_ready[s]) begin
      if (sf[s] == 0) exp_q[s][dst[s][sp[s]] / 64].push_back(sp[s]);
      if (in_tail[s]) begin sp[s]++; sf[s] = 0; end else sf[s]++;
    end
    // sinks
    for (int o = 0; o < NP; o++) if (out_valid[o] && out_ready[o]) begin
      automatic int p = int'(out_data[o][63:52]);
      automatic int f = int'(out_data[o][51:48]);
      automatic int s = int'(out_data[o][47:46]);
      chk(int'(out_data[o][7:6]) == o, "flit leaves on its routed output");
      if (cur_src[o] < 0) begin
        chk(f == 0 && exp_q[s][o].size() > 0 && exp_q[s][o][0] == p, "packet order per source and output");
        if (exp_q[s][o].size() > 0) void'(exp_q[s][o].pop_front());
        cur_src[o] = s; cur_pkt[o] = p; cur_fl[o] = 0;
      end else begin
        chk(s == cur_src[o] && p == cur_pkt[o] && f == cur_fl[o], "flits of a packet contiguous and in order");
      end
      chk(out_tail[o] == (f == len[s][p] - 1), "end-of-packet bit");
      if (out_tail[o]) begin cur_src[o] = -1; got[o]++; total_got++; end
      else cur_fl[o]++;
    end
  end

  initial begin
    int t0, lat;
    for (int s = 0; s < NP; s++) begin
      sp[s] = 0; sf[s] = 0;
      for (int p = 0; p < NPKT; p++) begin
        dst[s][p] = $urandom_range(255);
        len[s][p] = $urandom_range(1, PKT_LEN);
      end
    end
    for (int o = 0; o < NP; o++) begin cur_src[o] = -1; got[o] = 0; end
    in_valid = '0; in_tail = '0;
    for (int s = 0; s < NP; s++) in_data[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // latency of an idle switch: a single-flit packet from input 0 to output 1
    @(negedge clk);
    dst[0][0] = 64 + dst[0][0] % 64; len[0][0] = 1;
    in_data[0] = flit(0, 0, 0);
    in_valid[0] = 1; in_tail[0] = 1;
    #1;
    chk(in_ready[0], "idle switch ready");
    @(posedge clk);
    t0 = 0; lat = -1;
    @(negedge clk); in_valid[0] = 0;
    for (int k = 1; k < 10 && lat < 0; k++) begin
      @(posedge clk); #1;
      if (out_valid[1]) lat = k;
    end
    chk(lat == 1, "idle switch: flit on the output link one clock after the edge that accepted it");
    $display("idle latency = %0d clock after acceptance", lat);
    // random traffic
    enable = 1;
    for (int cyc = 0; total_got < NP * NPKT && cyc < NPKT * PKT_LEN * 30; cyc++) begin
      @(posedge clk);
      ready_rate = ((cyc / 400) % 2 == 0) ? 35 : 100;
    end
    chk(total_got == NP * NPKT, "all packets delivered");
    for (int c = 1; c < 5; c++) chk(n_case[c] > 0, "every buffer case occurs");
    chk(n_cut > 0, "cut-through occurs");
    chk(n_block > 0, "virtual cut-through admission holds a head flit back");
    chk(n_stall > 0, "output link stall occurs");
    chk(n_contend > 0, "two inputs contend for one output");
    chk(n_pass > 0, "a flit leaves while another queue of its buffer waits");
    $display("delivered=%0d cases w=%0d r=%0d rw_rlow=%0d rw_wlow=%0d cut=%0d block=%0d stall=%0d contend=%0d pass=%0d",
             total_got, n_case[1], n_case[2], n_case[3], n_case[4], n_cut, n_block, n_stall, n_contend, n_pass);
    tb_done = 1'b1;
  end
