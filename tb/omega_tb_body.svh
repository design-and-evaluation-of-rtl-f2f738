// Shared body of the Omega-network testbenches. The including module sets
// PKT_LEN (fixed packet size in flits), RHO_PCT (offered channel load in
// percent) and CYCLES (injection time).
//
// Network: 256 nodes, 4 stages of 64 damq_router switches (4x4), a radix-4
// perfect shuffle (rotate the 8-bit line number left by one base-4 digit)
// in front of every stage; stage s routes on destination digit s, most
// significant first. Each node generates fixed-size packets to uniformly
// random destinations with probability RHO_PCT/100/PKT_LEN per cycle (so
// channel load = generation rate x packet size), kept in an unbounded source
// queue; destinations always accept. Latency is counted from the cycle the
// head flit enters the first switch to the cycle the last flit leaves the
// last switch. Checks: every packet reaches the node it names, exactly once,
// with its flits in order and contiguous, and packets between one source and
// one destination arrive in the order sent.

  localparam int unsigned NN = 256;
  localparam int unsigned NS = 4;
  localparam int unsigned NSW = NN / 4;
  localparam int unsigned FW = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  function automatic int shuffle(int l);
    return ((l << 2) | (l >> 6)) & 8'hFF;
  endfunction

  // line-level link signals: stage s input lines
  logic [NN-1:0] l_valid [NS+1];
  logic [NN-1:0] l_tail  [NS+1];
  logic [NN-1:0] l_ready [NS+1];
  logic [FW-1:0] l_data  [NS+1][NN];
  // switch output lines of stage s
  logic [NN-1:0] o_valid [NS];
  logic [NN-1:0] o_tail  [NS];
  logic [NN-1:0] o_ready [NS];
  logic [FW-1:0] o_data  [NS][NN];

  for (genvar s = 0; s < NS; s++) begin : g_stage
    for (genvar w = 0; w < NSW; w++) begin : g_sw
      logic [FW-1:0] id [4];
      logic [FW-1:0] od [4];
      for (genvar p = 0; p < 4; p++) begin : g_p
        assign id[p] = l_data[s][4*w+p];
        assign o_data[s][4*w+p] = od[p];
      end
      damq_router #(.PKT_LEN(PKT_LEN), .STAGE(s)) u_sw (
        .clk, .rst_n, .node_id(8'd0),
        .in_valid(l_valid[s][4*w +: 4]), .in_data(id), .in_tail(l_tail[s][4*w +: 4]),
        .in_ready(l_ready[s][4*w +: 4]),
        .out_valid(o_valid[s][4*w +: 4]), .out_data(od), .out_tail(o_tail[s][4*w +: 4]),
        .out_ready(o_ready[s][4*w +: 4]));
    end
    // shuffle wiring: output line L of stage s feeds input line shuffle(L) of
    // stage s+1; the last stage's output line L is node L
    for (genvar L = 0; L < NN; L++) begin : g_link
      localparam int unsigned SL = (s == NS - 1) ? L : (((L << 2) | (L >> 6)) & 8'hFF);
      assign l_valid[s+1][SL] = o_valid[s][L];
      assign l_tail[s+1][SL]  = o_tail[s][L];
      assign l_data[s+1][SL]  = o_data[s][L];
      assign o_ready[s][L]    = (s == NS - 1) ? 1'b1 : l_ready[s+1][SL];
    end
  end
  assign l_ready[NS] = '1;

  // injection lines driven by the sources
  logic [NN-1:0] inj_valid, inj_tail;
  logic [FW-1:0] inj_data [NN];
  assign l_valid[0] = inj_valid;
  assign l_tail[0]  = inj_tail;
  for (genvar L = 0; L < NN; L++) begin : g_inj
    assign l_data[0][L] = inj_data[L];
  end

  int checks = 0, failures = 0;
  bit tb_done = 1'b0;   // the including module reports and stops
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ---------------- sources ----------------
  int src_q [NN][$];             // destinations of queued packets
  int src_t [NN][$];             // generation cycle
  int nsent [NN];                // packets sent per source
  int sf [NN];                   // flit index of the packet being sent
  int t_head [NN][$];            // per source: injection cycle of packets in flight, by number
  int cyc = 0;
  bit gen_on = 0;
  int n_gen = 0, n_got = 0;
  longint lat_sum = 0;
  int last_pkt [NN][NN];
  int rx_fl [NN], rx_src [NN], rx_pkt [NN];
  longint inj_cycle [NN][int];   // [source][packet number] head injection cycle

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      automatic int L = shuffle(n);
      if (src_q[n].size() > 0) begin
        logic [FW-1:0] d;
        d = '0;
        d[63:44] = 20'(nsent[n]); d[43:40] = 4'(sf[n]); d[15:8] = 8'(n); d[7:0] = 8'(src_q[n][0]);
        inj_valid[L] = 1'b1; inj_data[L] = d; inj_tail[L] = sf[n] == PKT_LEN - 1;
      end else begin
        inj_valid[L] = 1'b0; inj_data[L] = '0; inj_tail[L] = 1'b0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // generation: Bernoulli per cycle (geometric interarrival times)
    if (gen_on)
      for (int n = 0; n < NN; n++)
        if ($urandom_range(100 * PKT_LEN - 1) < RHO_PCT) begin
          src_q[n].push_back($urandom_range(NN - 1));
          n_gen++;
        end
    // injection
    for (int n = 0; n < NN; n++) begin
      automatic int L = shuffle(n);
      if (l_valid[0][L] && l_ready[0][L]) begin
        if (sf[n] == 0) inj_cycle[n][nsent[n]] = cyc;
        if (l_tail[0][L]) begin
          sf[n] = 0; nsent[n]++; void'(src_q[n].pop_front());
        end else sf[n]++;
      end
    end
    // ejection at the last stage: line L is node L
    for (int L = 0; L < NN; L++) if (l_valid[NS][L]) begin
      automatic logic [FW-1:0] d = l_data[NS][L];
      automatic int p = int'(d[63:44]);
      automatic int f = int'(d[43:40]);
      automatic int s = int'(d[15:8]);
      if (f == 0) begin
        chk(int'(d[7:0]) == L, "packet reaches the node it names");
        chk(p > last_pkt[s][L], "packets of one source-destination pair stay in order");
        last_pkt[s][L] = p;
        rx_src[L] = s; rx_pkt[L] = p; rx_fl[L] = 0;
      end else begin
        chk(s == rx_src[L] && p == rx_pkt[L] && f == rx_fl[L] + 1, "flits contiguous and in order");
        rx_fl[L] = f;
      end
      if (l_tail[NS][L]) begin
        chk(f == PKT_LEN - 1, "fixed packet length");
        if (inj_cycle[s].exists(p)) begin
          lat_sum += cyc - inj_cycle[s][p];
          inj_cycle[s].delete(p);
        end else chk(0, "packet delivered exactly once");
        n_got++;
      end
    end
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      nsent[n] = 0; sf[n] = 0; rx_fl[n] = 0; rx_src[n] = 0; rx_pkt[n] = 0;
      for (int m = 0; m < NN; m++) last_pkt[n][m] = -1;
    end
    inj_valid = '0; inj_tail = '0;
    for (int n = 0; n < NN; n++) inj_data[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen_on = 1;
    repeat (CYCLES) @(posedge clk);
    gen_on = 0;
    for (int k = 0; k < CYCLES * 3 && n_got < n_gen; k++) @(posedge clk);
    chk(n_got == n_gen, "every generated packet delivered");
    $display("omega 256 nodes, %0d-flit packets, load %0d%%: generated=%0d delivered=%0d mean latency=%0.2f cycles",
             PKT_LEN, RHO_PCT, n_gen, n_got, (n_got > 0) ? real'(lat_sum) / n_got : 0.0);
    tb_done = 1'b1;
  end
