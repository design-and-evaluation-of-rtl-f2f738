// tb_torus_network: a unidirectional 10-ary 2-cube (100 nodes, wrap-around
// in both dimensions) of 3-port DAMQ switches using dimension-ordered
// routing, with single-flit packets to uniformly random destinations.
//
// Switch (x, y): port 0 carries the +x ring, port 1 the +y ring, port 2 the
// local node. Node address = {y[3:0], x[3:0]}. Output port 0 of (x, y) feeds
// input port 0 of (x+1 mod 10, y); output port 1 feeds input port 1 of
// (x, y+1 mod 10). Each node generates a packet with probability M_PCT/1000
// per cycle into an unbounded source queue; with an average distance of 4.5
// hops per dimension the ring channel load is about 4.5 x M. The switch has
// no virtual channels, so the load is kept low enough that the rings do not
// fill. Checks: every packet reaches the node it names exactly once, and
// packets of one source-destination pair arrive in order. Prints the mean
// latency (head enters the first switch to packet leaves the last).
module tb_torus_network;
  import damq_pkg::*;
  localparam int unsigned K = 10;
  localparam int unsigned NN = K * K;
  localparam int unsigned FW = 64;
  localparam int unsigned M_PCT = 50;      // per mille: 0.05 packets/node/cycle
  localparam int unsigned CYCLES = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int addr_of(int n);
    return ((n / K) << 4) | (n % K);
  endfunction

  logic [2:0]    iv [NN], it [NN], ir [NN], ov [NN], ot [NN], ordy [NN];
  logic [FW-1:0] id [NN][3];
  logic [FW-1:0] od [NN][3];
  logic          inj_v [NN], inj_t [NN];
  logic [FW-1:0] inj_d [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int X = n % K;
    localparam int Y = n / K;
    localparam int NX = Y * K + (X + 1) % K;    // +x neighbour
    localparam int NY = ((Y + 1) % K) * K + X;  // +y neighbour
    localparam int PX = Y * K + (X + K - 1) % K;
    localparam int PY = ((Y + K - 1) % K) * K + X;
    logic [FW-1:0] idl [3];
    logic [FW-1:0] odl [3];
    // input 0 from -x neighbour's output 0, input 1 from -y neighbour's output 1
    assign iv[n] = {inj_v[n], ov[PY][1], ov[PX][0]};
    assign it[n] = {inj_t[n], ot[PY][1], ot[PX][0]};
    assign idl[0] = od[PX][0];
    assign idl[1] = od[PY][1];
    assign idl[2] = inj_d[n];
    assign ordy[n] = {1'b1, ir[NY][1], ir[NX][0]};
    for (genvar p = 0; p < 3; p++) begin : g_p
      assign id[n][p] = idl[p];
      assign od[n][p] = odl[p];
    end
    damq_router #(.NP(3), .ROUTING(ROUTE_KCUBE), .K(K)) u_sw (
      .clk, .rst_n, .node_id(8'(((n / K) << 4) | (n % K))),
      .in_valid(iv[n]), .in_data(idl), .in_tail(it[n]), .in_ready(ir[n]),
      .out_valid(ov[n]), .out_data(odl), .out_tail(ot[n]), .out_ready(ordy[n]));
  end

  // ---------------- sources and sinks ----------------
  int src_q [NN][$];
  int nsent [NN];
  longint inj_cycle [NN][int];
  int last_pkt [NN][NN];
  int cyc = 0, n_gen = 0, n_got = 0;
  longint lat_sum = 0;
  bit gen_on = 0;
  bit tb_done = 0;

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      logic [FW-1:0] d;
      d = '0;
      if (src_q[n].size() > 0) begin
        d[63:44] = 20'(nsent[n]); d[15:8] = 8'(n); d[7:0] = 8'(addr_of(src_q[n][0]));
      end
      inj_v[n] = src_q[n].size() > 0;
      inj_t[n] = 1'b1;
      inj_d[n] = d;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (gen_on)
      for (int n = 0; n < NN; n++)
        if ($urandom_range(999) < M_PCT) begin
          src_q[n].push_back($urandom_range(NN - 1));
          n_gen++;
        end
    for (int n = 0; n < NN; n++) begin
      if (inj_v[n] && ir[n][2]) begin
        inj_cycle[n][nsent[n]] = cyc;
        nsent[n]++;
        void'(src_q[n].pop_front());
      end
      if (ov[n][2]) begin
        automatic int p = int'(od[n][2][63:44]);
        automatic int s = int'(od[n][2][15:8]);
        chk(int'(od[n][2][7:0]) == addr_of(n), "packet reaches the node it names");
        chk(p > last_pkt[s][n], "packets of one source-destination pair stay in order");
        last_pkt[s][n] = p;
        if (inj_cycle[s].exists(p)) begin
          lat_sum += cyc - inj_cycle[s][p];
          inj_cycle[s].delete(p);
        end else chk(0, "packet delivered exactly once");
        n_got++;
      end
    end
  end

  initial begin
    #(10 * (CYCLES * 4 + 50000));
    failures++;
    $display("watchdog expired: generated=%0d delivered=%0d", n_gen, n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      nsent[n] = 0; inj_v[n] = 0; inj_t[n] = 0; inj_d[n] = '0;
      for (int m = 0; m < NN; m++) last_pkt[n][m] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen_on = 1;
    repeat (CYCLES) @(posedge clk);
    gen_on = 0;
    for (int k = 0; k < CYCLES * 3 && n_got < n_gen; k++) @(posedge clk);
    chk(n_got == n_gen, "every generated packet delivered");
    chk(n_gen > 0, "traffic generated");
    $display("10-ary 2-cube, 1-flit packets, %0d packets/1000 cycles/node: generated=%0d delivered=%0d mean latency=%0.2f cycles",
             M_PCT, n_gen, n_got, (n_got > 0) ? real'(lat_sum) / n_got : 0.0);
    tb_done = 1;
  end

  initial begin
    wait (tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
