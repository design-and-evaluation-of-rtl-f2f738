// tb_hypercube_switch: one 9-port switch of a binary 8-cube (256 nodes),
// i.e. dimension-ordered routing with K=2: a packet leaves on the lowest
// address bit in which its destination differs from this node's address, or
// on port 8 (the local processor) when it is addressed to this node. Random
// node address, Bernoulli arrivals on all nine inputs with uniformly random
// destinations (so half of all packets leave on port 0, which bounds the load
// to below 1/(9 x 0.5) per input), always-ready outputs. Checks the output of every packet
// against that rule, order per input-output pair and complete delivery.
module tb_hypercube_switch;
  import damq_pkg::*;
  localparam int unsigned NP = 9;
  localparam int unsigned FW = 64;
  localparam int unsigned RHO_PCT = 15;
  localparam int unsigned CYCLES = 5000;

  logic clk = 0, rst_n = 0;
  logic [7:0] node_id;
  logic [NP-1:0] in_valid, in_tail, in_ready, out_valid, out_tail, out_ready;
  logic [FW-1:0] in_data [NP];
  logic [FW-1:0] out_data [NP];
  int checks = 0, failures = 0;

  damq_router #(.NP(NP), .ROUTING(ROUTE_KCUBE), .K(2)) dut (
    .clk, .rst_n, .node_id, .in_valid, .in_data, .in_tail, .in_ready,
    .out_valid, .out_data, .out_tail, .out_ready);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int exp_port(logic [7:0] dest);
    for (int b = 0; b < 8; b++) if (dest[b] != node_id[b]) return b;
    return 8;
  endfunction

  int src_q [NP][$];
  int nsent [NP];
  longint acc_cycle [NP][int];
  int last_pkt [NP][NP];
  int cyc = 0, n_gen = 0, n_got = 0;
  longint lat_sum = 0;
  bit gen_on = 0;

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NP; s++) begin
      logic [FW-1:0] d;
      d = '0;
      if (src_q[s].size() > 0) begin
        d[63:32] = 32'(nsent[s]); d[15:8] = 8'(s); d[7:0] = 8'(src_q[s][0]);
      end
      in_valid[s] = src_q[s].size() > 0;
      in_tail[s]  = 1'b1;
      in_data[s]  = d;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (gen_on)
      for (int s = 0; s < NP; s++)
        if ($urandom_range(99) < RHO_PCT) begin
          src_q[s].push_back($urandom_range(255));
          n_gen++;
        end
    for (int s = 0; s < NP; s++)
      if (in_valid[s] && in_ready[s]) begin
        acc_cycle[s][nsent[s]] = cyc;
        nsent[s]++;
        void'(src_q[s].pop_front());
      end
    for (int o = 0; o < NP; o++)
      if (out_valid[o]) begin
        automatic int p = int'(out_data[o][63:32]);
        automatic int s = int'(out_data[o][15:8]);
        chk(o == exp_port(out_data[o][7:0]), "packet leaves on its routed output");
        chk(p > last_pkt[s][o], "order per input-output pair");
        last_pkt[s][o] = p;
        if (acc_cycle[s].exists(p)) begin
          lat_sum += cyc - acc_cycle[s][p];
          acc_cycle[s].delete(p);
        end else chk(0, "packet delivered exactly once");
        n_got++;
      end
  end

  initial begin
    #(10 * (CYCLES * 3 + 10000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean;
    out_ready = '1;
    node_id = 8'($urandom);
    in_valid = '0; in_tail = '0;
    for (int s = 0; s < NP; s++) begin
      in_data[s] = '0; nsent[s] = 0;
      for (int o = 0; o < NP; o++) last_pkt[s][o] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen_on = 1;
    repeat (CYCLES) @(posedge clk);
    gen_on = 0;
    for (int k = 0; k < CYCLES && n_got < n_gen; k++) @(posedge clk);
    chk(n_got == n_gen, "every generated packet delivered");
    mean = (n_got > 0) ? real'(lat_sum) / n_got : 0.0;
    $display("9-port hypercube switch, load %0d%%: packets=%0d mean switch latency=%0.3f cycles",
             RHO_PCT, n_got, mean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
