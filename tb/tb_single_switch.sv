// tb_single_switch: single-switch approximation of a Delta network.
//
// In a Delta network under uniform traffic every switch sees the same load
// on each input and routes each packet to any output with probability 1/n,
// so the mean delay of one switch under that traffic, times the number of
// stages, approximates the network latency. This testbench drives one switch
// at its default configuration (4x4, single-flit packets) with Bernoulli
// arrivals of probability RHO_PCT/100 per input per cycle (geometrically
// distributed gaps), held in unbounded source queues, uniformly random
// outputs and always-ready outputs. It measures the mean switch latency
// (head accepted at the input to packet valid on the output link, the same
// measure the Omega network testbench uses end to end) and prints the
// estimate for a 4-stage network: 4 x mean switch latency.
// Checks: every packet leaves on its routed output, in order per
// input-output pair, and all packets are delivered.
module tb_single_switch;
  localparam int unsigned NP = 4;
  localparam int unsigned FW = 64;
  localparam int unsigned RHO_PCT = 50;
  localparam int unsigned CYCLES = 20000;
  localparam int unsigned NSTAGE = 4;

  logic clk = 0, rst_n = 0;
  logic [7:0] node_id = '0;
  logic [NP-1:0] in_valid, in_tail, in_ready, out_valid, out_tail, out_ready;
  logic [FW-1:0] in_data [NP];
  logic [FW-1:0] out_data [NP];
  int checks = 0, failures = 0;

  damq_router dut (
    .clk, .rst_n, .node_id, .in_valid, .in_data, .in_tail, .in_ready,
    .out_valid, .out_data, .out_tail, .out_ready);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

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
        chk(int'(out_data[o][7:6]) == o, "packet leaves on its routed output");
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
    $display("single switch, load %0d%%: packets=%0d mean switch latency=%0.3f cycles; %0d-stage network estimate=%0.2f cycles",
             RHO_PCT, n_got, mean, NSTAGE, NSTAGE * mean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
