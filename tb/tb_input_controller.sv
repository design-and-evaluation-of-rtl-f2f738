// tb_input_controller: one complete input port (routing handler included)
// under random traffic, with the default digit routing of stage 0 of a
// radix-4 Omega network: the channel is the top base-4 digit of the 8-bit
// destination in the head flit. Packets of 1..PKT_LEN flits arrive with
// random gaps; the testbench plays the crossbar/output side (grants and pulls at random, holding a
// channel from head to end of packet). Checks: per channel, packets leave in
// arrival order with all flits in order; the offered flit belongs to the
// requested / held channel; no packet is interleaved; occupancy never exceeds
// N; every flit is delivered. Counts each mechanism and fails if one never
// occurred: the four buffer cases, cut-through from the bypass buffer and a
// head flit held back by the free space register.
module tb_input_controller;
  import damq_pkg::*;
  localparam int unsigned NP = 4;
  localparam int unsigned N = 16;
  localparam int unsigned W = 32;
  localparam int unsigned PKT_LEN = 4;
  localparam int unsigned NPKT = 400;
  localparam int unsigned P = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic in_valid, in_tail, in_ready;
  logic [W-1:0] in_data, x_data;
  logic [1:0] req_ch;
  logic req_valid, x_valid, x_tail, x_pull;
  logic [P:0] free_space, occupancy;
  buf_case_e op;
  logic cut_through;
  int checks = 0, failures = 0;

  input_controller #(.NP(NP), .N(N), .FLIT_W(W), .PKT_LEN(PKT_LEN)) dut (
    .clk, .rst_n, .node_id(8'd0), .in_valid, .in_data, .in_tail, .in_ready,
    .req_valid, .req_ch, .x_valid, .x_data, .x_tail, .x_pull,
    .free_space, .occupancy, .op, .cut_through);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sent packets: channel and length; flit data = {packet[11:0], flit[3:0], 8'b0, destination}
  int pch [NPKT], plen [NPKT];
  int sp = 0, sf = 0;          // sender position
  int exp_q [NP][$];           // per channel: packet numbers in order
  int rx_pkt = -1, rx_fl = 0;  // packet being pulled
  bit locked = 0; int lock_ch = 0;
  int delivered = 0;
  int n_case [5];
  int n_cut = 0, n_block = 0;
  int pull_rate;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // link driver and crossbar-side puller, decided at the falling edge
  always @(negedge clk) begin
    in_valid = rst_n && sp < NPKT && ($urandom_range(4) != 0);
    in_data  = {12'(sp), 4'(sf), 8'd0, 2'(pch[sp % NPKT]), 6'(sp)};
    in_tail  = sf == plen[sp % NPKT] - 1;
    #1;
    x_pull = rst_n && x_valid && ($urandom_range(99) < pull_rate);
  end

  always @(posedge clk) if (rst_n) begin
    n_case[op]++;
    if (cut_through) n_cut++;
    if (!in_ready && sf == 0 && sp < NPKT && free_space < PKT_LEN) n_block++;
    chk(occupancy <= N, "occupancy within buffer");
    if (in_valid && in_ready) begin
      if (sf == 0) exp_q[pch[sp]].push_back(sp);
      if (in_tail) begin sp++; sf = 0; end else sf++;
    end
    if (x_pull) begin
      automatic int p = int'(x_data[31:20]);
      automatic int f = int'(x_data[19:16]);
      automatic int c = int'(x_data[7:6]);
      if (locked) chk(c == lock_ch && p == rx_pkt && f == rx_fl, "held channel continues its packet");
      else begin
        chk(req_valid && c == int'(req_ch), "offered flit is of the requested channel");
        chk(exp_q[c].size() > 0 && exp_q[c][0] == p && f == 0, "packets leave a channel in order");
        if (exp_q[c].size() > 0) void'(exp_q[c].pop_front());
        rx_pkt = p; rx_fl = 0; lock_ch = c;
      end
      chk(x_tail == (f == plen[p] - 1), "end-of-packet bit");
      if (x_tail) begin locked = 0; delivered++; end
      else begin locked = 1; rx_fl++; end
    end
  end

  initial begin
    for (int i = 0; i < NPKT; i++) begin
      pch[i] = $urandom_range(NP - 1);
      plen[i] = $urandom_range(1, PKT_LEN);
    end
    in_valid = 0; x_pull = 0; in_data = '0; in_tail = 0;
    pull_rate = 30;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 40000 && delivered < NPKT; cyc++) begin
      @(posedge clk);
      // alternate congested and free-flowing phases
      pull_rate = ((cyc / 500) % 2 == 0) ? 25 : 100;
    end
    chk(delivered == NPKT, "all packets delivered");
    for (int c = 1; c < 5; c++) chk(n_case[c] > 0, "every buffer case occurs");
    chk(n_cut > 0, "cut-through from the bypass buffer occurs");
    chk(n_block > 0, "head flit held back for lack of space occurs");
    $display("delivered=%0d cases w=%0d r=%0d rw_rlow=%0d rw_wlow=%0d cut=%0d block=%0d",
             delivered, n_case[1], n_case[2], n_case[3], n_case[4], n_cut, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
