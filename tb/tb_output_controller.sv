// tb_output_controller: four inputs compete for one output with multi-flit
// packets whose flits become available at random and a link that stalls at
// random. Checks that every flit arrives once, in order per input, that
// packets never interleave on the link, that a waiting link flit is held,
// the one-cycle request-to-link latency of an idle output, and that
// arbitration rotates (every input wins while all four keep asking).
module tb_output_controller;
  localparam int unsigned NP = 4;
  localparam int unsigned W = 32;
  localparam int unsigned NPKT = 60;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] req;
  logic [1:0] sel;
  logic sel_valid, f_valid, f_tail, pull, out_valid, out_tail, out_ready;
  logic [W-1:0] f_data, out_data;
  int checks = 0, failures = 0;

  // per input: packets of 1..4 flits, flit data = {input, packet, flit index}
  int npk [NP];        // packets fully sent by input
  int nfl [NP];        // flits of current packet sent
  int len [NP][NPKT];
  bit mid [NP];        // inside a packet (locked)
  bit avail [NP];      // next flit has arrived
  int got_pk [NP], got_fl [NP];
  int cur_in;          // input whose packet is on the link, -1 none
  int wins [NP];
  logic [W-1:0] held_data;
  bit held;

  output_controller #(.NP(NP), .FLIT_W(W)) dut (
    .clk, .rst_n, .req, .sel, .sel_valid, .f_valid, .f_data, .f_tail, .pull,
    .out_valid, .out_data, .out_tail, .out_ready);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input side model (crossbar folded in)
  always_comb begin
    for (int i = 0; i < NP; i++) req[i] = npk[i] < NPKT && !mid[i];
    f_valid = sel_valid && npk[sel] < NPKT && avail[sel];
    f_data  = {8'(sel), 12'(npk[sel]), 12'(nfl[sel])};
    f_tail  = nfl[sel] == len[sel][npk[sel] % NPKT] - 1;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int done;
    for (int i = 0; i < NP; i++) begin
      npk[i] = 0; nfl[i] = 0; mid[i] = 0; avail[i] = 0; got_pk[i] = 0; got_fl[i] = 0; wins[i] = 0;
      for (int p = 0; p < NPKT; p++) len[i][p] = (p < 2) ? 1 : $urandom_range(1, 4);
    end
    cur_in = -1; held = 0;
    out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: only input 2 asks, single-flit packet, idle link
    @(negedge clk);
    avail[2] = 1;
    npk[0] = NPKT; npk[1] = NPKT; npk[3] = NPKT;
    #1;
    chk(pull && sel == 2, "idle output must take a requested flit in the same cycle");
    @(posedge clk); #1;
    chk(out_valid && out_data == {8'd2, 12'd0, 12'd0} && out_tail, "flit on the link one cycle later");
    @(negedge clk);
    npk[0] = 0; npk[1] = 0; npk[3] = 0; npk[2] = 1; avail[2] = 0; got_pk[2] = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      done = 1;
      for (int i = 0; i < NP; i++) begin
        avail[i] = $urandom_range(3) != 0;
        if (got_pk[i] < NPKT) done = 0;
      end
      out_ready = $urandom_range(3) != 0;
      if (done) break;
      #1;
      if (pull && !mid[sel]) wins[sel]++;
      @(posedge clk);
      // link side (values sampled before the edge are still visible in this
      // time step's active region only for TB variables; use shadow copies)
    end
    for (int i = 0; i < NP; i++) begin
      chk(got_pk[i] == NPKT, "all packets delivered");
      chk(wins[i] > 5, "every input wins arbitration");
    end
    $display("wins: %0d %0d %0d %0d", wins[0], wins[1], wins[2], wins[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample at each rising edge: link transfer and pulls
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      automatic int i = int'(out_data[31:24]);
      automatic int p = int'(out_data[23:12]);
      automatic int f = int'(out_data[11:0]);
      if (!(i == 2 && p == 0)) begin
        chk(i < NP && p == got_pk[i] && f == got_fl[i], "flit order per input");
        chk(cur_in == -1 || cur_in == i, "packets do not interleave");
        if (out_tail) begin got_pk[i]++; got_fl[i] = 0; cur_in = -1; end
        else begin got_fl[i]++; cur_in = i; end
      end
    end
    if (out_valid && !out_ready && held) chk(out_data == held_data, "waiting flit held");
    held <= out_valid && !out_ready;
    held_data <= out_data;
    if (pull) begin
      if (f_tail) begin npk[sel] <= npk[sel] + 1; nfl[sel] <= 0; mid[sel] <= 0; end
      else begin nfl[sel] <= nfl[sel] + 1; mid[sel] <= 1; end
    end
  end
endmodule
