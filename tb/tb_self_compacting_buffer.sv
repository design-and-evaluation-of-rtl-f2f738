// tb_self_compacting_buffer: random inserts and deletes on a buffer holding
// NCH packed FIFO regions. The testbench works out the addresses and the
// u/d/load tags of each case itself and keeps a reference copy of the buffer
// as a queue (delete at the read address, insert at the write position);
// after every operation all occupied entries are read back through the read
// port and compared.
module tb_self_compacting_buffer;
  localparam int unsigned N = 16;
  localparam int unsigned P = $clog2(N);
  localparam int unsigned W = 16;
  localparam int unsigned NCH = 4;
  logic clk = 0;
  logic [N-1:0] up, dn, load;
  logic [W-1:0] w_data, rdata;
  logic w_e, re;
  logic [P-1:0] raddr;
  int checks = 0, failures = 0;
  int cnt [NCH];
  logic [W:0] model [$];   // {e, data}
  int ncase [5];

  self_compacting_buffer #(.N(N), .FLIT_W(W)) dut (
    .clk, .up, .dn, .load, .w_data, .w_e, .raddr, .rdata, .re);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int base(int c);
    int s = 0;
    for (int j = 0; j < c; j++) s += cnt[j];
    return s;
  endfunction

  initial begin
    int occ, r, w, ra, wa, cs;
    bit do_rd, do_wr;
    logic [W:0] item;
    for (int c = 0; c < NCH; c++) cnt[c] = 0;
    up = '0; dn = '0; load = '0; w_data = '0; w_e = 0; raddr = '0;
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      occ = model.size();
      r = $urandom_range(NCH - 1);
      w = $urandom_range(NCH - 1);
      do_rd = ($urandom_range(1) == 1) && cnt[r] > 0;
      do_wr = ($urandom_range(1) == 1) && occ < N;
      ra = base(r);
      wa = base(w) + cnt[w];
      w_data = W'($urandom); w_e = 1'($urandom);
      if (do_rd && do_wr) cs = (ra < wa) ? 3 : 4;
      else if (do_wr) cs = 1;
      else if (do_rd) cs = 2;
      else cs = 0;
      ncase[cs]++;
      for (int i = 0; i < N; i++) begin
        up[i] = 0; dn[i] = 0; load[i] = 0;
        case (cs)
          1: begin dn[i] = i >= wa; load[i] = i == wa; end
          2: up[i] = i > ra;
          3: begin up[i] = i > ra && i < wa; load[i] = i == wa - 1; end
          4: begin dn[i] = i >= wa && i < ra; load[i] = i == wa; end
          default: ;
        endcase
      end
      if (do_rd) begin
        raddr = P'(ra);
        #1;
        checks++;
        if ({re, rdata} !== model[ra]) begin
          failures++;
          $display("FAIL read it=%0d addr=%0d got %h exp %h", it, ra, {re, rdata}, model[ra]);
        end
      end
      // reference update
      item = {w_e, w_data};
      if (do_rd) begin model.delete(ra); cnt[r]--; end
      if (do_wr) begin
        model.insert((do_rd && ra < wa) ? wa - 1 : wa, item);
        cnt[w]++;
      end
      @(posedge clk);
      @(negedge clk);
      up = '0; dn = '0; load = '0;
      for (int a = 0; a < model.size(); a++) begin
        raddr = P'(a);
        #1;
        checks++;
        if ({re, rdata} !== model[a]) begin
          failures++;
          if (failures < 10) $display("FAIL it=%0d case=%0d ra=%0d wa=%0d addr=%0d got %h exp %h", it, cs, ra, wa, a, {re, rdata}, model[a]);
        end
      end
    end
    for (int c = 1; c < 5; c++) begin
      checks++;
      if (ncase[c] == 0) begin failures++; $display("FAIL case %0d never exercised", c); end
    end
    $display("cases: write=%0d read=%0d rw_rlow=%0d rw_wlow=%0d", ncase[1], ncase[2], ncase[3], ncase[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
