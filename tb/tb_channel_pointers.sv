// tb_channel_pointers: random reads and writes against per-channel entry
// counts kept by the testbench; checks the read address (head of the read
// region), the insertion address (end of the written region), every count
// and the occupancy after each operation.
module tb_channel_pointers;
  localparam int unsigned N = 16;
  localparam int unsigned P = $clog2(N);
  localparam int unsigned NCH = 4;
  localparam int unsigned CW = $clog2(NCH);
  logic clk = 0, rst_n = 0;
  logic rd, wr;
  logic [CW-1:0] rd_ch, wr_ch;
  logic [P-1:0] raddr, waddr;
  logic [P:0] count [NCH];
  logic [P:0] occupancy;
  int checks = 0, failures = 0;
  int cnt [NCH];

  channel_pointers #(.NCH(NCH), .N(N)) dut (
    .clk, .rst_n, .rd, .rd_ch, .wr, .wr_ch, .raddr, .waddr, .count, .occupancy);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int occ, sr, sw;
    rd = 0; wr = 0; rd_ch = '0; wr_ch = '0;
    for (int c = 0; c < NCH; c++) cnt[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 2000; it++) begin
      occ = 0;
      for (int c = 0; c < NCH; c++) occ += cnt[c];
      rd_ch = CW'($urandom); wr_ch = CW'($urandom);
      rd = ($urandom_range(1) == 1) && cnt[rd_ch] > 0;
      wr = ($urandom_range(1) == 1) && occ < N;
      sr = 0; sw = 0;
      for (int c = 0; c < NCH; c++) begin
        if (c < int'(rd_ch)) sr += cnt[c];
        if (c <= int'(wr_ch)) sw += cnt[c];
      end
      #1;
      if (sr < N) chk("raddr", int'(raddr), sr);
      if (sw < N) chk("waddr", int'(waddr), sw);
      for (int c = 0; c < NCH; c++) chk("count", int'(count[c]), cnt[c]);
      chk("occupancy", int'(occupancy), occ);
      @(posedge clk);
      if (rd) cnt[rd_ch]--;
      if (wr) cnt[wr_ch]++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
