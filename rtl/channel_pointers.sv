// channel_pointers: the n+1 region pointers of the self-compacting buffer.
//
// ptr[c] is the first address of channel c's region and ptr[NCH] the first
// free address, so region c spans ptr[c] .. ptr[c+1]-1 and holds
// count[c] = ptr[c+1]-ptr[c] entries (the per-channel count delta_c).
// A read of channel r takes the entry at ptr[r]; a write to channel w inserts
// at ptr[w+1]. After the operation every pointer above the written channel
// moves down by one and every pointer above the read channel moves up by one:
// ptr[j] += (wr & j > w) - (rd & j > r). Pointers reset to 0 (empty buffer).
//
// Interface: raddr/waddr/count/occupancy are combinational from the pointer
// registers; updates happen at the clock edge of the operation.
module channel_pointers #(
  parameter int unsigned NCH = 4,
  parameter int unsigned N   = 16,
  localparam int unsigned P  = $clog2(N),
  localparam int unsigned CW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd,
  input  logic [CW-1:0] rd_ch,
  input  logic          wr,
  input  logic [CW-1:0] wr_ch,
  output logic [P-1:0]  raddr,
  output logic [P-1:0]  waddr,
  output logic [P:0]    count [NCH],
  output logic [P:0]    occupancy
);

  logic [P:0] ptr [NCH+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= NCH; j++) ptr[j] <= '0;
    end else begin
      for (int j = 0; j <= NCH; j++) begin
        if ((wr && j > int'(wr_ch)) && !(rd && j > int'(rd_ch)))
          ptr[j] <= ptr[j] + 1'b1;
        else if (!(wr && j > int'(wr_ch)) && (rd && j > int'(rd_ch)))
          ptr[j] <= ptr[j] - 1'b1;
      end
    end
  end

  assign raddr     = ptr[int'(rd_ch)][P-1:0];
  assign waddr     = ptr[int'(wr_ch) + 1][P-1:0];
  assign occupancy = ptr[NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_cnt
    assign count[c] = ptr[c+1] - ptr[c];
  end

endmodule
