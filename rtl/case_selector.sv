// case_selector: chooses the buffer's data-movement case for this cycle.
//
// Single write -> case 1, single read -> case 2, both with the read address
// below the insertion address -> case 3, both with the insertion address at or
// below the read address -> case 4. The four cases follow the self-compacting
// buffer scheme; sending equal addresses to case 4 (the new entry simply
// replaces the one read out) is this design's choice.
//
// Interface: combinational. raddr is the head of the region being read,
// waddr the insertion address (first address after the region written).
module case_selector
  import damq_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned P = $clog2(N)
) (
  input  logic         rd,
  input  logic         wr,
  input  logic [P-1:0] raddr,
  input  logic [P-1:0] waddr,
  output buf_case_e    op
);

  always_comb begin
    unique case ({rd, wr})
      2'b00:   op = OP_NONE;
      2'b01:   op = OP_WRITE;
      2'b10:   op = OP_READ;
      default: op = (raddr < waddr) ? OP_RW_RLOW : OP_RW_WLOW;
    endcase
  end

endmodule
