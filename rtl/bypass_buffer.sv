// bypass_buffer: one-flit holding register between the input link and the
// self-compacting buffer.
//
// A flit arriving from the link waits here while the routing algorithm
// handler works out the output channel from the header; from here it is
// either written into its channel's region or, when that region is empty and
// the channel's output is taking flits, sent straight to the crossbar (cut-
// through). The role follows the scheme; the depth of one flit is this
// design's choice.
//
// Interface: a flit is loaded when in_valid is high; in_valid may only be high
// when the register is empty or `take` is high in the same cycle. `take`
// removes the held flit.
module bypass_buffer #(
  parameter int unsigned FLIT_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_data,
  input  logic              in_tail,
  input  logic              in_head,
  input  logic              take,
  output logic              valid,
  output logic [FLIT_W-1:0] data,
  output logic              tail,
  output logic              head
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
    end else if (in_valid) begin
      valid <= 1'b1;
    end else if (take) begin
      valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      data <= in_data;
      tail <= in_tail;
      head <= in_head;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (!valid || take))
    else $error("bypass_buffer: overrun");

endmodule
