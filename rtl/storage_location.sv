// storage_location: one entry of the self-compacting buffer.
//
// Holds a data field and the e (end-of-packet) tag bit. Each clock it does
// exactly one of: load the incoming flit, take the content of the neighbour
// above (address i-1, which is shifting down), take the content of the
// neighbour below (address i+1, which is shifting up), or hold. The buffer
// controller guarantees at most one of the three strobes is set. The data
// field has no reset: the channel pointers alone say which entries are valid
// (this design's choice).
module storage_location #(
  parameter int unsigned FLIT_W = 64
) (
  input  logic              clk,
  input  logic              load,
  input  logic [FLIT_W-1:0] w_data,
  input  logic              w_e,
  input  logic              from_above,  // location i-1 shifts down into this one
  input  logic [FLIT_W-1:0] above_data,
  input  logic              above_e,
  input  logic              from_below,  // location i+1 shifts up into this one
  input  logic [FLIT_W-1:0] below_data,
  input  logic              below_e,
  output logic [FLIT_W-1:0] q_data,
  output logic              q_e
);

  always_ff @(posedge clk) begin
    if (load) begin
      q_data <= w_data;
      q_e    <= w_e;
    end else if (from_above) begin
      q_data <= above_data;
      q_e    <= above_e;
    end else if (from_below) begin
      q_data <= below_data;
      q_e    <= below_e;
    end
  end

endmodule
