// crossbar: the NP x NP switch between input and output controllers.
//
// Each output controller names the input it is connected to (sel[o],
// sel_valid[o]); the crossbar passes that input's offered flit to the output.
// A plain multiplexer crossbar with one port per input, as the dynamically
// allocated multi-queue organisation uses; the multiplexer form is this
// design's choice.
//
// Interface: combinational.
module crossbar #(
  parameter int unsigned NP     = 4,
  parameter int unsigned FLIT_W = 64,
  localparam int unsigned CW = $clog2(NP)
) (
  input  logic [NP-1:0]     in_valid,
  input  logic [FLIT_W-1:0] in_data [NP],
  input  logic [NP-1:0]     in_tail,
  input  logic [CW-1:0]     sel [NP],
  input  logic [NP-1:0]     sel_valid,
  output logic [NP-1:0]     out_valid,
  output logic [FLIT_W-1:0] out_data [NP],
  output logic [NP-1:0]     out_tail
);

  for (genvar o = 0; o < NP; o++) begin : g_out
    assign out_valid[o] = sel_valid[o] & in_valid[sel[o]];
    assign out_data[o]  = in_data[sel[o]];
    assign out_tail[o]  = in_tail[sel[o]];
  end

endmodule
