// tb_damq_router: end-to-end test of a 4x4 switch carrying multi-flit
// packets (up to 4 flits), 16-flit buffers. See router_tb_body.svh for the
// traffic and the checks.
module tb_damq_router;
  localparam int unsigned NP = 4;
  localparam int unsigned FLIT_W = 64;
  localparam int unsigned PKT_LEN = 4;
  localparam int unsigned NPKT = 300;

  damq_router #(.PKT_LEN(PKT_LEN)) dut (
    .clk, .rst_n, .node_id, .in_valid, .in_data, .in_tail, .in_ready,
    .out_valid, .out_data, .out_tail, .out_ready);

`include "router_tb_body.svh"

  initial begin
    #(10 * (NPKT * PKT_LEN * 40 + 20000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
