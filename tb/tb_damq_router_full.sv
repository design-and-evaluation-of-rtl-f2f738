// tb_damq_router_full: end-to-end test of the switch exactly at its default
// configuration (4x4, 16-flit buffers, 64-bit flits, single-flit packets,
// digit routing). See router_tb_body.svh for the traffic and the checks.
module tb_damq_router_full;
  localparam int unsigned NP = 4;
  localparam int unsigned FLIT_W = 64;
  localparam int unsigned PKT_LEN = 1;
  localparam int unsigned NPKT = 1000;

  damq_router dut (
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
