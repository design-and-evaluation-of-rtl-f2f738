// tb_omega_network: 256-node radix-4 Omega network of DAMQ switches with
// fixed single-flit packets at 50% channel load. See omega_tb_body.svh.
module tb_omega_network;
  localparam int unsigned PKT_LEN = 1;
  localparam int unsigned RHO_PCT = 50;
  localparam int unsigned CYCLES = 2000;
`include "omega_tb_body.svh"

  initial begin
    #(10 * (CYCLES * 4 + 50000));
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
