// tb_omega_network_8flit: the 256-node radix-4 Omega network of DAMQ
// switches carrying fixed 8-flit packets at 50% channel load. See
// omega_tb_body.svh.
module tb_omega_network_8flit;
  localparam int unsigned PKT_LEN = 8;
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
