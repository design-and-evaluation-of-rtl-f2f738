// tb_routing_handler: digit routing of a radix-4 Omega switch at two
// stages, and dimension-ordered routing of a 4-port 8-ary 3-cube node,
// against digit / coordinate arithmetic done in the testbench.
module tb_routing_handler;
  import damq_pkg::*;
  logic [63:0] header;
  logic [7:0]  node_id;
  logic [1:0]  ch_s0, ch_s3;
  logic [1:0]  ch_cube;
  logic [11:0] node12;
  logic [63:0] header12;
  int checks = 0, failures = 0;

  routing_handler #(.NP(4), .ADDR_W(8), .ROUTING(ROUTE_DELTA), .STAGE(0))
    dut_s0 (.header(header), .node_id(node_id), .out_ch(ch_s0));
  routing_handler #(.NP(4), .ADDR_W(8), .ROUTING(ROUTE_DELTA), .STAGE(3))
    dut_s3 (.header(header), .node_id(node_id), .out_ch(ch_s3));
  routing_handler #(.NP(4), .ADDR_W(12), .ROUTING(ROUTE_KCUBE), .K(8))
    dut_cube (.header(header12), .node_id(node12), .out_ch(ch_cube));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dest, me, exp_c;
    int dd [3], md [3];
    for (int it = 0; it < 500; it++) begin
      dest = $urandom_range(255);
      header = {$urandom, $urandom};
      header[7:0] = 8'(dest);
      node_id = 8'($urandom);
      // 3-cube: coordinates 0..7 per dimension
      me = $urandom_range(511);
      dest = (it % 3 == 0) ? me : $urandom_range(511);
      if (it % 5 == 0) dest = (me & ~7) | $urandom_range(7);  // differ in dim 0 only
      for (int d = 0; d < 3; d++) begin dd[d] = (dest >> (3*d)) & 7; md[d] = (me >> (3*d)) & 7; end
      header12 = {$urandom, $urandom};
      header12[11:0] = 12'(dest);
      node12 = 12'(me);
      #1;
      checks++;
      if (int'(ch_s0) != ((int'(header[7:0]) / 64) % 4)) begin failures++; $display("FAIL stage0"); end
      checks++;
      if (int'(ch_s3) != (int'(header[7:0]) % 4)) begin failures++; $display("FAIL stage3"); end
      exp_c = 3;
      for (int d = 2; d >= 0; d--) if (dd[d] != md[d]) exp_c = d;
      checks++;
      if (int'(ch_cube) != exp_c) begin
        failures++;
        $display("FAIL cube dest=%0d me=%0d got %0d exp %0d", dest, me, ch_cube, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
