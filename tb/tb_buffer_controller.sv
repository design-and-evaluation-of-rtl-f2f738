// tb_buffer_controller: for every case and every legal pair of addresses,
// compares the u/d/load vectors with the movement each case calls for,
// written here as plain per-location comparisons.
module tb_buffer_controller;
  import damq_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned P = $clog2(N);
  buf_case_e op;
  logic [P-1:0] raddr, waddr;
  logic [N-1:0] up, dn, load, eu, ed, el;
  int checks = 0, failures = 0;

  buffer_controller #(.N(N)) dut (.op, .raddr, .waddr, .up, .dn, .load);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int c, int r, int w);
    for (int i = 0; i < N; i++) begin
      eu[i] = 1'b0; ed[i] = 1'b0; el[i] = 1'b0;
      case (c)
        1: begin ed[i] = i >= w;           el[i] = i == w;     end
        2: begin eu[i] = i > r;                                 end
        3: begin eu[i] = i > r && i < w;   el[i] = i == w - 1; end
        4: begin ed[i] = i >= w && i < r;  el[i] = i == w;     end
        default: ;
      endcase
    end
    checks++;
    if (up !== eu || dn !== ed || load !== el) begin
      failures++;
      $display("FAIL case=%0d r=%0d w=%0d up=%b/%b dn=%b/%b load=%b/%b",
               c, r, w, up, eu, dn, ed, load, el);
    end
  endtask

  initial begin
    for (int c = 0; c < 5; c++)
      for (int r = 0; r < N; r++)
        for (int w = 0; w < N; w++) begin
          if (c == 3 && !(r < w)) continue;
          if (c == 4 && !(w <= r)) continue;
          op = buf_case_e'(c); raddr = P'(r); waddr = P'(w);
          #1;
          check(c, r, w);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
