// tb_case_selector: all request combinations and all address pairs against
// the case table (none / write / read / read below write / write at or
// below read).
module tb_case_selector;
  import damq_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned P = $clog2(N);
  logic rd, wr;
  logic [P-1:0] raddr, waddr;
  buf_case_e op, exp_op;
  int checks = 0, failures = 0;

  case_selector #(.N(N)) dut (.rd, .wr, .raddr, .waddr, .op);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int r = 0; r < N; r++)
        for (int w = 0; w < N; w++) begin
          rd = m[1]; wr = m[0]; raddr = P'(r); waddr = P'(w);
          #1;
          if (m == 0) exp_op = OP_NONE;
          else if (m == 1) exp_op = OP_WRITE;
          else if (m == 2) exp_op = OP_READ;
          else if (r < w) exp_op = OP_RW_RLOW;
          else exp_op = OP_RW_WLOW;
          checks++;
          if (op != exp_op) begin
            failures++;
            $display("FAIL rd=%0d wr=%0d r=%0d w=%0d op=%0d exp=%0d", rd, wr, r, w, op, exp_op);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
