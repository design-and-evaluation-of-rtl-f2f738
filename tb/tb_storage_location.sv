// tb_storage_location: load, take from above, take from below, hold, and
// the priority of load over the shift inputs.
module tb_storage_location;
  localparam int unsigned W = 16;
  logic clk = 0;
  logic load, fa, fb, we, ae, be, q_e;
  logic [W-1:0] wd, ad, bd, q;
  int checks = 0, failures = 0;

  storage_location #(.FLIT_W(W)) dut (
    .clk, .load, .w_data(wd), .w_e(we), .from_above(fa), .above_data(ad), .above_e(ae),
    .from_below(fb), .below_data(bd), .below_e(be), .q_data(q), .q_e);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic l, logic a, logic b, logic [W-1:0] exp_q, logic exp_e);
    load = l; fa = a; fb = b;
    @(posedge clk); #1;
    checks++;
    if (q !== exp_q || q_e !== exp_e) begin
      failures++;
      $display("FAIL l=%0d a=%0d b=%0d q=%h e=%0d exp %h %0d", l, a, b, q, q_e, exp_q, exp_e);
    end
  endtask

  initial begin
    wd = 16'h1111; we = 1; ad = 16'h2222; ae = 0; bd = 16'h3333; be = 1;
    step(1, 0, 0, 16'h1111, 1);
    step(0, 0, 0, 16'h1111, 1);
    step(0, 1, 0, 16'h2222, 0);
    step(0, 0, 1, 16'h3333, 1);
    wd = 16'h4444; we = 0;
    step(1, 1, 1, 16'h4444, 0);
    step(0, 0, 0, 16'h4444, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
