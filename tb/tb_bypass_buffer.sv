// tb_bypass_buffer: load, hold, take, and load-while-taking (a new flit
// every cycle), checking valid and the held flit.
module tb_bypass_buffer;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_tail, in_head, take, valid, tail, head;
  logic [W-1:0] in_data, data;
  int checks = 0, failures = 0;

  bypass_buffer #(.FLIT_W(W)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_tail, .in_head, .take, .valid, .data, .tail, .head);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic iv, logic [W-1:0] d, logic t, logic h, logic tk,
                      logic ev, logic [W-1:0] ed, logic et, logic eh);
    in_valid = iv; in_data = d; in_tail = t; in_head = h; take = tk;
    @(posedge clk); #1;
    checks++;
    if (valid !== ev || (ev && (data !== ed || tail !== et || head !== eh))) begin
      failures++;
      $display("FAIL valid=%0d data=%h tail=%0d head=%0d exp %0d %h %0d %0d",
               valid, data, tail, head, ev, ed, et, eh);
    end
  endtask

  initial begin
    in_valid = 0; take = 0; in_data = '0; in_tail = 0; in_head = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (valid) begin failures++; $display("FAIL valid after reset"); end
    rst_n = 1;
    step(1, 16'hA001, 0, 1, 0, 1, 16'hA001, 0, 1);
    step(0, 16'h0000, 0, 0, 0, 1, 16'hA001, 0, 1);   // hold
    step(1, 16'hA002, 0, 0, 1, 1, 16'hA002, 0, 0);   // take and reload
    step(1, 16'hA003, 1, 0, 1, 1, 16'hA003, 1, 0);
    step(0, 16'h0000, 0, 0, 1, 0, 16'h0000, 0, 0);   // take, empty
    step(0, 16'h0000, 0, 0, 0, 0, 16'h0000, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
