// tb_crossbar: random offered flits and random selections; every output
// must show exactly the selected input's flit, valid only when selected.
module tb_crossbar;
  localparam int unsigned NP = 4;
  localparam int unsigned W = 16;
  logic [NP-1:0] in_valid, in_tail, sel_valid, out_valid, out_tail;
  logic [W-1:0] in_data [NP];
  logic [W-1:0] out_data [NP];
  logic [1:0] sel [NP];
  int checks = 0, failures = 0;

  crossbar #(.NP(NP), .FLIT_W(W)) dut (
    .in_valid, .in_data, .in_tail, .sel, .sel_valid, .out_valid, .out_data, .out_tail);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      in_valid = NP'($urandom); in_tail = NP'($urandom); sel_valid = NP'($urandom);
      for (int i = 0; i < NP; i++) begin in_data[i] = W'($urandom); sel[i] = 2'($urandom); end
      #1;
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_valid[o] !== (sel_valid[o] & in_valid[sel[o]]) ||
            (sel_valid[o] && (out_data[o] !== in_data[sel[o]] || out_tail[o] !== in_tail[sel[o]]))) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
