// tb_bit_setting_tree: exhaustive check of the comparator tree for every
// key and both root selections against the plain comparison
// tag[i] = (i > key) | (i == key & s_root).
module tb_bit_setting_tree;
  localparam int unsigned N = 16;
  localparam int unsigned P = $clog2(N);
  logic [P-1:0] key;
  logic         s_root;
  logic [N-1:0] tag, exp_tag;
  int checks = 0, failures = 0;

  bit_setting_tree #(.N(N)) dut (.key, .s_root, .tag);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int k = 0; k < N; k++) begin
        key = P'(k); s_root = s[0];
        #1;
        for (int i = 0; i < N; i++) exp_tag[i] = (i > k) || (i == k && s == 1);
        checks++;
        if (tag !== exp_tag) begin
          failures++;
          $display("FAIL key=%0d s=%0d tag=%b exp=%b", k, s, tag, exp_tag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
