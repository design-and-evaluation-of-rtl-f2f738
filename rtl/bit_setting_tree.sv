// bit_setting_tree: parallel tag-bit setting with a binary comparator tree.
//
// Splits the N buffer addresses at `key` and drives one tag bit per storage
// location: tag[i] = (i > key) | ((i == key) & s_root). With s_root = 1 (the
// initial value of "s" in the scheme) this is i >= key; with s_root = 0 it is
// i > key.
//
// How it works (follows the comparator-tree scheme): N-1 nodes in log2(N)
// levels. Each node sees a control bit c (1 = this subtree is already
// decided), a selection bit s (the value the subtree's tags get once
// decided) and one bit of the key. The root gets the key's MSB, level l gets
// key bit P-1-l. An undecided node whose key bit is 1 decides its lower-address
// child to s=0 and passes the higher child on undecided; a key bit of 0
// decides the higher-address child to s=1. Decided nodes pass (c=1, s) to
// both children. The leaf reached undecided is address `key` and takes s_root.
// The key bits reach each level through the address feeding tree: every
// node forwards the MSB of its content and passes the content rotated left by
// one to its children, so all nodes of one level hold the same rotated key.
//
// Interface: combinational, no clock. N is a power of two, N >= 2.
module bit_setting_tree #(
  parameter int unsigned N = 16,
  localparam int unsigned P = $clog2(N)
) (
  input  logic [P-1:0] key,
  input  logic         s_root,
  output logic [N-1:0] tag
);

  // heap-ordered nodes: node h has children 2h (address bit 0, lower
  // addresses) and 2h+1 (address bit 1, higher addresses); leaves are
  // h = N .. 2N-1 for address h-N.
  logic [2*N-1:1] c_n;
  logic [2*N-1:1] s_n;

  // address feeding tree, one value per level
  logic [P-1:0] feed [P];

  assign c_n[1] = 1'b0;
  assign s_n[1] = s_root;
  assign feed[0] = key;

  for (genvar l = 1; l < P; l++) begin : g_feed
    assign feed[l] = {feed[l-1][P-2:0], feed[l-1][P-1]};
  end

  for (genvar h = 1; h < N; h++) begin : g_node
    localparam int unsigned LVL = $clog2(h + 1) - 1;
    logic a;
    assign a = feed[LVL][P-1];
    always_comb begin
      if (c_n[h]) begin
        c_n[2*h]   = 1'b1; s_n[2*h]   = s_n[h];
        c_n[2*h+1] = 1'b1; s_n[2*h+1] = s_n[h];
      end else if (a) begin
        c_n[2*h]   = 1'b1; s_n[2*h]   = 1'b0;
        c_n[2*h+1] = 1'b0; s_n[2*h+1] = s_n[h];
      end else begin
        c_n[2*h]   = 1'b0; s_n[2*h]   = s_n[h];
        c_n[2*h+1] = 1'b1; s_n[2*h+1] = 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign tag[i] = s_n[N+i];
  end

endmodule
