// damq_pkg: types shared by the self-compacting DAMQ switch.
//
// buf_case_e names the five buffer operations the case selector can choose
// in one cycle: the four data-movement cases of the self-compacting buffer
// (single write, single read, read+write with the read address below the
// write address, read+write with the write address at or below the read
// address) plus "no operation". routing_e selects the routing function of
// the routing algorithm handler.
package damq_pkg;

  typedef enum logic [2:0] {
    OP_NONE    = 3'd0,  // no read, no write
    OP_WRITE   = 3'd1,  // case 1: insertion
    OP_READ    = 3'd2,  // case 2: deletion
    OP_RW_RLOW = 3'd3,  // case 3: read address < write address
    OP_RW_WLOW = 3'd4   // case 4: write address <= read address
  } buf_case_e;

  typedef enum logic [0:0] {
    ROUTE_DELTA = 1'b0,  // digit routing, Delta / Omega networks
    ROUTE_KCUBE = 1'b1   // dimension-ordered routing, unidirectional k-ary n-cube
  } routing_e;

endpackage
