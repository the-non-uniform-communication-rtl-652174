// tesh_pkg: types and constants shared by the TESH(2,L,0) network.
//
// A TESH network is built from basic modules (BMs), each a 4x4 2D mesh of
// routers (m = 2). Sixteen BMs form a Level-2 4x4 torus, sixteen Level-2
// networks a Level-3 torus, and so on. A node is addressed by 2L base-4
// digits n(2L-1)..n0: (n1 n0) = (y, x) inside the BM, (n(2l-1) n(2l-2)) =
// (vertical, horizontal) position at level l. Addresses are held in a fixed
// ADDR_W-bit field sized for the highest level m = 2, q = 0 allows (L = 5);
// a network of level L uses the low 4L bits.
//
// Flits are 2-bit type + 32-bit data. The head flit's data is a head_t
// routing header. Links carry one flit per cycle tagged with its virtual
// channel (VC); credits return per VC. Four VCs per physical channel and
// 2-flit VC buffers follow the document; the flit width, header layout and
// credit flow control are this design's own choices.
package tesh_pkg;

  parameter int unsigned M         = 2;          // BM is 2^M x 2^M
  parameter int unsigned RADIX     = 4;          // 2^M, also torus size per level
  parameter int unsigned L_MAX     = 5;          // 2^(m-q)+1 with m=2, q=0
  parameter int unsigned NDIG      = 2 * L_MAX;  // base-4 address digits
  parameter int unsigned ADDR_W    = 2 * NDIG;   // address bits
  parameter int unsigned NUM_VC    = 4;          // VCs per physical channel
  parameter int unsigned VC_W      = 2;
  parameter int unsigned BUF_DEPTH = 2;          // flits per VC buffer
  parameter int unsigned NPORT     = 5;          // N, E, S, W, local
  parameter int unsigned DATA_W    = 32;
  parameter int unsigned DR_W      = 3;          // dimension-reversal count
  parameter int unsigned PKT_FLITS = 16;         // flits per packet

  // Port numbering. N = +y (UPPER), E = +x (RIGHT). A mesh port at the BM
  // contour that has no mesh neighbour is an inter-BM (higher level) port.
  typedef enum logic [2:0] {
    P_N = 3'd0, P_E = 3'd1, P_S = 3'd2, P_W = 3'd3, P_L = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    F_HEAD = 2'd0, F_BODY = 2'd1, F_TAIL = 2'd2, F_HEADTAIL = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e            ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Routing header carried in the head flit's data field.
  typedef struct packed {
    logic [ADDR_W-1:0] dest;      // destination node address
    logic [DR_W-1:0]   dr;        // DDR dimension-reversal number
    logic              cls_h;     // packet is on Channel-H in current ring phase
    logic [3:0]        phase;     // address digit being routed (0 = final BM)
    logic              dir_set;   // ring direction fixed for this phase
    logic              dir_minus; // fixed ring direction is minus
    logic              det;       // DDR: packet is on deterministic channels
    logic              rsvd;
  } head_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    flit_t           flit;
  } link_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // Routing algorithm selection: all zero = dimension-order routing (R1).
  typedef struct packed {
    logic cs;   // channel select (R2)
    logic ls;   // link select (R3)
    logic ddr;  // dynamic dimension reversal (R4)
  } route_mode_t;

  // One-cycle event pulses from a router, for performance monitoring.
  typedef struct packed {
    logic flit_sent;    // a flit left through some output
    logic credit_stall; // a routed flit waited for downstream buffer space
    logic inter_bm;     // a head took an inter-BM (higher-level) link
    logic wrap;         // a head took a wraparound inter-BM link
    logic cs_early_h;   // CS: a head moved to Channel-H before a wraparound
    logic ls_minus;     // LS: a tie was broken towards the minus direction
    logic ddr_reversal; // DDR: a head took an out-of-order inter-BM link
    logic ddr_escape;   // DDR: a head switched to the deterministic channels
  } router_ev_t;

  function automatic logic [1:0] digit(input logic [ADDR_W-1:0] a, input int unsigned i);
    return a[2*i +: 2];
  endfunction

  function automatic bit is_head(input ftype_e t);
    return (t == F_HEAD) || (t == F_HEADTAIL);
  endfunction

  function automatic bit is_tail(input ftype_e t);
    return (t == F_TAIL) || (t == F_HEADTAIL);
  endfunction

endpackage
