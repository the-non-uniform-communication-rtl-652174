// tesh_network: a TESH(2,L,0) hierarchical interconnection network.
//
// 16^L nodes, each a tesh_router, node index = node address. Digits
// (n1 n0) = (y, x) place a node in its 4x4 basic module (BM), a 2D mesh
// without wraparound. For each level l = 2..L the BMs (or level-(l-1)
// subnetworks) form a 4x4 2D torus: digit n(2l-1) is the vertical ring,
// n(2l-2) the horizontal ring. With inter-level connectivity q = 0 each BM
// gives one link per level, dimension and direction, joining two nodes whose
// addresses differ by +-1 (mod 4) in exactly one digit i >= 2 (the
// document's connection rule):
//   vertical, level l  : (y=3, x=l-2) port N  <->  next BM's (y=0, x=l-2) port S
//   horizontal, level l: (y=l-2, x=3) port E  <->  next BM's (y=l-2, x=0) port W
// The placement of these outlet PEs on the BM contour is this design's own
// choice; the document's figure gives it for its implementation. Links
// between 3-valued digits 3 and 0 are the wraparound links of the ring.
// Contour ports without a link are tied off and never routed to.
//
// Each node's local port is brought out: inj_* to inject flits (with a VC
// tag, against credits returned on inj_credit), ej_* for delivered flits
// (the receiver returns a credit per flit on ej_credit). `mode` selects the
// routing algorithm for all routers; it is meant to be changed only while
// the network is empty. ev gives each router's event pulses.
module tesh_network
  import tesh_pkg::*;
#(
  parameter int unsigned L = 2   // document: TESH(2,3,0), 4096 nodes
) (
  input  logic        clk,
  input  logic        rst_n,
  input  route_mode_t mode,
  input  link_t       inj_link   [16**L],
  output credit_t     inj_credit [16**L],
  output link_t       ej_link    [16**L],
  input  credit_t     ej_credit  [16**L],
  output router_ev_t  ev         [16**L]
);

  localparam int unsigned NN = 16 ** L;

  // Neighbour of node a through port o, or -1 for a tied-off port.
  function automatic int nbr(input int a, input int o);
    int y, x, i, dg;
    y = (a >> 2) & 3;
    x = a & 3;
    case (o)
      0: begin // N
        if (y < 3) return a + 4;
        if (x + 2 > int'(L)) return -1;
        i  = 2 * (x + 2) - 1;
        dg = (a >> (2 * i)) & 3;
        return (a & ~(3 << (2 * i)) & ~(3 << 2)) | (((dg + 1) & 3) << (2 * i));
      end
      2: begin // S
        if (y > 0) return a - 4;
        if (x + 2 > int'(L)) return -1;
        i  = 2 * (x + 2) - 1;
        dg = (a >> (2 * i)) & 3;
        return (a & ~(3 << (2 * i))) | (3 << 2) | (((dg + 3) & 3) << (2 * i));
      end
      1: begin // E
        if (x < 3) return a + 1;
        if (y + 2 > int'(L)) return -1;
        i  = 2 * (y + 2) - 2;
        dg = (a >> (2 * i)) & 3;
        return (a & ~(3 << (2 * i)) & ~3) | (((dg + 1) & 3) << (2 * i));
      end
      3: begin // W
        if (x > 0) return a - 1;
        if (y + 2 > int'(L)) return -1;
        i  = 2 * (y + 2) - 2;
        dg = (a >> (2 * i)) & 3;
        return (a & ~(3 << (2 * i))) | 3 | (((dg + 3) & 3) << (2 * i));
      end
      default: return -1;
    endcase
  endfunction

  link_t   r_in_link   [NN][NPORT];
  credit_t r_in_credit [NN][NPORT];
  link_t   r_out_link  [NN][NPORT];
  credit_t r_out_credit[NN][NPORT];

  for (genvar a = 0; a < NN; a++) begin : g_node
    for (genvar o = 0; o < 4; o++) begin : g_port
      localparam int NB  = nbr(a, o);
      localparam int OPP = (o + 2) % 4;
      if (NB >= 0) begin : g_link
        assign r_in_link[a][o]    = r_out_link[NB][OPP];
        assign r_out_credit[a][o] = r_in_credit[NB][OPP];
      end else begin : g_tie
        assign r_in_link[a][o]    = '0;
        assign r_out_credit[a][o] = '0;
      end
    end
    assign r_in_link[a][P_L]    = inj_link[a];
    assign r_out_credit[a][P_L] = ej_credit[a];
    assign inj_credit[a]        = r_in_credit[a][P_L];
    assign ej_link[a]           = r_out_link[a][P_L];

    tesh_router #(.L(L)) u_router (
      .clk, .rst_n,
      .my_addr    (ADDR_W'(a)),
      .mode,
      .in_link    (r_in_link[a]),
      .in_credit  (r_in_credit[a]),
      .out_link   (r_out_link[a]),
      .out_credit (r_out_credit[a]),
      .ev         (ev[a])
    );
  end

endmodule
