// tesh_router: one node's wormhole router in a TESH network.
//
// Five ports: the four mesh directions N, E, S, W and the local port of the
// node's processing element. A mesh port on the BM contour with no mesh
// neighbour carries an inter-BM link instead. Every input port has four
// virtual channels (VCs), each a 2-flit buffer, as in the document.
//
// Pipeline, per cycle:
//   * route: each input VC whose buffer head is a head flit and which holds
//     no output VC asks its tesh_route_unit for an output port and a set of
//     allowed output VCs. The lowest allowed output VC that is unowned and
//     has a credit is the one it requests.
//   * allocate: a round-robin arbiter per input port picks one requesting
//     VC, then a round-robin arbiter per output port picks one input port.
//     A head that wins takes ownership of its output VC (wormhole), a tail
//     releases it.
//   * traverse: the winning flit is written to the output port's register,
//     which drives the link; the downstream router stores it at the next
//     clock edge. A flit thus needs two cycles per hop (buffer to output,
//     output to next buffer), which is the document's transfer model.
// Flow control is credit based: an output VC may send while the downstream
// buffer has space; each flit that leaves an input buffer returns a credit
// upstream one cycle later. The allocator, credits and registered outputs
// are this design's own realisation of the document's description.
//
// In DDR mode each output VC is labelled with the DR number of the packet
// that holds it; the route units read these labels.
module tesh_router
  import tesh_pkg::*;
#(
  parameter int unsigned L = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [ADDR_W-1:0] my_addr,
  input  route_mode_t mode,
  input  link_t       in_link   [NPORT],  // flits arriving
  output credit_t     in_credit [NPORT],  // credits back to the senders
  output link_t       out_link  [NPORT],  // flits leaving
  input  credit_t     out_credit[NPORT],  // credits from the receivers
  output router_ev_t  ev
);

  localparam int unsigned FW = $bits(flit_t);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam int unsigned PW = $clog2(NPORT);

  // ---------------- input buffers and per-VC state ----------------
  flit_t             buf_dout  [NPORT][NUM_VC];
  logic              buf_empty [NPORT][NUM_VC];
  logic              buf_pop   [NPORT][NUM_VC];
  logic              buf_full  [NPORT][NUM_VC];  // guarded by credits
  logic              active    [NPORT][NUM_VC];
  port_e             act_port  [NPORT][NUM_VC];
  logic [VC_W-1:0]   act_vc    [NPORT][NUM_VC];

  // ---------------- output VC state ----------------
  logic [NUM_VC-1:0] ovc_owned [NPORT];
  logic [CW-1:0]     ovc_cred  [NPORT][NUM_VC];
  logic [DR_W-1:0]   ovc_label [NPORT][NUM_VC];
  logic [NUM_VC-1:0] ovc_avail [NPORT];

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int v = 0; v < NUM_VC; v++)
        ovc_avail[o][v] = !ovc_owned[o][v] && (ovc_cred[o][v] != '0);
  end

  // ---------------- route units ----------------
  port_e             rt_port [NPORT][NUM_VC];
  logic [NUM_VC-1:0] rt_mask [NPORT][NUM_VC];
  logic              rt_hodd [NPORT][NUM_VC];
  head_t             rt_hdr  [NPORT][NUM_VC];
  logic              rt_lsm  [NPORT][NUM_VC];
  logic              rt_rev  [NPORT][NUM_VC];
  logic              rt_esc  [NPORT][NUM_VC];
  logic              rt_wrap [NPORT][NUM_VC];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      vc_fifo #(.WIDTH(FW), .DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .push  (in_link[p].valid && in_link[p].vc == VC_W'(v)),
        .din   (in_link[p].flit),
        .pop   (buf_pop[p][v]),
        .dout  (buf_dout[p][v]),
        .empty (buf_empty[p][v]),
        .full  (buf_full[p][v])
      );
      tesh_route_unit #(.L(L)) u_rt (
        .my_addr, .mode,
        .hdr_in      (head_t'(buf_dout[p][v].data)),
        .vc_avail    (ovc_avail),
        .vc_owned    (ovc_owned),
        .vc_label    (ovc_label),
        .out_port    (rt_port[p][v]),
        .vc_mask     (rt_mask[p][v]),
        .h_on_odd    (rt_hodd[p][v]),
        .hdr_out     (rt_hdr[p][v]),
        .ev_ls_minus (rt_lsm[p][v]),
        .ev_reversal (rt_rev[p][v]),
        .ev_escape   (rt_esc[p][v]),
        .ev_wrap     (rt_wrap[p][v])
      );
      // the sender only sends against a credit, so a full buffer takes nothing
      assert property (@(posedge clk) disable iff (!rst_n)
                       !(in_link[p].valid && in_link[p].vc == VC_W'(v) && buf_full[p][v]));
    end
  end

  // ---------------- requests ----------------
  logic [NUM_VC-1:0] req1     [NPORT];   // per input port, per VC
  port_e             req_port [NPORT][NUM_VC];
  logic [VC_W-1:0]   req_vc   [NPORT][NUM_VC];
  logic              stall    [NPORT][NUM_VC];

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        logic [NUM_VC-1:0] ok;
        req1[p][v]     = 1'b0;
        req_port[p][v] = act_port[p][v];
        req_vc[p][v]   = act_vc[p][v];
        stall[p][v]    = 1'b0;
        ok             = '0;
        if (!buf_empty[p][v]) begin
          if (active[p][v]) begin
            req1[p][v]  = (ovc_cred[act_port[p][v]][act_vc[p][v]] != '0);
            stall[p][v] = !req1[p][v];
          end else if (is_head(buf_dout[p][v].ftype)) begin
            req_port[p][v] = rt_port[p][v];
            ok = rt_mask[p][v] & ovc_avail[rt_port[p][v]];
            for (int k = NUM_VC - 1; k >= 0; k--)
              if (ok[k]) req_vc[p][v] = VC_W'(k);
            req1[p][v] = (ok != '0);
          end
        end
      end
    end
  end

  // ---------------- two-stage round-robin allocation ----------------
  logic [NUM_VC-1:0] gnt1     [NPORT];
  logic [VC_W-1:0]   gnt1_idx [NPORT];
  logic [NPORT-1:0]  req2     [NPORT];   // per output port, per input port
  logic [NPORT-1:0]  gnt2     [NPORT];
  logic [PW-1:0]     gnt2_idx [NPORT];
  logic [NPORT-1:0]  win;                // per input port

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int p = 0; p < NPORT; p++)
        req2[o][p] = (gnt1[p] != '0) && (req_port[p][gnt1_idx[p]] == port_e'(o));
    for (int p = 0; p < NPORT; p++) begin
      win[p] = 1'b0;
      for (int o = 0; o < NPORT; o++)
        if (gnt2[o][p]) win[p] = 1'b1;
    end
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_arb1
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n, .req(req1[p]), .advance(win[p]),
      .gnt(gnt1[p]), .gnt_idx(gnt1_idx[p])
    );
  end
  for (genvar o = 0; o < NPORT; o++) begin : g_arb2
    rr_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n, .req(req2[o]), .advance(1'b1),
      .gnt(gnt2[o]), .gnt_idx(gnt2_idx[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++)
        buf_pop[p][v] = win[p] && (gnt1_idx[p] == VC_W'(v));
  end

  // ---------------- state update and traversal ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) begin
        out_link[p]  <= '0;
        in_credit[p] <= '0;
        ovc_owned[p] <= '0;
        for (int v = 0; v < NUM_VC; v++) begin
          active[p][v]    <= 1'b0;
          act_port[p][v]  <= P_L;
          act_vc[p][v]    <= '0;
          ovc_cred[p][v]  <= CW'(BUF_DEPTH);
          ovc_label[p][v] <= '0;
        end
      end
      ev <= '0;
    end else begin
      router_ev_t e;
      e = '0;
      for (int p = 0; p < NPORT; p++) begin
        in_credit[p] <= '0;
        out_link[p]  <= '0;
      end
      // credits returned by receivers
      for (int o = 0; o < NPORT; o++)
        for (int v = 0; v < NUM_VC; v++)
          if (out_credit[o].valid && out_credit[o].vc == VC_W'(v))
            ovc_cred[o][v] <= ovc_cred[o][v] + 1'b1;
      // winners
      for (int o = 0; o < NPORT; o++) begin
        if (gnt2[o] != '0) begin
          logic [PW-1:0]   p;
          logic [VC_W-1:0] v;
          logic [VC_W-1:0] ov;
          flit_t           f;
          head_t           h;
          p  = gnt2_idx[o];
          v  = gnt1_idx[p];
          ov = req_vc[p][v];
          f  = buf_dout[p][v];
          e.flit_sent = 1'b1;
          if (!active[p][v]) begin
            h = rt_hdr[p][v];
            if (rt_hodd[p][v] && ov[0]) begin
              if (!h.cls_h && o != int'(P_L)) e.cs_early_h = 1'b1;
              h.cls_h = 1'b1;
            end
            f.data = DATA_W'(h);
            ovc_label[o][ov] <= h.dr;
            if ((o == int'(P_N) && my_addr[3:2] == 2'd3) || (o == int'(P_S) && my_addr[3:2] == 2'd0)
                || (o == int'(P_E) && my_addr[1:0] == 2'd3) || (o == int'(P_W) && my_addr[1:0] == 2'd0))
              e.inter_bm = 1'b1;
            if (rt_lsm[p][v])  e.ls_minus     = 1'b1;
            if (rt_rev[p][v])  e.ddr_reversal = 1'b1;
            if (rt_esc[p][v])  e.ddr_escape   = 1'b1;
            if (rt_wrap[p][v]) e.wrap         = 1'b1;
            if (!is_tail(f.ftype)) begin
              active[p][v]   <= 1'b1;
              act_port[p][v] <= port_e'(o);
              act_vc[p][v]   <= ov;
              ovc_owned[o][ov] <= 1'b1;
            end
          end else if (is_tail(f.ftype)) begin
            active[p][v]     <= 1'b0;
            ovc_owned[o][ov] <= 1'b0;
          end
          ovc_cred[o][ov] <= ovc_cred[o][ov] - 1'b1
                             + CW'(out_credit[o].valid && out_credit[o].vc == ov);
          out_link[o]  <= '{valid: 1'b1, vc: ov, flit: f};
          in_credit[p] <= '{valid: 1'b1, vc: VC_W'(v)};
        end
      end
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NUM_VC; v++)
          if (stall[p][v]) e.credit_stall = 1'b1;
      ev <= e;
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_chk
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assert property (@(posedge clk) disable iff (!rst_n) ovc_cred[o][v] <= CW'(BUF_DEPTH));
    end
  end

endmodule
