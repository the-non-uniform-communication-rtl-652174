// tesh_route_unit: routing computation for one input virtual channel.
//
// Given this router's address and a head flit's header, it picks the output
// port, the set of output VCs the packet may take there, and the header the
// packet carries to the next router. It is purely combinational.
//
// Dimension-order routing (R1), after the document's routing algorithm:
// the highest address digit p (>= 2) that differs from the destination is
// routed first; odd digits are the vertical ring of level p/2+1, even digits
// the horizontal ring. The ring direction is plus when (d-c) mod 4 <= 2.
// Inside the BM the packet goes to the outlet PE of that ring and direction,
// moving in y first and then in x, and then takes the inter-BM link. When no
// higher digit differs it is routed in the BM to (d1, d0) and ejected.
//
// Outlet PEs (this design's own placement of the q = 0 free ports; each is a
// contour port without a mesh neighbour):
//   level l vertical plus  : (y=3, x=l-2), port N   minus: (y=0, x=l-2), port S
//   level l horizontal plus: (y=l-2, x=3), port E   minus: (y=l-2, x=0), port W
//
// Virtual channels. Without DDR, VCs 0 and 2 are Channel-L and VCs 1 and 3
// Channel-H (two pairs, as in the document). A packet uses Channel-L in a
// ring until it crosses the wraparound link, and Channel-H after it; the
// class is reset when the routed digit changes.
//   CS (R2): while the rest of the ring route uses no wraparound link, or
//   ends at the PE a wraparound link enters, a Channel-L packet may also
//   take Channel-H (and then stays on it).
//   LS (R3): when the ring distance is 2 (|s-d| = 2^m/2) the direction is
//   chosen at the first router of the phase: plus unless only minus has a
//   free VC. The choice is kept in the header for the rest of the phase.
//   DDR (R4): VCs 0/1 are the deterministic Channel-L/H, VCs 2/3 adaptive.
//   On adaptive VCs a packet at an outlet PE takes that inter-BM link
//   (path 1) if it reduces a still-differing digit and an adaptive VC is
//   free; otherwise it follows R1 on adaptive VCs. Taking a link of a lower
//   digit than p increments its DR number. If every adaptive VC it could
//   use is held by a packet with an equal or lower DR label it moves to the
//   deterministic VCs for good and is routed by R1 (with CS/LS if enabled).
module tesh_route_unit
  import tesh_pkg::*;
#(
  parameter int unsigned L = 3     // network level, 2..L_MAX
) (
  input  logic [ADDR_W-1:0] my_addr,
  input  route_mode_t       mode,
  input  head_t             hdr_in,
  // state of this router's output VCs
  input  logic [NUM_VC-1:0] vc_avail [NPORT],   // unowned and has credit
  input  logic [NUM_VC-1:0] vc_owned [NPORT],
  input  logic [DR_W-1:0]   vc_label [NPORT][NUM_VC],
  output port_e             out_port,
  output logic [NUM_VC-1:0] vc_mask,
  output logic              h_on_odd,  // an odd (Channel-H) VC sets cls_h
  output head_t             hdr_out,
  output logic              ev_ls_minus,
  output logic              ev_reversal,
  output logic              ev_escape,
  output logic              ev_wrap
);

  localparam logic [NUM_VC-1:0] M_L    = 4'b0101;
  localparam logic [NUM_VC-1:0] M_H    = 4'b1010;
  localparam logic [NUM_VC-1:0] M_DL   = 4'b0001;
  localparam logic [NUM_VC-1:0] M_DH   = 4'b0010;
  localparam logic [NUM_VC-1:0] M_ADPT = 4'b1100;

  logic [1:0] cy, cx, dy, dx;
  assign cy = my_addr[3:2];
  assign cx = my_addr[1:0];
  assign dy = hdr_in.dest[3:2];
  assign dx = hdr_in.dest[1:0];

  // next port inside the BM towards (ty, tx): y first, then x
  function automatic port_e bm_step(input logic [1:0] y, x, ty, tx);
    if (ty > y)      return P_N;
    else if (ty < y) return P_S;
    else if (tx > x) return P_E;
    else             return P_W;
  endfunction

  // ---- highest differing digit p (0 when only the BM position differs) ----
  logic [3:0] p;
  logic       found;
  always_comb begin
    p = '0;
    found = 1'b0;
    for (int unsigned i = 2; i < 2 * L; i++)
      if (hdr_in.dest[2*i +: 2] != my_addr[2*i +: 2]) begin
        p = 4'(i);
        found = 1'b1;
      end
  end

  // ---- ring of digit p: direction, outlets, next step each way ----
  logic [1:0] cp, dp, delta, lm2;
  logic       vert, dist2, new_phase, cls_in, dset_in, dminus_in;
  logic [1:0] oy_p, ox_p, oy_m, ox_m;
  port_e      plus_port, minus_port;
  always_comb begin
    cp    = my_addr[2*p +: 2];
    dp    = hdr_in.dest[2*p +: 2];
    delta = dp - cp;                       // mod 4
    dist2 = found && (delta == 2'd2);
    vert  = p[0];
    lm2   = 2'((p >> 1) - 4'd1);           // level - 2
    oy_p  = vert ? 2'd3 : lm2;   ox_p = vert ? lm2 : 2'd3;
    oy_m  = vert ? 2'd0 : lm2;   ox_m = vert ? lm2 : 2'd0;
    plus_port  = (cy == oy_p && cx == ox_p) ? (vert ? P_N : P_E) : bm_step(cy, cx, oy_p, ox_p);
    minus_port = (cy == oy_m && cx == ox_m) ? (vert ? P_S : P_W) : bm_step(cy, cx, oy_m, ox_m);
    new_phase = (hdr_in.phase != p);
    cls_in    = new_phase ? 1'b0 : hdr_in.cls_h;
    dset_in   = new_phase ? 1'b0 : hdr_in.dir_set;
    dminus_in = new_phase ? 1'b0 : hdr_in.dir_minus;
  end

  // ---- inter-BM links of this node (DDR path 1 candidates) ----
  // N/S: vertical link of level cx+2 (digit 2cx+3); E/W: horizontal link of
  // level cy+2 (digit 2cy+2).
  logic [3:0] dig_v, dig_h;
  logic [1:0] dd_v, dd_h;
  logic       lnk_n, lnk_s, lnk_e, lnk_w;
  logic       prod_n, prod_s, prod_e, prod_w;
  always_comb begin
    dig_v = 4'(2 * cx + 3);
    dig_h = 4'(2 * cy + 2);
    dd_v  = hdr_in.dest[2*dig_v +: 2] - my_addr[2*dig_v +: 2];
    dd_h  = hdr_in.dest[2*dig_h +: 2] - my_addr[2*dig_h +: 2];
    lnk_n = (cy == 2'd3) && (32'(cx) + 2 <= L);
    lnk_s = (cy == 2'd0) && (32'(cx) + 2 <= L);
    lnk_e = (cx == 2'd3) && (32'(cy) + 2 <= L);
    lnk_w = (cx == 2'd0) && (32'(cy) + 2 <= L);
    prod_n = lnk_n && (dd_v == 2'd1 || dd_v == 2'd2);
    prod_s = lnk_s && (dd_v == 2'd3 || dd_v == 2'd2);
    prod_e = lnk_e && (dd_h == 2'd1 || dd_h == 2'd2);
    prod_w = lnk_w && (dd_h == 2'd3 || dd_h == 2'd2);
  end

  logic              minus, wrap_ahead, wrap_last, relaxed, adaptive, all_low;
  logic              p1_found, p1_minus, hop_edge, hop_minus;
  logic [3:0]        p1_digit, hop_digit;
  port_e             dor_port, p1_port;
  logic [NUM_VC-1:0] det_mask, ls_mask;

  always_comb begin

    adaptive = mode.ddr && !hdr_in.det;

    hdr_out           = hdr_in;
    hdr_out.phase     = p;
    hdr_out.cls_h     = cls_in;
    hdr_out.dir_set   = dset_in;
    hdr_out.dir_minus = dminus_in;
    ev_ls_minus = 1'b0;
    ev_reversal = 1'b0;
    ev_escape   = 1'b0;
    ev_wrap     = 1'b0;
    out_port    = P_L;
    vc_mask     = '0;
    h_on_odd    = 1'b0;
    all_low     = 1'b0;

    // ---- dimension-order step (R1) ----
    if (!found) begin
      dor_port   = (cy == dy && cx == dx) ? P_L : bm_step(cy, cx, dy, dx);
      minus      = 1'b0;
      wrap_ahead = 1'b0;
      wrap_last  = 1'b0;
    end else begin
      minus      = (dist2 && dset_in) ? dminus_in : (delta == 2'd3);
      wrap_ahead = minus ? (dp > cp) : (dp < cp);
      wrap_last  = minus ? (dp == 2'd3) : (dp == 2'd0);
      dor_port   = minus ? minus_port : plus_port;
    end
    relaxed = !wrap_ahead || wrap_last;

    // Channel-L/H choice (R1, widened by CS)
    if (mode.ddr) det_mask = cls_in ? M_DH : ((mode.cs && relaxed) ? (M_DL | M_DH) : M_DL);
    else          det_mask = cls_in ? M_H  : ((mode.cs && relaxed) ? (M_L  | M_H ) : M_L);

    // LS: first router of a distance-2 phase may go minus
    ls_mask = adaptive ? M_ADPT : det_mask;
    if (dist2 && !dset_in && mode.ls) begin
      if ((vc_avail[plus_port] & ls_mask) == '0 && (vc_avail[minus_port] & ls_mask) != '0) begin
        minus       = 1'b1;
        dor_port    = minus_port;
        ev_ls_minus = 1'b1;
      end
    end
    if (dist2) begin
      hdr_out.dir_set   = 1'b1;
      hdr_out.dir_minus = minus;
    end

    // ---- DDR path 1: a productive inter-BM link with a free adaptive VC ----
    p1_found = 1'b0; p1_port = P_L; p1_digit = '0; p1_minus = 1'b0;
    if (adaptive) begin
      if (prod_n && (vc_avail[P_N] & M_ADPT) != '0) begin
        p1_found = 1'b1; p1_port = P_N; p1_digit = dig_v; p1_minus = 1'b0;
      end else if (prod_e && (vc_avail[P_E] & M_ADPT) != '0) begin
        p1_found = 1'b1; p1_port = P_E; p1_digit = dig_h; p1_minus = 1'b0;
      end else if (prod_s && (vc_avail[P_S] & M_ADPT) != '0) begin
        p1_found = 1'b1; p1_port = P_S; p1_digit = dig_v; p1_minus = 1'b1;
      end else if (prod_w && (vc_avail[P_W] & M_ADPT) != '0) begin
        p1_found = 1'b1; p1_port = P_W; p1_digit = dig_h; p1_minus = 1'b1;
      end
    end

    // ---- final selection ----
    if (!adaptive) begin
      out_port = dor_port;
      if (dor_port == P_L) vc_mask = '1;
      else begin
        vc_mask  = det_mask;
        h_on_odd = 1'b1;
      end
    end else if (dor_port == P_L) begin
      out_port = P_L;
      vc_mask  = '1;
    end else if (p1_found) begin
      out_port = p1_port;
      vc_mask  = M_ADPT;
      if (p1_digit < p) begin
        ev_reversal = 1'b1;
        if (hdr_in.dr != '1) hdr_out.dr = hdr_in.dr + 1'b1;
      end else begin
        // the link of digit p itself: follow its direction
        minus             = p1_minus;
        hdr_out.dir_set   = 1'b1;
        hdr_out.dir_minus = p1_minus;
      end
    end else if ((vc_avail[dor_port] & M_ADPT) != '0) begin
      out_port = dor_port;
      vc_mask  = M_ADPT;
    end else begin
      // wait unless every adaptive VC at the DOR port is held by a packet
      // whose DR label is not above ours; then escape to deterministic VCs
      all_low = 1'b1;
      for (int unsigned v = 2; v < NUM_VC; v++)
        if (!vc_owned[dor_port][v] || vc_label[dor_port][v] > hdr_in.dr) all_low = 1'b0;
      out_port = dor_port;
      if (all_low) begin
        vc_mask     = det_mask;
        h_on_odd    = 1'b1;
        hdr_out.det = 1'b1;
        ev_escape   = 1'b1;
      end else begin
        vc_mask = M_ADPT;
      end
    end

    // crossing the wraparound link of digit p: Channel-H afterwards
    hop_edge  = 1'b0; hop_digit = '0; hop_minus = 1'b0;
    case (out_port)
      P_N: begin hop_edge = lnk_n; hop_digit = dig_v; hop_minus = 1'b0; end
      P_S: begin hop_edge = lnk_s; hop_digit = dig_v; hop_minus = 1'b1; end
      P_E: begin hop_edge = lnk_e; hop_digit = dig_h; hop_minus = 1'b0; end
      P_W: begin hop_edge = lnk_w; hop_digit = dig_h; hop_minus = 1'b1; end
      default: ;
    endcase
    if (found && hop_edge && hop_digit == p && (hop_minus ? (cp == 2'd0) : (cp == 2'd3))) begin
      hdr_out.cls_h = 1'b1;
      ev_wrap       = 1'b1;
    end
  end

endmodule
