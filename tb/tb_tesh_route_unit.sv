// tb_tesh_route_unit: directed routing cases in a Level-3 TESH, each with
// the port, VC set and header worked out by hand from the routing rules
// (dimension order, CS, LS, DDR path 1, DDR escape and wait, ejection).
module tb_tesh_route_unit;
  import tesh_pkg::*;

  logic [ADDR_W-1:0] my_addr;
  route_mode_t       mode;
  head_t             hdr_in, hdr_out;
  logic [NUM_VC-1:0] vc_avail [NPORT];
  logic [NUM_VC-1:0] vc_owned [NPORT];
  logic [DR_W-1:0]   vc_label [NPORT][NUM_VC];
  port_e             out_port;
  logic [NUM_VC-1:0] vc_mask;
  logic h_on_odd, ev_ls_minus, ev_reversal, ev_escape, ev_wrap;
  int checks = 0, failures = 0;

  tesh_route_unit #(.L(3)) dut (.*);

  // address from (level-3 v,h) (level-2 v,h) (y,x)
  function automatic logic [ADDR_W-1:0] A(int d5, int d4, int d3, int d2, int y, int x);
    return ADDR_W'((d5 << 10) | (d4 << 8) | (d3 << 6) | (d2 << 4) | (y << 2) | x);
  endfunction

  function automatic head_t H(logic [ADDR_W-1:0] dest);
    head_t h;
    h = '0;
    h.dest = dest;
    return h;
  endfunction

  task automatic all_free();
    for (int p = 0; p < NPORT; p++) begin
      vc_avail[p] = '1;
      vc_owned[p] = '0;
      for (int v = 0; v < NUM_VC; v++) vc_label[p][v] = '0;
    end
  endtask

  task automatic expect_route(string name, port_e p, logic [NUM_VC-1:0] m);
    #1;
    checks++;
    if (out_port != p || vc_mask != m) begin
      failures++;
      $display("FAIL %s: port %0d mask %b, expected port %0d mask %b", name, out_port, vc_mask, p, m);
    end
  endtask

  task automatic expect_bit(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b", name, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    all_free();
    mode = '0;

    // 1. final BM routing, y first: (0,0) -> (1,2)
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(0,0,0,0,1,2));
    expect_route("bm y first", P_N, 4'b0101);
    expect_bit("bm phase", hdr_out.phase == 0, 1);
    // then x when y matches
    my_addr = A(0,0,0,0,1,0);
    expect_route("bm x", P_E, 4'b0101);
    // ejection
    my_addr = A(0,0,0,0,1,2);
    expect_route("eject", P_L, 4'b1111);

    // 2. level-2 vertical ring, plus: outlet (3,0)
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(0,0,1,0,2,2));
    expect_route("to V2+ outlet", P_N, 4'b0101);
    expect_bit("phase 3", hdr_out.phase == 3, 1);
    my_addr = A(0,0,0,0,3,0); hdr_in.phase = 3;
    expect_route("take V2+ link", P_N, 4'b0101);
    expect_bit("no wrap", ev_wrap, 0);
    // higher level first: level-3 horizontal digit differs too -> digit 4
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(0,1,1,0,0,0));
    expect_route("L3 H+ outlet (1,3)", P_N, 4'b0101);
    expect_bit("phase 4", hdr_out.phase == 4, 1);
    my_addr = A(0,0,0,0,1,3); hdr_in.phase = 4;
    expect_route("take H3+ link", P_E, 4'b0101);
    // minus direction: digit2 0 -> 3 is distance 3 -> minus, outlet (0,0) W
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(0,0,0,3,0,0));
    expect_route("H2- link from (0,0)", P_W, 4'b0101);
    expect_bit("wrap minus at 0", ev_wrap, 1);
    expect_bit("wrap sets H", hdr_out.cls_h, 1);

    // 3. wraparound: digit3 3 -> 1 (distance 2, plus by DOR) at outlet (3,0)
    my_addr = A(0,0,3,0,3,0); hdr_in = H(A(0,0,1,0,0,0)); hdr_in.phase = 3;
    expect_route("wrap hop on L", P_N, 4'b0101);
    expect_bit("wrap event", ev_wrap, 1);
    expect_bit("wrap -> cls_h", hdr_out.cls_h, 1);
    // after the wrap the packet is on Channel-H
    my_addr = A(0,0,0,0,0,0); hdr_in.cls_h = 1; hdr_in.dir_set = 1;
    expect_route("after wrap H", P_N, 4'b1010);
    // CS cannot relax here: wrap ahead and not last (3 -> 1)
    mode = '{cs: 1, ls: 0, ddr: 0};
    my_addr = A(0,0,3,0,2,0); hdr_in = H(A(0,0,1,0,0,0)); hdr_in.phase = 3;
    expect_route("CS no relax", P_N, 4'b0101);
    // CS relaxes when the route ends at the wrap output (2 -> 0)
    hdr_in = H(A(0,0,0,0,0,0)); my_addr = A(0,0,2,0,2,0);
    hdr_in.dest = A(0,0,0,1,0,0);  // digit3 2 -> 0, digit2 differs too (lower)
    expect_route("CS relax wrap last", P_N, 4'b1111);
    // CS relaxes with no wrap ahead
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(0,0,1,0,0,0));
    expect_route("CS relax no wrap", P_N, 4'b1111);
    expect_bit("CS h_on_odd", h_on_odd, 1);

    // 4. LS: digit3 0 -> 2, plus outlet (3,0) via N, minus outlet (0,0) S link
    mode = '{cs: 0, ls: 1, ddr: 0};
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(0,0,2,0,0,0));
    expect_route("LS both free -> plus", P_N, 4'b0101);
    expect_bit("LS dir stored", hdr_out.dir_set && !hdr_out.dir_minus, 1);
    vc_avail[P_N] = 4'b1010;   // no Channel-L free towards plus
    expect_route("LS -> minus", P_S, 4'b0101);
    expect_bit("LS event", ev_ls_minus, 1);
    expect_bit("LS dir minus", hdr_out.dir_minus, 1);
    mode = '0;
    expect_route("DOR keeps plus", P_N, 4'b0101);
    all_free();

    // 5. DDR path 1: at (0,0) with p = 5 (L3 vertical) and digit2 3 behind
    //    (distance 3 -> minus productive): take the H2- link W, DR -> 1
    mode = '{cs: 0, ls: 0, ddr: 1};
    my_addr = A(0,0,0,0,0,0); hdr_in = H(A(1,0,0,3,0,0));
    expect_route("DDR path1", P_W, 4'b1100);
    expect_bit("DDR reversal", ev_reversal, 1);
    expect_bit("DDR dr=1", hdr_out.dr == 1, 1);
    // not productive (digit2 +1 needs plus link E, absent here): DOR port N
    hdr_in = H(A(1,0,0,1,0,0));
    expect_route("DDR path2", P_N, 4'b1100);
    expect_bit("no reversal", ev_reversal, 0);
    // 6. escape: adaptive VCs of N held by DR-0 packets -> deterministic L
    vc_avail[P_N] = 4'b0011; vc_owned[P_N] = 4'b1100;
    expect_route("DDR escape", P_N, 4'b0001);
    expect_bit("det set", hdr_out.det, 1);
    expect_bit("escape event", ev_escape, 1);
    // 7. wait: one adaptive VC held by a higher DR packet
    vc_label[P_N][3] = 3'd2;
    expect_route("DDR wait", P_N, 4'b1100);
    expect_bit("no escape", ev_escape, 0);
    // deterministic packets stay deterministic
    hdr_in.det = 1;
    expect_route("det stays", P_N, 4'b0001);
    all_free();
    // DDR + CS on the deterministic pair
    mode = '{cs: 1, ls: 0, ddr: 1};
    expect_route("det CS", P_N, 4'b0011);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
