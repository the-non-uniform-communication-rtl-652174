// tb_tesh_router: one router of a Level-2 TESH at node (y=1, x=1) of BM 0.
// Upstream senders per input port obey credits; downstream sinks collect
// flits per output port and VC and return credits when enabled.
// Checks: output port and VC of each packet, rewritten header, flit order
// and payload, the one-cycle buffer-to-link latency (two cycles per hop
// with the link), credit stalls, and two packets sharing one output on
// different VCs.
module tb_tesh_router;
  import tesh_pkg::*;

  logic clk = 0, rst_n = 0;
  route_mode_t mode;
  link_t      in_link   [NPORT];
  credit_t    in_credit [NPORT];
  link_t      out_link  [NPORT];
  credit_t    out_credit[NPORT];
  router_ev_t ev;
  localparam logic [ADDR_W-1:0] ME = ADDR_W'(5);   // (y=1, x=1)

  tesh_router #(.L(2)) dut (.clk, .rst_n, .my_addr(ME), .mode, .in_link, .in_credit,
                            .out_link, .out_credit, .ev);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;

  // senders
  typedef struct { logic [VC_W-1:0] vc; flit_t f; } item_t;
  item_t sq [NPORT][$];
  int    scred [NPORT][NUM_VC];
  // sinks
  flit_t rq [NPORT][NUM_VC][$];
  bit    sink_en;
  int    manual_cred;   // credits to hand back on port N, VC 0
  int    first_out_cycle;
  int    stalls;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) for (int v = 0; v < NUM_VC; v++) scred[p][v] = BUF_DEPTH;
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        if (in_credit[p].valid) scred[p][in_credit[p].vc]++;
        if (out_link[p].valid) begin
          rq[p][out_link[p].vc].push_back(out_link[p].flit);
          if (first_out_cycle < 0) first_out_cycle = cycle;
        end
      end
      if (ev.credit_stall) stalls++;
    end
    cycle++;
  end

  // drive inputs after each edge
  always @(negedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      in_link[p] = '0;
      if (rst_n && sq[p].size() > 0 && scred[p][sq[p][0].vc] > 0) begin
        item_t it;
        it = sq[p].pop_front();
        scred[p][it.vc]--;
        in_link[p] = '{valid: 1'b1, vc: it.vc, flit: it.f};
      end
      out_credit[p] = '0;
      if (sink_en && out_link[p].valid) out_credit[p] = '{valid: 1'b1, vc: out_link[p].vc};
    end
    if (manual_cred > 0 && !out_credit[P_N].valid) begin
      out_credit[P_N] = '{valid: 1'b1, vc: '0};
      manual_cred--;
    end
  end

  function automatic head_t mkhdr(logic [ADDR_W-1:0] dest);
    head_t h; h = '0; h.dest = dest; return h;
  endfunction

  task automatic send_pkt(int p, int vc, head_t h, int nflits, int tag);
    item_t it;
    it.vc = VC_W'(vc);
    it.f  = '{ftype: F_HEAD, data: DATA_W'(h)};
    sq[p].push_back(it);
    for (int k = 1; k < nflits; k++) begin
      it.f = '{ftype: (k == nflits - 1) ? F_TAIL : F_BODY, data: DATA_W'(tag * 256 + k)};
      sq[p].push_back(it);
    end
  endtask

  task automatic check_pkt(string name, int o, int vc, logic [ADDR_W-1:0] dest,
                           logic [3:0] phase, int nflits, int tag);
    head_t h;
    checks++;
    if (rq[o][vc].size() != nflits) begin
      failures++;
      $display("FAIL %s: %0d flits on port %0d vc %0d, expected %0d", name, rq[o][vc].size(), o, vc, nflits);
      return;
    end
    h = head_t'(rq[o][vc][0].data);
    checks++;
    if (rq[o][vc][0].ftype != F_HEAD || h.dest != dest || h.phase != phase) begin
      failures++; $display("FAIL %s: head %p", name, h);
    end
    for (int k = 1; k < nflits; k++) begin
      checks++;
      if (rq[o][vc][k].data != DATA_W'(tag * 256 + k)
          || rq[o][vc][k].ftype != ((k == nflits - 1) ? F_TAIL : F_BODY)) begin
        failures++; $display("FAIL %s: flit %0d = %h", name, k, rq[o][vc][k].data);
      end
    end
    rq[o][vc].delete();
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    mode = '0; sink_en = 1; manual_cred = 0; first_out_cycle = -1; stalls = 0;
    for (int p = 0; p < NPORT; p++) begin in_link[p] = '0; out_credit[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. local -> E inside the BM, latency of the first flit
    @(negedge clk);
    t0 = cycle;
    send_pkt(P_L, 1, mkhdr(ADDR_W'(7)), 4, 1);     // dest (1,3)
    repeat (12) @(posedge clk);
    check_pkt("local to E", P_E, 0, ADDR_W'(7), 4'd0, 4, 1);
    checks++;
    // entry edge, output register edge, next buffer edge: 2 cycles per hop
    if (first_out_cycle - t0 != 2) begin
      failures++; $display("FAIL latency: head on link %0d cycles after entry", first_out_cycle - t0);
    end

    // 2. credit stall: sinks return no credit, only BUF_DEPTH flits leave
    sink_en = 0;
    @(negedge clk);
    send_pkt(P_W, 0, mkhdr(ADDR_W'(13)), 6, 2);    // dest (3,1): N
    repeat (15) @(posedge clk);
    checks++;
    if (rq[P_N][0].size() != BUF_DEPTH) begin
      failures++; $display("FAIL stall: %0d flits left", rq[P_N][0].size());
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall event"); end
    // return the two missing credits by hand, then resume
    manual_cred = BUF_DEPTH;
    sink_en = 1;
    repeat (15) @(posedge clk);
    check_pkt("stalled W to N", P_N, 0, ADDR_W'(13), 4'd0, 6, 2);

    // 3. two packets to E at once: VC 0 and VC 2 (the two Channel-L VCs)
    @(negedge clk);
    send_pkt(P_W, 3, mkhdr(ADDR_W'(6)), 8, 3);     // dest (1,2)
    send_pkt(P_L, 0, mkhdr(ADDR_W'(7)), 8, 4);     // dest (1,3)
    repeat (30) @(posedge clk);
    if (rq[P_E][0].size() > 0 && rq[P_E][0][0].data[DATA_W-1 -: ADDR_W] == ADDR_W'(6)) begin
      check_pkt("shared E a", P_E, 0, ADDR_W'(6), 4'd0, 8, 3);
      check_pkt("shared E b", P_E, 2, ADDR_W'(7), 4'd0, 8, 4);
    end else begin
      check_pkt("shared E b", P_E, 0, ADDR_W'(7), 4'd0, 8, 4);
      check_pkt("shared E a", P_E, 2, ADDR_W'(6), 4'd0, 8, 3);
    end

    // 4. higher level: dest in BM (1,0) of level 2 -> V2+ outlet (3,0)
    //    from (1,1): y first -> N, header phase becomes 3
    @(negedge clk);
    send_pkt(P_L, 2, mkhdr(ADDR_W'(1 << 6)), 3, 5);
    repeat (12) @(posedge clk);
    check_pkt("to outlet", P_N, 0, ADDR_W'(1 << 6), 4'd3, 3, 5);

    // 5. ejection to the local port (any VC: lowest free = 0)
    @(negedge clk);
    send_pkt(P_S, 1, mkhdr(ME), 5, 6);
    repeat (12) @(posedge clk);
    check_pkt("eject", P_L, 0, ME, 4'd0, 5, 6);

    // credits: every sender got all its credits back
    for (int p = 0; p < NPORT; p++) for (int v = 0; v < NUM_VC; v++) begin
      checks++;
      if (scred[p][v] != BUF_DEPTH) begin failures++; $display("FAIL credit %0d/%0d = %0d", p, v, scred[p][v]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
