// tb_tesh_network: end-to-end traffic through a TESH(2,L,0) network.
//
// Every node runs a packet source and a sink on its local port. Sources
// make 16-flit packets (head, source/sequence, injection cycle, payload,
// tail) with request probability r per cycle and send them against the
// injection credits; sinks return a credit per flit and check every packet:
// it arrives at its destination, whole, in order and with the payload its
// source wrote. The run goes through the routing modes (dimension order,
// CS+LS, DDR, CS+LS+DDR) and the traffic patterns (uniform, hotspot,
// perfect shuffle, complement, local), draining the network between phases.
// Each phase must deliver all it injected. The router event pulses are
// counted, and a mechanism that never happened is a failure: credit stalls,
// inter-BM hops, wraparound hops, CS early Channel-H, LS minus choice, DDR
// reversal and DDR escape. Average latency and throughput are printed.
// The network runs at its default parameters.
module tb_tesh_network;
  import tesh_pkg::*;

  localparam int unsigned L    = 2;    // must equal tesh_network's default
  localparam int unsigned NPKT = 3;    // packets per node per phase

  localparam int NN = 16 ** L;
  localparam int AW = 4 * L;           // used address bits

  logic clk = 0, rst_n = 0;
  route_mode_t mode;
  link_t      inj_link   [NN];
  credit_t    inj_credit [NN];
  link_t      ej_link    [NN];
  credit_t    ej_credit  [NN];
  router_ev_t ev         [NN];

  tesh_network dut (.*);   // network at its default size

  always #5 clk = ~clk;

  typedef enum int { UNIFORM, HOTSPOT, SHUFFLE, COMPLEMENT, LOCAL } pattern_e;

  int checks = 0, failures = 0;
  int cycle = 0;

  // ---- sources ----
  int       pattern;
  int       rate_pm;         // request probability per cycle, per mille
  bit       inject_on;
  int       pk_left  [NN];
  int       fl_idx   [NN];   // next flit of the packet being sent, -1 idle
  int       cur_dest [NN];
  int       cur_vc   [NN];
  int       seq      [NN];
  int       icred    [NN][NUM_VC];
  longint   injected, delivered, lat_sum, flits_rx;

  // ---- sinks ----
  int       rx_cnt   [NN][NUM_VC];
  int       rx_src   [NN][NUM_VC];
  int       rx_seq   [NN][NUM_VC];
  int       rx_t0    [NN][NUM_VC];

  // ---- events ----
  longint   n_stall, n_inter, n_wrap, n_csh, n_lsm, n_rev, n_esc;

  function automatic logic [DATA_W-1:0] payload(int src, int sq, int k);
    return DATA_W'((src * 7919) ^ (sq * 104729) ^ (k * 31) ^ 32'h5a5a0000);
  endfunction

  function automatic int pick_dest(int s);
    int d;
    case (pattern)
      HOTSPOT:    d = ($urandom % 10 == 0) ? NN / 2 + 5 : int'($urandom % NN);
      SHUFFLE:    d = (s < NN / 2) ? s * 2 : (s - NN / 2) * 2 + 1;
      COMPLEMENT: d = ~s & (NN - 1);
      LOCAL:      d = ($urandom % 2 == 0) ? ((s & ~15) | int'($urandom % 16)) : int'($urandom % NN);
      default:    d = int'($urandom % NN);
    endcase
    return d;
  endfunction

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      inj_link[n] = '0;
      if (rst_n) begin
        if (fl_idx[n] < 0 && inject_on && pk_left[n] > 0 && int'($urandom % 1000) < rate_pm) begin
          fl_idx[n]   = 0;
          cur_dest[n] = pick_dest(n);
          cur_vc[n]   = seq[n] % NUM_VC;
        end
        if (fl_idx[n] >= 0 && icred[n][cur_vc[n]] > 0) begin
          flit_t f;
          head_t h;
          int k;
          k = fl_idx[n];
          if (k == 0) begin
            h = '0; h.dest = ADDR_W'(cur_dest[n]);
            f = '{ftype: F_HEAD, data: DATA_W'(h)};
          end else if (k == 1) f = '{ftype: F_BODY, data: DATA_W'((n << 16) | (seq[n] & 16'hffff))};
          else if (k == 2)     f = '{ftype: F_BODY, data: DATA_W'(cycle)};
          else                 f = '{ftype: (k == PKT_FLITS - 1) ? F_TAIL : F_BODY,
                                     data: payload(n, seq[n], k)};
          inj_link[n] = '{valid: 1'b1, vc: VC_W'(cur_vc[n]), flit: f};
          icred[n][cur_vc[n]]--;
          if (k == PKT_FLITS - 1) begin
            fl_idx[n] = -1;
            pk_left[n]--;
            seq[n]++;
            injected++;
          end else fl_idx[n] = k + 1;
        end
      end
    end
  end

  // credits, sinks and event counters
  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        ej_credit[n] <= '0;
        if (inj_credit[n].valid) icred[n][inj_credit[n].vc]++;
        if (ej_link[n].valid) begin
          int v, k;
          flit_t f;
          v = int'(ej_link[n].vc);
          f = ej_link[n].flit;
          k = rx_cnt[n][v];
          ej_credit[n] <= '{valid: 1'b1, vc: ej_link[n].vc};
          flits_rx++;
          if (k == 0) begin
            head_t hh;
            hh = head_t'(f.data);
            checks++;
            if (f.ftype != F_HEAD || int'(hh.dest) != n) begin
              failures++;
              $display("FAIL node %0d vc %0d: head type %0d dest %0d", n, v, f.ftype, hh.dest);
            end
          end else if (k == 1) begin
            rx_src[n][v] = int'(f.data >> 16);
            rx_seq[n][v] = int'(f.data & 32'hffff);
          end else if (k == 2) begin
            rx_t0[n][v] = int'(f.data);
          end else if (f.data != payload(rx_src[n][v], rx_seq[n][v], k)) begin
            failures++;
            $display("FAIL node %0d vc %0d flit %0d payload", n, v, k);
          end
          if (k == PKT_FLITS - 1) begin
            checks++;
            if (f.ftype != F_TAIL) begin failures++; $display("FAIL node %0d: no tail", n); end
            delivered++;
            lat_sum += cycle - rx_t0[n][v];
            rx_cnt[n][v] = 0;
          end else rx_cnt[n][v] = k + 1;
        end
        if (ev[n].credit_stall) n_stall++;
        if (ev[n].inter_bm)     n_inter++;
        if (ev[n].wrap)         n_wrap++;
        if (ev[n].cs_early_h)   n_csh++;
        if (ev[n].ls_minus)     n_lsm++;
        if (ev[n].ddr_reversal) n_rev++;
        if (ev[n].ddr_escape)   n_esc++;
      end
    end
    cycle++;
  end

  initial begin
    #(64'd10 * 64'd400000);
    failures++;
    $display("watchdog: cycle %0d injected %0d delivered %0d", cycle, injected, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(string name, route_mode_t m, int pat, int rate);
    int t0;
    longint inj0, del0, fl0, lat0;
    mode = m; pattern = pat; rate_pm = rate;
    inj0 = injected; del0 = delivered; fl0 = flits_rx; lat0 = lat_sum;
    for (int n = 0; n < NN; n++) pk_left[n] = NPKT;
    t0 = cycle;
    inject_on = 1;
    while (injected - inj0 < longint'(NN * NPKT)) @(posedge clk);
    inject_on = 0;
    while (delivered < injected && cycle - t0 < 200000) @(posedge clk);
    checks++;
    if (delivered != injected) begin
      failures++;
      $display("FAIL %s: injected %0d delivered %0d (deadlock?)", name, injected, delivered);
    end
    $display("%-28s cycles %6d  packets %6d  avg latency %0d  flits/node/cycle %.4f", name,
             cycle - t0, delivered - del0, (lat_sum - lat0) / ((delivered - del0) > 0 ? (delivered - del0) : 1),
             real'(flits_rx - fl0) / real'(NN) / real'(cycle - t0));
  endtask

  initial begin
    route_mode_t DOR, CSLS, DDR, ALL;
    DOR  = '{cs: 0, ls: 0, ddr: 0};
    CSLS = '{cs: 1, ls: 1, ddr: 0};
    DDR  = '{cs: 0, ls: 0, ddr: 1};
    ALL  = '{cs: 1, ls: 1, ddr: 1};
    mode = DOR; inject_on = 0; pattern = UNIFORM; rate_pm = 0;
    injected = 0; delivered = 0; lat_sum = 0; flits_rx = 0;
    n_stall = 0; n_inter = 0; n_wrap = 0; n_csh = 0; n_lsm = 0; n_rev = 0; n_esc = 0;
    for (int n = 0; n < NN; n++) begin
      inj_link[n] = '0; ej_credit[n] = '0;
      fl_idx[n] = -1; seq[n] = 0; pk_left[n] = 0;
      for (int v = 0; v < NUM_VC; v++) begin
        icred[n][v] = BUF_DEPTH; rx_cnt[n][v] = 0;
      end
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    run_phase("DOR uniform",         DOR,  UNIFORM,    50);
    run_phase("CS+LS uniform",       CSLS, UNIFORM,    50);
    run_phase("DDR uniform",         DDR,  UNIFORM,    50);
    run_phase("CS+LS+DDR uniform",   ALL,  UNIFORM,    50);
    run_phase("DOR hotspot",         DOR,  HOTSPOT,    50);
    run_phase("CS+LS+DDR hotspot",   ALL,  HOTSPOT,    50);
    run_phase("DOR shuffle",         DOR,  SHUFFLE,    50);
    run_phase("CS+LS+DDR shuffle",   ALL,  SHUFFLE,    50);
    run_phase("DOR complement",      DOR,  COMPLEMENT, 50);
    run_phase("CS+LS+DDR complement",ALL,  COMPLEMENT, 50);
    run_phase("DOR local",           DOR,  LOCAL,      50);
    run_phase("CS+LS+DDR local",     ALL,  LOCAL,      50);
    run_phase("CS+LS saturated",     CSLS, COMPLEMENT, 1000);
    run_phase("DDR saturated",       DDR,  COMPLEMENT, 1000);

    $display("events: stall %0d inter-BM %0d wrap %0d CS-early-H %0d LS-minus %0d DDR-reversal %0d DDR-escape %0d",
             n_stall, n_inter, n_wrap, n_csh, n_lsm, n_rev, n_esc);
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no credit stall"); end
    checks++; if (n_inter == 0) begin failures++; $display("FAIL no inter-BM hop"); end
    checks++; if (n_wrap  == 0) begin failures++; $display("FAIL no wraparound hop"); end
    checks++; if (n_csh   == 0) begin failures++; $display("FAIL no CS early Channel-H"); end
    checks++; if (n_lsm   == 0) begin failures++; $display("FAIL no LS minus choice"); end
    checks++; if (n_rev   == 0) begin failures++; $display("FAIL no DDR reversal"); end
    checks++; if (n_esc   == 0) begin failures++; $display("FAIL no DDR escape"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
