// End-to-end test of terabit_switch, shared by the reduced-size testbench and
// the full-size one (FULL = 1 instantiates the switch with its defaults).
//
// Connections: connection index k is routed by every SCM to SM k mod N and by
// that SM to its port (k / N) mod NP, with header translation VPI = k,
// VCI = 0x100 + k. One multicast connection (index MCK) goes to both of the
// first two ports of SM 0, one OAM connection (index OAMK) to the OAM port
// of SM 1.
// Phases: (1) single cells with their exact latency, which follows from the
// pre-allocation table and the ring; (2) random traffic, checked cell by cell;
// (3) multicast and OAM; (4) one SCM flooded towards one SM until its buffer
// overflows, checked by count. Each mechanism (own slot used, slot taken over
// from another SCM, SCM buffer overflow, multicast, OAM) must happen.
// Alongside, the error recovery sender and receiver exchange frames over a
// lossy channel for the whole run; delivery order is checked and each of
// retransmission, POLL, POLL time-out, periodic and polled STAT must happen.
module terabit_tb_body #(
  parameter bit FULL = 0,
  parameter int N    = 4,
  parameter int NP   = 2,
  parameter int NRND = 60,
  parameter int NISO = 6
) (
  output int checks,
  output int failures,
  output bit done
);
  import atm_pkg::*;
  localparam int G = N * NP;
  localparam int MCK = (2 * N < 62) ? 2 * N : 62, OAMK = 63;

  logic clk = 0, rst_n = 0;
  logic [G-1:0] in_bit = '0, in_valid = '0, out_bit, out_valid;
  logic [N-1:0] oam_bit, oam_valid, sig_bit, sig_valid;
  logic [BIT_W-1:0] bitcnt; logic [$clog2(N)-1:0] tslot; logic [31:0] now;
  logic rt_we = 0; logic [$clog2(N)-1:0] rt_scm = 0, rt_sm = 0; logic [5:0] rt_idx = 0; logic rt_valid = 0;
  logic cfg_we = 0; logic [$clog2(N)-1:0] cfg_sm = 0; logic [5:0] cfg_idx = 0; logic cfg_valid = 0;
  conn_kind_e cfg_kind = CONN_USER; logic [NP+1:0] cfg_mask = 0; logic cfg_mc = 0;
  logic [7:0] cfg_vpi = 0; logic [15:0] cfg_vci = 0; logic [1:0] cfg_class = 0; logic [15:0] cfg_inc = 0, cfg_lim = 0;
  logic mc_we = 0; logic [$clog2(N)-1:0] mc_sm = 0; logic [$clog2(NP+2)-1:0] mc_port = 0; logic [3:0] mc_idx = 0;
  logic [7:0] mc_vpi = 0; logic [15:0] mc_vci = 0;
  logic fc_we = 0; logic [$clog2(N)-1:0] fc_sm = 0; logic [$clog2(NP+2)-1:0] fc_port = 0; logic [1:0] fc_q = 0, fc_mode = 0;
  logic [15:0] fc_interval = 0;
  logic credit_add = 0; logic [$clog2(N)-1:0] credit_sm = 0; logic [$clog2(NP+2)-1:0] credit_port = 0;
  logic [1:0] credit_q = 0; logic [7:0] credit_n = 0;
  logic [G-1:0] scm_drop_full, scm_drop_unknown;
  logic [N-1:0] sent_own, sent_realloc, sm_drop;
  // error recovery engines: default window and sequence width in both sizes
  localparam int PSEQW = 8, PNS = 1 << PSEQW, PD = 6;
  logic psrp_tick = 1, psrp_src_valid = 0, psrp_src_take, psrp_tx_slot = 1;
  logic psrp_tx_valid, psrp_tx_poll, psrp_tx_retx, psrp_win_full, psrp_poll_wait, psrp_timeout;
  logic [PSEQW-1:0] psrp_tx_seq, psrp_stat_in_last = 0, psrp_rx_seq = 0, psrp_deliver_seq, psrp_stat_last;
  logic psrp_stat_in_valid = 0, psrp_congested = 0, psrp_rx_valid = 0, psrp_rx_ok = 0, psrp_rx_poll = 0;
  logic [PNS-1:0] psrp_stat_in_lost = 0, psrp_stat_lost;
  logic psrp_deliver_valid, psrp_stat_valid, psrp_stat_polled;

  if (FULL) begin : g_full
    terabit_switch dut (.*);
  end else begin : g_red
    terabit_switch #(.N(N), .NP(NP)) dut (.*);
  end

  always #5 clk = ~clk;

  // ---------- cells (header check computed by long division here)
  function automatic logic [7:0] tb_hec(logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'b1_0000_0111;
    return r[7:0] ^ 8'h55;
  endfunction
  function automatic cell_t mk(int k, int seed);
    logic [31:0] h32; logic [39:0] hb; cell_t c;
    h32 = {4'h0, 8'h00, 16'(k), 3'b000, 1'b0};
    hb = {h32, tb_hec(h32)};
    for (int i = 0; i < 40; i++) c[i] = hb[39 - i];
    for (int i = 40; i < CELL_BITS; i++) c[i] = 1'(($urandom(seed * 7 + i) >> 5) & 1);
    return c;
  endfunction
  function automatic cell_t xl(cell_t c, int vpi, int vci);
    logic [31:0] h32; logic [39:0] hb; cell_t o;
    for (int i = 0; i < 32; i++) h32[31 - i] = c[i];
    h32[27:20] = 8'(vpi); h32[19:4] = 16'(vci);
    hb = {h32, tb_hec(h32)};
    o = c;
    for (int i = 0; i < 40; i++) o[i] = hb[39 - i];
    return o;
  endfunction

  // ---------- error recovery: sender and receiver joined by a lossy channel
  // with a fixed delay of PD clocks each way. One frame time per clock.
  // Congestion toggles every 300 clocks; every 3000 clocks the return
  // channel is cut for 200 clocks so that a POLL times out.
  typedef struct { bit v; bit ok; logic [PSEQW-1:0] seq; bit poll; } pfr_t;
  typedef struct { bit v; logic [PSEQW-1:0] last; logic [PNS-1:0] lost; } pst_t;
  pfr_t pf [PD];
  pst_t ps [PD];
  int pcyc = 0, p_new = 0, p_deliv = 0, p_retx = 0, p_poll = 0, p_to = 0, p_per = 0, p_pol = 0, p_exp = 0;
  bit p_run = 0;
  always @(posedge clk) if (!rst_n) begin
    for (int i = 0; i < PD; i++) begin pf[i] = '{0, 0, 0, 0}; ps[i] = '{0, 0, 0}; end
  end else begin
    pfr_t f; pst_t t; bit cut;
    pcyc++;
    cut = p_run && (pcyc % 3000) >= 2800;
    f = pf[PD-1]; t = ps[PD-1];
    for (int i = PD - 1; i > 0; i--) begin pf[i] = pf[i-1]; ps[i] = ps[i-1]; end
    pf[0] = '{psrp_tx_valid, !p_run || $urandom_range(0, 999) >= 50, psrp_tx_seq, psrp_tx_poll};
    ps[0] = '{psrp_stat_valid && !cut && (!p_run || $urandom_range(0, 999) >= 100),
              psrp_stat_last, psrp_stat_lost};
    #1;
    psrp_rx_valid = f.v; psrp_rx_ok = f.ok; psrp_rx_seq = f.seq; psrp_rx_poll = f.poll;
    psrp_stat_in_valid = t.v; psrp_stat_in_last = t.last; psrp_stat_in_lost = t.lost;
    psrp_src_valid = p_run;
    psrp_congested = p_run && (pcyc / 300) % 2 == 1;
  end
  always @(negedge clk) if (rst_n) begin
    if (psrp_tx_valid && psrp_src_take) p_new++;
    if (psrp_tx_valid && psrp_tx_retx) p_retx++;
    if (psrp_tx_valid && psrp_tx_poll) p_poll++;
    if (psrp_timeout) p_to++;
    if (psrp_deliver_valid) begin
      checks++;
      if (psrp_deliver_seq != PSEQW'(p_exp)) begin
        failures++; $display("FAIL error recovery: frame %0d delivered, expected %0d", psrp_deliver_seq, PSEQW'(p_exp));
      end
      p_exp++; p_deliv++;
    end
    if (psrp_stat_valid) begin
      if (psrp_stat_polled) p_pol++;
      else begin
        p_per++; checks++;
        if (psrp_congested) begin failures++; $display("FAIL error recovery: periodic STAT while congested"); end
      end
    end
  end

  // ---------- drivers and scoreboard
  cell_t txq [G][$];
  cell_t cur [G];
  bit    curv [G];
  cell_t expq [G + 2][$];    // G user ports, then OAM port of SM 1, SM 0 unused
  int    exp_at [G + 2][$];  // expected output slot, -1 = any
  cell_t rx [G + 2];
  int n_own = 0, n_realloc = 0, n_full = 0, n_mc = 0, n_oam = 0, n_rx = 0, n_unexp = 0;
  bit lenient = 0;

  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < G; g++) begin
      if (bitcnt == 0) begin
        curv[g] = 0;
        if (txq[g].size() > 0) begin cur[g] = txq[g].pop_front(); curv[g] = 1; end
      end
      in_valid[g] = curv[g];
      in_bit[g]   = curv[g] ? cur[g][bitcnt] : 1'b0;
    end
  end

  task automatic take(int o, logic b, logic v);
    if (v) begin
      rx[o][bitcnt] = b;
      if (bitcnt == BIT_W'(CELL_BITS - 1)) begin
        int hit;
        hit = -1;
        for (int e = 0; e < expq[o].size(); e++) if (expq[o][e] == rx[o]) begin hit = e; break; end
        n_rx++;
        if (hit < 0) begin
          n_unexp++;
          if (!lenient) begin checks++; failures++; $display("FAIL output %0d: unexpected cell in slot %0d", o, now); end
        end else begin
          checks++;
          if (exp_at[o][hit] >= 0 && exp_at[o][hit] != int'(now)) begin
            failures++; $display("FAIL output %0d: cell left in slot %0d, expected %0d", o, now, exp_at[o][hit]);
          end
          if (o == G) n_oam++;
          expq[o].delete(hit); exp_at[o].delete(hit);
        end
      end
    end
  endtask
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < G; o++) take(o, out_bit[o], out_valid[o]);
    take(G, oam_bit[1], oam_valid[1]);
    for (int j = 0; j < N; j++) begin
      if (bitcnt == 0) begin n_own += int'(sent_own[j]); n_realloc += int'(sent_realloc[j]); end
    end
    for (int g = 0; g < G; g++) n_full += int'(scm_drop_full[g]);
  end

  task automatic slots(int n); repeat (n * CELL_BITS) @(posedge clk); endtask
  function automatic int pending();
    int s; s = 0;
    for (int g = 0; g < G; g++) s += txq[g].size() + int'(curv[g]);
    for (int o = 0; o < G + 2; o++) s += expq[o].size();
    return s;
  endfunction
  task automatic drain(int maxslots);
    for (int s = 0; s < maxslots && pending() > 0; s++) slots(1);
    slots(2);
  endtask
  task automatic leftover(string what);
    for (int o = 0; o < G + 2; o++) begin
      checks++;
      if (expq[o].size() != 0) begin
        failures++; $display("FAIL %s: output %0d still expects %0d cells", what, o, expq[o].size());
      end
      expq[o].delete(); exp_at[o].delete();
    end
  endtask
  task automatic chk(string what, bit ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // destination of connection k (user connections 0 .. MCK-1)
  function automatic int dsm(int k);   return k % N; endfunction
  function automatic int dport(int k); return (k / N) % NP; endfunction

  initial begin
    cell_t c;
    int nuser;
    checks = 0; failures = 0; done = 0;
    nuser = (MCK < 2 * N) ? MCK : 2 * N;
    for (int g = 0; g < G; g++) curv[g] = 0;
    repeat (3) @(posedge clk); rst_n = 1; p_run = 1;

    // ---------- tables
    for (int k = 0; k < nuser; k++) begin
      for (int j = 0; j < N; j++) begin
        @(negedge clk); rt_we = 1; rt_scm = $bits(rt_scm)'(j); rt_idx = 6'(k); rt_valid = 1; rt_sm = $bits(rt_sm)'(dsm(k));
      end
      @(negedge clk); rt_we = 0;
      cfg_we = 1; cfg_sm = $bits(cfg_sm)'(dsm(k)); cfg_idx = 6'(k); cfg_valid = 1; cfg_kind = CONN_USER;
      cfg_mask = (NP+2)'(1) << dport(k); cfg_mc = 0; cfg_vpi = 8'(k); cfg_vci = 16'(256 + k); cfg_class = 2'(k % 4);
      @(negedge clk); cfg_we = 0;
    end
    for (int j = 0; j < N; j++) begin
      @(negedge clk); rt_we = 1; rt_scm = $bits(rt_scm)'(j); rt_idx = 6'(MCK); rt_valid = 1; rt_sm = 0;
      @(negedge clk); rt_we = 1; rt_idx = 6'(OAMK); rt_sm = 1;
    end
    @(negedge clk); rt_we = 0;
    cfg_we = 1; cfg_sm = 0; cfg_idx = 6'(MCK); cfg_kind = CONN_USER; cfg_mask = (NP+2)'(3); cfg_mc = 1; cfg_vci = 16'd1; cfg_class = 0;
    @(negedge clk); cfg_sm = 1; cfg_idx = 6'(OAMK); cfg_kind = CONN_OAM; cfg_mask = '0; cfg_mc = 0;
    @(negedge clk); cfg_we = 0;
    mc_we = 1; mc_sm = 0; mc_port = 0; mc_idx = 1; mc_vpi = 8'hA0; mc_vci = 16'h0A00;
    @(negedge clk); mc_port = 1; mc_vpi = 8'hA1; mc_vci = 16'h0A01;
    @(negedge clk); mc_we = 0;

    // ---------- (1) isolated cells with exact latency
    for (int n = 0; n < NISO; n++) begin
      int g, j, k, s, t, c0, send;
      g = $urandom_range(0, G - 1); j = g / NP; k = $urandom_range(0, nuser - 1);
      // the first cell enters in the last slot of a cycle, so it is scheduled
      // in its SCM's own vector and uses the pre-allocated slot
      while (bitcnt != 1 || (n == 0 && (int'(now) + 1) % N != N - 1)) @(negedge clk);
      s = int'(now) + 1;                       // slot in which the cell enters
      t = s % N; c0 = s / N;
      if (t < N - 1) send = (c0 + 1) * N + ((dsm(k) - j + t + 1 + 2 * N) % N);
      else           send = (c0 + 2) * N + ((dsm(k) - j + 2 * N) % N);
      c = mk(k, n);
      txq[g].push_back(c);
      expq[dsm(k) * NP + dport(k)].push_back(xl(c, k, 256 + k));
      exp_at[dsm(k) * NP + dport(k)].push_back(send + 1);
      drain(4 * N + 10);
    end
    leftover("isolated cells");

    // ---------- (2) random traffic, one cell per input every other slot
    for (int n = 0; n < NRND; n++) begin
      for (int g = 0; g < G; g++) if ($urandom_range(0, 3) == 0) begin
        int k;
        k = $urandom_range(0, nuser - 1);
        c = mk(k, 100 + n * G + g);
        txq[g].push_back(c);
        expq[dsm(k) * NP + dport(k)].push_back(xl(c, k, 256 + k));
        exp_at[dsm(k) * NP + dport(k)].push_back(-1);
      end
      slots(2);
    end
    drain(20 * N + 50);
    leftover("random traffic");

    // ---------- (3) multicast to SM 0 ports 0 and 1, OAM to SM 1
    c = mk(MCK, 7777);
    txq[G - 1].push_back(c);
    expq[0].push_back(xl(c, 8'hA0, 16'h0A00)); exp_at[0].push_back(-1);
    expq[1].push_back(xl(c, 8'hA1, 16'h0A01)); exp_at[1].push_back(-1);
    c = mk(OAMK, 8888);
    txq[0].push_back(c);
    expq[G].push_back(c); exp_at[G].push_back(-1);
    drain(4 * N + 10);
    n_mc = (expq[0].size() == 0 && expq[1].size() == 0) ? 1 : 0;
    leftover("multicast and OAM");

    // ---------- (4) flood SCM 0 towards SM 1: NP cells per slot, one leaves per slot
    lenient = 1;
    begin
      int sent, got0, k;
      k = 1;   // connection to SM 1
      sent = 0; got0 = n_rx;
      for (int n = 0; n < 3 * 12 + 4; n++)
        for (int p = 0; p < NP; p++) begin
          c = mk(k, 5000 + sent); txq[p].push_back(c); sent++;
          expq[dsm(k) * NP + dport(k)].push_back(xl(c, k, 256 + k)); exp_at[dsm(k) * NP + dport(k)].push_back(-1);
        end
      for (int s = 0; s < 3 * 12 + 4 + 4 * N + 80 && (n_rx - got0) + n_full != sent; s++) slots(1);
      slots(2);
      chk("overflow: every cell either delivered or discarded",
          (n_rx - got0) + n_full == sent && expq[dsm(k) * NP + dport(k)].size() == n_full);
      chk("overflow: delivered cells are the sent ones", n_unexp == 0);
      for (int o = 0; o < G + 2; o++) begin expq[o].delete(); exp_at[o].delete(); end
    end

    // ---------- error recovery: drain, then every frame must have arrived once
    p_run = 0;
    for (int i = 0; i < 4000 && p_deliv != p_new; i++) @(posedge clk);
    chk("error recovery: every frame delivered once", p_deliv == p_new && p_new > 0);

    // ---------- mechanisms
    chk("pre-allocated slot used", n_own > 0);
    chk("slot taken over through the ring", n_realloc > 0);
    chk("SCM buffer overflow", n_full > 0);
    chk("multicast delivered", n_mc == 1);
    chk("OAM cell delivered", n_oam == 1);
    chk("error recovery: frame retransmitted", p_retx > 0);
    chk("error recovery: POLL sent", p_poll > 0);
    chk("error recovery: POLL timed out", p_to > 0);
    chk("error recovery: periodic STAT", p_per > 0);
    chk("error recovery: STAT on POLL", p_pol > 0);
    $display("mechanisms: own=%0d realloc=%0d overflow=%0d multicast=%0d oam=%0d",
             n_own, n_realloc, n_full, n_mc, n_oam);
    $display("error recovery: frames=%0d retx=%0d poll=%0d timeout=%0d stat_periodic=%0d stat_polled=%0d",
             p_new, p_retx, p_poll, p_to, p_per, p_pol);
    done = 1;
  end
endmodule
