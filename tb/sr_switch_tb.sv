// Self-checking testbench for sr_switch (4 inputs, 4 user ports, 8 registers
// per input). Cells are built with a testbench-side header check routine;
// every received cell is matched against the set of cells expected at that
// port (translated header, recomputed HEC, unchanged payload).
// Directed parts: unicast with its one-slot latency, multicast to three ports
// with per-port translation and release of the single stored copy, OAM and
// signalling cells to the local ports, unknown-connection and UPC discards,
// window scheduling of four backlogged classes, buffer overflow while the port
// is held back by flow control; then random unicast traffic.
module sr_switch_tb;
  import atm_pkg::*;
  localparam int NIN = 4, NPORT = 4, NOUT = NPORT + 2, P = 8, CIDX = 4;

  logic clk = 0, rst_n = 0;
  logic [BIT_W-1:0] bitcnt; logic slot_end; logic [31:0] now;
  logic [NIN-1:0] in_bit = '0, in_valid = '0;
  logic [NOUT-1:0] out_bit, out_valid;
  logic cfg_we = 0; logic [1:0] cfg_port = 0; logic [CIDX-1:0] cfg_idx = 0; logic cfg_valid = 0;
  conn_kind_e cfg_kind = CONN_USER; logic [NOUT-1:0] cfg_mask = 0; logic cfg_mc = 0;
  logic [7:0] cfg_vpi = 0; logic [15:0] cfg_vci = 0; logic [1:0] cfg_class = 0;
  logic [15:0] cfg_inc = 0, cfg_lim = 0;
  logic mc_we = 0; logic [2:0] mc_port = 0; logic [3:0] mc_idx = 0; logic [7:0] mc_vpi = 0; logic [15:0] mc_vci = 0;
  logic fc_we = 0; logic [2:0] fc_port = 0; logic [1:0] fc_q = 0; logic [1:0] fc_mode = 0; logic [15:0] fc_interval = 0;
  logic credit_add = 0; logic [2:0] credit_port = 0; logic [1:0] credit_q = 0; logic [7:0] credit_n = 0;
  logic [NIN-1:0] drop_full, drop_upc, drop_unknown;
  logic [NOUT-1:0] vq_drop;
  logic [3:0] grant [NOUT];

  int checks = 0, failures = 0;
  int n_full = 0, n_upc = 0, n_unknown = 0;

  slot_timer u_t (.clk, .rst_n, .bitcnt, .slot_end, .now);
  sr_switch #(.NIN(NIN), .NPORT(NPORT), .P(P), .CIDX(CIDX), .VQD(8)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- cell helpers (independent of the RTL package functions)
  function automatic logic [7:0] tb_hec(logic [31:0] h);
    // polynomial long division of h * x^8 by x^8 + x^2 + x + 1
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'b1_0000_0111;
    return r[7:0] ^ 8'h55;
  endfunction
  function automatic cell_t mk(logic [7:0] vpi, logic [15:0] vci, logic [2:0] pti, logic clp, int seed);
    logic [39:0] hb; cell_t c; logic [31:0] h32;
    h32 = {4'h0, vpi, vci, pti, clp};
    hb = {h32, tb_hec(h32)};
    for (int i = 0; i < 40; i++) c[i] = hb[39 - i];
    for (int i = 40; i < CELL_BITS; i++) c[i] = 1'(($urandom(seed + i) >> 3) & 1);
    return c;
  endfunction
  function automatic cell_t xlate(cell_t c, logic [7:0] vpi, logic [15:0] vci);
    logic [31:0] h32; logic [39:0] hb; cell_t o;
    for (int i = 0; i < 32; i++) h32[31 - i] = c[i];
    h32[27:20] = vpi; h32[19:4] = vci;
    hb = {h32, tb_hec(h32)};
    o = c;
    for (int i = 0; i < 40; i++) o[i] = hb[39 - i];
    return o;
  endfunction

  // ---------------- stimulus queues and scoreboard
  cell_t  txq [NIN][$];
  cell_t  cur_tx [NIN];
  logic   cur_v [NIN];
  int     tx_slot [NIN];
  cell_t  expq [NOUT][$];
  int     exp_slot [NOUT][$];
  cell_t  rx [NOUT];
  int     nrx [NOUT];
  int     lat_check_port = -1, lat_check_send = -1, lat_seen = -1;

  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < NIN; i++) begin
      if (bitcnt == 0) begin
        cur_v[i] = 1'b0;
        if (txq[i].size() > 0) begin cur_tx[i] = txq[i].pop_front(); cur_v[i] = 1'b1; tx_slot[i] = int'(now); end
      end
      in_valid[i] = cur_v[i];
      in_bit[i]   = cur_v[i] ? cur_tx[i][bitcnt] : 1'b0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NOUT; o++) if (out_valid[o]) begin
      rx[o][bitcnt] = out_bit[o];
      if (bitcnt == BIT_W'(CELL_BITS - 1)) begin
        int k; k = -1;
        for (int e = 0; e < expq[o].size(); e++) if (expq[o][e] == rx[o]) begin k = e; break; end
        checks++;
        nrx[o]++;
        if (k < 0) begin failures++; $display("FAIL port %0d received an unexpected cell at slot %0d", o, now); end
        else begin
          if (o == lat_check_port && lat_seen < 0) lat_seen = int'(now) - lat_check_send;
          expq[o].delete(k);
        end
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NIN; i++) begin
      n_full += int'(drop_full[i]); n_upc += int'(drop_upc[i]); n_unknown += int'(drop_unknown[i]);
    end
  end

  // ---------------- configuration helpers
  task automatic conn(int port, int idx, conn_kind_e k, logic [NOUT-1:0] mask, bit mc,
                      int vpi, int vci, int cls, int inc = 0, int lim = 0);
    @(negedge clk);
    cfg_we = 1; cfg_port = 2'(port); cfg_idx = CIDX'(idx); cfg_valid = 1; cfg_kind = k;
    cfg_mask = mask; cfg_mc = mc; cfg_vpi = 8'(vpi); cfg_vci = 16'(vci); cfg_class = 2'(cls);
    cfg_inc = 16'(inc); cfg_lim = 16'(lim);
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic mct(int port, int idx, int vpi, int vci);
    @(negedge clk); mc_we = 1; mc_port = 3'(port); mc_idx = 4'(idx); mc_vpi = 8'(vpi); mc_vci = 16'(vci);
    @(negedge clk); mc_we = 0;
  endtask
  task automatic wait_slots(int n);
    repeat (n * CELL_BITS) @(posedge clk);
  endtask
  task automatic wait_idle(int maxslots);
    for (int s = 0; s < maxslots; s++) begin
      bit busyq; busyq = 0;
      for (int i = 0; i < NIN; i++) if (txq[i].size() > 0 || cur_v[i]) busyq = 1;
      for (int o = 0; o < NOUT; o++) if (expq[o].size() > 0) busyq = 1;
      if (!busyq) break;
      wait_slots(1);
    end
    wait_slots(2);
  endtask
  task automatic expect_empty(string what);
    for (int o = 0; o < NOUT; o++) begin
      checks++;
      if (expq[o].size() != 0) begin
        failures++; $display("FAIL %s: port %0d still expects %0d cells", what, o, expq[o].size());
        expq[o].delete();
      end
    end
  endtask
  task automatic check(string what, bit ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // window pattern capture on port 3
  int gseq [$];
  bit gcap = 0;
  always @(posedge clk) if (gcap && bitcnt == BIT_W'(CELL_BITS - 1))
    for (int q = 0; q < 4; q++) if (grant[3][q]) gseq.push_back(q);

  initial begin
    cell_t c;
    int f0;
    for (int i = 0; i < NIN; i++) cur_v[i] = 0;
    for (int o = 0; o < NOUT; o++) nrx[o] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1) unicast with latency check
    conn(0, 1, CONN_USER, 6'b000100, 0, 8'h21, 16'h0777, 0);
    c = mk(8'h05, 16'h0001, 3'b000, 0, 11);
    @(negedge clk); while (bitcnt != 1) @(negedge clk);
    lat_check_port = 2; lat_check_send = int'(now) + 1;
    txq[0].push_back(c); expq[2].push_back(xlate(c, 8'h21, 16'h0777));
    wait_idle(20);
    expect_empty("unicast");
    check("unicast latency of one slot", lat_seen == 1 + 0);

    // 2) multicast to ports 0,1,3 with identifier 5
    conn(1, 2, CONN_USER, 6'b001011, 1, 0, 5, 1);
    mct(0, 5, 8'h10, 16'h0100); mct(1, 5, 8'h11, 16'h0101); mct(3, 5, 8'h13, 16'h0103);
    c = mk(8'h07, 16'h0002, 3'b001, 1, 22);
    txq[1].push_back(c);
    expq[0].push_back(xlate(c, 8'h10, 16'h0100));
    expq[1].push_back(xlate(c, 8'h11, 16'h0101));
    expq[3].push_back(xlate(c, 8'h13, 16'h0103));
    wait_idle(20);
    expect_empty("multicast");
    check("multicast register released", dut.g_in[1].busy == '0);

    // 3) OAM and signalling cells go to the local ports untranslated
    conn(2, 3, CONN_OAM, '0, 0, 0, 0, 0);
    conn(2, 4, CONN_SIGNAL, '0, 0, 0, 0, 0);
    c = mk(8'h00, 16'h0003, 3'b100, 0, 33); txq[2].push_back(c); expq[NPORT].push_back(c);
    c = mk(8'h00, 16'h0004, 3'b000, 0, 44); txq[2].push_back(c); expq[NPORT + 1].push_back(c);
    wait_idle(20);
    expect_empty("local ports");

    // 4) unknown connection, 5) UPC: one cell per 3 slots, no slack
    c = mk(8'h00, 16'h000f, 3'b000, 0, 55); txq[3].push_back(c);
    conn(3, 5, CONN_USER, 6'b000001, 0, 1, 9, 0, 3, 0);
    for (int k = 0; k < 3; k++) begin
      c = mk(8'h00, 16'h0005, 3'b000, 0, 60 + k); txq[3].push_back(c);
    end
    expq[0].push_back(xlate(txq[3][1], 8'h01, 16'h0009));
    wait_idle(20);
    expect_empty("upc");
    check("unknown connection discarded", n_unknown == 1);
    check("UPC discarded two back-to-back cells", n_upc == 2);

    // 6) four backlogged classes on port 3: window of 10 slots, 4/3/2/1
    for (int i = 0; i < 4; i++) conn(i, 8, CONN_USER, 6'b001000, 0, 2, 16'h0200 + i, i);
    for (int k = 0; k < 5; k++)
      for (int i = 0; i < 4; i++) begin
        c = mk(8'h00, 16'h0008, 3'b000, 0, 100 + 4 * k + i); txq[i].push_back(c);
        expq[3].push_back(xlate(c, 8'h02, 16'h0200 + 16'(i)));
      end
    gcap = 1;
    wait_idle(80);
    gcap = 0;
    expect_empty("priority");
    begin
      int n0, n1, n2, n3;
      n0 = 0; n1 = 0; n2 = 0; n3 = 0;
      for (int k = 0; k < 10 && k < gseq.size(); k++)
        case (gseq[k]) 0: n0++; 1: n1++; 2: n2++; default: n3++; endcase
      check("all classes served", gseq.size() == 20);
      // the first decisions: class 0 four times first
      check("class 0 served first in its allowance", gseq.size() >= 4 && gseq[0] == 0 && gseq[1] == 0);
      check("window shares lower classes", n1 + n2 + n3 >= 3);
    end

    // 7) flow control holds port 1 class 0 (credit mode, no credit): input 0 fills
    conn(0, 9, CONN_USER, 6'b000010, 0, 3, 16'h0300, 0);
    @(negedge clk); fc_we = 1; fc_port = 1; fc_q = 0; fc_mode = 1; @(negedge clk); fc_we = 0;
    f0 = n_full;
    for (int k = 0; k < P + 2; k++) begin
      c = mk(8'h00, 16'h0009, 3'b000, 0, 200 + k); txq[0].push_back(c);
      if (k < P) expq[1].push_back(xlate(c, 8'h03, 16'h0300));
    end
    wait_slots(12);
    check("nothing sent without credit", expq[1].size() == P);
    check("cells beyond the register bank discarded", n_full - f0 == 2);
    @(negedge clk); credit_add = 1; credit_port = 1; credit_q = 0; credit_n = 8'(P);
    @(negedge clk); credit_add = 0;
    wait_idle(20);
    expect_empty("flow control");

    // 8) random unicast traffic, class and port chosen per connection
    for (int i = 0; i < 4; i++)
      for (int k = 10; k < 14; k++)
        conn(i, k, CONN_USER, 6'(1 << ((i + k) % NPORT)), 0, 8'(k), 16'(16'h1000 + 16 * i + k), (i + k) % 4);
    for (int n = 0; n < 30; n++) begin
      for (int i = 0; i < NIN; i++) begin
        int k;
        k = $urandom_range(10, 13);
        c = mk(8'h00, 16'(k), 3'b000, 0, 1000 + 4 * n + i); txq[i].push_back(c);
        expq[(i + k) % NPORT].push_back(xlate(c, 8'(k), 16'(16'h1000 + 16 * i + k)));
      end
      wait_slots(4);
    end
    wait_idle(400);
    expect_empty("random");
    check("no register overflow in random traffic", n_full - f0 == 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200 * CELL_BITS) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
