// Self-checking testbench for output_module (4 inputs, 8 registers each,
// class queues of depth 4). The testbench plays the inputs: it holds the cell
// registers, posts their addresses on the bus and drives the concentrator
// line from the register the module selects. A reference model of the class
// queues, the window scheduler (weights 4,3,2,1, window 10) and the credit
// counter predicts, at every slot end, which class is served; every cell sent
// is compared bit for bit with the expected one (multicast cells with the
// translated VPI/VCI and a fresh HEC), and every release must name the
// register just sent. Queue overflow must refuse the entry and release it.
// Class 3 runs under credit-based flow control.
module output_module_tb;
  import atm_pkg::*;
  localparam int NIN = 4, P = 8, NQ = 4, VQD = 4, MCIDX = 2, WINDOW = 10;
  localparam int WT [NQ] = '{4, 3, 2, 1};
  localparam int RW = 3, IW = 2, QW = 2;

  logic clk = 0, rst_n = 0;
  logic [BIT_W-1:0] bitcnt;
  logic slot_end;
  logic [31:0] now;
  logic post_valid = 0, post_sel = 0, post_mc = 0;
  logic [IW-1:0] post_in = 0;
  logic [RW-1:0] post_reg = 0;
  logic [QW-1:0] post_class = 0;
  logic [15:0] post_mcid = 0;
  logic mc_we = 0;
  logic [MCIDX-1:0] mc_idx = 0;
  logic [7:0] mc_vpi = 0;
  logic [15:0] mc_vci = 0;
  logic fc_we = 0, credit_add = 0;
  logic [QW-1:0] fc_q = 0, credit_q = 0;
  logic [1:0] fc_mode = 0;
  logic [15:0] fc_interval = 0;
  logic [7:0] credit_n = 0;
  logic sel_active, clr, bus_bit, out_bit, out_valid, vq_drop;
  logic [IW-1:0] sel_in, clr_in;
  logic [RW-1:0] sel_reg, clr_reg;
  logic [NQ-1:0] grant;
  int checks = 0, failures = 0;

  slot_timer u_t (.clk, .rst_n, .bitcnt, .slot_end, .now);
  output_module #(.NIN(NIN), .P(P), .NQ(NQ), .WEIGHT('{4, 3, 2, 1}), .WINDOW(WINDOW),
                  .VQD(VQD), .MCIDX(MCIDX)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] tb_hec(logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'b1_0000_0111;
    return r[7:0] ^ 8'h55;
  endfunction
  function automatic cell_t mk();
    logic [39:0] hb; cell_t c; logic [31:0] h32;
    h32 = $urandom;
    hb = {h32, tb_hec(h32)};
    for (int i = 0; i < 40; i++) c[i] = hb[39 - i];
    for (int i = 40; i < CELL_BITS; i++) c[i] = 1'($urandom);
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
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at slot %0d", what, now); end
  endtask

  // ---- input registers held by the testbench
  cell_t store [NIN][P];
  bit    held  [NIN][P];
  assign bus_bit = sel_active ? store[sel_in][sel_reg][bitcnt] : 1'b0;

  // ---- reference model
  typedef struct { int in; int rg; cell_t exp; } ent_t;
  ent_t mq [NQ][$];
  logic [7:0] mtv [4];
  logic [15:0] mtc [4];
  int wcnt [NQ], winpos = 0, credit3 = 0;
  bit fc3 = 0;
  ent_t cur;
  bit   cur_v = 0;
  cell_t rx;
  int n_sent = 0, n_vqdrop = 0, n_clr_drop = 0, n_mc = 0;
  int served [NQ] = '{0, 0, 0, 0};

  always @(negedge clk) if (rst_n) begin
    logic [NQ-1:0] d, el, g;
    bit acc, found;
    // received bits of the current cell
    if (out_valid) rx[bitcnt] = out_bit;
    chk(out_valid == cur_v, "out_valid");
    if (slot_end) begin
      if (cur_v) begin
        chk(rx == cur.exp, "cell contents");
        chk(clr && clr_in == IW'(cur.in) && clr_reg == RW'(cur.rg), "release of sent cell");
        held[cur.in][cur.rg] = 0;
        n_sent++;
      end
      // window scheduler prediction
      for (int q = 0; q < NQ; q++) d[q] = (mq[q].size() > 0) && (q != 3 || !fc3 || credit3 > 0);
      acc = 0;
      for (int q = NQ - 1; q >= 0; q--) begin
        el[q] = d[q] && (wcnt[q] != 0 || !acc);
        acc = acc || (d[q] && wcnt[q] != 0);
      end
      g = 0; found = 0;
      for (int q = 0; q < NQ; q++) if (el[q] && !found) begin g[q] = 1; found = 1; end
      chk(grant == g, "class served");
      cur_v = found;
      for (int q = 0; q < NQ; q++) if (g[q]) begin
        cur = mq[q].pop_front();
        served[q]++;
        if (q == 3 && fc3) credit3--;
      end
      if (winpos == WINDOW - 1) begin
        winpos = 0;
        for (int q = 0; q < NQ; q++) wcnt[q] = WT[q];
      end else begin
        winpos++;
        for (int q = 0; q < NQ; q++) if (g[q] && wcnt[q] != 0) wcnt[q]--;
      end
    end else if (clr) begin
      n_clr_drop++;
    end
  end

  // post one cell address (never in the last clock of a slot)
  task automatic post(int cls, bit mc, int mcid);
    int i, r;
    cell_t c;
    do begin i = $urandom_range(0, NIN - 1); r = $urandom_range(0, P - 1); end while (held[i][r]);
    c = mk();
    @(negedge clk iff (bitcnt > 0 && bitcnt < CELL_BITS - 2));
    store[i][r] = c;
    held[i][r] = 1;
    post_valid = 1; post_sel = 1; post_in = IW'(i); post_reg = RW'(r);
    post_class = QW'(cls); post_mc = mc; post_mcid = 16'(mcid);
    #1;
    if (mq[cls].size() == VQD) begin
      chk(vq_drop && clr && clr_in == IW'(i) && clr_reg == RW'(r), "full queue refuses and releases");
      n_vqdrop++;
      held[i][r] = 0;
    end else begin
      chk(!vq_drop, "no refusal");
      mq[cls].push_back('{i, r, mc ? xlate(c, mtv[mcid], mtc[mcid]) : c});
      if (mc) n_mc++;
    end
    @(negedge clk);
    post_valid = 0; post_sel = 0;
  endtask

  task automatic add_credit(int n);
    @(negedge clk iff (bitcnt > 0 && bitcnt < CELL_BITS - 2));
    credit_add = 1; credit_q = 3; credit_n = 8'(n);
    credit3 += n;
    @(negedge clk);
    credit_add = 0;
  endtask

  function automatic int free_regs();
    int n = 0;
    for (int i = 0; i < NIN; i++) for (int r = 0; r < P; r++) n += !held[i][r];
    return n;
  endfunction

  initial begin
    for (int q = 0; q < NQ; q++) wcnt[q] = WT[q];
    for (int i = 0; i < NIN; i++) for (int r = 0; r < P; r++) held[i][r] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // multicast translation entries
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      mtv[k] = 8'($urandom); mtc[k] = 16'($urandom);
      mc_we = 1; mc_idx = MCIDX'(k); mc_vpi = mtv[k]; mc_vci = mtc[k];
    end
    @(negedge clk); mc_we = 0;

    // one unicast and one multicast cell
    post(0, 0, 0);
    post(1, 1, 2);
    repeat (3) @(posedge clk iff slot_end);

    // all classes backlogged, one queue overflows
    for (int q = 0; q < NQ; q++) for (int n = 0; n < VQD; n++) post(q, n == 1, n);
    post(0, 0, 0);
    repeat (20) @(posedge clk iff slot_end);
    chk(n_vqdrop == 1, "one refused entry");

    // class 3 under credit control: blocked without credit, one cell per credit
    @(negedge clk iff (bitcnt > 0 && bitcnt < CELL_BITS - 2));
    fc_we = 1; fc_q = 3; fc_mode = 1; fc3 = 1; credit3 = 0;
    @(negedge clk); fc_we = 0;
    post(3, 0, 0); post(3, 0, 0);
    repeat (5) @(posedge clk iff slot_end);
    chk(mq[3].size() == 2, "class 3 blocked without credit");
    add_credit(1);
    repeat (3) @(posedge clk iff slot_end);
    chk(mq[3].size() == 1, "one cell per credit");
    add_credit(3);
    repeat (3) @(posedge clk iff slot_end);

    // random traffic
    for (int n = 0; n < 400; n++) begin
      if (free_regs() > 0 && $urandom_range(0, 2) != 0) post($urandom_range(0, NQ - 1), $urandom_range(0, 3) == 0, $urandom_range(0, 3));
      if ($urandom_range(0, 7) == 0) add_credit($urandom_range(1, 3));
      if ($urandom_range(0, 1) == 0) @(posedge clk iff slot_end);
    end
    add_credit(20);
    repeat (40) @(posedge clk iff slot_end);
    chk(mq[0].size() + mq[1].size() + mq[2].size() + mq[3].size() == 0, "all queues drained");
    chk(n_clr_drop == n_vqdrop, "releases outside slot end are refusals");
    for (int q = 0; q < NQ; q++) chk(served[q] > 0, "every class served");
    $display("sent=%0d multicast=%0d refused=%0d", n_sent, n_mc, n_vqdrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
