// Self-checking testbench for input_module (input 2 of 4, 4 user ports plus
// the OAM and signalling ports, 4 cell registers). It checks:
//   * the address posted on the bus (slot bit 41 + input number, register,
//     destination set, class) for unicast, multicast and OAM connections;
//   * the stored cell read back through the concentrator: header rewritten
//     with the new VPI/VCI and HEC, payload unchanged;
//   * release counting: a two-destination cell is freed by the second release;
//   * loss when all registers are busy, for an unknown connection and for a
//     cell the UPC finds non-conforming.
module input_module_tb;
  import atm_pkg::*;
  localparam int NOUT = 6, NIN = 4, P = 4, CIDX = 4, NQ = 4, ME = 2;
  localparam int RW = 2, IW = 2, QW = 2;

  logic clk = 0, rst_n = 0;
  logic [BIT_W-1:0] bitcnt;
  logic slot_end;
  logic [31:0] now;
  logic in_bit = 0, in_valid = 0;
  logic cfg_we = 0, cfg_valid = 0, cfg_mc = 0;
  logic [CIDX-1:0] cfg_idx = 0;
  conn_kind_e cfg_kind = CONN_USER;
  logic [NOUT-1:0] cfg_mask = 0;
  logic [7:0] cfg_vpi = 0;
  logic [15:0] cfg_vci = 0, cfg_inc = 0, cfg_lim = 0;
  logic [QW-1:0] cfg_class = 0;
  logic post_valid, post_mc;
  logic [RW-1:0] post_reg;
  logic [NOUT-1:0] post_mask;
  logic [QW-1:0] post_class;
  logic [15:0] post_mcid;
  logic [NOUT-1:0] sel_active = 0, clr = 0;
  logic [IW-1:0] sel_in [NOUT], clr_in [NOUT];
  logic [RW-1:0] sel_reg [NOUT], clr_reg [NOUT];
  logic [NOUT-1:0] conc_bit, conc_en;
  logic drop_full, drop_upc, drop_unknown;
  logic [P-1:0] busy;
  int checks = 0, failures = 0;

  slot_timer u_t (.clk, .rst_n, .bitcnt, .slot_end, .now);
  input_module #(.NOUT(NOUT), .NIN(NIN), .P(P), .CIDX(CIDX), .NQ(NQ)) dut (
    .clk, .rst_n, .bitcnt, .now, .in_id(IW'(ME)), .in_bit, .in_valid,
    .cfg_we, .cfg_idx, .cfg_valid, .cfg_kind, .cfg_mask, .cfg_mc, .cfg_vpi, .cfg_vci,
    .cfg_class, .cfg_inc, .cfg_lim,
    .post_valid, .post_reg, .post_mask, .post_class, .post_mc, .post_mcid,
    .sel_active, .sel_in, .sel_reg, .conc_bit, .conc_en,
    .clr, .clr_in, .clr_reg, .drop_full, .drop_upc, .drop_unknown, .busy
  );
  always #5 clk = ~clk;

  function automatic logic [7:0] tb_hec(logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--) if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'b1_0000_0111;
    return r[7:0] ^ 8'h55;
  endfunction
  function automatic cell_t mk(logic [7:0] vpi, logic [15:0] vci);
    logic [39:0] hb; cell_t c; logic [31:0] h32;
    h32 = {4'h0, vpi, vci, 3'b000, 1'b0};
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

  // ---- line driver: one queued cell per slot
  cell_t txq [$];
  cell_t cur;
  logic  cur_v = 0;
  always @(negedge clk) if (rst_n) begin
    if (bitcnt == 0) begin
      cur_v = (txq.size() > 0);
      if (cur_v) cur = txq.pop_front();
    end
    in_valid = cur_v;
    in_bit   = cur_v && cur[bitcnt];
  end

  // ---- monitors
  typedef struct { int rg; logic [NOUT-1:0] mask; int cls; logic mc; logic [15:0] mcid; int bit_at; } post_t;
  post_t posts [$];
  int n_full = 0, n_upc = 0, n_unk = 0;
  always @(negedge clk) if (rst_n) begin
    if (post_valid) posts.push_back('{int'(post_reg), post_mask, int'(post_class), post_mc, post_mcid, int'(bitcnt)});
    n_full += drop_full; n_upc += drop_upc; n_unk += drop_unknown;
  end

  task automatic conn(int idx, conn_kind_e k, logic [NOUT-1:0] mask, bit mc, logic [7:0] vpi,
                      logic [15:0] vci, int cls, int inc = 0);
    @(negedge clk);
    cfg_we = 1; cfg_idx = CIDX'(idx); cfg_valid = 1; cfg_kind = k; cfg_mask = mask; cfg_mc = mc;
    cfg_vpi = vpi; cfg_vci = vci; cfg_class = QW'(cls); cfg_inc = 16'(inc); cfg_lim = 0;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic wait_slots(int n);
    repeat (n) @(posedge clk iff slot_end);
  endtask

  // read register r through output o's concentrator during one whole slot
  task automatic read_reg(int o, int r, output cell_t c);
    @(negedge clk iff bitcnt == 0);
    sel_active[o] = 1; sel_in[o] = IW'(ME); sel_reg[o] = RW'(r);
    for (int b = 0; b < CELL_BITS; b++) begin
      if (b > 0) @(negedge clk);
      #1;
      c[bitcnt] = conc_bit[o];
      if (!conc_en[o]) begin failures++; checks++; $display("FAIL concentrator enable"); end
    end
    sel_active[o] = 0;
  endtask

  task automatic release_reg(int o, int r);
    @(negedge clk);
    clr[o] = 1; clr_in[o] = IW'(ME); clr_reg[o] = RW'(r);
    @(negedge clk);
    clr[o] = 0;
  endtask

  initial begin
    cell_t c, got;
    post_t p;
    for (int o = 0; o < NOUT; o++) begin sel_in[o] = 0; sel_reg[o] = 0; clr_in[o] = 0; clr_reg[o] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    conn(1, CONN_USER, 6'b000001, 0, 8'h12, 16'h0345, 1);
    conn(2, CONN_USER, 6'b000110, 1, 8'h00, 16'h0007, 2);
    conn(3, CONN_OAM, 6'b000000, 0, 8'h00, 16'h0000, 0);
    conn(5, CONN_USER, 6'b001000, 0, 8'h05, 16'h0055, 3, 4);
    wait_slots(1);

    // unicast: post, rewritten header, payload
    c = mk(8'h40, 16'h0001);
    txq.push_back(c);
    wait_slots(2);
    chk(posts.size() == 1, "unicast post");
    if (posts.size() > 0) begin
      p = posts.pop_front();
      chk(p.bit_at == HDR_BITS + 1 + ME, "TDM bus position");
      chk(p.rg == 0 && p.mask == 6'b000001 && p.cls == 1 && !p.mc, "unicast post fields");
    end
    chk(busy == 4'b0001, "register 0 busy");
    read_reg(0, 0, got);
    chk(got == xlate(c, 8'h12, 16'h0345), "stored cell rewritten");
    release_reg(0, 0);
    chk(busy == 4'b0000, "register 0 freed");

    // multicast to two outputs: VPI 0, VCI = multicast id, freed by the 2nd release
    c = mk(8'h41, 16'h0002);
    txq.push_back(c);
    wait_slots(2);
    chk(posts.size() == 1, "multicast post");
    if (posts.size() > 0) begin
      p = posts.pop_front();
      chk(p.mask == 6'b000110 && p.mc && p.mcid == 16'h0007 && p.cls == 2, "multicast post fields");
    end
    read_reg(1, 0, got);
    chk(got == xlate(c, 8'h00, 16'h0007), "multicast identifier in header");
    release_reg(1, 0);
    chk(busy == 4'b0001, "held after first release");
    release_reg(2, 0);
    chk(busy == 4'b0000, "freed after second release");

    // OAM cell to the OAM port, header untouched
    c = mk(8'h00, 16'h0003);
    txq.push_back(c);
    wait_slots(2);
    chk(posts.size() == 1, "OAM post");
    if (posts.size() > 0) begin
      p = posts.pop_front();
      chk(p.mask == 6'b010000, "OAM destination");
    end
    read_reg(4, 0, got);
    chk(got == c, "OAM cell unchanged");
    release_reg(4, 0);

    // unknown connection
    txq.push_back(mk(8'h00, 16'h0004));
    wait_slots(2);
    chk(n_unk == 1 && posts.size() == 0 && busy == 0, "unknown connection dropped");

    // UPC: increment 4 slots, limit 0 -> back-to-back cells, the second is lost
    txq.push_back(mk(8'h01, 16'h0005));
    txq.push_back(mk(8'h01, 16'h0005));
    wait_slots(3);
    chk(n_upc == 1 && posts.size() == 1, "UPC drops the early cell");
    posts.delete();
    for (int r = 0; r < P; r++) if (busy[r]) release_reg(3, r);
    wait_slots(5);
    txq.push_back(mk(8'h01, 16'h0005));
    wait_slots(2);
    chk(n_upc == 1 && posts.size() == 1, "UPC passes a spaced cell");
    posts.delete();
    for (int r = 0; r < P; r++) if (busy[r]) release_reg(3, r);

    // buffer full: P + 1 cells without releases
    for (int n = 0; n < P + 1; n++) txq.push_back(mk(8'h00, 16'h0001));
    wait_slots(P + 2);
    chk(n_full == 1 && posts.size() == P && busy == '1, "loss when all registers busy");
    for (int n = 0; n < P; n++) chk(posts[n].rg == n, "lowest free register order");

    // random contents through all registers
    posts.delete();
    for (int r = 0; r < P; r++) release_reg(0, r);
    for (int n = 0; n < 40; n++) begin
      c = mk(8'($urandom), 16'h0001);
      txq.push_back(c);
      wait_slots(2);
      chk(posts.size() == 1, "random post");
      p = posts.pop_front();
      read_reg(0, p.rg, got);
      chk(got == xlate(c, 8'h12, 16'h0345), "random cell");
      release_reg(0, p.rg);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
