// Self-checking testbench for scm (N = 4 SCMs in the fabric, this one is
// SCM 1, two input ports, 12-cell buffer). The testbench plays the rest of the
// ring: it feeds the vector of the predecessor each slot and checks what the
// SCM passes on and what it transmits.
//   a) a cell for SM 2 seen in SS_0 (slot of SM 2 already taken) is not
//      claimed there, then claims slot 3 of SS_3 and is sent in slot 3 of the
//      next cycle, with the right data;
//   b) a cell stored in the last slot of a cycle is given its own
//      pre-allocated slot (slot 0 to SM 1) in the first step of the next
//      cycle, and is sent in the cycle after that;
//   c) with the ring fully booked, a flood towards SM 2 overflows the buffer;
//      every cell is either sent, in order, or discarded;
//   d) a cell of an unknown connection is discarded.
module scm_tb;
  import atm_pkg::*;
  localparam int N = 4, NP = 2, B = 12;
  logic clk = 0, rst_n = 0;
  logic [BIT_W-1:0] bitcnt; logic slot_end; logic [31:0] now;
  logic [1:0] tslot;
  logic [NP-1:0] in_bit = 0, in_valid = 0;
  logic cfg_we = 0; logic [5:0] cfg_idx = 0; logic cfg_valid = 0; logic [1:0] cfg_sm = 0;
  logic [N-1:0] ss_in = 0, ss_out; logic [1:0] ss_in_k = 0, ss_out_k;
  logic link_bit, link_valid; logic [1:0] link_dest;
  logic [NP-1:0] drop_full, drop_unknown; logic sent_own, sent_realloc;
  int checks = 0, failures = 0, n_full = 0, n_unk = 0;

  slot_timer u_t (.clk, .rst_n, .bitcnt, .slot_end, .now);
  assign tslot = now[1:0];
  scm #(.N(N), .NP(NP), .B(B)) dut (.clk, .rst_n, .bitcnt, .slot_end, .tslot, .scm_id(2'd1),
    .in_bit, .in_valid, .cfg_we, .cfg_idx, .cfg_valid, .cfg_sm, .ss_in, .ss_in_k, .ss_out, .ss_out_k,
    .link_bit, .link_valid, .link_dest, .drop_full, .drop_unknown, .sent_own, .sent_realloc);
  always #5 clk = ~clk;

  function automatic cell_t mk(int vci, int seed);
    cell_t c;
    for (int i = 0; i < CELL_BITS; i++) c[i] = 1'(($urandom(seed + i) >> 4) & 1);
    for (int i = 0; i < 16; i++) c[VCI_POS + i] = 1'((vci >> (15 - i)) & 1);
    return c;
  endfunction

  cell_t txq [NP][$]; cell_t cur [NP]; bit curv [NP];
  cell_t expq [$]; int exp_dest [$]; int exp_slot [$];
  cell_t rx;
  int n_sent = 0;

  always @(negedge clk) if (rst_n) for (int p = 0; p < NP; p++) begin
    if (bitcnt == 0) begin curv[p] = 0; if (txq[p].size() > 0) begin cur[p] = txq[p].pop_front(); curv[p] = 1; end end
    in_valid[p] = curv[p]; in_bit[p] = curv[p] ? cur[p][bitcnt] : 1'b0;
  end
  always @(posedge clk) if (rst_n) begin
    n_full += $countones(drop_full); n_unk += $countones(drop_unknown);
    if (link_valid) begin
      rx[bitcnt] = link_bit;
      if (bitcnt == BIT_W'(CELL_BITS - 1)) begin
        n_sent++;
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected transmission"); end
        else begin
          if (rx !== expq[0] || link_dest != 2'(exp_dest[0]) || (exp_slot[0] >= 0 && exp_slot[0] != int'(now))) begin
            failures++; $display("FAIL transmission in slot %0d to SM %0d (expected slot %0d SM %0d)", now, link_dest, exp_slot[0], exp_dest[0]);
          end
          void'(expq.pop_front()); void'(exp_dest.pop_front()); void'(exp_slot.pop_front());
        end
      end
    end
  end

  task automatic chk(string w, bit ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  // wait until the clock edge that ends slot `s` is next, with ss_in set for it
  task automatic at_slot_end(int s, logic [N-1:0] v, int k);
    while (!(int'(now) == s && bitcnt == BIT_W'(CELL_BITS - 2))) @(negedge clk);
    ss_in = v; ss_in_k = 2'(k);
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    cell_t c;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); cfg_we = 1; cfg_idx = 6'd2; cfg_valid = 1; cfg_sm = 2'd2;
    @(negedge clk); cfg_idx = 6'd1; cfg_sm = 2'd1;
    @(negedge clk); cfg_we = 0;
    // a) cell enters in slot 4 (cycle 1, t = 0)
    while (!(now == 3 && bitcnt == 10)) @(negedge clk);
    c = mk(2, 1); txq[0].push_back(c);
    expq.push_back(c); exp_dest.push_back(2); exp_slot.push_back(2 * N + 3);
    at_slot_end(5, 4'b0100, 0);      // SS_0 with SM 2's slot taken
    chk("no claim when the slot is taken", ss_out == 4'b0100 && ss_out_k == 2'd0);
    at_slot_end(6, 4'b0000, 3);      // SS_3: bit 3 is SM 2
    chk("claim slot 3 of SS_3", ss_out == 4'b1000 && ss_out_k == 2'd3);
    at_slot_end(7, 4'b0000, 2);
    chk("nothing more to claim", ss_out == 4'b0000);
    // b) cell for SM 1 entering in slot 11 (t = 3): own slot 0 of cycle 3
    while (!(now == 10 && bitcnt == 10)) @(negedge clk);
    c = mk(1, 2); txq[1].push_back(c);
    expq.push_back(c); exp_dest.push_back(1); exp_slot.push_back(4 * N + 0);
    ss_in = 4'b1111;
    while (!(now == 13 && bitcnt == 5)) @(negedge clk);
    chk("own pre-allocated slot claimed in SS_1", ss_out == 4'b0001 && ss_out_k == 2'd1);
    while (now < 18) @(negedge clk);
    chk("sent in own slot", n_sent == 2);
    // c) flood towards SM 2 with the ring fully booked
    for (int n = 0; n < 10; n++) for (int p = 0; p < NP; p++) begin
      c = mk(2, 100 + 2 * n + p); txq[p].push_back(c);
      expq.push_back(c); exp_dest.push_back(2); exp_slot.push_back(-1);
    end
    while (txq[0].size() > 0 || curv[0]) @(negedge clk);
    chk("buffer overflow seen", n_full > 0);
    repeat (20 * N * CELL_BITS) @(posedge clk);
    chk("every flood cell sent or discarded", n_sent - 2 + n_full == 2 * 10 && expq.size() == n_full);
    expq.delete();
    // d) unknown connection
    c = mk(5, 999); txq[0].push_back(c);
    repeat (3 * CELL_BITS) @(posedge clk);
    chk("unknown connection discarded", n_unk == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200 * CELL_BITS) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
