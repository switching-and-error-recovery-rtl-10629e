// Self-checking testbench for the PSRP sender and receiver joined by a lossy
// channel model (window 8 frames, 4-bit frame numbers, time-out 12 and STAT
// period 10 frame times, one frame time per clock, 6 clocks of delay each
// way). It checks:
//   * every frame is handed on exactly once and in order, for random frame
//     and STAT losses, in both congestion states;
//   * while uncongested, periodic STAT frames come a whole number of PERIOD
//     frame times apart (one that falls on a POLL answer is merged with it); while congested only POLLs are answered;
//   * with the return channel cut, a POLL is repeated exactly TIMEOUT + 1
//     frame times after the previous one;
//   * a directed loss: the STAT frame lists exactly the missing frames.
// It also counts retransmissions, POLLs, time-outs and both kinds of STAT
// frames and fails if any of them never happened.
module psrp_tb;
  localparam int W = 8, SEQW = 4, NS = 16, TIMEOUT = 12, PERIOD = 10, D = 6, NFR = 3000;
  logic clk = 0, rst_n = 0;
  logic tick = 1, src_valid = 0, src_take, tx_slot = 1, tx_valid, tx_poll, tx_retx;
  logic [SEQW-1:0] tx_seq;
  logic stat_valid_s = 0;
  logic [SEQW-1:0] stat_last_s = 0;
  logic [NS-1:0] stat_lost_s = 0;
  logic win_full, poll_wait, timeout;
  logic congested = 0, rx_valid = 0, rx_ok = 0, rx_poll = 0;
  logic [SEQW-1:0] rx_seq = 0;
  logic deliver_valid, stat_valid, stat_polled;
  logic [SEQW-1:0] deliver_seq, stat_last;
  logic [NS-1:0] stat_lost;
  int checks = 0, failures = 0;

  psrp_sender #(.W(W), .SEQW(SEQW), .TIMEOUT(TIMEOUT)) u_tx (
    .clk, .rst_n, .tick, .src_valid, .src_take, .tx_slot, .tx_valid, .tx_seq, .tx_poll, .tx_retx,
    .stat_valid(stat_valid_s), .stat_last(stat_last_s), .stat_lost(stat_lost_s),
    .win_full, .poll_wait, .timeout);
  psrp_receiver #(.W(W), .SEQW(SEQW), .PERIOD(PERIOD)) u_rx (
    .clk, .rst_n, .tick, .congested, .rx_valid, .rx_ok, .rx_seq, .rx_poll,
    .deliver_valid, .deliver_seq, .stat_valid, .stat_last, .stat_lost, .stat_polled);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- channel: fixed delay, random loss in each direction
  int loss_fwd = 0, loss_back = 0;   // per mille
  bit cut_back = 0;
  typedef struct { bit v; bit ok; logic [SEQW-1:0] seq; bit poll; } fr_t;
  typedef struct { bit v; logic [SEQW-1:0] last; logic [NS-1:0] lost; } st_t;
  fr_t fpipe [D];
  st_t spipe [D];
  int  cyc = 0;
  int  n_sent_new = 0, n_retx = 0, n_poll = 0, n_to = 0, n_per = 0, n_pol = 0, n_deliv = 0, n_cong_cycles = 0;
  int  last_per = -1, last_poll = -1;
  bit  poll_since_stat = 0;
  int  expect_seq = 0;
  int  stat_seen = 0;
  st_t last_stat;

  always @(posedge clk) if (rst_n) begin
    fr_t f; st_t s;
    cyc++;
    // receiver side of the forward channel
    f = fpipe[D-1];
    for (int i = D - 1; i > 0; i--) fpipe[i] = fpipe[i-1];
    fpipe[0] = '{tx_valid, ($urandom_range(0, 999) >= loss_fwd), tx_seq, tx_poll};
    s = spipe[D-1];
    for (int i = D - 1; i > 0; i--) spipe[i] = spipe[i-1];
    spipe[0] = '{stat_valid && !cut_back && ($urandom_range(0, 999) >= loss_back), stat_last, stat_lost};
    #1;
    rx_valid = f.v; rx_ok = f.ok; rx_seq = f.seq; rx_poll = f.poll;
    stat_valid_s = s.v; stat_last_s = s.last; stat_lost_s = s.lost;
  end

  // ---- monitors (sampled before the clock edge)
  always @(negedge clk) if (rst_n) begin
    if (tx_valid && src_take) n_sent_new++;
    if (tx_valid && tx_retx) n_retx++;
    if (tx_valid && tx_poll) begin
      if (last_poll >= 0 && cut_back && poll_since_stat) chk(cyc - last_poll == TIMEOUT + 1, "re-POLL after the time-out");
      n_poll++; last_poll = cyc; poll_since_stat = 1;
    end
    if (stat_valid_s) poll_since_stat = 0;
    if (timeout) n_to++;
    if (congested) n_cong_cycles++;
    if (deliver_valid) begin
      chk(deliver_seq == SEQW'(expect_seq), "in-order delivery");
      expect_seq++; n_deliv++;
    end
    if (stat_valid) begin
      stat_seen++; last_stat = '{1, stat_last, stat_lost};
      if (stat_polled) n_pol++;
      else begin
        chk(!congested, "no periodic STAT while congested");
        if (last_per >= 0 && !congested) chk((cyc - last_per) % PERIOD == 0, "STAT period");
        n_per++; last_per = cyc;
      end
    end
    if (congested) last_per = -1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin fpipe[i] = '{0, 0, 0, 0}; spipe[i] = '{0, 0, 0}; end

    // directed loss: frames 1 and 2 lost, then check the next STAT frame
    loss_fwd = 0;
    @(negedge clk);
    src_valid = 1;
    begin
      int sent = 0;
      while (sent < 5) begin
        #1;
        if (src_take) begin
          if (sent == 1 || sent == 2) force_loss = 1; else force_loss = 0;
          sent++;
        end
        @(negedge clk);
      end
    end
    force_loss = 0;
    src_valid = 0;
    @(negedge clk iff (stat_valid && stat_last == 4));
    chk(stat_lost == 16'b0000_0000_0000_0110, "STAT lists the lost frames");
    if (stat_lost != 16'b0000_0000_0000_0110) $display("lost=%b last=%0d", stat_lost, stat_last);
    repeat (100) @(negedge clk);
    chk(n_deliv == 5, "lost frames recovered");

    // random traffic with losses, congestion state changes
    loss_fwd = 50; loss_back = 100;
    src_valid = 1;
    while (n_sent_new < NFR) begin
      repeat ($urandom_range(50, 400)) @(negedge clk);
      congested = !congested;
    end
    src_valid = 0; congested = 0; loss_fwd = 0; loss_back = 0;
    repeat (400) @(negedge clk);
    chk(n_deliv == n_sent_new, "every frame delivered once");

    // time-out: cut the return channel with a full window
    cut_back = 1; congested = 1; src_valid = 1;
    repeat (200) @(negedge clk);
    cut_back = 0; congested = 0;
    repeat (300) @(negedge clk);
    src_valid = 0;
    repeat (300) @(negedge clk);
    chk(n_deliv == n_sent_new, "delivery after the time-outs");

    $display("new=%0d retx=%0d poll=%0d timeouts=%0d periodic=%0d polled=%0d delivered=%0d congested_cycles=%0d",
             n_sent_new, n_retx, n_poll, n_to, n_per, n_pol, n_deliv, n_cong_cycles);
    chk(n_retx > 0, "retransmissions happened");
    chk(n_poll > 0, "POLLs happened");
    chk(n_to > 0, "time-outs happened");
    chk(n_per > 0, "periodic STATs happened");
    chk(n_pol > 0, "polled STATs happened");
    chk(n_cong_cycles > 0, "congested state happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit force_loss = 0;
  always @(posedge clk) if (rst_n && force_loss === 1'b1 && tx_valid) begin
    #2; fpipe[0].ok = 0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
