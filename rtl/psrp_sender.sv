// psrp_sender: sending end of the periodic selective-repeat error recovery
// protocol (PSRP) for AAL5 frames.
//
// The sender numbers frames modulo 2^SEQW and keeps at most W of them
// outstanding. No positive acknowledgement is ever expected: the receiver
// reports, in STAT frames, the last frame it received and the frames it is
// missing. On a STAT frame every outstanding frame up to the reported last one
// that is not listed as missing is freed, every listed one is queued for
// retransmission. Retransmissions go before new frames.
// When the window is full the sender asks for a STAT frame: the frame that
// fills the window, or the last pending retransmission while the window is
// full, carries the POLL bit. The same is done when the source has no new
// frame while frames are outstanding, so that the last frames of a burst are
// recovered without waiting for more traffic. A time-out of TIMEOUT frame times then runs; if
// no STAT frame arrives before it expires (timeout pulses) the oldest
// outstanding frame is sent again with the POLL bit in the next transmit slot,
// and the time-out restarts.
//
// Interface and timing: one frame may be sent in every clock with `tx_slot`
// set (one frame time); the frame number, POLL bit and retransmission flag are
// valid with tx_valid in that clock. A new frame is taken from the source when
// src_valid is set (src_take pulses). A STAT frame is presented for one clock
// with stat_valid; stat_lost is a bitmap indexed by frame number. `tick`
// advances the time-out, once per frame time.
// The protocol rules (no ACKs, STAT with last frame and lost list, POLL when
// the window is full, time-out and re-poll, retransmission of lost frames)
// follow the source design; the frame-number bitmap, the choice of which frame
// carries a POLL, the POLL when the source is idle and the priority of
// retransmissions are this design's own.
module psrp_sender #(
  parameter int unsigned W       = 100,  // window size in frames
  parameter int unsigned SEQW    = 8,    // frame-number width, 2^SEQW >= 2W
  parameter int unsigned TIMEOUT = 30,   // POLL time-out in frame times
  localparam int unsigned NS     = 1 << SEQW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,        // one frame time elapsed
  // frame source
  input  logic            src_valid,
  output logic            src_take,
  // transmit side
  input  logic            tx_slot,     // the channel takes a frame this clock
  output logic            tx_valid,
  output logic [SEQW-1:0] tx_seq,
  output logic            tx_poll,
  output logic            tx_retx,
  // STAT frames from the receiver
  input  logic            stat_valid,
  input  logic [SEQW-1:0] stat_last,
  input  logic [NS-1:0]   stat_lost,
  // status
  output logic            win_full,
  output logic            poll_wait,
  output logic            timeout
);
  logic [NS-1:0]   outst;        // sent and not yet freed
  logic [NS-1:0]   redo;         // queued for retransmission
  logic [SEQW-1:0] base, nxt;
  logic [SEQW:0]   count;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic            expired;      // time-out ran out, re-poll at the next slot

  initial assert (NS >= 2 * W);

  assign count    = {1'b0, nxt - base};
  assign win_full = (count == (SEQW+1)'(W));

  // oldest frame queued for retransmission, and whether it is the only one
  logic            have_redo, last_redo;
  logic [SEQW-1:0] redo_seq;
  always_comb begin
    int n;
    have_redo = 1'b0; redo_seq = base; n = 0;
    for (int i = 0; i < W; i++) begin
      logic [SEQW-1:0] s;
      s = base + SEQW'(i);
      if (redo[s] && (SEQW+1)'(i) < count) begin
        if (!have_redo) redo_seq = s;
        have_redo = 1'b1;
        n++;
      end
    end
    last_redo = (n == 1);
  end

  assign timeout = poll_wait && !expired && tick && (timer == '0);

  // what goes out in this transmit slot
  always_comb begin
    tx_valid = 1'b0; tx_seq = nxt; tx_poll = 1'b0; tx_retx = 1'b0; src_take = 1'b0;
    if (tx_slot && !stat_valid) begin
      if (expired || ((win_full || !src_valid) && count != '0 && !poll_wait && !have_redo)) begin
        tx_valid = 1'b1; tx_seq = base; tx_poll = 1'b1; tx_retx = 1'b1;
      end else if (have_redo) begin
        tx_valid = 1'b1; tx_seq = redo_seq; tx_retx = 1'b1;
        tx_poll  = (win_full || !src_valid) && last_redo && !poll_wait;
      end else if (!win_full && src_valid) begin
        tx_valid = 1'b1; tx_seq = nxt; src_take = 1'b1;
        tx_poll  = (count == (SEQW+1)'(W - 1)) && !poll_wait;
      end
    end
  end

  // STAT processing: free or requeue every outstanding frame up to stat_last
  logic [SEQW:0] last_d;
  assign last_d = {1'b0, stat_last - base};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outst <= '0; redo <= '0; base <= '0; nxt <= '0; poll_wait <= 1'b0; timer <= '0;
      expired <= 1'b0;
    end else begin
      if (stat_valid) begin
        logic [NS-1:0] o, r;
        logic [SEQW-1:0] nb;
        logic stop;
        o = outst; r = redo;
        if (last_d < count) begin
          for (int i = 0; i < W; i++) begin
            logic [SEQW-1:0] s;
            s = base + SEQW'(i);
            if ((SEQW+1)'(i) <= last_d && o[s]) begin
              if (stat_lost[s]) r[s] = 1'b1;
              else begin o[s] = 1'b0; r[s] = 1'b0; end
            end
          end
        end
        // the window slides past the freed frames
        nb = base; stop = 1'b0;
        for (int i = 0; i < W; i++) begin
          if (!stop && (SEQW+1)'(i) < count && !o[base + SEQW'(i)]) nb = base + SEQW'(i + 1);
          else stop = 1'b1;
        end
        outst <= o; redo <= r; base <= nb;
        poll_wait <= 1'b0;
        expired   <= 1'b0;
      end else begin
        if (tx_valid) begin
          if (src_take) begin outst[nxt] <= 1'b1; nxt <= nxt + 1'b1; end
          if (tx_retx) redo[tx_seq] <= 1'b0;
          if (tx_poll) begin
            poll_wait <= 1'b1;
            expired   <= 1'b0;
            timer     <= ($bits(timer))'(TIMEOUT - 1);
          end
        end
        if (timeout && !(tx_valid && tx_poll)) expired <= 1'b1;
        if (tick && poll_wait && timer != '0 && !(tx_valid && tx_poll)) timer <= timer - 1'b1;
      end
    end
  end
endmodule
