// psrp_receiver: receiving end of the periodic selective-repeat error
// recovery protocol (PSRP).
//
// The receiver records which frames have arrived intact (rx_ok: the frame
// passed its AAL5 check) in a bitmap indexed by frame number, and remembers
// the highest frame number received. Frames are handed on in order
// (deliver_*) as soon as the oldest missing one is filled in. It never
// acknowledges single frames. Instead it sends STAT frames that carry the
// last frame received and, as a bitmap, every frame before it that is still
// missing:
//   * uncongested (congested = 0): a STAT frame every PERIOD frame times;
//   * congested (congested = 1): no periodic STAT frames;
//   * in both states a frame with the POLL bit is answered with a STAT frame.
// Every STAT frame carries the full current status, so a lost STAT frame or a
// lost retransmission is covered by the next one.
// Interface and timing: one received frame per clock at most; `tick` marks one
// frame time; a STAT frame is a one-clock pulse on stat_valid with its
// contents; a POLL is answered in the clock after it arrives.
// The STAT contents, the periodic and the poll-driven modes follow the source
// design; the bitmap form, the in-order delivery port and sending no STAT
// before the first frame are this design's own.
module psrp_receiver #(
  parameter int unsigned W      = 100,   // window size in frames
  parameter int unsigned SEQW   = 8,
  parameter int unsigned PERIOD = 100,   // frame times between periodic STATs
  localparam int unsigned NS    = 1 << SEQW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic            congested,
  // frames from the channel
  input  logic            rx_valid,
  input  logic            rx_ok,
  input  logic [SEQW-1:0] rx_seq,
  input  logic            rx_poll,
  // in-order delivery
  output logic            deliver_valid,
  output logic [SEQW-1:0] deliver_seq,
  // STAT frames to the sender
  output logic            stat_valid,
  output logic [SEQW-1:0] stat_last,
  output logic [NS-1:0]   stat_lost,
  output logic            stat_polled     // this STAT answers a POLL
);
  logic [NS-1:0]   got;
  logic [SEQW-1:0] rbase, last;
  logic            any, poll_seen;
  logic [$clog2(PERIOD+1)-1:0] timer;

  initial assert (NS >= 2 * W);

  logic [SEQW:0] rd, ld;
  assign rd = {1'b0, rx_seq - rbase};
  assign ld = {1'b0, last - rbase};

  // missing frames between the oldest missing one and the last received one
  always_comb begin
    stat_lost = '0;
    for (int i = 0; i < W; i++) begin
      logic [SEQW-1:0] s;
      s = rbase + SEQW'(i);
      if (any && ld < (SEQW+1)'(W) && (SEQW+1)'(i) < ld && !got[s]) stat_lost[s] = 1'b1;
    end
  end
  assign stat_last = last;

  assign deliver_valid = got[rbase];
  assign deliver_seq   = rbase;

  logic periodic;
  assign periodic   = !congested && tick && (timer == '0) && any;
  assign stat_valid = poll_seen || periodic;
  assign stat_polled = poll_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got <= '0; rbase <= '0; last <= '0; any <= 1'b0; poll_seen <= 1'b0;
      timer <= ($bits(timer))'(PERIOD - 1);
    end else begin
      logic [NS-1:0] g;
      g = got;
      if (deliver_valid) begin
        g[rbase] = 1'b0;
        rbase <= rbase + 1'b1;
      end
      if (rx_valid && rx_ok && rd < (SEQW+1)'(W)) begin
        if (!(deliver_valid && rx_seq == rbase)) g[rx_seq] = 1'b1;
        if (!any || ld >= (SEQW+1)'(W) || rd > ld) last <= rx_seq;
        any <= 1'b1;
      end
      got <= g;
      poll_seen <= rx_valid && rx_ok && rx_poll;
      if (tick) timer <= (timer == '0) ? ($bits(timer))'(PERIOD - 1) : timer - 1'b1;
    end
  end
endmodule
