// window_sched: window-based priority scheduler for one output port.
//
// Cells of NQ service classes wait in NQ queues; queue 0 has the highest
// priority. Within a window frame of WINDOW time-slots queue i may send at
// most WEIGHT[i] cells before lower-priority queues get their turn. Every
// time-slot the search starts again from queue 0: queue i is chosen when it
// holds a cell and either it still has allowance (W flag set) or no
// lower-priority queue can send (none both holds a cell and has allowance).
// A queue that has used up its allowance can therefore still send when the
// link would otherwise go idle. The allowance counters are reloaded at the
// end of every window frame.
//
// Interface: d[i] is the D flag (queue i holds a cell that may leave now; the
// caller folds flow-control credit into it). On a cycle with `slot` high the
// module decides: `grant` is one-hot (or zero if every d is low) in that same
// cycle, combinationally, and the allowance of the granted queue is decremented
// at the clock edge. The default weights 4,3,2,1 and window of 10 slots are the
// configuration the scheduler was evaluated with; the selection rule is the
// flow-chart rule generalised to any NQ.
module window_sched #(
  parameter int unsigned NQ             = 4,
  parameter int unsigned WEIGHT [NQ]    = '{4, 3, 2, 1},
  parameter int unsigned WINDOW         = 10,
  parameter int unsigned CW             = 8      // allowance counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot,        // one scheduling decision per pulse
  input  logic [NQ-1:0] d,           // queue holds a sendable cell
  output logic [NQ-1:0] grant,       // one-hot queue chosen this slot
  output logic [NQ-1:0] w_flag,      // queue still has allowance in this window
  output logic          window_start // first slot of a window frame
);

  logic [CW-1:0] wcnt [NQ];
  logic [$clog2(WINDOW+1)-1:0] winpos;

  always_comb begin
    for (int i = 0; i < NQ; i++) w_flag[i] = (wcnt[i] != '0);
  end

  // lower_can[i]: some queue j > i holds a cell and has allowance left
  logic [NQ-1:0] lower_can, elig;
  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int i = NQ - 1; i >= 0; i--) begin
      lower_can[i] = acc;
      acc = acc | (d[i] & w_flag[i]);
    end
    for (int i = 0; i < NQ; i++) elig[i] = d[i] & (w_flag[i] | ~lower_can[i]);
  end

  // the first eligible queue, searching from the highest priority
  always_comb begin
    logic found;
    found = 1'b0;
    grant = '0;
    for (int i = 0; i < NQ; i++) begin
      if (slot && elig[i] && !found) begin
        grant[i] = 1'b1;
        found    = 1'b1;
      end
    end
  end

  assign window_start = (winpos == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      winpos <= '0;
      for (int i = 0; i < NQ; i++) wcnt[i] <= CW'(WEIGHT[i]);
    end else if (slot) begin
      if (winpos == ($bits(winpos))'(WINDOW - 1)) begin
        winpos <= '0;
        for (int i = 0; i < NQ; i++) wcnt[i] <= CW'(WEIGHT[i]);
      end else begin
        winpos <= winpos + 1'b1;
        for (int i = 0; i < NQ; i++)
          if (grant[i] && wcnt[i] != '0) wcnt[i] <= wcnt[i] - 1'b1;
      end
    end
  end

  // at most one queue is ever granted
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
