// output_module: one output port of the shift-register switch.
//
// The port keeps NQ virtual queues, one per priority class. An entry is the
// address of a cell that is still held in an input register (input number,
// register number, multicast flag and identifier); the cells themselves never
// move, so the input registers behave as output queues.
//   * queue update: entries arrive over the shared address bus; the port takes
//     an entry when its bit of the selection bus (post_sel) is set. If the
//     class queue is full the entry is refused and released at once, so the
//     input register is not held forever (vq_drop).
//   * output scheduler: in the last clock of every time-slot a window_sched
//     picks a class among the queues that hold an entry and have flow-control
//     credit (flow_ctrl); the head entry is popped and becomes the cell sent in
//     the next slot.
//   * concentrator control: during that slot the module names the input and
//     register on sel_*; the chosen input drives the cell bit by bit onto this
//     port's line of the shared bus (bus_bit), and the module forwards it to
//     out_bit. At the end of the slot it pulses clr_* to release the register.
//   * multicast: for a multicast cell the outgoing VPI/VCI are taken from this
//     port's translation table, indexed by the multicast identifier stored in
//     the cell, and the HEC is recomputed as the header streams out.
// Timing: a cell whose address is posted during slot s leaves in slot s+1 at
// the earliest; out_valid marks a slot carrying a cell.
// Virtual queues, output-driven concentrators, per-port window scheduling,
// the credit check and per-port multicast translation follow the source
// design. Queueing per class rather than per virtual channel, the queue depth
// and the refusal on overflow are this design's choices.
module output_module
  import atm_pkg::*;
#(
  parameter int unsigned NIN    = 16,
  parameter int unsigned P      = 16,
  parameter int unsigned NQ     = 4,
  parameter int unsigned WEIGHT [NQ] = '{4, 3, 2, 1},
  parameter int unsigned WINDOW = 10,
  parameter int unsigned VQD    = 64,  // entries per class queue
  parameter int unsigned MCIDX  = 4,   // multicast translation table index bits
  localparam int unsigned RW = $clog2(P),
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned QW = $clog2(NQ)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BIT_W-1:0]  bitcnt,
  // shared address bus
  input  logic              post_valid,
  input  logic              post_sel,     // this port's selection-bus line
  input  logic [IW-1:0]     post_in,
  input  logic [RW-1:0]     post_reg,
  input  logic [QW-1:0]     post_class,
  input  logic              post_mc,
  input  logic [15:0]       post_mcid,
  // multicast translation table
  input  logic              mc_we,
  input  logic [MCIDX-1:0]  mc_idx,
  input  logic [7:0]        mc_vpi,
  input  logic [15:0]       mc_vci,
  // flow control
  input  logic              fc_we,
  input  logic [QW-1:0]     fc_q,
  input  logic [1:0]        fc_mode,
  input  logic [15:0]       fc_interval,
  input  logic              credit_add,
  input  logic [QW-1:0]     credit_q,
  input  logic [7:0]        credit_n,
  // concentrator control and release
  output logic              sel_active,
  output logic [IW-1:0]     sel_in,
  output logic [RW-1:0]     sel_reg,
  output logic              clr,
  output logic [IW-1:0]     clr_in,
  output logic [RW-1:0]     clr_reg,
  // data
  input  logic              bus_bit,
  output logic              out_bit,
  output logic              out_valid,
  // status
  output logic [NQ-1:0]     grant,        // class served (pulse in last clock of slot)
  output logic              vq_drop
);
  localparam int unsigned AW = $clog2(VQD);

  typedef struct packed {
    logic [IW-1:0]  in;
    logic [RW-1:0]  rg;
    logic           mc;
    logic [15:0]    mcid;
  } vq_entry_t;

  vq_entry_t      vq   [NQ][VQD];
  logic [AW-1:0]  head [NQ];
  logic [AW-1:0]  tail [NQ];
  logic [AW:0]    cnt  [NQ];

  logic [7:0]     mt_vpi [1 << MCIDX];
  logic [15:0]    mt_vci [1 << MCIDX];

  logic           slot_end;
  assign slot_end = (bitcnt == BIT_W'(CELL_BITS - 1));

  logic [NQ-1:0]  d, has_credit, w_flag;
  logic           window_start;
  always_comb for (int q = 0; q < NQ; q++) d[q] = (cnt[q] != '0) && has_credit[q];

  window_sched #(.NQ(NQ), .WEIGHT(WEIGHT), .WINDOW(WINDOW)) u_sched (
    .clk, .rst_n, .slot(slot_end), .d, .grant, .w_flag, .window_start
  );

  flow_ctrl #(.NQ(NQ)) u_fc (
    .clk, .rst_n, .slot(slot_end),
    .cfg_we(fc_we), .cfg_q(fc_q), .cfg_mode(fc_mode), .cfg_interval(fc_interval),
    .credit_add, .credit_q, .credit_n,
    .consume(grant), .has_credit
  );

  // entry chosen by the scheduler
  vq_entry_t pick;
  always_comb begin
    pick = '0;
    for (int q = 0; q < NQ; q++) if (grant[q]) pick = vq[q][head[q]];
  end

  // current cell
  vq_entry_t      cur;
  logic [7:0]     cur_vpi;
  logic [15:0]    cur_vci;
  logic [31:0]    hacc;          // outgoing header bits 0..31, msb = bit 0

  logic           accept, full;
  assign full   = (cnt[post_class] == (AW+1)'(VQD));
  assign accept = post_valid && post_sel && !full;
  assign vq_drop = post_valid && post_sel && full;

  assign sel_active = out_valid;
  assign sel_in     = cur.in;
  assign sel_reg    = cur.rg;

  // release at the end of a sent cell, or at once for a refused entry
  always_comb begin
    clr = 1'b0; clr_in = cur.in; clr_reg = cur.rg;
    if (out_valid && slot_end) clr = 1'b1;
    else if (vq_drop) begin clr = 1'b1; clr_in = post_in; clr_reg = post_reg; end
  end

  // header substitution for multicast cells
  logic [7:0] out_hec;
  assign out_hec = hec8(hacc);
  always_comb begin
    int m;
    m = int'(bitcnt);
    out_bit = bus_bit;
    if (out_valid && cur.mc) begin
      if (m >= VPI_POS && m < VCI_POS)       out_bit = cur_vpi[7 - (m - VPI_POS)];
      else if (m >= VCI_POS && m < PTI_POS)  out_bit = cur_vci[15 - (m - VCI_POS)];
      else if (m >= HEC_POS && m < HDR_BITS) out_bit = out_hec[7 - (m - HEC_POS)];
    end
    if (!out_valid) out_bit = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) begin head[q] <= '0; tail[q] <= '0; cnt[q] <= '0; end
      for (int i = 0; i < (1 << MCIDX); i++) begin mt_vpi[i] <= '0; mt_vci[i] <= '0; end
      cur <= '0; cur_vpi <= '0; cur_vci <= '0; out_valid <= 1'b0; hacc <= '0;
    end else begin
      for (int q = 0; q < NQ; q++) begin
        logic push, pop;
        push = accept && (post_class == QW'(q));
        pop  = grant[q];
        if (push) begin
          vq[q][tail[q]] <= '{in: post_in, rg: post_reg, mc: post_mc, mcid: post_mcid};
          tail[q] <= tail[q] + 1'b1;
        end
        if (pop) head[q] <= head[q] + 1'b1;
        cnt[q] <= cnt[q] + (AW+1)'(push) - (AW+1)'(pop);
      end
      if (int'(bitcnt) < HEC_POS) hacc[31 - int'(bitcnt)] <= out_bit;
      if (slot_end) begin
        out_valid <= |grant;
        cur       <= pick;
        cur_vpi   <= mt_vpi[pick.mcid[MCIDX-1:0]];
        cur_vci   <= mt_vci[pick.mcid[MCIDX-1:0]];
      end
      if (mc_we) begin mt_vpi[mc_idx] <= mc_vpi; mt_vci[mc_idx] <= mc_vci; end
    end
  end
endmodule
