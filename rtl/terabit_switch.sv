// terabit_switch: scalable space-switch based ATM switch.
//
// N switching controller modules (SCM) and N switching modules (SM) are joined
// by an N x N crosspoint switch. Every SCM collects the cells of NP input
// ports and sends one cell per time-slot through the crosspoint; every SM is a
// shift-register switch (sr_switch) with the crosspoint as its single input
// and NP output ports, plus its OAM and signalling ports. Global output port g
// is port g mod NP of SM g / NP; global input port g enters SCM g / NP.
//
// The crosspoint needs no central controller. Slots are grouped into switching
// cycles of N slots; in each cycle every SCM owns one slot towards every SM
// (SCM i to SM (i+t) mod N in slot t), which guarantees each SCM/SM pair one
// cell per cycle. Slots an SCM cannot use are taken over by other SCMs through
// scheduled-cell-status vectors passed once per slot around a ring of SCMs
// (scm, ss_update). Schedules are made one cycle ahead, so a cell waits at
// least until the next switching cycle in its SCM; the SM then adds one slot.
//
// The SCM tables give the destination SM of a connection; each SM's own
// tables give the output port, the header translation, the class, the UPC
// contract and the multicast translation (cfg_* ports, selected by index).
// Fault-tolerance standby modules are not included.
// Beside the fabric, and not connected to it, sit the two engines of the
// end-to-end error recovery protocol (psrp_sender, psrp_receiver). They run in
// the terminals at the two ends of a connection, so their ports are brought
// out unchanged (psrp_*). All lines are bit-serial,
// one bit per clock, with cells aligned to a common 424-clock slot grid.
module terabit_switch
  import atm_pkg::*;
#(
  parameter int unsigned N    = 128,  // SCMs and SMs (switch "ports" of 10 Gb/s)
  parameter int unsigned NP   = 4,    // external ports per SCM and per SM
  parameter int unsigned B    = 12,   // SCM cell buffer
  parameter int unsigned P    = 16,   // SM cell registers
  parameter int unsigned CIDX = 6,
  parameter int unsigned VQD  = 64,
  // end-to-end error recovery engines (PSRP), beside the fabric
  parameter int unsigned PSRP_W       = 100,  // window in frames
  parameter int unsigned PSRP_SEQW    = 8,
  parameter int unsigned PSRP_TIMEOUT = 30,   // POLL time-out, frame times
  parameter int unsigned PSRP_PERIOD  = 100,  // STAT period, frame times
  localparam int unsigned KW  = $clog2(N),
  localparam int unsigned NS  = 1 << PSRP_SEQW,
  localparam int unsigned NQ  = 4,
  localparam int unsigned OW  = $clog2(NP + 2)
) (
  input  logic                clk,
  input  logic                rst_n,
  // external ports
  input  logic [N*NP-1:0]     in_bit,
  input  logic [N*NP-1:0]     in_valid,
  output logic [N*NP-1:0]     out_bit,
  output logic [N*NP-1:0]     out_valid,
  // OAM and signalling ports of the SMs (to the processors)
  output logic [N-1:0]        oam_bit,
  output logic [N-1:0]        oam_valid,
  output logic [N-1:0]        sig_bit,
  output logic [N-1:0]        sig_valid,
  // slot grid
  output logic [BIT_W-1:0]    bitcnt,
  output logic [KW-1:0]       tslot,
  output logic [31:0]         now,
  // SCM routing tables
  input  logic                rt_we,
  input  logic [KW-1:0]       rt_scm,
  input  logic [CIDX-1:0]     rt_idx,
  input  logic                rt_valid,
  input  logic [KW-1:0]       rt_sm,
  // SM connection tables
  input  logic                cfg_we,
  input  logic [KW-1:0]       cfg_sm,
  input  logic [CIDX-1:0]     cfg_idx,
  input  logic                cfg_valid,
  input  conn_kind_e          cfg_kind,
  input  logic [NP+1:0]       cfg_mask,
  input  logic                cfg_mc,
  input  logic [7:0]          cfg_vpi,
  input  logic [15:0]         cfg_vci,
  input  logic [1:0]          cfg_class,
  input  logic [15:0]         cfg_inc,
  input  logic [15:0]         cfg_lim,
  // SM multicast translation tables
  input  logic                mc_we,
  input  logic [KW-1:0]       mc_sm,
  input  logic [OW-1:0]       mc_port,
  input  logic [3:0]          mc_idx,
  input  logic [7:0]          mc_vpi,
  input  logic [15:0]         mc_vci,
  // SM flow controllers
  input  logic                fc_we,
  input  logic [KW-1:0]       fc_sm,
  input  logic [OW-1:0]       fc_port,
  input  logic [1:0]          fc_q,
  input  logic [1:0]          fc_mode,
  input  logic [15:0]         fc_interval,
  input  logic                credit_add,
  input  logic [KW-1:0]       credit_sm,
  input  logic [OW-1:0]       credit_port,
  input  logic [1:0]          credit_q,
  input  logic [7:0]          credit_n,
  // events
  output logic [N*NP-1:0]     scm_drop_full,
  output logic [N*NP-1:0]     scm_drop_unknown,
  output logic [N-1:0]        sent_own,
  output logic [N-1:0]        sent_realloc,
  output logic [N-1:0]        sm_drop,
  // PSRP sender
  input  logic                 psrp_tick,
  input  logic                 psrp_src_valid,
  output logic                 psrp_src_take,
  input  logic                 psrp_tx_slot,
  output logic                 psrp_tx_valid,
  output logic [PSRP_SEQW-1:0] psrp_tx_seq,
  output logic                 psrp_tx_poll,
  output logic                 psrp_tx_retx,
  input  logic                 psrp_stat_in_valid,
  input  logic [PSRP_SEQW-1:0] psrp_stat_in_last,
  input  logic [NS-1:0]        psrp_stat_in_lost,
  output logic                 psrp_win_full,
  output logic                 psrp_poll_wait,
  output logic                 psrp_timeout,
  // PSRP receiver
  input  logic                 psrp_congested,
  input  logic                 psrp_rx_valid,
  input  logic                 psrp_rx_ok,
  input  logic [PSRP_SEQW-1:0] psrp_rx_seq,
  input  logic                 psrp_rx_poll,
  output logic                 psrp_deliver_valid,
  output logic [PSRP_SEQW-1:0] psrp_deliver_seq,
  output logic                 psrp_stat_valid,
  output logic [PSRP_SEQW-1:0] psrp_stat_last,
  output logic [NS-1:0]        psrp_stat_lost,
  output logic                 psrp_stat_polled
);

  // ---------------- end-to-end error recovery (terminal side)
  psrp_sender #(.W(PSRP_W), .SEQW(PSRP_SEQW), .TIMEOUT(PSRP_TIMEOUT)) u_psrp_tx (
    .clk, .rst_n, .tick(psrp_tick), .src_valid(psrp_src_valid), .src_take(psrp_src_take),
    .tx_slot(psrp_tx_slot), .tx_valid(psrp_tx_valid), .tx_seq(psrp_tx_seq), .tx_poll(psrp_tx_poll),
    .tx_retx(psrp_tx_retx), .stat_valid(psrp_stat_in_valid), .stat_last(psrp_stat_in_last),
    .stat_lost(psrp_stat_in_lost), .win_full(psrp_win_full), .poll_wait(psrp_poll_wait),
    .timeout(psrp_timeout)
  );
  psrp_receiver #(.W(PSRP_W), .SEQW(PSRP_SEQW), .PERIOD(PSRP_PERIOD)) u_psrp_rx (
    .clk, .rst_n, .tick(psrp_tick), .congested(psrp_congested), .rx_valid(psrp_rx_valid),
    .rx_ok(psrp_rx_ok), .rx_seq(psrp_rx_seq), .rx_poll(psrp_rx_poll),
    .deliver_valid(psrp_deliver_valid), .deliver_seq(psrp_deliver_seq),
    .stat_valid(psrp_stat_valid), .stat_last(psrp_stat_last), .stat_lost(psrp_stat_lost),
    .stat_polled(psrp_stat_polled)
  );
  logic slot_end;
  slot_timer u_timer (.clk, .rst_n, .bitcnt, .slot_end, .now);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        tslot <= '0;
    else if (slot_end) tslot <= (tslot == KW'(N - 1)) ? '0 : tslot + 1'b1;
  end

  logic [N-1:0]  ss     [N];
  logic [KW-1:0] ss_k   [N];
  logic [N-1:0]  link_bit, link_valid, sm_bit, sm_valid;
  logic [KW-1:0] link_dest [N];

  for (genvar j = 0; j < N; j++) begin : g_scm
    localparam int unsigned PREV = (j + N - 1) % N;
    scm #(.N(N), .NP(NP), .B(B), .CIDX(CIDX)) u_scm (
      .clk, .rst_n, .bitcnt, .slot_end, .tslot, .scm_id(KW'(j)),
      .in_bit(in_bit[j*NP +: NP]), .in_valid(in_valid[j*NP +: NP]),
      .cfg_we(rt_we && rt_scm == KW'(j)), .cfg_idx(rt_idx), .cfg_valid(rt_valid), .cfg_sm(rt_sm),
      .ss_in(ss[PREV]), .ss_in_k(ss_k[PREV]), .ss_out(ss[j]), .ss_out_k(ss_k[j]),
      .link_bit(link_bit[j]), .link_valid(link_valid[j]), .link_dest(link_dest[j]),
      .drop_full(scm_drop_full[j*NP +: NP]), .drop_unknown(scm_drop_unknown[j*NP +: NP]),
      .sent_own(sent_own[j]), .sent_realloc(sent_realloc[j])
    );
  end

  crosspoint #(.N(N)) u_xp (.clk, .rst_n, .link_bit, .link_valid, .link_dest, .sm_bit, .sm_valid);

  for (genvar m = 0; m < N; m++) begin : g_sm
    logic [NP+1:0] ob, ov, vqd;
    logic dfull, dupc, dunk;
    logic [NQ-1:0] gr [NP+2];
    sr_switch #(.NIN(1), .NPORT(NP), .P(P), .CIDX(CIDX), .VQD(VQD)) u_sm (
      .clk, .rst_n, .bitcnt, .now,
      .in_bit(sm_bit[m]), .in_valid(sm_valid[m]),
      .out_bit(ob), .out_valid(ov),
      .cfg_we(cfg_we && cfg_sm == KW'(m)), .cfg_port(1'b0), .cfg_idx, .cfg_valid, .cfg_kind,
      .cfg_mask, .cfg_mc, .cfg_vpi, .cfg_vci, .cfg_class, .cfg_inc, .cfg_lim,
      .mc_we(mc_we && mc_sm == KW'(m)), .mc_port, .mc_idx, .mc_vpi, .mc_vci,
      .fc_we(fc_we && fc_sm == KW'(m)), .fc_port, .fc_q, .fc_mode, .fc_interval,
      .credit_add(credit_add && credit_sm == KW'(m)), .credit_port, .credit_q, .credit_n,
      .drop_full(dfull), .drop_upc(dupc), .drop_unknown(dunk), .vq_drop(vqd), .grant(gr)
    );
    assign out_bit[m*NP +: NP]   = ob[NP-1:0];
    assign out_valid[m*NP +: NP] = ov[NP-1:0];
    assign oam_bit[m]   = ob[NP];
    assign oam_valid[m] = ov[NP];
    assign sig_bit[m]   = ob[NP+1];
    assign sig_valid[m] = ov[NP+1];
    assign sm_drop[m]   = dfull | dupc | dunk | (|vqd);
  end
endmodule
