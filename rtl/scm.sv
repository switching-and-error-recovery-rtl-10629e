// scm: switching controller module of the space-switch fabric.
//
// An SCM concentrates NP bit-serial input ports onto one link into the N x N
// crosspoint switch. It has three parts:
//   * routing module: each arriving cell is assembled bit by bit; at the end
//     of its slot the connection table (indexed by the low CIDX bits of the
//     VCI) gives the destination switching module (SM), the cell is written
//     into a free entry of a B-cell buffer, and the entry number is appended
//     to the queue of that SM. Headers are not translated here.
//   * distributed scheduler: cells are scheduled one switching cycle (N
//     slots) ahead. In slot 0 of a cycle the SCM fills its own vector SS_j
//     with the slots pre-allocated to it (slot x to SM_{(j+x) mod N}) for
//     which it holds a cell; in each later slot it receives the vector of its
//     ring predecessor, claims any free slot it can use (ss_update) and passes
//     the vector on. After N slots every vector has visited every SCM and the
//     schedule of the next cycle is fixed. The cell-buffer status CBS counts a
//     cell only once: cbs[m] = cells queued for SM m > cells already given a
//     slot.
//   * link transmitter: in every slot of the current cycle for which the
//     schedule names an SM, the head cell of that SM's queue is sent bit by
//     bit on `link_bit`, with `link_dest` naming the SM for the crosspoint.
// Timing: everything is aligned to the common slot grid (bitcnt, slot_end);
// `tslot` is the slot number inside the switching cycle. The ring vector is
// registered, so it advances one SCM per slot.
// Pre-allocation pattern, one-cycle-ahead scheduling, ring transfer of SS and
// the CBS/SS matching follow the source design; the shared B-cell buffer with
// per-SM queues of entry numbers, the table look-up and the discard of cells
// that find the buffer full are this design's choices.
module scm
  import atm_pkg::*;
#(
  parameter int unsigned N    = 128,   // SCMs = SMs
  parameter int unsigned NP   = 4,     // input ports per SCM
  parameter int unsigned B    = 12,    // cell buffer entries
  parameter int unsigned CIDX = 6,
  localparam int unsigned KW  = $clog2(N),
  localparam int unsigned EW  = $clog2(B),
  localparam int unsigned CW  = $clog2(B + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BIT_W-1:0]  bitcnt,
  input  logic              slot_end,
  input  logic [KW-1:0]     tslot,       // slot number in the switching cycle
  input  logic [KW-1:0]     scm_id,
  // input ports
  input  logic [NP-1:0]     in_bit,
  input  logic [NP-1:0]     in_valid,
  // routing table
  input  logic              cfg_we,
  input  logic [CIDX-1:0]   cfg_idx,
  input  logic              cfg_valid,
  input  logic [KW-1:0]     cfg_sm,
  // scheduling ring
  input  logic [N-1:0]      ss_in,
  input  logic [KW-1:0]     ss_in_k,
  output logic [N-1:0]      ss_out,
  output logic [KW-1:0]     ss_out_k,
  // crosspoint link
  output logic              link_bit,
  output logic              link_valid,
  output logic [KW-1:0]     link_dest,
  // events
  output logic [NP-1:0]     drop_full,
  output logic [NP-1:0]     drop_unknown,
  output logic              sent_own,       // slot used as pre-allocated
  output logic              sent_realloc    // slot taken over from another SCM
);
  // routing table
  logic          rt_valid [1 << CIDX];
  logic [KW-1:0] rt_sm    [1 << CIDX];

  // input assembly
  cell_t         asm_c [NP];
  logic [NP-1:0] asm_v;

  // buffer and per-SM queues
  cell_t         mem   [B];
  logic [B-1:0]  used;
  logic [EW-1:0] qm    [N][B];
  logic [EW-1:0] qh    [N];
  logic [EW-1:0] qt    [N];
  logic [CW-1:0] qc    [N];
  logic [CW-1:0] pend  [N];
  logic [N-1:0]  cbs;
  always_comb for (int m = 0; m < N; m++) cbs[m] = (qc[m] > pend[m]);

  // schedules
  logic [N-1:0]  nx_v,  cu_v;
  logic [KW-1:0] nx_sm [N];
  logic [KW-1:0] cu_sm [N];

  // scheduling step of this slot
  logic [N-1:0]  st_in, st_out, st_claim;
  logic [KW-1:0] st_k;
  assign st_in = (tslot == '0) ? '0 : ss_in;
  assign st_k  = (tslot == '0) ? scm_id : ss_in_k;

  ss_update #(.N(N)) u_upd (
    .ss_in(st_in), .k(st_k), .cbs, .link_used(nx_v), .ss_out(st_out), .claim(st_claim)
  );

  function automatic logic [KW-1:0] smod(logic [KW-1:0] a, int unsigned b);
    return KW'((int'(a) + b) % N);
  endfunction

  // transmitter
  cell_t txc;
  assign link_bit = link_valid && txc[bitcnt];

  // what the next slot sends
  logic          tx_v;
  logic [KW-1:0] tx_sm;
  always_comb begin
    if (tslot == KW'(N - 1)) begin
      tx_v  = nx_v[0] | st_claim[0];
      tx_sm = st_claim[0] ? st_k : nx_sm[0];
    end else begin
      tx_v  = cu_v[tslot + 1'b1];
      tx_sm = cu_sm[tslot + 1'b1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_v <= '0; used <= '0; drop_full <= '0; drop_unknown <= '0;
      for (int m = 0; m < N; m++) begin qh[m] <= '0; qt[m] <= '0; qc[m] <= '0; pend[m] <= '0; end
      for (int c = 0; c < (1 << CIDX); c++) begin rt_valid[c] <= 1'b0; rt_sm[c] <= '0; end
      nx_v <= '0; cu_v <= '0; ss_out <= '0; ss_out_k <= '0;
      link_valid <= 1'b0; link_dest <= '0; txc <= '0; sent_own <= 1'b0; sent_realloc <= 1'b0;
    end else begin
      drop_full <= '0; drop_unknown <= '0;
      // bit-serial assembly
      for (int p = 0; p < NP; p++) begin
        if (bitcnt == '0) asm_v[p] <= in_valid[p];
        asm_c[p][bitcnt] <= in_bit[p];
      end

      if (slot_end) begin
        logic [B-1:0]  u;
        logic [CW-1:0] dq  [N];   // queue length change
        logic [CW-1:0] dp  [N];   // pending change (claims)
        logic [N-1:0]  popm;
        u = used;
        popm = '0;
        for (int m = 0; m < N; m++) begin dq[m] = '0; dp[m] = '0; end

        // 1. transmit the next slot's cell, freeing its entry
        link_valid <= tx_v;
        link_dest  <= tx_sm;
        sent_own     <= tx_v && (tx_sm == smod(scm_id, (tslot == KW'(N - 1)) ? 0 : int'(tslot) + 1));
        sent_realloc <= tx_v && (tx_sm != smod(scm_id, (tslot == KW'(N - 1)) ? 0 : int'(tslot) + 1));
        if (tx_v) begin
          logic [EW-1:0] e;
          e = qm[tx_sm][qh[tx_sm]];
          txc <= mem[e];
          u[e] = 1'b0;
          qh[tx_sm] <= (qh[tx_sm] == EW'(B - 1)) ? '0 : qh[tx_sm] + 1'b1;
          popm[tx_sm] = 1'b1;
        end

        // 2. scheduling step
        ss_out   <= st_out;
        ss_out_k <= st_k;
        for (int x = 0; x < N; x++) begin
          if (st_claim[x]) begin
            nx_sm[x] <= smod(st_k, x);
            dp[smod(st_k, x)] = dp[smod(st_k, x)] + 1'b1;
          end
        end
        if (tslot == KW'(N - 1)) begin
          cu_v <= nx_v | st_claim;
          for (int x = 0; x < N; x++) cu_sm[x] <= st_claim[x] ? smod(st_k, x) : nx_sm[x];
          nx_v <= '0;
        end else begin
          nx_v <= nx_v | st_claim;
        end

        // 3. store arriving cells
        for (int p = 0; p < NP; p++) begin
          if (asm_v[p]) begin
            cell_t c;
            logic [15:0] vci;
            logic [CIDX-1:0] ci;
            c = asm_c[p];
            c[CELL_BITS-1] = in_bit[p];
            for (int i = 0; i < 16; i++) vci[15 - i] = c[VCI_POS + i];
            ci = vci[CIDX-1:0];
            if (!rt_valid[ci]) begin
              drop_unknown[p] <= 1'b1;
            end else if (&u) begin
              drop_full[p] <= 1'b1;
            end else begin
              logic [EW-1:0] e;
              logic [KW-1:0] sm;
              logic [EW-1:0] pos;
              e = '0;
              for (int i = B - 1; i >= 0; i--) if (!u[i]) e = EW'(i);
              u[e] = 1'b1;
              mem[e] <= c;
              sm  = rt_sm[ci];
              pos = EW'((int'(qt[sm]) + int'(dq[sm])) % B);
              qm[sm][pos] <= e;
              dq[sm] = dq[sm] + 1'b1;
            end
          end
        end

        // 4. counters
        for (int m = 0; m < N; m++) begin
          qc[m]   <= qc[m] + dq[m] - CW'(popm[m]);
          pend[m] <= pend[m] + dp[m] - CW'(popm[m]);
          if (dq[m] != '0) qt[m] <= EW'((int'(qt[m]) + int'(dq[m])) % B);
        end
        used <= u;
      end

      if (cfg_we) begin rt_valid[cfg_idx] <= cfg_valid; rt_sm[cfg_idx] <= cfg_sm; end
    end
  end
endmodule
