// input_module: one input port of the shift-register switch.
//
// It holds the port's cell buffer, a bank of P cell-sized registers, and the
// logic around it:
//   * input scheduler (memory write router): when a cell starts (in_valid at
//     bit 0 of a time-slot) it picks the lowest free register and writes bit m
//     of the cell at position m of that register, one bit per clock. A cell
//     that finds no free register is lost (drop_full).
//   * input controller: as soon as the 5 header bytes are stored (bit 40) it
//     reads the header in parallel, looks the connection up in its table
//     (indexed by the low CIDX bits of the VCI), has the UPC police it, and
//     rewrites VPI/VCI (and HEC) in place. A multicast connection gets its
//     multicast identifier written into the VCI field instead (VPI = 0). OAM
//     and signalling connections are sent to the two local processor ports
//     OAM_PORT and SIG_PORT without rewriting.
//   * the address posting: the controller places the register address, its
//     destination set (selection bus), class and multicast identifier on the
//     shared address bus at bit 41 + in_id of the slot, so the NIN inputs
//     share the bus in turn (TDM).
//   * concentrator: each output module names (input, register) for the slot
//     it is sending in; this module then drives bit `bitcnt` of that register
//     on the concentrator line for that output and enables its bus driver.
//   * release: an output module pulses `clr` when it has sent the cell; the
//     register is freed when as many releases as destinations have arrived,
//     so a multicast cell is stored once and read by every destination.
// Storing the cell bit-serially in registers, header processing after five
// bytes, TDM address bus, output-driven concentrators and the release count
// for multicast follow the source design. The table layout, the look-up key,
// the lowest-free register choice and the discard of non-conforming cells are
// this design's choices.
module input_module
  import atm_pkg::*;
#(
  parameter int unsigned NOUT = 18,   // output modules, incl. the two local ports
  parameter int unsigned NIN  = 16,   // inputs sharing the address bus
  parameter int unsigned P    = 16,   // cell registers per input
  parameter int unsigned CIDX = 6,    // connection table index bits
  parameter int unsigned NQ   = 4,
  localparam int unsigned RW  = $clog2(P),
  localparam int unsigned IW  = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned QW  = $clog2(NQ),
  localparam int unsigned OAM_PORT = NOUT - 2,
  localparam int unsigned SIG_PORT = NOUT - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [BIT_W-1:0]   bitcnt,       // bit position in the current slot
  input  logic [31:0]        now,          // time-slot number
  input  logic [IW-1:0]      in_id,        // index of this input
  // line
  input  logic               in_bit,
  input  logic               in_valid,     // a cell occupies this slot
  // connection table programming
  input  logic               cfg_we,
  input  logic [CIDX-1:0]    cfg_idx,
  input  logic               cfg_valid,
  input  conn_kind_e         cfg_kind,
  input  logic [NOUT-1:0]    cfg_mask,     // destination outputs
  input  logic               cfg_mc,       // multicast connection
  input  logic [7:0]         cfg_vpi,      // outgoing VPI (unicast)
  input  logic [15:0]        cfg_vci,      // outgoing VCI, or multicast id
  input  logic [QW-1:0]      cfg_class,    // priority class
  input  logic [15:0]        cfg_inc,      // UPC increment (0 = unpoliced)
  input  logic [15:0]        cfg_lim,      // UPC limit
  // shared address bus
  output logic               post_valid,
  output logic [RW-1:0]      post_reg,
  output logic [NOUT-1:0]    post_mask,
  output logic [QW-1:0]      post_class,
  output logic               post_mc,
  output logic [15:0]        post_mcid,
  // concentrator control from the output modules
  input  logic [NOUT-1:0]    sel_active,
  input  logic [IW-1:0]      sel_in  [NOUT],
  input  logic [RW-1:0]      sel_reg [NOUT],
  output logic [NOUT-1:0]    conc_bit,     // concentrator outputs
  output logic [NOUT-1:0]    conc_en,      // bus driver enables
  // releases from the output modules
  input  logic [NOUT-1:0]    clr,
  input  logic [IW-1:0]      clr_in  [NOUT],
  input  logic [RW-1:0]      clr_reg [NOUT],
  // events
  output logic               drop_full,
  output logic               drop_upc,
  output logic               drop_unknown,
  output logic [P-1:0]       busy
);
  localparam int unsigned NCONN = 1 << CIDX;
  localparam int unsigned FW = $clog2(NOUT + 1);

  cell_t          mem     [P];
  logic [FW-1:0]  fanout  [P];
  logic [FW-1:0]  nclr    [P];

  // connection table
  logic           t_valid [NCONN];
  conn_kind_e     t_kind  [NCONN];
  logic [NOUT-1:0] t_mask [NCONN];
  logic           t_mc    [NCONN];
  logic [7:0]     t_vpi   [NCONN];
  logic [15:0]    t_vci   [NCONN];
  logic [QW-1:0]  t_class [NCONN];

  // write side
  logic           writing;
  logic [RW-1:0]  wr_reg;
  logic           pend;
  logic [RW-1:0]  pend_reg;
  logic [NOUT-1:0] pend_mask;
  logic [QW-1:0]  pend_class;
  logic           pend_mc;
  logic [15:0]    pend_mcid;

  // lowest free register
  logic           have_free;
  logic [RW-1:0]  free_reg;
  always_comb begin
    have_free = 1'b0;
    free_reg  = '0;
    for (int r = P - 1; r >= 0; r--)
      if (!busy[r]) begin have_free = 1'b1; free_reg = RW'(r); end
  end

  // header processing at bit 40 of the cell being written
  uni_hdr_t        hdr, new_hdr;
  logic [CIDX-1:0] cidx;
  logic            hdr_time;
  logic            conform;
  logic [NOUT-1:0] dmask;
  assign hdr      = get_hdr(mem[wr_reg][HDR_BITS-1:0]);
  assign cidx     = hdr.vci[CIDX-1:0];
  assign hdr_time = writing && (bitcnt == BIT_W'(HDR_BITS));

  always_comb begin
    new_hdr = hdr;
    dmask   = t_mask[cidx];
    unique case (t_kind[cidx])
      CONN_OAM:    dmask = NOUT'(1) << OAM_PORT;
      CONN_SIGNAL: dmask = NOUT'(1) << SIG_PORT;
      default: begin
        if (t_mc[cidx]) begin
          new_hdr.vpi = '0;
          new_hdr.vci = t_vci[cidx];
        end else begin
          new_hdr.vpi = t_vpi[cidx];
          new_hdr.vci = t_vci[cidx];
        end
      end
    endcase
    new_hdr = with_hec(new_hdr);
  end

  upc #(.NCONN(NCONN)) u_upc (
    .clk, .rst_n, .now,
    .cfg_we, .cfg_conn(cfg_idx), .cfg_inc, .cfg_lim,
    .check(hdr_time && t_valid[cidx]), .conn(cidx), .conform
  );

  // concentrator: bit `bitcnt` of the register each output names
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      conc_en[o]  = sel_active[o] && (sel_in[o] == in_id);
      conc_bit[o] = conc_en[o] && mem[sel_reg[o]][bitcnt];
    end
  end

  assign post_valid = pend && (bitcnt == BIT_W'(HDR_BITS + 1) + BIT_W'(in_id));
  assign post_reg   = pend_reg;
  assign post_mask  = post_valid ? pend_mask : '0;
  assign post_class = pend_class;
  assign post_mc    = pend_mc;
  assign post_mcid  = pend_mcid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0; writing <= 1'b0; wr_reg <= '0; pend <= 1'b0;
      pend_reg <= '0; pend_mask <= '0; pend_class <= '0; pend_mc <= 1'b0; pend_mcid <= '0;
      drop_full <= 1'b0; drop_upc <= 1'b0; drop_unknown <= 1'b0;
      for (int r = 0; r < P; r++) begin fanout[r] <= '0; nclr[r] <= '0; mem[r] <= '0; end
      for (int c = 0; c < NCONN; c++) begin
        t_valid[c] <= 1'b0; t_kind[c] <= CONN_USER; t_mask[c] <= '0; t_mc[c] <= 1'b0;
        t_vpi[c] <= '0; t_vci[c] <= '0; t_class[c] <= '0;
      end
    end else begin
      drop_full <= 1'b0; drop_upc <= 1'b0; drop_unknown <= 1'b0;

      // releases: count them, free the register after the last destination
      for (int r = 0; r < P; r++) begin
        logic [FW-1:0] n;
        n = '0;
        for (int o = 0; o < NOUT; o++)
          if (clr[o] && clr_in[o] == in_id && clr_reg[o] == RW'(r)) n = n + 1'b1;
        if (n != '0) begin
          if (nclr[r] + n >= fanout[r]) begin
            busy[r] <= 1'b0; nclr[r] <= '0;
          end else begin
            nclr[r] <= nclr[r] + n;
          end
        end
      end

      // memory write router
      if (bitcnt == '0) begin
        writing <= 1'b0;
        if (in_valid) begin
          if (have_free) begin
            writing <= 1'b1;
            wr_reg  <= free_reg;
            busy[free_reg]   <= 1'b1;
            nclr[free_reg]   <= '0;
            fanout[free_reg] <= '0;
            mem[free_reg][0] <= in_bit;
          end else begin
            drop_full <= 1'b1;
          end
        end
      end else if (writing) begin
        mem[wr_reg][bitcnt] <= in_bit;
        if (bitcnt == BIT_W'(CELL_BITS - 1)) writing <= 1'b0;
      end

      // input controller
      if (hdr_time) begin
        if (!t_valid[cidx]) begin
          drop_unknown <= 1'b1;
          busy[wr_reg] <= 1'b0;
          writing      <= 1'b0;
        end else if (!conform) begin
          drop_upc     <= 1'b1;
          busy[wr_reg] <= 1'b0;
          writing      <= 1'b0;
        end else begin
          if (t_kind[cidx] == CONN_USER) mem[wr_reg][HDR_BITS-1:0] <= put_hdr(new_hdr);
          fanout[wr_reg] <= FW'($countones(dmask));
          pend       <= 1'b1;
          pend_reg   <= wr_reg;
          pend_mask  <= dmask;
          pend_class <= t_class[cidx];
          pend_mc    <= t_mc[cidx] && (t_kind[cidx] == CONN_USER);
          pend_mcid  <= t_vci[cidx];
          if (dmask == '0) busy[wr_reg] <= 1'b0;
        end
      end
      if (post_valid) pend <= 1'b0;

      if (cfg_we) begin
        t_valid[cfg_idx] <= cfg_valid; t_kind[cfg_idx] <= cfg_kind; t_mask[cfg_idx] <= cfg_mask;
        t_mc[cfg_idx] <= cfg_mc; t_vpi[cfg_idx] <= cfg_vpi; t_vci[cfg_idx] <= cfg_vci;
        t_class[cfg_idx] <= cfg_class;
      end
    end
  end

  // the TDM post must fit in the slot
  initial assert (HDR_BITS + 1 + NIN < CELL_BITS);
endmodule
