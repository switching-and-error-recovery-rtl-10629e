// sr_switch: shift-register based ATM switching module.
//
// NIN bit-serial input ports, NPORT bit-serial output ports and two local
// output ports (OAM processor, call-control processor). Every input has its
// own input_module, whose registers hold arriving cells for as long as they
// wait; every output has an output_module with per-class virtual queues of
// cell addresses and a window scheduler. Cells never move between buffers:
// each output module, once per time-slot, reaches into an input's register
// through that input's concentrator and its line of the shared bus.
//
// Control path, per cell: header stored (bit 40) -> connection look-up, UPC,
// header rewrite -> address posted on the TDM address bus with the selection
// bus naming the destination outputs (bit 41 + input number) -> virtual queue
// update -> scheduling in the last clock of the slot -> cell sent in the next
// slot -> register released. The minimum latency from the first bit in to the
// first bit out is therefore one time-slot (424 clocks).
//
// Interface: bitcnt/now come from a slot_timer shared by all modules; a cell
// starts on input i when in_valid[i] is high at bitcnt 0 and its 424 bits follow
// on in_bit[i]. out_valid[o] is high for a slot in which output o sends.
// Ports NPORT and NPORT+1 are the OAM and signalling ports; the processors
// themselves are outside this module, and they insert cells through ordinary
// input ports. Tables are written through the cfg_*, mc_* and fc_* ports.
module sr_switch
  import atm_pkg::*;
#(
  parameter int unsigned NIN    = 16,
  parameter int unsigned NPORT  = 16,
  parameter int unsigned P      = 16,
  parameter int unsigned CIDX   = 6,
  parameter int unsigned NQ     = 4,
  parameter int unsigned WEIGHT [NQ] = '{4, 3, 2, 1},
  parameter int unsigned WINDOW = 10,
  parameter int unsigned VQD    = 64,
  parameter int unsigned MCIDX  = 4,
  localparam int unsigned NOUT  = NPORT + 2,
  localparam int unsigned RW    = $clog2(P),
  localparam int unsigned IW    = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned OW    = $clog2(NOUT),
  localparam int unsigned QW    = $clog2(NQ)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BIT_W-1:0]  bitcnt,
  input  logic [31:0]       now,
  // lines
  input  logic [NIN-1:0]    in_bit,
  input  logic [NIN-1:0]    in_valid,
  output logic [NOUT-1:0]   out_bit,
  output logic [NOUT-1:0]   out_valid,
  // connection tables of the input controllers (written by call control)
  input  logic              cfg_we,
  input  logic [IW-1:0]     cfg_port,
  input  logic [CIDX-1:0]   cfg_idx,
  input  logic              cfg_valid,
  input  conn_kind_e        cfg_kind,
  input  logic [NOUT-1:0]   cfg_mask,
  input  logic              cfg_mc,
  input  logic [7:0]        cfg_vpi,
  input  logic [15:0]       cfg_vci,
  input  logic [QW-1:0]     cfg_class,
  input  logic [15:0]       cfg_inc,
  input  logic [15:0]       cfg_lim,
  // multicast translation tables of the output modules
  input  logic              mc_we,
  input  logic [OW-1:0]     mc_port,
  input  logic [MCIDX-1:0]  mc_idx,
  input  logic [7:0]        mc_vpi,
  input  logic [15:0]       mc_vci,
  // flow controllers of the output modules
  input  logic              fc_we,
  input  logic [OW-1:0]     fc_port,
  input  logic [QW-1:0]     fc_q,
  input  logic [1:0]        fc_mode,
  input  logic [15:0]       fc_interval,
  input  logic              credit_add,
  input  logic [OW-1:0]     credit_port,
  input  logic [QW-1:0]     credit_q,
  input  logic [7:0]        credit_n,
  // events
  output logic [NIN-1:0]    drop_full,
  output logic [NIN-1:0]    drop_upc,
  output logic [NIN-1:0]    drop_unknown,
  output logic [NOUT-1:0]   vq_drop,
  output logic [NQ-1:0]     grant [NOUT]
);
  // address and selection buses
  logic [NIN-1:0]  p_valid;
  logic [RW-1:0]   p_reg   [NIN];
  logic [NOUT-1:0] p_mask  [NIN];
  logic [QW-1:0]   p_class [NIN];
  logic            p_mc    [NIN];
  logic [15:0]     p_mcid  [NIN];

  logic            ab_valid;
  logic [IW-1:0]   ab_in;
  logic [RW-1:0]   ab_reg;
  logic [NOUT-1:0] sb_mask;
  logic [QW-1:0]   ab_class;
  logic            ab_mc;
  logic [15:0]     ab_mcid;
  always_comb begin
    ab_valid = 1'b0; ab_in = '0; ab_reg = '0; sb_mask = '0; ab_class = '0; ab_mc = 1'b0; ab_mcid = '0;
    for (int i = 0; i < NIN; i++) begin
      if (p_valid[i]) begin
        ab_valid = 1'b1; ab_in = IW'(i); ab_reg = p_reg[i]; sb_mask = p_mask[i];
        ab_class = p_class[i]; ab_mc = p_mc[i]; ab_mcid = p_mcid[i];
      end
    end
  end

  // concentrator control and releases from the outputs
  logic [NOUT-1:0] sel_active, clr;
  logic [IW-1:0]   sel_in  [NOUT];
  logic [RW-1:0]   sel_reg [NOUT];
  logic [IW-1:0]   clr_in  [NOUT];
  logic [RW-1:0]   clr_reg [NOUT];

  logic [NOUT-1:0] conc_bit [NIN];
  logic [NOUT-1:0] conc_en  [NIN];
  logic [NOUT-1:0] line;

  for (genvar i = 0; i < NIN; i++) begin : g_in
    logic [P-1:0] busy;
    input_module #(.NOUT(NOUT), .NIN(NIN), .P(P), .CIDX(CIDX), .NQ(NQ)) u_in (
      .clk, .rst_n, .bitcnt, .now, .in_id(IW'(i)),
      .in_bit(in_bit[i]), .in_valid(in_valid[i]),
      .cfg_we(cfg_we && cfg_port == IW'(i)), .cfg_idx, .cfg_valid, .cfg_kind, .cfg_mask,
      .cfg_mc, .cfg_vpi, .cfg_vci, .cfg_class, .cfg_inc, .cfg_lim,
      .post_valid(p_valid[i]), .post_reg(p_reg[i]), .post_mask(p_mask[i]),
      .post_class(p_class[i]), .post_mc(p_mc[i]), .post_mcid(p_mcid[i]),
      .sel_active, .sel_in, .sel_reg, .conc_bit(conc_bit[i]), .conc_en(conc_en[i]),
      .clr, .clr_in, .clr_reg,
      .drop_full(drop_full[i]), .drop_upc(drop_upc[i]), .drop_unknown(drop_unknown[i]),
      .busy
    );
  end

  shared_bus #(.NIN(NIN), .NOUT(NOUT)) u_bus (.conc_bit, .conc_en, .line);

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    output_module #(.NIN(NIN), .P(P), .NQ(NQ), .WEIGHT(WEIGHT), .WINDOW(WINDOW),
                    .VQD(VQD), .MCIDX(MCIDX)) u_out (
      .clk, .rst_n, .bitcnt,
      .post_valid(ab_valid), .post_sel(sb_mask[o]), .post_in(ab_in), .post_reg(ab_reg),
      .post_class(ab_class), .post_mc(ab_mc), .post_mcid(ab_mcid),
      .mc_we(mc_we && mc_port == OW'(o)), .mc_idx, .mc_vpi, .mc_vci,
      .fc_we(fc_we && fc_port == OW'(o)), .fc_q, .fc_mode, .fc_interval,
      .credit_add(credit_add && credit_port == OW'(o)), .credit_q, .credit_n,
      .sel_active(sel_active[o]), .sel_in(sel_in[o]), .sel_reg(sel_reg[o]),
      .clr(clr[o]), .clr_in(clr_in[o]), .clr_reg(clr_reg[o]),
      .bus_bit(line[o]), .out_bit(out_bit[o]), .out_valid(out_valid[o]),
      .grant(grant[o]), .vq_drop(vq_drop[o])
    );
  end

  // rules of the buses
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(p_valid));
  for (genvar o = 0; o < NOUT; o++) begin : g_chk
    logic [NIN-1:0] drv;
    always_comb for (int i = 0; i < NIN; i++) drv[i] = conc_en[i][o];
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv));
  end
endmodule
