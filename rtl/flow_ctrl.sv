// flow_ctrl: credit engine of one output port.
//
// Each of the NQ virtual queues of the port owns a credit balance. A queue may
// send a cell only while its balance is non-zero; each cell sent (consume)
// takes one credit. Credits come from two sources that feed the same counter:
//   * credit-based flow control: credit_add grants n credits to a queue
//     (e.g. decoded from a resource-management cell by the caller);
//   * rate-based flow control: a configured rate is turned into credits, one
//     credit every `interval` time-slots.
// A queue in mode FC_OFF is not flow controlled and always has credit.
// After reset every queue is in FC_OFF.
//
// The single credit engine serving both schemes follows the source design;
// the per-queue granularity, the counter widths, the saturation at CMAX and
// the configuration port are this design's choices.
// Timing: has_credit is registered state; consume and credit_add take effect
// at the next clock edge; the rate timer advances on `slot`.
module flow_ctrl #(
  parameter int unsigned NQ   = 4,
  parameter int unsigned CW   = 8,      // credit counter width
  parameter int unsigned IW   = 16      // rate interval width (time-slots)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            slot,
  // configuration
  input  logic            cfg_we,
  input  logic [$clog2(NQ)-1:0] cfg_q,
  input  logic [1:0]      cfg_mode,     // 0 off, 1 credit-based, 2 rate-based
  input  logic [IW-1:0]   cfg_interval, // slots per credit in rate mode
  // credit-based grants
  input  logic            credit_add,
  input  logic [$clog2(NQ)-1:0] credit_q,
  input  logic [CW-1:0]   credit_n,
  // cells sent
  input  logic [NQ-1:0]   consume,
  output logic [NQ-1:0]   has_credit
);
  localparam logic [1:0] FC_OFF = 2'd0, FC_CREDIT = 2'd1, FC_RATE = 2'd2;
  localparam logic [CW-1:0] CMAX = '1;

  logic [1:0]    mode     [NQ];
  logic [IW-1:0] interval [NQ];
  logic [IW-1:0] timer    [NQ];
  logic [CW-1:0] bal      [NQ];

  always_comb
    for (int q = 0; q < NQ; q++) has_credit[q] = (mode[q] == FC_OFF) || (bal[q] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) begin
        mode[q] <= FC_OFF; interval[q] <= '0; timer[q] <= '0; bal[q] <= '0;
      end
    end else begin
      for (int q = 0; q < NQ; q++) begin
        logic [CW:0] nb;
        nb = {1'b0, bal[q]};
        if (mode[q] == FC_RATE && slot) begin
          if (timer[q] + 1'b1 >= interval[q]) begin
            timer[q] <= '0;
            nb = nb + 1'b1;
          end else begin
            timer[q] <= timer[q] + 1'b1;
          end
        end
        if (mode[q] == FC_CREDIT && credit_add && credit_q == $clog2(NQ)'(q)) nb = nb + credit_n;
        if (consume[q] && nb != '0 && mode[q] != FC_OFF) nb = nb - 1'b1;
        bal[q] <= (nb > {1'b0, CMAX}) ? CMAX : nb[CW-1:0];
        if (cfg_we && cfg_q == $clog2(NQ)'(q)) begin
          mode[q] <= cfg_mode; interval[q] <= cfg_interval; timer[q] <= '0; bal[q] <= '0;
        end
      end
    end
  end
endmodule
