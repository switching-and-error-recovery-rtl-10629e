// shared_bus: the switching module of the shift-register switch.
//
// A bus with one line per output module. Line o can be driven by the o-th
// concentrator output of every input module, each through its own three-state
// driver; the output module that owns line o enables exactly one of them for
// the cell it is fetching. Three-state drivers are modelled here as an
// AND-OR selection over the enables, which is the same function when at most
// one driver per line is enabled; the enclosing switch asserts that rule
// at every clock.
// Purely combinational.
module shared_bus #(
  parameter int unsigned NIN  = 16,
  parameter int unsigned NOUT = 18
) (
  input  logic [NOUT-1:0] conc_bit [NIN],
  input  logic [NOUT-1:0] conc_en  [NIN],
  output logic [NOUT-1:0] line
);
  always_comb begin
    line = '0;
    for (int i = 0; i < NIN; i++) line = line | (conc_bit[i] & conc_en[i]);
  end

endmodule
