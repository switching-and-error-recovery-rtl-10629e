// crosspoint: N x N space switch between the SCM links and the SM inputs.
//
// During a time-slot every SCM link either idles or carries one cell to the
// SM named by its link_dest; the distributed schedule guarantees that no two
// SCMs name the same SM in the same slot (checked by an assertion). The
// crosspoint connects SM m to the SCM that names it and tells the SM whether a
// cell arrives. The source design leaves the crosspoint's construction open;
// here it is one AND-OR selector per output. The connection pattern is set by
// the SCMs' registered link_dest, so it is stable for the whole slot.
module crosspoint #(
  parameter int unsigned N  = 128,
  localparam int unsigned KW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  link_bit,
  input  logic [N-1:0]  link_valid,
  input  logic [KW-1:0] link_dest [N],
  output logic [N-1:0]  sm_bit,
  output logic [N-1:0]  sm_valid
);
  logic [N-1:0] hit [N];     // hit[m][i]: SCM i is connected to SM m
  always_comb begin
    for (int m = 0; m < N; m++) begin
      for (int i = 0; i < N; i++) hit[m][i] = link_valid[i] && (link_dest[i] == KW'(m));
      sm_valid[m] = |hit[m];
      sm_bit[m]   = |(hit[m] & link_bit);
    end
  end

  for (genvar m = 0; m < N; m++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit[m]));
  end
endmodule
