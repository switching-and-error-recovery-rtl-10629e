// ss_update: one step of the distributed routing algorithm of the space-switch
// fabric, as done by one switching controller module (SCM).
//
// A scheduled-cell-status vector SS_k has N bits, one per time-slot of the
// next switching cycle; bit x stands for the crosspoint path into switching
// module SM_{(k+x) mod N} during slot x, and a 1 means that path is taken.
// SCM j, on receiving SS_k, takes every free slot x for which
//   * its cell-buffer status CBS says it holds an unscheduled cell for
//     SM_{(k+x) mod N}, and
//   * its own link into the crosspoint is still idle in slot x
//     (an SCM sends at most one cell per slot).
// All N bits are updated in parallel; `claim` lists the slots taken in this
// step, and the caller marks its link busy in those slots. Starting from an
// all-zero SS with k = j and an idle link, the same logic yields the SCM's
// own pre-allocated slots (slot x to SM_{(j+x) mod N}).
//
// The vector layout, the bit meanings, the parallel update and the per-bit
// combination of "bit x of SS_k" with "CBS bit for SM_{(k+x) mod N}" follow
// the source design; the idle-link condition is the one-cell-per-slot rule of
// the same design made explicit. Purely combinational.
module ss_update #(
  parameter int unsigned N  = 128,
  localparam int unsigned KW = $clog2(N)
) (
  input  logic [N-1:0]  ss_in,      // SS_k as received (1 = slot taken)
  input  logic [KW-1:0] k,          // owner index of the vector
  input  logic [N-1:0]  cbs,        // cbs[m]: unscheduled cell for SM m
  input  logic [N-1:0]  link_used,  // this SCM already sends in slot x
  output logic [N-1:0]  ss_out,
  output logic [N-1:0]  claim
);
  // cbs_rot[x] = cbs[(k + x) mod N]
  logic [N-1:0] cbs_rot;
  always_comb begin
    for (int x = 0; x < N; x++) begin
      int unsigned m;
      m = (int'(k) + x) % N;
      cbs_rot[x] = cbs[m];
    end
  end
  assign claim  = ~ss_in & cbs_rot & ~link_used;
  assign ss_out = ss_in | claim;
endmodule
