// Self-checking testbench for crosspoint (N = 8): random conflict-free
// connection patterns (a random permutation, some links idle) with random
// bits; each SM output is compared with the SCM that names it.
module crosspoint_tb;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] link_bit = '0, link_valid = '0, sm_bit, sm_valid;
  logic [2:0] link_dest [N] = '{default: '0};
  int checks = 0, failures = 0;
  crosspoint #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    int perm [N];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(0, i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < N; i++) begin
        link_dest[i] = 3'(perm[i]); link_valid[i] = 1'($urandom_range(0, 3) != 0); link_bit[i] = 1'($urandom);
      end
      #1;
      for (int m = 0; m < N; m++) begin
        logic ev, eb;
        ev = 0; eb = 0;
        for (int i = 0; i < N; i++) if (perm[i] == m && link_valid[i]) begin ev = 1; eb = link_bit[i]; end
        checks++;
        if (sm_valid[m] !== ev || sm_bit[m] !== eb) begin failures++; $display("FAIL SM %0d", m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
