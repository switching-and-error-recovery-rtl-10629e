// Self-checking testbench for ss_update: random vectors for N = 8 and the
// default N = 128, compared bit by bit with a reference computed here.
module ss_update_tb;
  int checks = 0, failures = 0;

  logic [7:0] a_in, a_cbs, a_used, a_out, a_claim; logic [2:0] a_k;
  logic [127:0] b_in, b_cbs, b_used, b_out, b_claim; logic [6:0] b_k;

  ss_update #(.N(8)) u8 (.ss_in(a_in), .k(a_k), .cbs(a_cbs), .link_used(a_used), .ss_out(a_out), .claim(a_claim));
  ss_update u128 (.ss_in(b_in), .k(b_k), .cbs(b_cbs), .link_used(b_used), .ss_out(b_out), .claim(b_claim));

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [7:0] ec;
      logic [127:0] bc;
      a_in = 8'($urandom); a_cbs = 8'($urandom); a_used = 8'($urandom); a_k = 3'($urandom);
      b_in = {4{$urandom}}; b_cbs = {4{$urandom}}; b_used = {4{$urandom}}; b_k = 7'($urandom);
      #1;
      for (int x = 0; x < 8; x++) ec[x] = !a_in[x] && a_cbs[(a_k + x) & 7] && !a_used[x];
      for (int x = 0; x < 128; x++) bc[x] = !b_in[x] && b_cbs[(b_k + x) & 127] && !b_used[x];
      checks += 4;
      if (a_claim !== ec) begin failures++; $display("FAIL N=8 claim %b exp %b", a_claim, ec); end
      if (a_out !== (a_in | ec)) begin failures++; $display("FAIL N=8 ss_out"); end
      if (b_claim !== bc) begin failures++; $display("FAIL N=128 claim"); end
      if (b_out !== (b_in | bc)) begin failures++; $display("FAIL N=128 ss_out"); end
    end
    // own pre-allocation: empty SS, idle link -> slot x goes to SM k+x
    a_in = '0; a_used = '0; a_k = 3; a_cbs = 8'b0001_0000; #1;
    checks++;
    if (a_claim !== 8'b0000_0010) begin failures++; $display("FAIL own slot for SM4 from k=3: %b", a_claim); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
