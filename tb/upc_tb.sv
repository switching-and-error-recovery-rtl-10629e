// Self-checking testbench for upc: a contract of one cell per 4 slots with a
// slack of 2 slots, checked against an independent model of the virtual
// scheduling rule for random arrival patterns; an unpoliced connection must
// always conform.
module upc_tb;
  logic clk = 0, rst_n = 0;
  logic [31:0] now = 0;
  logic cfg_we = 0; logic [5:0] cfg_conn = 0; logic [15:0] cfg_inc = 0, cfg_lim = 0;
  logic check = 0; logic [5:0] conn = 0; logic conform;
  int checks = 0, failures = 0, nviol = 0;
  longint mtat;

  upc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    now = 100;
    cfg_we = 1; cfg_conn = 7; cfg_inc = 4; cfg_lim = 2; @(posedge clk); #1 cfg_we = 0;
    mtat = 100;
    for (int n = 0; n < 3000; n++) begin
      bit exp;
      now = now + 32'($urandom_range(0, 6));
      conn = 7; check = 1; #1;
      exp = (mtat <= longint'(now) + 2);
      checks++;
      if (conform !== exp) begin failures++; $display("FAIL t=%0d tat=%0d conform=%0d", now, mtat, conform); end
      if (exp) mtat = ((mtat > now) ? mtat : now) + 4; else nviol++;
      @(posedge clk); #1 check = 0;
      // unpoliced connection 3 always conforms
      conn = 3; #1;
      checks++;
      if (conform !== 1) begin failures++; $display("FAIL unpoliced connection"); end
    end
    checks++;
    if (nviol == 0) begin failures++; $display("FAIL no violation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
