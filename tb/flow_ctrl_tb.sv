// Self-checking testbench for flow_ctrl: queue 0 unregulated, queue 1
// credit-based (grants of 3, then drained), queue 2 rate-based (one credit per
// 4 slots), queue 3 credit-based with saturation at the counter maximum.
module flow_ctrl_tb;
  localparam int NQ = 4;
  logic clk = 0, rst_n = 0, slot = 0;
  logic cfg_we = 0; logic [1:0] cfg_q = 0; logic [1:0] cfg_mode = 0; logic [15:0] cfg_interval = 0;
  logic credit_add = 0; logic [1:0] credit_q = 0; logic [7:0] credit_n = 0;
  logic [NQ-1:0] consume = 0, has_credit;
  int checks = 0, failures = 0;

  flow_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask
  task automatic cfg(int q, int m, int iv);
    cfg_we = 1; cfg_q = 2'(q); cfg_mode = 2'(m); cfg_interval = 16'(iv);
    @(posedge clk); #1 cfg_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check("q0 off has credit", has_credit[0], 1);
    cfg(1, 1, 0); cfg(2, 2, 4); cfg(3, 1, 0);
    check("q1 empty", has_credit[1], 0);
    check("q2 empty", has_credit[2], 0);
    // grant 3 credits to queue 1, send 3 cells, the fourth finds no credit
    credit_add = 1; credit_q = 1; credit_n = 3; @(posedge clk); #1 credit_add = 0;
    for (int i = 0; i < 3; i++) begin
      check("q1 credit before send", has_credit[1], 1);
      consume = 4'b0010; @(posedge clk); #1 consume = 0;
    end
    check("q1 drained", has_credit[1], 0);
    // queue 0 unregulated keeps its credit while sending
    consume = 4'b0001; @(posedge clk); #1 consume = 0;
    check("q0 still credit", has_credit[0], 1);
    // rate mode: one credit per 4 slots
    for (int s = 0; s < 3; s++) begin slot = 1; @(posedge clk); #1 slot = 0; end
    check("q2 no credit after 3 slots", has_credit[2], 0);
    slot = 1; @(posedge clk); #1 slot = 0;
    check("q2 credit after 4 slots", has_credit[2], 1);
    consume = 4'b0100; @(posedge clk); #1 consume = 0;
    check("q2 used", has_credit[2], 0);
    // saturation: two grants of 200 leave 255 credits
    credit_q = 3; credit_n = 200; credit_add = 1; @(posedge clk); @(posedge clk); #1 credit_add = 0;
    for (int i = 0; i < 255; i++) begin consume = 4'b1000; @(posedge clk); #1; end
    consume = 0;
    check("q3 saturated at 255", has_credit[3], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
