// Self-checking testbench for window_sched.
// 1) All four queues always backlogged: each window of 10 slots must serve
//    4, 3, 2 and 1 cells in priority order (0,0,0,0,1,1,1,2,2,3).
// 2) Random D flags: the grant is compared with a reference model of the
//    window rule kept in the testbench.
// 3) Queue 0 has used its allowance and queue 1 is empty of allowance too:
//    a lower queue with allowance is served first; with no lower queue able to
//    send, queue 0 is served beyond its allowance.
module window_sched_tb;
  localparam int NQ = 4;
  logic clk = 0, rst_n = 0, slot = 0;
  logic [NQ-1:0] d, grant, w_flag;
  logic window_start;
  int checks = 0, failures = 0;

  window_sched dut (.clk, .rst_n, .slot, .d, .grant, .w_flag, .window_start);

  always #5 clk = ~clk;

  // reference model
  int mw [NQ];
  int mpos;
  function automatic logic [NQ-1:0] model_grant(logic [NQ-1:0] dd);
    for (int i = 0; i < NQ; i++) begin
      bit lower = 0;
      for (int j = i + 1; j < NQ; j++) if (dd[j] && mw[j] > 0) lower = 1;
      if (dd[i] && (mw[i] > 0 || !lower)) return NQ'(1) << i;
    end
    return '0;
  endfunction
  task automatic model_step(logic [NQ-1:0] g);
    if (mpos == 9) begin
      mpos = 0; mw = '{4, 3, 2, 1};
    end else begin
      mpos++;
      for (int i = 0; i < NQ; i++) if (g[i] && mw[i] > 0) mw[i]--;
    end
  endtask

  task automatic do_slot(logic [NQ-1:0] dd, output logic [NQ-1:0] g);
    logic [NQ-1:0] exp;
    d = dd; slot = 1;
    #1;
    exp = model_grant(dd);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL d=%b grant=%b expected=%b", dd, grant, exp);
    end
    g = grant;
    @(posedge clk); #1;
    model_step(exp);
    slot = 0;
  endtask

  initial begin
    int seq [10] = '{0,0,0,0,1,1,1,2,2,3};
    logic [NQ-1:0] g;
    int cnt [NQ];
    d = '0;
    mw = '{4, 3, 2, 1}; mpos = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // 1) backlogged window
    for (int w = 0; w < 3; w++) begin
      for (int s = 0; s < 10; s++) begin
        do_slot(4'b1111, g);
        checks++;
        if (g !== (4'(1) << seq[s])) begin
          failures++;
          $display("FAIL backlog window %0d slot %0d grant=%b", w, s, g);
        end
      end
    end
    // 2) random flags against the model
    for (int n = 0; n < 2000; n++) begin
      do_slot(4'($urandom), g);
    end
    // 3) allowance exhausted: reach a window start, then queue 0 alone
    while (mpos != 0) do_slot(4'b0000, g);
    for (int i = 0; i < NQ; i++) cnt[i] = 0;
    for (int s = 0; s < 10; s++) begin
      do_slot(4'b0001, g);
      if (g[0]) cnt[0]++;
    end
    checks++;
    if (cnt[0] != 10) begin
      failures++;
      $display("FAIL queue 0 alone got %0d of 10 slots", cnt[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
