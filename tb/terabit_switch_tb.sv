// End-to-end testbench of terabit_switch at a reduced size (4 SCMs and 4 SMs
// of 2 ports each); the test itself is in terabit_tb_body.
module terabit_switch_tb;
  int checks, failures;
  bit done;
  terabit_tb_body #(.FULL(0), .N(4), .NP(2), .NRND(60)) body (.checks, .failures, .done);
  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(64'd400_000_000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
