// Full-size testbench of terabit_switch: the switch with its default
// parameters (128 SCMs and 128 SMs, 4 ports each), run through the same
// end-to-end test as the reduced one with fewer cells.
module terabit_full_tb;
  int checks, failures;
  bit done;
  terabit_tb_body #(.FULL(1), .N(128), .NP(4), .NRND(3), .NISO(2)) body (.checks, .failures, .done);
  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(64'd100_000_000_000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
