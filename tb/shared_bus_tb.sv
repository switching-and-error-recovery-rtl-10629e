// Self-checking testbench for shared_bus (4 inputs, 6 lines): for random
// concentrator outputs and at most one enabled driver per line, each line
// must carry the enabled input's bit, or 0 when no driver is enabled.
module shared_bus_tb;
  localparam int NIN = 4, NOUT = 6;
  logic [NOUT-1:0] conc_bit [NIN];
  logic [NOUT-1:0] conc_en  [NIN];
  logic [NOUT-1:0] line;
  int checks = 0, failures = 0;
  shared_bus #(.NIN(NIN), .NOUT(NOUT)) dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int drv [NOUT];
      for (int i = 0; i < NIN; i++) begin conc_bit[i] = 6'($urandom); conc_en[i] = '0; end
      for (int o = 0; o < NOUT; o++) begin
        drv[o] = $urandom_range(0, NIN);   // NIN = no driver
        if (drv[o] < NIN) conc_en[drv[o]][o] = 1'b1;
      end
      #1;
      for (int o = 0; o < NOUT; o++) begin
        checks++;
        if (line[o] !== ((drv[o] < NIN) ? conc_bit[drv[o]][o] : 1'b0)) begin
          failures++; $display("FAIL line %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
