// slot_timer: common time base of the switch.
//
// Cells travel bit-serially, one bit per clock, and all cell boundaries are
// aligned: a time-slot is the 424 clocks one cell takes. bitcnt gives the bit
// position inside the current slot (0..423), slot_end marks its last clock and
// now counts time-slots since reset. Aligned cell starts on all ports are an
// assumption the source design also makes for its write router.
module slot_timer
  import atm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output logic [BIT_W-1:0] bitcnt,
  output logic             slot_end,
  output logic [31:0]      now
);
  assign slot_end = (bitcnt == BIT_W'(CELL_BITS - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0; now <= '0;
    end else if (slot_end) begin
      bitcnt <= '0; now <= now + 1'b1;
    end else begin
      bitcnt <= bitcnt + 1'b1;
    end
  end
endmodule
