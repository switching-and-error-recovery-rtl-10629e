// upc: usage parameter control for the connections of one input port.
//
// Every connection of the port has a contract given by an increment I (the
// nominal spacing between cells, in time-slots) and a limit L (the tolerated
// burst slack). A cell that arrives at time t conforms when its theoretical
// arrival time TAT is no later than t + L; TAT then becomes max(t, TAT) + I.
// A non-conforming cell leaves TAT unchanged and is reported as violating;
// the input controller discards it. A connection whose contract has I = 0 is
// not policed.
//
// The source design places a UPC in every input module and only says that it
// checks each stored cell against the traffic contract and takes remedial
// action; the policing rule (the generic cell-rate algorithm, virtual
// scheduling form), the action (discard) and the widths are this design's
// choices. Timing: `check` with `conn` and `now` is answered combinationally
// on `conform`; the TAT of the connection is updated at the clock edge.
module upc #(
  parameter int unsigned NCONN = 64,   // connections per input port
  parameter int unsigned TW    = 32    // time / TAT width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [TW-1:0]            now,          // current time-slot number
  // contract programming (also clears the TAT)
  input  logic                     cfg_we,
  input  logic [$clog2(NCONN)-1:0] cfg_conn,
  input  logic [15:0]              cfg_inc,
  input  logic [15:0]              cfg_lim,
  // policing
  input  logic                     check,
  input  logic [$clog2(NCONN)-1:0] conn,
  output logic                     conform
);
  logic [15:0]   inc [NCONN];
  logic [15:0]   lim [NCONN];
  logic [TW-1:0] tat [NCONN];

  logic [TW-1:0] t_tat;
  logic          late;         // TAT already behind now
  assign t_tat   = tat[conn];
  assign late    = $signed(t_tat - now) <= 0;
  assign conform = (inc[conn] == '0) || late || ($signed(t_tat - now) <= $signed(TW'(lim[conn])));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCONN; c++) begin
        inc[c] <= '0; lim[c] <= '0; tat[c] <= '0;
      end
    end else begin
      if (check && conform && inc[conn] != '0)
        tat[conn] <= (late ? now : t_tat) + TW'(inc[conn]);
      if (cfg_we) begin
        inc[cfg_conn] <= cfg_inc;
        lim[cfg_conn] <= cfg_lim;
        tat[cfg_conn] <= now;
      end
    end
  end
endmodule
