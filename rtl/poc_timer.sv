// poc_timer: update-period timer of the plant-on-chip emulator.
//
// While en is high the counter runs from 0 to period-1 and pulses tick for one
// clock as it wraps, so one plant update starts every `period` clocks (a
// period of 0 behaves like 1). When en is low the counter is held at 0, and the
// first tick comes `period` clocks after en rises. The plant model only says
// that internal timers pace the update; the counter itself is this design's.
module poc_timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] period,
  output logic         tick
);

  logic [W-1:0] cnt;
  logic         wrap;

  assign wrap = (period <= W'(1)) || (cnt >= period - W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= wrap;
      cnt  <= wrap ? '0 : cnt + W'(1);
    end
  end

endmodule
