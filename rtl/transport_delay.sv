// transport_delay -- behavioural model (not synthesizable): one-bit transport delay.
//
// Every change of `din` reappears on `dout` exactly DELAY later, however short
// the pulse that caused it, the way a SPICE-measured propagation delay is read.
// A plain `#` on a continuous assignment is inertial and would swallow pulses
// shorter than the delay, so each input change forks its own process that
// holds the new value and writes it to `dout` after DELAY. DELAY is in
// nanoseconds with picosecond resolution. Used by url_cell to give each output
// of the URL gate its own measured delay. `dout` starts at 0 and is only
// meaningful from DELAY after the first change of `din`.
module transport_delay #(
  parameter realtime DELAY = 1.0
) (
  input  logic din,
  output logic dout
);
  timeunit 1ns;
  timeprecision 1ps;

  initial dout = 1'b0;

  always @(din) begin
    fork
      automatic logic v = din;
      #(DELAY) dout = v;
    join_none
  end
endmodule
