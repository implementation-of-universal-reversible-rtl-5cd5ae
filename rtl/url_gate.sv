// url_gate -- logic function of the 4x4 Universal Reversible Logic (URL) gate.
//
// Four one-bit inputs (a, b, c, d) map to four one-bit outputs:
//   p = a            pass-through of a
//   q = a ^ b        XOR
//   r = ~(b & c)     NAND
//   s = ~(c | d)     NOR
// These four equations are the gate as it is defined; the module is purely
// combinational, has no clock or reset, and its outputs follow the inputs in
// zero time. Port names are the gate's own pin letters in lower case. Timing
// of the transistor-level cell is modelled separately in url_cell.
//
// Note for users: although the gate is built for reversible-logic work, the
// mapping above is not one-to-one over all 16 input vectors. For b = 0, r is
// 1 whatever c is, and for c = 1, s is 0 whatever d is, so c and d cannot
// always be recovered from the outputs (e.g. abcd = 0001 and 0010 both give
// pqrs = 0010). The module implements the equations exactly as defined.
module url_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    p = a;
    q = a ^ b;
    r = ~(b & c);
    s = ~(c | d);
  end
endmodule
