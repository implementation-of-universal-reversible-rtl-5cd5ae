// url_cell -- behavioural model (not synthesizable) of the URL gate as a
// 130 nm CMOS cell with its measured propagation delays. Top of the design.
//
// The logic comes from url_gate (p = a, q = a ^ b, r = ~(b & c),
// s = ~(c | d)); each output then passes through its own transport delay, so
// a change on an input shows on an affected output exactly T_* later, and
// pulses shorter than the delay are kept rather than filtered. The default
// delays are the per-output values measured on the transistor-level cell
// at a 1 V supply: P 28.831 ns, Q 28.831 ns, R 35.894 ns, S 31.056 ns. The
// model does not capture power (5.2076 nW was measured on the cell), slopes,
// voltage levels or load dependence; the delays are fixed and the same for
// rising and falling edges, which is this model's own simplification.
//
// Interface: four one-bit inputs a..d and four one-bit outputs p..s, the
// cell's pins A..D and P..S. No clock, no reset. Outputs read 0 until the
// delay after time zero has passed. For synthesis, use url_gate.
module url_cell #(
  parameter realtime T_P = 28.831,  // ns, A -> P
  parameter realtime T_Q = 28.831,  // ns, A/B -> Q (XOR)
  parameter realtime T_R = 35.894,  // ns, B/C -> R (NAND)
  parameter realtime T_S = 31.056   // ns, C/D -> S (NOR)
) (
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

  logic p0, q0, r0, s0;  // zero-delay logic outputs

  url_gate u_logic (
    .a(a), .b(b), .c(c), .d(d),
    .p(p0), .q(q0), .r(r0), .s(s0)
  );

  transport_delay #(.DELAY(T_P)) u_dly_p (.din(p0), .dout(p));
  transport_delay #(.DELAY(T_Q)) u_dly_q (.din(q0), .dout(q));
  transport_delay #(.DELAY(T_R)) u_dly_r (.din(r0), .dout(r));
  transport_delay #(.DELAY(T_S)) u_dly_s (.din(s0), .dout(s));
endmodule
