// tb_url_gate -- self-checking testbench for url_gate.
//
// Applies all 16 input vectors in counting order, then 200 pseudo-random
// vectors, and compares each output against a hand-written truth table,
// TRUTH, whose nibble i holds the expected {p,q,r,s} for input {a,b,c,d} = i.
// The table was worked out by hand from p = a, q = a xor b, r = b nand c and
// s = c nor d. It also confirms the two input pairs that collide on the same
// output vector (the mapping is not one-to-one). The gate is combinational,
// so outputs are sampled 1 ns after each input change.
module tb_url_gate;
  timeunit 1ns;
  timeprecision 1ps;

  //  abcd: 1111 1110 1101 1100 1011 1010 1001 1000 0111 ... 0000
  localparam logic [63:0] TRUTH = 64'h88AB_EEEF_4467_2223;

  logic a, b, c, d, p, q, r, s;
  int checks = 0;
  int failures = 0;

  url_gate dut (.*);

  task automatic apply_and_check(input logic [3:0] v);
    logic [3:0] exp;
    {a, b, c, d} = v;
    #1;
    exp = TRUTH[4*v +: 4];
    checks++;
    if ({p, q, r, s} !== exp) begin
      failures++;
      $display("FAIL abcd=%b pqrs=%b expected %b", v, {p, q, r, s}, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] pqrs_a, pqrs_b;
    for (int i = 0; i < 16; i++) apply_and_check(4'(i));
    for (int i = 0; i < 200; i++) apply_and_check(4'($urandom_range(15)));

    // Non-injective cases: 0001 and 0010 give the same outputs, as do
    // 0110 and 0111.
    {a, b, c, d} = 4'b0001; #1 pqrs_a = {p, q, r, s};
    {a, b, c, d} = 4'b0010; #1 pqrs_b = {p, q, r, s};
    checks++;
    if (pqrs_a !== pqrs_b || pqrs_a !== 4'b0010) begin
      failures++;
      $display("FAIL collision 0001/0010: %b %b", pqrs_a, pqrs_b);
    end
    {a, b, c, d} = 4'b0110; #1 pqrs_a = {p, q, r, s};
    {a, b, c, d} = 4'b0111; #1 pqrs_b = {p, q, r, s};
    checks++;
    if (pqrs_a !== pqrs_b || pqrs_a !== 4'b0100) begin
      failures++;
      $display("FAIL collision 0110/0111: %b %b", pqrs_a, pqrs_b);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
