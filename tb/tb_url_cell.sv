// tb_url_cell -- end-to-end, self-checking testbench for the URL cell model
// at its default (measured) delays.
//
// Phase 1 replays the transient experiment the cell was characterised with:
// four 0 V -> 1 V pulse sources, all with a 50 ns period, 1 ns rise and fall
// and no start delay, with high widths A 20 ns, B 30 ns, C 40 ns, D 20 ns,
// run for 1 us (20 periods). A logic edge is placed at the 50 % point of each
// ramp, so an input is high from 0.5 ns to W + 1.5 ns of each period. This
// yields the vectors abcd = 1111, 0110, 0010, 0000 in every period, which
// toggle all four outputs, and a 9 ns NOR pulse on S and a 10 ns XOR pulse on
// Q that are shorter than the delays and must still come through.
// Phase 2 walks all 16 input vectors, 50 ns each, and checks the settled
// outputs against a hand-written truth table.
//
// Checking: every input change is logged with its time. Each output edge must
// land exactly T (its delay, 1 ps tolerance) after a logged input change, with
// the value the reference equations give for the inputs of that moment. At
// the end, the number of edges seen on each output must equal the number of
// changes of its reference function, and S must have pulsed 20 times in
// phase 1. Each output (pass, XOR, NAND, NOR) must have switched at least once.
module tb_url_cell;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T_P = 28.831;
  localparam realtime T_Q = 28.831;
  localparam realtime T_R = 35.894;
  localparam realtime T_S = 31.056;
  localparam realtime TOL = 0.001;
  localparam realtime PERIOD = 50.0;
  localparam int      N_PERIODS = 20;
  //  abcd: 1111 1110 1101 1100 1011 1010 1001 1000 0111 ... 0000
  localparam logic [63:0] TRUTH = 64'h88AB_EEEF_4467_2223;

  logic a, b, c, d, p, q, r, s;
  int checks = 0;
  int failures = 0;
  logic phase1_on = 1'b1;

  url_cell dut (.*);

  // ---------------- reference ----------------
  function automatic logic ref_out(input int k, input logic [3:0] v);
    logic va, vb, vc, vd;
    {va, vb, vc, vd} = v;
    case (k)
      0:       return va;
      1:       return va != vb;
      2:       return !(vb && vc);
      default: return !(vc || vd);
    endcase
  endfunction

  function automatic realtime delay_of(input int k);
    case (k)
      0:       return T_P;
      1:       return T_Q;
      2:       return T_R;
      default: return T_S;
    endcase
  endfunction

  // ---------------- input history ----------------
  realtime    hist_t[$];
  logic [3:0] hist_v[$];

  always @(a or b or c or d) begin
    if (hist_t.size() > 0 && hist_t[hist_t.size()-1] == $realtime)
      hist_v[hist_v.size()-1] = {a, b, c, d};
    else begin
      hist_t.push_back($realtime);
      hist_v.push_back({a, b, c, d});
    end
  end

  // ---------------- output edge checker ----------------
  int edges[4];
  int s_pulses_phase1;
  localparam realtime FIRST_CHANGE = 0.5;  // first stimulus edge after t = 0

  task automatic check_edge(input int k, input logic val);
    realtime t_in;
    int idx;
    if ($realtime <= delay_of(k) + FIRST_CHANGE - TOL) return;  // start-up settling
    t_in = $realtime - delay_of(k);
    idx = -1;
    foreach (hist_t[i]) if (hist_t[i] <= t_in + TOL) idx = i;
    edges[k]++;
    checks++;
    if (idx < 0 || (t_in - hist_t[idx]) > TOL || (hist_t[idx] - t_in) > TOL) begin
      failures++;
      $display("FAIL output %0d edge at %0t has no input change %0.3f ns earlier",
               k, $realtime, delay_of(k));
    end else if (val !== ref_out(k, hist_v[idx])) begin
      failures++;
      $display("FAIL output %0d = %b at %0t, expected %b for abcd=%b",
               k, val, $realtime, ref_out(k, hist_v[idx]), hist_v[idx]);
    end
  endtask

  always @(p) check_edge(0, p);
  always @(q) check_edge(1, q);
  always @(r) check_edge(2, r);
  always @(s) begin
    check_edge(3, s);
    if (s && phase1_on && $realtime > FIRST_CHANGE + T_S) s_pulses_phase1++;
  end

  // ---------------- watchdog ----------------
  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- pulse sources (phase 1) ----------------
  task automatic pulse_source(ref logic x, input realtime width);
    repeat (N_PERIODS) begin
      #0.5 x = 1'b1;
      #(width + 1.0) x = 1'b0;
      #(PERIOD - width - 1.5);
    end
  endtask

  initial begin
    int exp_edges[4];
    int n_end;
    realtime t_end;

    $timeformat(-9, 3, " ns", 0);
    {a, b, c, d} = 4'b0000;
    s_pulses_phase1 = 0;
    fork
      pulse_source(a, 20.0);
      pulse_source(b, 30.0);
      pulse_source(c, 40.0);
      pulse_source(d, 20.0);
    join
    #(PERIOD);  // let the last edges of phase 1 come through
    phase1_on = 1'b0;

    // ---------------- phase 2: all 16 vectors ----------------
    for (int i = 0; i < 16; i++) begin
      logic [3:0] v;
      v = 4'(i ^ (i >> 1));  // Gray order
      {a, b, c, d} = v;
      #(PERIOD - 1.0);
      checks++;
      if ({p, q, r, s} !== TRUTH[4*v +: 4]) begin
        failures++;
        $display("FAIL settled abcd=%b pqrs=%b expected %b", v, {p, q, r, s}, TRUTH[4*v +: 4]);
      end
      #1.0;
    end
    #(PERIOD);
    t_end = $realtime;

    // ---------------- edge counts ----------------
    for (int k = 0; k < 4; k++) begin
      exp_edges[k] = 0;
      for (int i = 1; i < hist_t.size(); i++)
        if (hist_t[i] + delay_of(k) < t_end &&
            ref_out(k, hist_v[i]) != ref_out(k, hist_v[i-1])) exp_edges[k]++;
      checks++;
      if (edges[k] != exp_edges[k]) begin
        failures++;
        $display("FAIL output %0d: %0d edges seen, %0d expected", k, edges[k], exp_edges[k]);
      end
      checks++;
      if (edges[k] == 0) begin
        failures++;
        $display("FAIL output %0d never switched", k);
      end
    end
    n_end = s_pulses_phase1;
    checks++;
    if (n_end != N_PERIODS) begin
      failures++;
      $display("FAIL %0d NOR pulses on S in phase 1, expected %0d", n_end, N_PERIODS);
    end
    $display("edges: P(pass)=%0d Q(XOR)=%0d R(NAND)=%0d S(NOR)=%0d; S pulses in phase 1=%0d",
             edges[0], edges[1], edges[2], edges[3], n_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
