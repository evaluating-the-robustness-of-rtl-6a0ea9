// tb_sttl_timing: data-independent firing time of a small STTL circuit.
//
// Three And2 cells (sttl_gate2) form a two-level tree: E = A.B, F = C.D,
// G = E.F.  The cells themselves have no delays, so the testbench puts the
// physical delays on the wires between them, with a LUT delay of 1 ns:
// a cell's data rails reach the next cell 3 LUTs after its inputs became
// valid (Enable C-element, minterm C-element, OR) plus a per-rail routing
// skew u, and its validity rail 5 LUTs after (the delay D).  The data
// therefore leads the validity by a window of 2 ns minus u.
//
// All four primary validity rails rise at t = 0, after the data rails.  The
// test measures when cell G fires (its data output rises).
//  - Phase 1: 300 runs, random data, every skew u drawn in [0, 1.9] ns, so
//    always inside the window: G must fire at exactly 5 ns every time and
//    give A.B.C.D.
//  - Phase 2: 300 runs with skews up to 4 ns, beyond the window: G's firing
//    time must now vary, which shows that the first result comes from the
//    validity handshake and not from the measurement.
`timescale 1ns/1ps
module tb_sttl_timing;
  import sttl_pkg::*;

  localparam realtime T_DATA  = 3ns;
  localparam realtime T_VALID = 5ns;

  sttl_t a, b, c, d;
  sttl_t e, f, g;        // cell outputs as produced
  sttl_t e_w, f_w;       // after the wire delays
  realtime u_e1, u_e0, u_f1, u_f0;
  realtime t0, t_fire;
  bit fired;
  int checks = 0;
  int failures = 0;

  sttl_gate2 u_e (.a(a),   .b(b),   .s(e));
  sttl_gate2 u_f (.a(c),   .b(d),   .s(f));
  sttl_gate2 u_g (.a(e_w), .b(f_w), .s(g));

  // Wire delays, transport style (each rail changes once per phase).
  always @(e.r1) e_w.r1 <= #(T_DATA + u_e1) e.r1;
  always @(e.r0) e_w.r0 <= #(T_DATA + u_e0) e.r0;
  always @(e.v)  e_w.v  <= #(T_VALID)       e.v;
  always @(f.r1) f_w.r1 <= #(T_DATA + u_f1) f.r1;
  always @(f.r0) f_w.r0 <= #(T_DATA + u_f0) f.r0;
  always @(f.v)  f_w.v  <= #(T_VALID)       f.v;

  always @(posedge g.r1 or posedge g.r0) begin
    if (!fired) begin
      fired  = 1'b1;
      t_fire = $realtime - t0;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  task automatic run(input realtime u_max, output realtime t_out, output bit ok);
    logic [3:0] in;
    in = 4'($urandom);
    u_e1 = u_max * $urandom_range(1000, 0) / 1000.0;
    u_e0 = u_max * $urandom_range(1000, 0) / 1000.0;
    u_f1 = u_max * $urandom_range(1000, 0) / 1000.0;
    u_f0 = u_max * $urandom_range(1000, 0) / 1000.0;
    fired = 1'b0;
    a = sttl_data(in[3]); b = sttl_data(in[2]); c = sttl_data(in[1]); d = sttl_data(in[0]);
    #10ns;
    t0 = $realtime;
    a.v = 1'b1; b.v = 1'b1; c.v = 1'b1; d.v = 1'b1;
    #20ns;
    ok = fired && (g == sttl_encode(&in));
    t_out = t_fire;
    a.r1 = 1'b0; a.r0 = 1'b0; b.r1 = 1'b0; b.r0 = 1'b0;
    c.r1 = 1'b0; c.r0 = 1'b0; d.r1 = 1'b0; d.r0 = 1'b0;
    #10ns;
    a.v = 1'b0; b.v = 1'b0; c.v = 1'b0; d.v = 1'b0;
    #20ns;
    ok = ok && (g == STTL_SPACER) && (e_w == STTL_SPACER) && (f_w == STTL_SPACER);
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t, t_min, t_max;
    bit ok;
    a = STTL_SPACER; b = STTL_SPACER; c = STTL_SPACER; d = STTL_SPACER;
    e_w = STTL_SPACER; f_w = STTL_SPACER;
    u_e1 = 0; u_e0 = 0; u_f1 = 0; u_f0 = 0;
    #10ns;
    for (int i = 0; i < 300; i++) begin
      run(1.9ns, t, ok);
      check(ok, $sformatf("run %0d: wrong result or no return to spacer", i));
      check(t == T_VALID, $sformatf("run %0d: G fired at %0.3f ns, expected %0.3f ns", i, t, T_VALID));
    end
    t_min = 1e9; t_max = 0;
    for (int i = 0; i < 300; i++) begin
      run(4ns, t, ok);
      check(ok, $sformatf("skewed run %0d: wrong result", i));
      if (t < t_min) t_min = t;
      if (t > t_max) t_max = t;
    end
    check(t_max > t_min, "firing time did not vary with skew beyond the window");
    $display("skew beyond the window: G fired between %0.3f and %0.3f ns", t_min, t_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
