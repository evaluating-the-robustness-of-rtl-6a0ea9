// tb_sttl_sequencer: self-checking test of the clocked STTL sequencer.
// The sequencer drives a real STTL DES sub-module whose outputs reach it
// through a 37 ns delay, standing for the asynchronous computation time.
// The test loads two sub-keys and runs all 64 plaintexts under each, and
// checks the result against S-box 1 of (plaintext XOR key), that result_err
// stays low, that eval_cycles is the same for every run, that the inputs
// follow the protocol (validity rises only over settled data rails and
// falls only after they were released), that an unknown command code is
// ignored and that a command arriving while busy is reported as dropped.
`timescale 1ns/1ps
module tb_sttl_sequencer;
  import sttl_pkg::*;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  logic        clk = 1'b0;
  logic        rst_n;
  logic [7:0]  cmd_data;
  logic        cmd_valid;
  sttl_t [5:0] p, k, p_q, k_q;
  sttl_t [3:0] s_raw, s_del;
  logic [5:0]  key;
  logic [3:0]  result;
  logic        result_valid, result_err, busy, cmd_dropped;
  logic [15:0] eval_cycles;
  int checks = 0;
  int failures = 0;
  int n_results = 0, n_dropped = 0, n_proto_err = 0;
  logic [3:0] last_result;
  logic [15:0] first_eval;
  logic primed = 1'b0;

  sttl_sequencer #(.SETUP_CYCLES(2)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_data(cmd_data), .cmd_valid(cmd_valid),
    .p(p), .k(k), .s(s_del), .key(key), .result(result),
    .result_valid(result_valid), .result_err(result_err),
    .eval_cycles(eval_cycles), .busy(busy), .cmd_dropped(cmd_dropped)
  );

  sttl_des_submodule u_sub (.p(p), .k(k), .s(s_raw));
  assign #37 s_del = s_raw;

  always #5 clk = ~clk;

  // Protocol monitor on the sub-module inputs.
  always @(posedge clk) begin
    p_q <= p;
    k_q <= k;
    primed <= rst_n;
    if (primed) for (int i = 0; i < 6; i++) begin
      if (p[i].v && !p_q[i].v && (!(p[i].r1 ^ p[i].r0) || p[i][1:0] != p_q[i][1:0])) n_proto_err++;
      if (k[i].v && !k_q[i].v && (!(k[i].r1 ^ k[i].r0) || k[i][1:0] != k_q[i][1:0])) n_proto_err++;
      if (!p[i].v && p_q[i].v && p_q[i][1:0] != 2'b00) n_proto_err++;
      if (!k[i].v && k_q[i].v && k_q[i][1:0] != 2'b00) n_proto_err++;
    end
    if (result_valid) begin n_results++; last_result = result; end
    if (cmd_dropped) n_dropped++;
  end

  task automatic send(input logic [7:0] d);
    @(posedge clk);
    cmd_data <= d;
    cmd_valid <= 1'b1;
    @(posedge clk);
    cmd_valid <= 1'b0;
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kvals [2] = '{6'd10, 6'd57};
    cmd_data = '0; cmd_valid = 1'b0; rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    check(!busy && p == {6{STTL_SPACER}} && k == {6{STTL_SPACER}}, "not idle at spacer after reset");
    for (int kk = 0; kk < 2; kk++) begin
      send(8'h40 | 8'(kvals[kk]));
      repeat (2) @(posedge clk);
      check(key == 6'(kvals[kk]), "key not loaded");
      for (int pv = 0; pv < 64; pv++) begin
        int nr, ev;
        logic [5:0] xv;
        xv = 6'(pv ^ kvals[kk]);
        ev = S1[2 * xv[5] + xv[0]][xv[4:1]];
        nr = n_results;
        send(8'(pv));
        wait (n_results == nr + 1);
        @(posedge clk);
        check(last_result == 4'(ev), $sformatf("k=%0d p=%0d got %0d expected %0d",
                                               kvals[kk], pv, last_result, ev));
        check(!result_err, "result_err set");
        if (kk == 0 && pv == 0) first_eval = eval_cycles;
        check(eval_cycles == first_eval, $sformatf("eval_cycles %0d differs from %0d",
                                                   eval_cycles, first_eval));
        wait (!busy);
        check(s_del == {4{STTL_SPACER}}, "outputs not at spacer when idle");
      end
    end
    // Expected evaluation time: 37 ns delay plus the synchroniser, in 10 ns cycles.
    check(first_eval >= 5 && first_eval <= 7, $sformatf("eval_cycles %0d out of range", first_eval));
    // Unknown command code: no run, key unchanged.
    begin
      int nr;
      nr = n_results;
      send(8'hc5);
      repeat (30) @(posedge clk);
      check(n_results == nr && key == 6'd57 && !busy, "unknown command acted upon");
    end
    // Command while busy.
    begin
      int nd, nr;
      nd = n_dropped; nr = n_results;
      send(8'd3);
      send(8'd4);
      repeat (40) @(posedge clk);
      check(n_dropped == nd + 1, "command during a run not reported");
      check(n_results == nr + 1, "dropped command was executed");
    end
    check(n_proto_err == 0, $sformatf("%0d protocol violations at the sub-module inputs", n_proto_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
