// tb_sttl_des_prototype: end-to-end test of the STTL prototype at its
// default parameters (50 MHz clock, 115200 baud, five-LUT validity delay).
// A serial-line model sends command bytes as the controlling PC would:
// sub-key 10, the 64 plaintexts, sub-key 57, the 64 plaintexts again (each
// run is one spacer -> valid -> spacer transition of the STTL sub-module),
// one byte with a broken stop bit and one byte with an unknown command code.
// It checks every result against S-box 1 of (plaintext XOR sub-key), that
// the evaluation time in clock cycles is the same for all 128 runs, that the
// sub-module is back at the spacer after each run and that the bad bytes
// change nothing.  It counts how often each mechanism happened (sub-key load,
// computation, return to spacer, framing error, ignored command) and counts
// a failure for any that never did.
`timescale 1ns/1ps
module tb_sttl_des_prototype;
  import sttl_pkg::*;

  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned BAUD    = 115_200;
  localparam int unsigned DIV     = CLK_HZ / BAUD;
  localparam realtime     T_CLK   = 20ns;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  logic        clk = 1'b0;
  logic        rst_n;
  logic        uart_rxd;
  logic [5:0]  key;
  logic [3:0]  result;
  logic        result_valid, result_err, busy, frame_err, cmd_dropped;
  logic [15:0] eval_cycles;
  sttl_t [3:0] sbox_out;

  int checks = 0;
  int failures = 0;
  int n_key_load = 0, n_compute = 0, n_spacer = 0, n_frame_err = 0, n_ignored = 0;
  int n_results = 0;
  logic [3:0]  last_result;
  logic [15:0] last_eval;
  logic        busy_q = 1'b0;

  sttl_des_prototype dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(uart_rxd), .key(key),
    .result(result), .result_valid(result_valid), .result_err(result_err),
    .eval_cycles(eval_cycles), .busy(busy), .frame_err(frame_err),
    .cmd_dropped(cmd_dropped), .sbox_out(sbox_out)
  );

  always #(T_CLK / 2) clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    busy_q <= busy;
    if (result_valid) begin
      n_results++;
      last_result = result;
      last_eval = eval_cycles;
    end
    if (frame_err) n_frame_err++;
    if (busy_q && !busy && sbox_out == {4{STTL_SPACER}}) n_spacer++;
  end

  task automatic send_byte(input logic [7:0] d, input logic stop);
    uart_rxd = 1'b0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = d[i];
      repeat (DIV) @(posedge clk);
    end
    uart_rxd = stop;
    repeat (DIV) @(posedge clk);
    uart_rxd = 1'b1;
    repeat (2 * DIV) @(posedge clk);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keys [2] = '{10, 57};
    logic [15:0] eval0;
    uart_rxd = 1'b1;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    check(sbox_out == {4{STTL_SPACER}} && !busy, "not idle at the spacer after reset");
    for (int kk = 0; kk < 2; kk++) begin
      send_byte(8'h40 | 8'(keys[kk]), 1'b1);
      check(key == 6'(keys[kk]), $sformatf("sub-key %0d not loaded", keys[kk]));
      if (key == 6'(keys[kk])) n_key_load++;
      for (int pv = 0; pv < 64; pv++) begin
        int nr, ev;
        logic [5:0] xv;
        xv = 6'(pv ^ keys[kk]);
        ev = S1[2 * xv[5] + xv[0]][xv[4:1]];
        nr = n_results;
        send_byte(8'(pv), 1'b1);
        check(n_results == nr + 1, $sformatf("k=%0d p=%0d: no result", keys[kk], pv));
        check(last_result == 4'(ev) && !result_err,
              $sformatf("k=%0d p=%0d: got %0d expected %0d", keys[kk], pv, last_result, ev));
        if (n_results == 1) eval0 = last_eval;
        check(last_eval == eval0, $sformatf("evaluation took %0d cycles, first took %0d",
                                            last_eval, eval0));
        if (n_results == nr + 1) n_compute++;
      end
    end
    // Broken stop bit: must be rejected.
    begin
      int nr;
      nr = n_results;
      send_byte(8'h05, 1'b0);
      repeat (2 * DIV) @(posedge clk);
      check(n_results == nr && key == 6'd57, "byte with bad stop bit was used");
    end
    // Unknown command code: ignored.
    begin
      int nr;
      nr = n_results;
      send_byte(8'h85, 1'b1);
      check(n_results == nr && key == 6'd57 && !busy, "unknown command acted upon");
      if (n_results == nr && key == 6'd57) n_ignored++;
    end
    check(eval0 > 0 && eval0 < 8, $sformatf("evaluation time %0d cycles", eval0));
    check(n_key_load == 2, "sub-key load count");
    check(n_compute == 128, "computation count");
    check(n_spacer == 128, $sformatf("return to spacer seen %0d times", n_spacer));
    check(n_frame_err == 1, "framing error count");
    check(n_ignored == 1, "ignored command count");
    $display("mechanisms: key_load=%0d compute=%0d spacer_return=%0d frame_err=%0d ignored_cmd=%0d",
             n_key_load, n_compute, n_spacer, n_frame_err, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
