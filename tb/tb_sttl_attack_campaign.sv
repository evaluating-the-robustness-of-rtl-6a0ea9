// tb_sttl_attack_campaign: the acquisition campaign of a power-analysis
// evaluation, run through the whole prototype.
// For sub-keys 35 and 57, each of the 64 spacer -> valid transitions of the
// sub-module is applied 50 times (trace averaging), i.e. 6400 runs sent as
// command bytes over the serial line.  The serial link runs at 8 clock
// cycles per bit here to keep the simulation short; nothing else differs
// from the default configuration.  Every result is checked against S-box 1
// of (plaintext XOR sub-key); the evaluation time in cycles and the number of
// data rails held high inside the sub-module at evaluation (its switching
// activity) must be the same for all 6400 runs.
`timescale 1ns/1ps
module tb_sttl_attack_campaign;
  import sttl_pkg::*;

  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned BAUD   = 6_250_000;
  localparam int unsigned DIV    = CLK_HZ / BAUD;
  localparam int unsigned REPS   = 50;

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
  int n_results = 0;
  int activity_min = 1 << 30, activity_max = -1;
  int eval_min = 1 << 30, eval_max = -1;
  logic [3:0] last_result;
  logic       last_err;

  sttl_des_prototype #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(uart_rxd), .key(key),
    .result(result), .result_valid(result_valid), .result_err(result_err),
    .eval_cycles(eval_cycles), .busy(busy), .frame_err(frame_err),
    .cmd_dropped(cmd_dropped), .sbox_out(sbox_out)
  );

  always #10ns clk = ~clk;

  function automatic int rails_high();
    int n = 0;
    for (int i = 0; i < 6; i++)
      n += dut.u_submodule.x[i].r1 + dut.u_submodule.x[i].r0;
    for (int i = 0; i < 64; i++)
      n += dut.u_submodule.u_sbox1.mt[i].r1 + dut.u_submodule.u_sbox1.mt[i].r0;
    for (int i = 0; i < 16; i++)
      n += dut.u_submodule.u_sbox1.col[i].r1 + dut.u_submodule.u_sbox1.col[i].r0;
    for (int i = 0; i < 4; i++)
      n += dut.u_submodule.u_sbox1.row[i].r1 + dut.u_submodule.u_sbox1.row[i].r0
         + dut.u_submodule.u_sbox1.col_hi[i].r1 + dut.u_submodule.u_sbox1.col_hi[i].r0
         + dut.u_submodule.u_sbox1.col_lo[i].r1 + dut.u_submodule.u_sbox1.col_lo[i].r0;
    return n;
  endfunction

  always @(posedge clk) if (rst_n && result_valid) begin
    int act;
    n_results++;
    last_result = result;
    last_err = result_err;
    act = rails_high();
    if (act < activity_min) activity_min = act;
    if (act > activity_max) activity_max = act;
    if (int'(eval_cycles) < eval_min) eval_min = int'(eval_cycles);
    if (int'(eval_cycles) > eval_max) eval_max = int'(eval_cycles);
  end

  task automatic send_byte(input logic [7:0] d);
    uart_rxd = 1'b0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = d[i];
      repeat (DIV) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (3 * DIV) @(posedge clk);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keys [2] = '{35, 57};
    int wrong = 0;
    int runs = 0;
    uart_rxd = 1'b1;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    for (int kk = 0; kk < 2; kk++) begin
      send_byte(8'h40 | 8'(keys[kk]));
      checks++;
      if (key != 6'(keys[kk])) begin failures++; $display("sub-key %0d not loaded", keys[kk]); end
      for (int pv = 0; pv < 64; pv++) begin
        logic [5:0] xv;
        int ev;
        xv = 6'(pv ^ keys[kk]);
        ev = S1[2 * xv[5] + xv[0]][xv[4:1]];
        for (int r = 0; r < int'(REPS); r++) begin
          int nr;
          nr = n_results;
          send_byte(8'(pv));
          runs++;
          checks++;
          if (n_results != nr + 1 || last_result != 4'(ev) || last_err) begin
            failures++;
            wrong++;
            if (wrong < 10)
              $display("k=%0d p=%0d rep %0d: got %0d expected %0d", keys[kk], pv, r, last_result, ev);
          end
        end
      end
    end
    checks += 3;
    if (runs != 2 * 64 * int'(REPS)) failures++;
    if (eval_min != eval_max) begin
      failures++;
      $display("evaluation time varied: %0d to %0d cycles", eval_min, eval_max);
    end
    if (activity_min != activity_max) begin
      failures++;
      $display("switching activity varied: %0d to %0d rails", activity_min, activity_max);
    end
    $display("%0d runs; evaluation %0d cycles; %0d internal rails high in every run",
             runs, eval_min, activity_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
