// tb_uart_rx: self-checking test of the RS232 receiver.
// With a divider of 16 clock cycles per bit, it sends 60 random 8N1 bytes,
// a frame with a 0 stop bit (must give frame_err and no byte) and a start
// pulse shorter than half a bit (must be ignored), and checks each received
// byte and the time from the start edge to rx_valid (9.5 bit periods plus
// the synchroniser, within two cycles).
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 1_600_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int unsigned DIV    = CLK_HZ / BAUD;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       rxd;
  logic [7:0] rx_data;
  logic       rx_valid, frame_err;
  int checks = 0;
  int failures = 0;
  int n_valid = 0, n_ferr = 0;
  longint cyc = 0, start_cyc = 0;
  logic [7:0] last_byte;
  longint last_lat;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk(clk), .rst_n(rst_n), .rxd(rxd),
    .rx_data(rx_data), .rx_valid(rx_valid), .frame_err(frame_err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rx_valid) begin n_valid++; last_byte = rx_data; last_lat = cyc - start_cyc; end
    if (frame_err) n_ferr++;
  end

  task automatic send_bit(input logic b);
    rxd = b;
    repeat (DIV) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] d, input logic stop);
    @(posedge clk);
    start_cyc = cyc;
    send_bit(1'b0);
    for (int i = 0; i < 8; i++) send_bit(d[i]);
    send_bit(stop);
    send_bit(1'b1);
    send_bit(1'b1);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rxd = 1'b1;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      logic [7:0] d;
      int nv_prev;
      d = 8'($urandom);
      nv_prev = n_valid;
      send_byte(d, 1'b1);
      check(n_valid == nv_prev + 1, $sformatf("byte %0d not received", t));
      check(last_byte == d, $sformatf("byte %0d got %h expected %h", t, last_byte, d));
      check(last_lat >= 10 * DIV - DIV / 2 && last_lat <= 10 * DIV - DIV / 2 + 4,
            $sformatf("byte %0d latency %0d cycles", t, last_lat));
    end
    // Framing error.
    begin
      int nv0, nf0;
      nv0 = n_valid; nf0 = n_ferr;
      send_byte(8'h5a, 1'b0);
      check(n_valid == nv0, "byte accepted despite bad stop bit");
      check(n_ferr == nf0 + 1, "no frame error reported");
      repeat (4 * DIV) @(posedge clk);
    end
    // Glitch on the idle line.
    begin
      int nv0, nf0;
      nv0 = n_valid; nf0 = n_ferr;
      rxd = 1'b0;
      repeat (DIV / 4) @(posedge clk);
      rxd = 1'b1;
      repeat (12 * DIV) @(posedge clk);
      check(n_valid == nv0 && n_ferr == nf0, "glitch taken for a start bit");
    end
    // Still works afterwards.
    send_byte(8'hc3, 1'b1);
    check(last_byte == 8'hc3, "byte after glitch wrong");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
