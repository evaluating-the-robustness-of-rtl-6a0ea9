// sttl_des_prototype: top level of the STTL evaluation prototype.
//
// A PC sends command bytes over RS232.  uart_rx turns them into bytes,
// sttl_sequencer loads the sub-key or runs one spacer -> valid -> spacer
// computation of the asynchronous STTL DES sub-module (plaintext XOR sub-key
// into DES S-box 1), and reports the 4-bit result.  The power drawn by the
// FPGA core during the computation is what is measured in the side-channel
// evaluation; the clocked parts are idle while the sub-module computes.
//
// Interface: clk (board clock, CLK_HZ), rst_n (active low), uart_rxd (RS232
// input, 8N1 at BAUD).  Outputs: key (sub-key in use), result, result_valid
// (one-cycle pulse per computation), result_err (illegal output code),
// eval_cycles (clock cycles from raising the input validity rails to seeing
// all output validity rails), busy (high during a computation, usable as an
// oscilloscope trigger), frame_err and cmd_dropped (receive errors), and the
// sub-module's STTL outputs for probing.
// The RS232 command format, clock rate and baud rate are this design's own.
module sttl_des_prototype
  import sttl_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BAUD         = 115_200,
  parameter int unsigned N_DELAY      = 5,
  parameter int unsigned SETUP_CYCLES = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rxd,
  output logic [5:0]  key,
  output logic [3:0]  result,
  output logic        result_valid,
  output logic        result_err,
  output logic [15:0] eval_cycles,
  output logic        busy,
  output logic        frame_err,
  output logic        cmd_dropped,
  output sttl_t [3:0] sbox_out
);

  logic [7:0]  rx_data;
  logic        rx_valid;
  sttl_t [5:0] p, k;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .rxd      (uart_rxd),
    .rx_data  (rx_data),
    .rx_valid (rx_valid),
    .frame_err(frame_err)
  );

  sttl_sequencer #(.SETUP_CYCLES(SETUP_CYCLES), .CNT_W(16)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .cmd_data    (rx_data),
    .cmd_valid   (rx_valid),
    .p           (p),
    .k           (k),
    .s           (sbox_out),
    .key         (key),
    .result      (result),
    .result_valid(result_valid),
    .result_err  (result_err),
    .eval_cycles (eval_cycles),
    .busy        (busy),
    .cmd_dropped (cmd_dropped)
  );

  sttl_des_submodule #(.N_DELAY(N_DELAY)) u_submodule (
    .p(p),
    .k(k),
    .s(sbox_out)
  );

endmodule
