// uart_rx: RS232 receiver, 8 data bits, no parity, 1 stop bit (8N1).
//
// Brings the bytes sent by the controlling PC into the chip.  The serial line
// is first synchronised with two flip-flops.  A falling edge on the idle line
// starts a frame; the line is then sampled in the middle of each bit period,
// counted with a clock divider of CLK_HZ/BAUD cycles.  The start bit is
// checked again at mid-bit (a shorter pulse is ignored as a glitch), the
// data bits are shifted in LSB first, and the stop bit must be 1: if it is,
// rx_valid pulses for one cycle with the byte on rx_data, otherwise
// frame_err pulses and the byte is dropped.
//
// Interface: clk, rst_n (active-low, synchronous), rxd serial input (idle
// high) -> rx_data[7:0], rx_valid, frame_err (one-cycle pulses).
// Timing: rx_valid comes about 9.5 bit periods after the start edge plus two
// cycles of synchroniser.  Frame format and rates are this design's choice.
module uart_rx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       frame_err
);

  localparam int unsigned DIV   = CLK_HZ / BAUD;
  localparam int unsigned HALF  = DIV / 2;
  localparam int unsigned CW    = $clog2(DIV + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  wire line = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      rx_data   <= '0;
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (!line) begin
            state <= S_START;
            cnt   <= CW'(HALF - 1);
          end
        end
        S_START: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (line) state <= S_IDLE;  // glitch, not a start bit
          else begin
            state   <= S_DATA;
            cnt     <= CW'(DIV - 1);
            bit_idx <= '0;
          end
        end
        S_DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            shreg   <= {line, shreg[7:1]};
            cnt     <= CW'(DIV - 1);
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= S_STOP;
          end
        end
        S_STOP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            state <= S_IDLE;
            if (line) begin
              rx_data  <= shreg;
              rx_valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (DIV >= 4) else $error("uart_rx: CLK_HZ/BAUD must be at least 4");

endmodule
