// sttl_sequencer: clocked controller that drives the asynchronous STTL DES
// sub-module with the commands received over the RS232 link.
//
// Command bytes: bits [7:6] = 2'b01 loads the 6-bit sub-key from bits [5:0];
// bits [7:6] = 2'b00 runs one computation with plaintext bits [5:0]; other
// codes are ignored.  A run follows the STTL four-phase protocol on all
// twelve input bits (plaintext and sub-key alike):
//   1. DATA   : one data rail of every bit rises, validity rails stay low,
//               for SETUP_CYCLES cycles (data settles before validity);
//   2. VALID  : all validity rails rise; the controller waits until the four
//               output validity rails, seen through a two-flip-flop
//               synchroniser, are all high;
//   3. CAPTURE: the output true rails are stored in result; result_err is set
//               if an output bit does not carry a legal 1-of-2 code;
//   4. RTZ    : data rails fall, SETUP_CYCLES later validity rails fall,
//               and the controller waits until all output validity rails are
//               low (spacer) before it accepts the next command.
// Every run is thus one transition from the spacer to a valid 6-bit value and
// back.  eval_cycles reports how many clock cycles phase 2 took; for an STTL
// sub-module it is the same for every input value.
//
// Interface: clk, rst_n (active low, synchronous); cmd_data/cmd_valid from the
// receiver; p, k (STTL inputs of the sub-module, driven from flip-flops);
// s (STTL outputs of the sub-module, asynchronous); result, result_valid
// (one-cycle pulse), result_err, eval_cycles, busy, cmd_dropped (a command
// that arrived while busy; it is discarded).  The command format, the
// setup time and the synchroniser are this design's own choices.
module sttl_sequencer
  import sttl_pkg::*;
#(
  parameter int unsigned SETUP_CYCLES = 1,
  parameter int unsigned CNT_W        = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        cmd_data,
  input  logic              cmd_valid,
  output sttl_t [5:0]       p,
  output sttl_t [5:0]       k,
  input  sttl_t [3:0]       s,
  output logic [5:0]        key,
  output logic [3:0]        result,
  output logic              result_valid,
  output logic              result_err,
  output logic [CNT_W-1:0]  eval_cycles,
  output logic              busy,
  output logic              cmd_dropped
);

  typedef enum logic [2:0] {
    Q_IDLE, Q_DATA, Q_VALID, Q_CAPTURE, Q_RTZ_DATA, Q_RTZ_VALID
  } state_e;

  localparam int unsigned SW = $clog2(SETUP_CYCLES + 1);

  state_e           state;
  logic [5:0]       pt;
  logic [SW-1:0]    wait_cnt;
  logic [CNT_W-1:0] cyc;
  logic [3:0]       sv_meta, sv_sync;

  wire cmd_key = cmd_valid && (cmd_data[7:6] == 2'b01);
  wire cmd_run = cmd_valid && (cmd_data[7:6] == 2'b00);

  // Two-flip-flop synchroniser on the output validity rails.  The data
  // rails settle before the validity rails and stay put while they are high,
  // so they are sampled directly once sv_sync is all ones.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sv_meta <= '0;
      sv_sync <= '0;
    end else begin
      sv_meta <= {s[3].v, s[2].v, s[1].v, s[0].v};
      sv_sync <= sv_meta;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= Q_IDLE;
      pt           <= '0;
      key          <= '0;
      p            <= {6{STTL_SPACER}};
      k            <= {6{STTL_SPACER}};
      wait_cnt     <= '0;
      cyc          <= '0;
      result       <= '0;
      result_valid <= 1'b0;
      result_err   <= 1'b0;
      eval_cycles  <= '0;
      cmd_dropped  <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      cmd_dropped  <= 1'b0;
      if (state != Q_IDLE && cmd_valid) cmd_dropped <= 1'b1;

      unique case (state)
        Q_IDLE: begin
          if (cmd_key) key <= cmd_data[5:0];
          else if (cmd_run) begin
            pt <= cmd_data[5:0];
            for (int i = 0; i < 6; i++) begin
              p[i] <= sttl_data(cmd_data[i]);
              k[i] <= sttl_data(key[i]);
            end
            wait_cnt <= SW'(SETUP_CYCLES);
            state    <= Q_DATA;
          end
        end
        Q_DATA: begin
          if (wait_cnt != SW'(1)) wait_cnt <= wait_cnt - 1'b1;
          else begin
            for (int i = 0; i < 6; i++) begin
              p[i] <= sttl_encode(pt[i]);
              k[i] <= sttl_encode(key[i]);
            end
            cyc   <= '0;
            state <= Q_VALID;
          end
        end
        Q_VALID: begin
          if (cyc != '1) cyc <= cyc + 1'b1;
          if (&sv_sync) state <= Q_CAPTURE;
        end
        Q_CAPTURE: begin
          for (int i = 0; i < 4; i++) result[i] <= s[i].r1;
          result_err   <= ({s[3].r1, s[2].r1, s[1].r1, s[0].r1} &
                           {s[3].r0, s[2].r0, s[1].r0, s[0].r0}) != 4'd0 ||
                          ({s[3].r1, s[2].r1, s[1].r1, s[0].r1} |
                           {s[3].r0, s[2].r0, s[1].r0, s[0].r0}) != 4'hf;
          result_valid <= 1'b1;
          eval_cycles  <= cyc;
          for (int i = 0; i < 6; i++) begin
            p[i].r1 <= 1'b0;
            p[i].r0 <= 1'b0;
            k[i].r1 <= 1'b0;
            k[i].r0 <= 1'b0;
          end
          wait_cnt <= SW'(SETUP_CYCLES);
          state    <= Q_RTZ_DATA;
        end
        Q_RTZ_DATA: begin
          if (wait_cnt != SW'(1)) wait_cnt <= wait_cnt - 1'b1;
          else begin
            p     <= {6{STTL_SPACER}};
            k     <= {6{STTL_SPACER}};
            state <= Q_RTZ_VALID;
          end
        end
        Q_RTZ_VALID: begin
          if (sv_sync == 4'd0) state <= Q_IDLE;
        end
        default: state <= Q_IDLE;
      endcase
    end
  end

  assign busy = (state != Q_IDLE);

  initial assert (SETUP_CYCLES >= 1)
    else $error("sttl_sequencer: SETUP_CYCLES must be at least 1");

endmodule
