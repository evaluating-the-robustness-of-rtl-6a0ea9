// sttl_pkg: types and constants shared by the Secure Triple Track Logic (STTL)
// cells and the DES sub-module built from them.
//
// An STTL signal is three wires: two data rails (r1 carries a logic '1',
// r0 a logic '0') and a validity rail v.  A bit goes through the cycle
//   spacer (v=0, r1=0, r0=0) -> data set on one rail (v still 0)
//   -> valid (v=1) -> data rail released -> v released -> spacer.
// The validity rail carries no information on the value of the bit: it rises
// and falls once per computation whatever the data.  Exactly one data rail
// rises per computation, so the number of switching wires is constant.
// The code (r1=1, r0=1) is illegal.  Inverting an STTL bit is a swap of the
// two data rails and costs no logic.
//
// The package also holds the DES S-box 1 table used to build the S-box out of
// STTL cells.  The input of the S-box is indexed with bit 5 as the first DES
// bit (b1): the row is {b1, b6} and the column {b2, b3, b4, b5}.
package sttl_pkg;

  typedef struct packed {
    logic v;   // validity rail (slow, data independent)
    logic r1;  // true rail
    logic r0;  // false rail
  } sttl_t;

  localparam sttl_t STTL_SPACER = '{v: 1'b0, r1: 1'b0, r0: 1'b0};

  // Data rails for bit b, validity still low (first half of a computation).
  function automatic sttl_t sttl_data(input logic b);
    return '{v: 1'b0, r1: b, r0: ~b};
  endfunction

  // Fully valid encoding of bit b.
  function automatic sttl_t sttl_encode(input logic b);
    return '{v: 1'b1, r1: b, r0: ~b};
  endfunction

  // Logical inversion: swap the data rails.
  function automatic sttl_t sttl_not(input sttl_t s);
    return '{v: s.v, r1: s.r0, r0: s.r1};
  endfunction

  function automatic logic sttl_is_valid(input sttl_t s);
    return s.v && (s.r1 ^ s.r0);
  endfunction

  // Truth tables of two-input cells, bit index {a, b}.
  localparam logic [3:0] TT_AND2 = 4'b1000;
  localparam logic [3:0] TT_OR2  = 4'b1110;
  localparam logic [3:0] TT_XOR2 = 4'b0110;

  // DES S-box 1, row by row (FIPS 46-3).
  localparam logic [3:0] DES_S1_ROWS [4][16] = '{
    '{4'd14, 4'd4,  4'd13, 4'd1, 4'd2,  4'd15, 4'd11, 4'd8,
      4'd3,  4'd10, 4'd6,  4'd12, 4'd5, 4'd9,  4'd0,  4'd7},
    '{4'd0,  4'd15, 4'd7,  4'd4, 4'd14, 4'd2,  4'd13, 4'd1,
      4'd10, 4'd6,  4'd12, 4'd11, 4'd9, 4'd5,  4'd3,  4'd8},
    '{4'd4,  4'd1,  4'd14, 4'd8, 4'd13, 4'd6,  4'd2,  4'd11,
      4'd15, 4'd12, 4'd9,  4'd7,  4'd3, 4'd10, 4'd5,  4'd0},
    '{4'd15, 4'd12, 4'd8,  4'd2, 4'd4,  4'd9,  4'd1,  4'd7,
      4'd5,  4'd11, 4'd3,  4'd14, 4'd10, 4'd0, 4'd6,  4'd13}
  };

  function automatic logic [3:0] des_s1(input logic [5:0] x);
    return DES_S1_ROWS[{x[5], x[0]}][x[4:1]];
  endfunction

  // Index of the n-th (from 0) S-box input whose output bit 'bit_i' is 1.
  // Every output bit of S1 is 1 for exactly 32 of the 64 inputs.
  function automatic int unsigned s1_ones_index(input int unsigned bit_i,
                                                input int unsigned n);
    int unsigned seen;
    seen = 0;
    for (int unsigned x = 0; x < 64; x++) begin
      if ((des_s1(6'(x)) & (4'b0001 << bit_i)) != 4'd0) begin
        if (seen == n) return x;
        seen++;
      end
    end
    return 0;
  endfunction

endpackage
