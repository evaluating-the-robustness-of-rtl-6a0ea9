// sttl_sbox1: DES S-box 1 (6-bit input, 4-bit output) built only from STTL
// two-input cells (sttl_gate2).
//
// Structure (all cells are STTL, inversions are free rail swaps):
//   1. three 2-to-4 decoders, 12 And2 cells: row pair {x5, x0}, column
//      pairs {x4, x3} and {x2, x1};
//   2. 16 And2 cells combine the two column decoders into the 16 columns;
//   3. 64 And2 cells combine row and column into the 64 input minterms;
//   4. for each output bit, a balanced tree of 31 Or2 cells ORs the 32
//      minterms for which that bit of S1 is 1.
// 216 cells in all.  Paths cross 7 cells (through the row decoder) or 8
// (through the column decoders); a minterm cell fires only when both its
// inputs are valid, so every output fires after 8 cell stages whatever the
// data.  Per computation exactly one data rail of every cell switches, so
// the switching count does not depend on the data either.  The S-box is
// meant to be made of STTL cells; this particular decoder-plus-OR-tree
// netlist is this design's own choice.
//
// Interface: x[5:0] STTL input (x[5] is the first DES bit), s[3:0] STTL
// output (s[3] is the most significant bit of the S-box value).
// Asynchronous; s[i].v rises after the data rails of s[i] are settled.
module sttl_sbox1
  import sttl_pkg::*;
#(
  parameter int unsigned N_DELAY = 5
) (
  input  sttl_t [5:0] x,
  output sttl_t [3:0] s
);

  sttl_t [3:0]  row;     // {x5, x0}
  sttl_t [3:0]  col_hi;  // {x4, x3}
  sttl_t [3:0]  col_lo;  // {x2, x1}
  sttl_t [15:0] col;     // {x4, x3, x2, x1}
  sttl_t [63:0] mt;      // full input minterms

  // Stage 1: 2-to-4 decoders.  A minterm index bit of 0 uses the inverted
  // input (rails swapped).
  for (genvar k = 0; k < 4; k++) begin : g_dec
    sttl_gate2 #(.TRUTH(TT_AND2), .N_DELAY(N_DELAY)) u_row (
      .a(k[1] ? x[5] : sttl_not(x[5])),
      .b(k[0] ? x[0] : sttl_not(x[0])),
      .s(row[k])
    );
    sttl_gate2 #(.TRUTH(TT_AND2), .N_DELAY(N_DELAY)) u_hi (
      .a(k[1] ? x[4] : sttl_not(x[4])),
      .b(k[0] ? x[3] : sttl_not(x[3])),
      .s(col_hi[k])
    );
    sttl_gate2 #(.TRUTH(TT_AND2), .N_DELAY(N_DELAY)) u_lo (
      .a(k[1] ? x[2] : sttl_not(x[2])),
      .b(k[0] ? x[1] : sttl_not(x[1])),
      .s(col_lo[k])
    );
  end

  // Stage 2: 16 columns.
  for (genvar c = 0; c < 16; c++) begin : g_col
    sttl_gate2 #(.TRUTH(TT_AND2), .N_DELAY(N_DELAY)) u_col (
      .a(col_hi[c / 4]),
      .b(col_lo[c % 4]),
      .s(col[c])
    );
  end

  // Stage 3: 64 minterms, index n = input value.
  for (genvar n = 0; n < 64; n++) begin : g_mt
    localparam int unsigned ROW = 2 * (n >> 5) + (n & 1);
    localparam int unsigned COL = (n >> 1) & 15;
    sttl_gate2 #(.TRUTH(TT_AND2), .N_DELAY(N_DELAY)) u_mt (
      .a(row[ROW]),
      .b(col[COL]),
      .s(mt[n])
    );
  end

  // Stage 4: one balanced Or2 tree of 32 leaves per output bit.  Level 0
  // holds the 32 minterms where the bit is 1, level 5 the output.
  for (genvar j = 0; j < 4; j++) begin : g_bit
    for (genvar l = 0; l < 6; l++) begin : g_lvl
      sttl_t [(32 >> l)-1:0] node;
      if (l == 0) begin : g_leaves
        for (genvar i = 0; i < 32; i++) begin : g_leaf
          assign node[i] = mt[s1_ones_index(j, i)];
        end
      end else begin : g_ors
        for (genvar i = 0; i < (32 >> l); i++) begin : g_or
          sttl_gate2 #(.TRUTH(TT_OR2), .N_DELAY(N_DELAY)) u_or (
            .a(g_lvl[l-1].node[2*i]),
            .b(g_lvl[l-1].node[2*i+1]),
            .s(node[i])
          );
        end
      end
    end
    assign s[j] = g_lvl[5].node[0];
  end

endmodule
