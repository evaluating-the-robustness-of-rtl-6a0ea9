// sttl_des_submodule: the attacked part of the first DES round, in STTL.
//
// Six bits of the expansion-permutation output (the plaintext side) are
// XORed bit by bit with six bits of the first-round sub-key, and the result
// addresses S-box 1, which gives a 4-bit value.  Every bit travels as an
// STTL signal (two data rails plus a validity rail, see sttl_pkg), and all
// the logic is made of STTL cells: six Xor2 cells followed by sttl_sbox1.
// This is the smallest piece of DES on which a differential or correlation
// power attack on the sub-key can be mounted.
//
// Interface: p[5:0] plaintext bits, k[5:0] sub-key bits, s[3:0] S-box
// output; index 5 is the first DES bit.  A computation starts from the
// spacer on all inputs: set the data rails, then raise the validity rails;
// s[i].v rises after s[i] data rails have settled.  To return, release the
// data rails, then the validity rails; s[i].v falls last.  Asynchronous.
// Paths cross 8 or 9 STTL cells; every output fires after 9 cell stages,
// paced by the validity rails.
module sttl_des_submodule
  import sttl_pkg::*;
#(
  parameter int unsigned N_DELAY = 5
) (
  input  sttl_t [5:0] p,
  input  sttl_t [5:0] k,
  output sttl_t [3:0] s
);

  sttl_t [5:0] x;

  for (genvar i = 0; i < 6; i++) begin : g_xor
    sttl_gate2 #(.TRUTH(TT_XOR2), .N_DELAY(N_DELAY)) u_xor (
      .a(p[i]),
      .b(k[i]),
      .s(x[i])
    );
  end

  sttl_sbox1 #(.N_DELAY(N_DELAY)) u_sbox1 (
    .x(x),
    .s(s)
  );

endmodule
