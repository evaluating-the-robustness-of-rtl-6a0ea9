// sttl_gate2: two-input Secure Triple Track Logic cell.
//
// TRUTH selects the Boolean function (bit {a,b}); the default is the STTL
// And2 gate, and the same structure gives the Or2 and Xor2 cells.
//
// How it works: each of the four input minterms has a 3-input C-element on
// (Enable, the matching data rail of a, the matching data rail of b).  The
// minterm C-elements whose function value is 1 are ORed into the true rail,
// the others into the false rail, so both rails have the same logic depth
// (one C-element, one OR).  Enable and the output validity rail come from
// sttl_validity: Enable is a C-element on the two input validity rails and
// the validity rail is that Enable delayed by a five-LUT cascade.
//
// Because the data C-elements can only fire once Enable is up, and Enable
// only depends on the validity rails, the firing time of the cell does not
// depend on the data as long as the data rails arrive before the validity
// rails.  The return to spacer is triggered in the same way by Enable falling.
// Exactly one minterm C-element, and so exactly one output data rail, switches
// per computation whatever the inputs.  This is 6 data LUTs + 5 validity LUTs
// as in the Spartan-3 hard macro.
//
// Interface: a, b, s are STTL signals (sttl_pkg::sttl_t).  Asynchronous,
// no clock or reset: driving both inputs with the spacer clears the cell.
module sttl_gate2
  import sttl_pkg::*;
#(
  parameter logic [3:0]  TRUTH    = TT_AND2,
  parameter int unsigned N_DELAY  = 5
) (
  input  sttl_t a,
  input  sttl_t b,
  output sttl_t s
);

  logic       en;
  logic       sv;
  logic [3:0] minterm;

  sttl_validity #(.N_STAGES(N_DELAY)) u_validity (
    .av(a.v),
    .bv(b.v),
    .en(en),
    .sv(sv)
  );

  for (genvar m = 0; m < 4; m++) begin : g_minterm
    // m[1] is the value of a, m[0] the value of b for this minterm.
    localparam logic A_BIT = m[1];
    localparam logic B_BIT = m[0];
    logic fired;
    c_element #(.N(3)) u_c (
      .in ({en, (A_BIT ? a.r1 : a.r0), (B_BIT ? b.r1 : b.r0)}),
      .out(fired)
    );
    assign minterm[m] = fired;
  end

  assign s.r1 = |(minterm &  TRUTH);
  assign s.r0 = |(minterm & ~TRUTH);
  assign s.v  = sv;

  // Encoding rules of the inputs: never both data rails high.
  always_comb begin
    assert (!(a.r1 && a.r0)) else $error("sttl_gate2: illegal code on input a");
    assert (!(b.r1 && b.r0)) else $error("sttl_gate2: illegal code on input b");
  end

endmodule
