// sttl_validity: validation logic of an STTL cell (the delay D).
//
// The first stage is a C-element on the two input validity rails.  Its output
// is the cell's Enable: it rises once both inputs are valid and falls once
// both have returned to the spacer, so it never depends on the data.  The
// Enable then runs through a cascade of N_STAGES-1 further LUT stages to give
// the output validity rail sv.  With all stages counted, the chain is
// N_STAGES LUTs long (five on the Spartan-3 prototype), which makes sv settle
// well after the cell's data rails, whose path is only two LUTs long.
//
// Every stage carries a keep attribute so that synthesis leaves the cascade
// in place; the delay itself comes from placement in a hard macro and cannot
// be seen in a zero-delay simulation, where en and sv move together.
//
// Interface: av, bv (input validity rails) -> en (Enable to the data
// C-elements), sv (output validity rail).  Asynchronous, no clock.
module sttl_validity #(
  parameter int unsigned N_STAGES = 5
) (
  input  logic av,
  input  logic bv,
  output logic en,
  output logic sv
);

  (* keep *) logic [N_STAGES-1:0] stage;
  logic enable;

  c_element #(.N(2)) u_enable (
    .in ({av, bv}),
    .out(enable)
  );

  assign stage[0] = enable;

  for (genvar i = 1; i < N_STAGES; i++) begin : g_delay
    assign stage[i] = stage[i-1];
  end

  assign en = stage[0];
  assign sv = stage[N_STAGES-1];

  initial assert (N_STAGES >= 2)
    else $error("sttl_validity: the delay D needs at least two stages");

endmodule
