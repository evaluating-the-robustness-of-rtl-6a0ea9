// tb_sttl_gate2: self-checking test of the two-input STTL cell, as And2,
// Or2 and Xor2.
// For every input pair and both orders of arrival of the validity rails the
// test runs the four-phase protocol and checks that:
//  - the output stays at the spacer while only data rails are set, and while
//    only one validity rail is up (firing is caused by Enable, not by data);
//  - once both validity rails are up the output carries the right value;
//  - the output holds while the input data rails are released and while
//    only one validity rail has fallen, and returns to the spacer after both;
//  - exactly one output data rail rises per computation, whatever the data.
`timescale 1ns/1ps
module tb_sttl_gate2;
  import sttl_pkg::*;

  localparam logic [3:0] TT [3] = '{TT_AND2, TT_OR2, TT_XOR2};

  sttl_t a, b;
  sttl_t s [3];
  int    checks = 0;
  int    failures = 0;
  int    rail_rises [3];
  int    ops = 0;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    sttl_gate2 #(.TRUTH(TT[g])) dut (.a(a), .b(b), .s(s[g]));
    always @(posedge s[g].r1 or posedge s[g].r0) rail_rises[g]++;
  end

  task automatic expect_all(input string what, input logic sp, input logic av, input logic bv);
    for (int g = 0; g < 3; g++) begin
      sttl_t exp_s;
      if (sp) exp_s = STTL_SPACER;
      else    exp_s = sttl_encode(TT[g][{av, bv}]);
      checks++;
      if (s[g] !== exp_s) begin
        failures++;
        $display("%s: cell %0d a=%0b b=%0b got %b expected %b", what, g, av, bv, s[g], exp_s);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 3; g++) rail_rises[g] = 0;
    a = STTL_SPACER; b = STTL_SPACER;
    #1;
    expect_all("reset", 1'b1, 1'b0, 1'b0);
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 4; v++) begin
        for (int order = 0; order < 2; order++) begin
          logic av, bv;
          av = v[1]; bv = v[0];
          ops++;
          a = sttl_data(av); b = sttl_data(bv);
          #1 expect_all("data only", 1'b1, av, bv);
          if (order == 0) a.v = 1'b1; else b.v = 1'b1;
          #1 expect_all("one validity", 1'b1, av, bv);
          a.v = 1'b1; b.v = 1'b1;
          #1 expect_all("valid", 1'b0, av, bv);
          a.r1 = 1'b0; a.r0 = 1'b0; b.r1 = 1'b0; b.r0 = 1'b0;
          #1 expect_all("data released", 1'b0, av, bv);
          if (order == 0) b.v = 1'b0; else a.v = 1'b0;
          #1 expect_all("one validity released", 1'b0, av, bv);
          a.v = 1'b0; b.v = 1'b0;
          #1 expect_all("spacer", 1'b1, av, bv);
        end
      end
    end
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (rail_rises[g] != ops) begin
        failures++;
        $display("cell %0d: %0d data-rail rises for %0d computations", g, rail_rises[g], ops);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
