// tb_sttl_validity: self-checking test of the STTL validation logic.
// Random sequences on the two input validity rails; Enable must behave as a
// C-element of them (rise when both high, fall when both low, hold
// otherwise) and the output validity rail must follow Enable.
`timescale 1ns/1ps
module tb_sttl_validity;
  logic av, bv, en, sv;
  logic model;
  int   checks = 0;
  int   failures = 0;
  int   holds = 0;

  sttl_validity #(.N_STAGES(5)) dut (.av(av), .bv(bv), .en(en), .sv(sv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    av = 1'b0; bv = 1'b0; model = 1'b0;
    #1;
    for (int t = 0; t < 300; t++) begin
      {av, bv} = 2'($urandom);
      if (av && bv)        model = 1'b1;
      else if (!av && !bv) model = 1'b0;
      else                 holds++;
      #1;
      checks += 2;
      if (en !== model) begin failures++; $display("t=%0d en=%b expected %b", t, en, model); end
      if (sv !== model) begin failures++; $display("t=%0d sv=%b expected %b", t, sv, model); end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
