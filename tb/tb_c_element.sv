// tb_c_element: self-checking test of the Muller C-element.
// Drives a 3-input C-element with 400 random input vectors (starting from
// all zeros) and compares the output with a reference that rises on all
// ones, falls on all zeros and otherwise holds its previous value.
`timescale 1ns/1ps
module tb_c_element;
  localparam int unsigned N = 3;

  logic [N-1:0] in;
  logic         out;
  logic         model;
  int           checks = 0;
  int           failures = 0;
  int           holds = 0;

  c_element #(.N(N)) dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in    = '0;
    model = 1'b0;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("not cleared by all-zero inputs"); end
    for (int t = 0; t < 400; t++) begin
      in = N'($urandom);
      if (in == '1)      model = 1'b1;
      else if (in == '0) model = 1'b0;
      else               holds++;
      #1;
      checks++;
      if (out !== model) begin
        failures++;
        $display("step %0d in=%b out=%b expected %b", t, in, out, model);
      end
    end
    // Explicit hold in both states.
    in = '1; #1; in = 3'b010; #1; checks++; if (out !== 1'b1) failures++;
    in = '0; #1; in = 3'b101; #1; checks++; if (out !== 1'b0) failures++;
    checks++;
    if (holds == 0) begin failures++; $display("hold case never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
