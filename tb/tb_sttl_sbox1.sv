// tb_sttl_sbox1: self-checking test of the STTL DES S-box 1.
// For each of the 64 inputs (twice, with the validity rails raised in a
// random order) the test checks that the outputs stay at the spacer until
// the last input validity rail rises, that the result equals S-box 1 of the
// input (reference table typed in here from FIPS 46-3, in column order), that
// exactly one of the 64 internal minterm cells fires and exactly 84 internal
// data rails are high (data-independent switching), that outputs hold while
// the inputs return, and that everything returns to the spacer.
`timescale 1ns/1ps
module tb_sttl_sbox1;
  import sttl_pkg::*;

  // S1 by column: S1_COLS[c] = {row3, row2, row1, row0} values for column c.
  localparam logic [15:0] S1_COLS [16] = '{
    16'hF40E, 16'hC1F4, 16'h8E7D, 16'h2841, 16'h4DE2, 16'h962F, 16'h12DB, 16'h7B18,
    16'h5FA3, 16'hBC6A, 16'h39C6, 16'hE7BC, 16'hA395, 16'h0A59, 16'h6530, 16'hD087
  };

  function automatic logic [3:0] ref_s1(input logic [5:0] x);
    int unsigned r, c;
    r = x[5] * 2 + x[0];
    c = (x >> 1) & 15;
    return S1_COLS[c][4*r +: 4];
  endfunction

  sttl_t [5:0] x;
  sttl_t [3:0] s;
  int checks = 0;
  int failures = 0;

  sttl_sbox1 dut (.x(x), .s(s));

  function automatic int count_high();
    int n = 0;
    for (int i = 0; i < 64; i++) n += dut.mt[i].r1 + dut.mt[i].r0;
    for (int i = 0; i < 16; i++) n += dut.col[i].r1 + dut.col[i].r0;
    for (int i = 0; i < 4; i++)  n += dut.row[i].r1 + dut.row[i].r0;
    return n;
  endfunction

  function automatic int count_mt_true();
    int n = 0;
    for (int i = 0; i < 64; i++) n += dut.mt[i].r1;
    return n;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = {6{STTL_SPACER}};
    #1;
    check(s == {4{STTL_SPACER}}, "not at spacer after start");
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 64; v++) begin
        logic [5:0] val;
        logic [3:0] exp_v;
        int order [6];
        val = 6'(v);
        exp_v = ref_s1(val);
        for (int i = 0; i < 6; i++) x[i] = sttl_data(val[i]);
        #1 check(s == {4{STTL_SPACER}}, $sformatf("x=%0d fired on data alone", v));
        // Random order of validity arrival.
        for (int i = 0; i < 6; i++) order[i] = i;
        for (int i = 5; i > 0; i--) begin
          int j, tmp;
          j = $urandom_range(i, 0);
          tmp = order[i]; order[i] = order[j]; order[j] = tmp;
        end
        for (int i = 0; i < 5; i++) begin
          x[order[i]].v = 1'b1;
          #1;
        end
        check(s == {4{STTL_SPACER}}, $sformatf("x=%0d fired before last validity", v));
        x[order[5]].v = 1'b1;
        #1;
        for (int i = 0; i < 4; i++)
          check(s[i] == sttl_encode(exp_v[i]),
                $sformatf("x=%0d bit %0d got %b expected %0b", v, i, s[i], exp_v[i]));
        check(count_mt_true() == 1, $sformatf("x=%0d minterm not one-hot", v));
        check(count_high() == 84, $sformatf("x=%0d %0d internal rails high", v, count_high()));
        for (int i = 0; i < 6; i++) begin x[i].r1 = 1'b0; x[i].r0 = 1'b0; end
        #1;
        for (int i = 0; i < 4; i++)
          check(s[i] == sttl_encode(exp_v[i]), $sformatf("x=%0d output lost on data release", v));
        for (int i = 0; i < 6; i++) x[i].v = 1'b0;
        #1 check(s == {4{STTL_SPACER}}, $sformatf("x=%0d no return to spacer", v));
        check(count_high() == 0, $sformatf("x=%0d internal rails not cleared", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
