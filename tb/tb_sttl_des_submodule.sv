// tb_sttl_des_submodule: self-checking test of the STTL DES sub-module.
// Runs all 4096 (plaintext, sub-key) pairs through the full four-phase
// protocol, with the twelve input validity rails raised in a random order,
// and checks that:
//  - nothing fires before the last input validity rail is up;
//  - the output equals S-box 1 of (plaintext XOR sub-key), computed here
//    from the DES S1 table in its row form;
//  - the number of data rails that rise in the whole circuit (6 Xor2 and
//    92 decoder and minterm cells, one rail each) is the same for every pair;
//  - the outputs hold while the inputs return and end at the spacer.
`timescale 1ns/1ps
module tb_sttl_des_submodule;
  import sttl_pkg::*;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  sttl_t [5:0] p, k;
  sttl_t [3:0] s;
  int checks = 0;
  int failures = 0;
  int out_rises = 0;

  sttl_des_submodule dut (.p(p), .k(k), .s(s));

  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge s[i].r1 or posedge s[i].r0) out_rises++;
  end

  function automatic int rails_high();
    int n = 0;
    for (int i = 0; i < 6; i++)  n += dut.x[i].r1 + dut.x[i].r0;
    for (int i = 0; i < 64; i++) n += dut.u_sbox1.mt[i].r1 + dut.u_sbox1.mt[i].r0;
    for (int i = 0; i < 16; i++) n += dut.u_sbox1.col[i].r1 + dut.u_sbox1.col[i].r0;
    for (int i = 0; i < 4; i++)  n += dut.u_sbox1.row[i].r1 + dut.u_sbox1.row[i].r0
                                    + dut.u_sbox1.col_hi[i].r1 + dut.u_sbox1.col_hi[i].r0
                                    + dut.u_sbox1.col_lo[i].r1 + dut.u_sbox1.col_lo[i].r0;
    return n;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ops = 0;
    p = {6{STTL_SPACER}};
    k = {6{STTL_SPACER}};
    #1;
    for (int kv = 0; kv < 64; kv++) begin
      for (int pv = 0; pv < 64; pv++) begin
        logic [5:0] xv;
        int order [12];
        int exp_v;
        xv = 6'(pv ^ kv);
        exp_v = S1[2 * xv[5] + xv[0]][xv[4:1]];
        for (int i = 0; i < 6; i++) begin
          p[i] = sttl_data(pv[i]);
          k[i] = sttl_data(kv[i]);
        end
        for (int i = 0; i < 12; i++) order[i] = i;
        for (int i = 11; i > 0; i--) begin
          int j, tmp;
          j = $urandom_range(i, 0);
          tmp = order[i]; order[i] = order[j]; order[j] = tmp;
        end
        for (int i = 0; i < 11; i++) begin
          if (order[i] < 6) p[order[i]].v = 1'b1; else k[order[i] - 6].v = 1'b1;
          #1;
        end
        check(s == {4{STTL_SPACER}}, $sformatf("p=%0d k=%0d fired early", pv, kv));
        if (order[11] < 6) p[order[11]].v = 1'b1; else k[order[11] - 6].v = 1'b1;
        #1;
        ops++;
        for (int i = 0; i < 4; i++)
          check(s[i] == sttl_encode(exp_v[i]),
                $sformatf("p=%0d k=%0d bit %0d got %b", pv, kv, i, s[i]));
        check(rails_high() == 98, $sformatf("p=%0d k=%0d: %0d rails high", pv, kv, rails_high()));
        for (int i = 0; i < 6; i++) begin
          p[i].r1 = 1'b0; p[i].r0 = 1'b0; k[i].r1 = 1'b0; k[i].r0 = 1'b0;
        end
        #1;
        for (int i = 0; i < 4; i++)
          check(s[i] == sttl_encode(exp_v[i]), $sformatf("p=%0d k=%0d output lost", pv, kv));
        for (int i = 0; i < 6; i++) begin p[i].v = 1'b0; k[i].v = 1'b0; end
        #1 check(s == {4{STTL_SPACER}}, $sformatf("p=%0d k=%0d no spacer", pv, kv));
      end
    end
    check(out_rises == 4 * ops, $sformatf("%0d output rail rises for %0d computations", out_rises, ops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
