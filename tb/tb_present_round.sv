// tb_present_round -- checks one combinational PRESENT round (key XOR, S-box
// layer, permutation) against the reference round on fixed and random inputs.
module tb_present_round;
  import present_ref_pkg::*;

  logic [63:0] s, k, dout;
  int checks = 0, failures = 0;

  present_round dut (.state_i(s), .round_key_i(k), .state_o(dout));

  task automatic check(input logic [63:0] sv, input logic [63:0] kv);
    s = sv;
    k = kv;
    #1;
    checks++;
    if (dout !== ref_round(sv, kv)) begin
      failures++;
      $display("FAIL s=%h k=%h out=%h exp=%h", sv, kv, dout, ref_round(sv, kv));
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
    check('0, '0);
    check('1, '0);
    check('0, '1);
    // all-zero state and key: every nibble becomes C = 1100, so state bits
    // 2,3 of each nibble are set; after the permutation these are output
    // bits 32..63: FFFFFFFF00000000
    s = '0;
    k = '0;
    #1;
    checks++;
    if (dout !== 64'hFFFF_FFFF_0000_0000) begin
      failures++;
      $display("FAIL zero round: %h", dout);
    end
    for (int n = 0; n < 300; n++) check(rand64(), rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
