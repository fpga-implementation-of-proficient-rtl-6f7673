// tb_present_sbox_layer -- checks the 16-wide S-box layer against the
// reference S-box table: every S-box input value in every nibble position,
// then random states.
module tb_present_sbox_layer;
  import present_ref_pkg::*;

  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  present_sbox_layer dut (.state_i(din), .state_o(dout));

  task automatic check(input logic [63:0] v);
    din = v;
    #1;
    checks++;
    if (dout !== ref_sbox_layer(v)) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", v, dout, ref_sbox_layer(v));
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
    // S(0)..S(15) spread over the nibbles, rotated through all positions
    for (int r = 0; r < 16; r++) begin
      logic [63:0] v;
      for (int j = 0; j < 16; j++) v[4*j +: 4] = 4'((j + r) % 16);
      check(v);
    end
    // the printed S-box row of the standard, S(0)..S(F) = C56B90AD3EF84712
    din = 64'hFEDC_BA98_7654_3210;
    #1;
    checks++;
    if (dout !== 64'h2174_8FE3_DA09_B65C) begin
      failures++;
      $display("FAIL S-box table: %h", dout);
    end
    for (int n = 0; n < 200; n++) check(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
