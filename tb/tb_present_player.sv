// tb_present_player -- checks the bit permutation: each single set bit must
// land where the transposition rule puts it, and random words must match the
// reference permutation.
module tb_present_player;
  import present_ref_pkg::*;

  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  present_player dut (.state_i(din), .state_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      din = 64'd1 << i;
      #1;
      checks++;
      if (dout !== (64'd1 << (16 * (i % 4) + i / 4))) begin
        failures++;
        $display("FAIL bit %0d -> %h", i, dout);
      end
    end
    for (int n = 0; n < 200; n++) begin
      din = rand64();
      #1;
      checks++;
      if (dout !== ref_player(din)) begin
        failures++;
        $display("FAIL in=%h out=%h", din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
