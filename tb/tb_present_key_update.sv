// tb_present_key_update -- checks one PRESENT-80 key-schedule step against
// the reference for random keys and every round number 0..31, and a worked
// example: key 0 after round 1 is C000_0000_0000_0000_8000 (rotation leaves
// zeros, the S-box turns the top nibble into C, the counter 1 sets bit 15).
module tb_present_key_update;
  import present_ref_pkg::*;

  logic [79:0] k, dout;
  logic [4:0]  rc;
  int checks = 0, failures = 0;

  present_key_update dut (.key_i(k), .round_count_i(rc), .key_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k  = '0;
    rc = 5'd1;
    #1;
    checks++;
    if (dout !== 80'hC000_0000_0000_0000_8000) begin
      failures++;
      $display("FAIL worked example: %h", dout);
    end
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 32; i++) begin
        k  = rand80();
        rc = 5'(i);
        #1;
        checks++;
        if (dout !== ref_key_update(k, rc)) begin
          failures++;
          $display("FAIL k=%h rc=%0d out=%h exp=%h", k, rc, dout, ref_key_update(k, rc));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
