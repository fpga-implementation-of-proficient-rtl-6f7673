// tb_present_key_reg -- checks the key register: a load copies all 80 bits
// (seen through the 64-bit round-key output), each advance steps the key
// schedule with the given round number, and the register holds when neither
// strobe is high. A tracked reference register is compared after every edge.
module tb_present_key_reg;
  import present_ref_pkg::*;

  logic        clk = 1'b0;
  logic        key_load = 1'b0, advance = 1'b0;
  logic [4:0]  rc = '0;
  logic [79:0] din = '0, model;
  logic [63:0] rk;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  present_key_reg dut (
    .clk_i(clk), .key_load(key_load), .advance(advance), .round_count(rc),
    .data_i(din), .round_key_o(rk)
  );

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ld, input logic adv, input logic [4:0] r, input logic [79:0] d);
    key_load = ld;
    advance  = adv;
    rc       = r;
    din      = d;
    @(posedge clk);
    if (ld)       model = d;
    else if (adv) model = ref_key_update(model, r);
    #1;
    checks++;
    if (rk !== model[79:16]) begin
      failures++;
      $display("FAIL ld=%b adv=%b rc=%0d rk=%h exp=%h", ld, adv, r, rk, model[79:16]);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int blk = 0; blk < 20; blk++) begin
      step(1'b1, 1'b0, 5'(blk), rand80());
      // load has priority over advance
      if (blk % 3 == 0) step(1'b1, 1'b1, 5'd7, rand80());
      for (int i = 1; i <= 31; i++) begin
        step(1'b0, 1'b1, 5'(i), rand80());
        if (i % 8 == 0) step(1'b0, 1'b0, 5'(i), rand80());  // hold
      end
    end
    // a full schedule from key 0 must give K32 = 6DAB31744F41D700 (key 0,
    // plaintext 0 encrypts to 5579C1387B228445 = K32 ^ state after round 31)
    step(1'b1, 1'b0, 5'd0, '0);
    for (int i = 1; i <= 31; i++) step(1'b0, 1'b1, 5'(i), '0);
    checks++;
    if (rk !== 64'h6DAB_3174_4F41_D700) begin
      failures++;
      $display("FAIL K32 of zero key: %h", rk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
