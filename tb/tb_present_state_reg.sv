// tb_present_state_reg -- checks the state register: a load copies the
// plaintext, each advance applies one reference round with the supplied round
// key, and the register holds when neither strobe is high. Ends with the
// 31 rounds of the all-zero key and plaintext, whose result XORed with K32
// must give the known ciphertext 5579C1387B228445.
module tb_present_state_reg;
  import present_ref_pkg::*;

  logic        clk = 1'b0;
  logic        data_load = 1'b0, advance = 1'b0;
  logic [63:0] rkey = '0, din = '0, model, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  present_state_reg dut (
    .clk_i(clk), .data_load(data_load), .advance(advance), .round_key(rkey),
    .data_i(din), .state_o(q)
  );

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ld, input logic adv, input logic [63:0] k, input logic [63:0] d);
    data_load = ld;
    advance   = adv;
    rkey      = k;
    din       = d;
    @(posedge clk);
    if (ld)       model = d;
    else if (adv) model = ref_round(model, k);
    #1;
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL ld=%b adv=%b q=%h exp=%h", ld, adv, q, model);
    end
  endtask

  initial begin
    logic [79:0] k;
    @(negedge clk);
    for (int blk = 0; blk < 20; blk++) begin
      step(1'b1, 1'b0, rand64(), rand64());
      if (blk % 3 == 0) step(1'b1, 1'b1, rand64(), rand64());  // load wins
      for (int i = 1; i <= 31; i++) begin
        step(1'b0, 1'b1, rand64(), rand64());
        if (i % 8 == 0) step(1'b0, 1'b0, rand64(), rand64());  // hold
      end
    end
    k = '0;
    step(1'b1, 1'b0, '0, '0);
    for (int i = 1; i <= 31; i++) begin
      step(1'b0, 1'b1, k[79:16], '0);
      k = ref_key_update(k, 5'(i));
    end
    checks++;
    if ((q ^ k[79:16]) !== 64'h5579_C138_7B22_8445) begin
      failures++;
      $display("FAIL zero vector: %h", q ^ k[79:16]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
