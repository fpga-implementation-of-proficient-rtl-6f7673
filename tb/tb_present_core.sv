// tb_present_core -- end-to-end test of one encryption lane.
//
// Loads a key, then a plaintext, and counts rising edges until done_o
// pulses: this must take exactly 32 edges after the plaintext-load edge, and
// data_o must then equal the reference ciphertext. Covers the four
// known-answer vectors of PRESENT-80 and random keys and plaintexts. Also
// checks the round counter sequence (1 after the load, then 2..31, 0, 1),
// that done_o is a single-clock pulse and the lane then rests with data_o
// held, key and plaintext loaded in the same clock, back-to-back blocks with
// that load on the edge that stores the previous ciphertext (one block per
// 32 clocks), and a key load in the middle of a block abandoning it.
module tb_present_core;
  import present_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        key_load = 1'b0, data_load = 1'b0;
  logic [79:0] din = '0;
  logic [63:0] dout;
  logic        done;
  logic [4:0]  rc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  present_core dut (
    .clk_i(clk), .rst_ni(rst_n), .key_load(key_load), .data_load(data_load),
    .data_i(din), .data_o(dout), .done_o(done), .round_counter(rc)
  );

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(input logic [79:0] k);
    key_load = 1'b1;
    din      = k;
    @(negedge clk);
    key_load = 1'b0;
  endtask

  // Load the plaintext (with the key when combined is set, in which case the
  // key's low 64 bits are the plaintext), then count edges until done_o.
  task automatic run_block(input logic [79:0] k, input logic [63:0] pt, input bit combined);
    int cycles;
    logic [63:0] exp;
    exp       = ref_encrypt(pt, k);
    key_load  = combined;
    data_load = 1'b1;
    din       = combined ? k : {16'($urandom()), pt};
    @(negedge clk);
    data_load = 1'b0;
    key_load  = 1'b0;
    din       = rand80();
    expect_eq("counter after load", 64'(rc), 64'd1);
    cycles = 0;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
      if (cycles < 31)  expect_eq("counter", 64'(rc), 64'(cycles + 1));
      if (cycles == 31) expect_eq("counter wrapped", 64'(rc), 64'd0);
    end
    expect_eq("latency in clocks", 64'(cycles), 64'd32);
    expect_eq("ciphertext", dout, exp);
    expect_eq("counter after block", 64'(rc), 64'd1);
  endtask

  initial begin
    logic [79:0] k, kn;
    logic [63:0] ct;
    logic [63:0] exp_q[$];
    int t0, seen;
    repeat (2) @(negedge clk);
    expect_eq("done low in reset", 64'(done), 64'd0);
    rst_n = 1'b1;

    // known answers; the first is checked against the printed value as well
    load_key('0);  run_block('0, '0, 1'b0);
    expect_eq("known answer K=0 P=0", dout, 64'h5579_C138_7B22_8445);
    load_key('1);  run_block('1, '0, 1'b0);
    expect_eq("known answer K=1s P=0", dout, 64'hE72C_46C0_F594_5049);
    load_key('0);  run_block('0, '1, 1'b0);
    expect_eq("known answer K=0 P=1s", dout, 64'hA112_FFC7_2F68_417B);
    load_key('1);  run_block('1, '1, 1'b0);
    expect_eq("known answer K=1s P=1s", dout, 64'h3333_DCD3_2132_10D2);

    // done is one clock wide; the lane then rests with data_o held
    @(negedge clk);
    expect_eq("done is a single pulse", 64'(done), 64'd0);
    ct = dout;
    repeat (70) begin
      @(negedge clk);
      expect_eq("data_o held", dout, ct);
      expect_eq("no further done", 64'(done), 64'd0);
      expect_eq("counter rests at 1", 64'(rc), 64'd1);
    end

    // random blocks: separate loads, combined loads, abandoned blocks
    for (int n = 0; n < 30; n++) begin
      k = rand80();
      if (n % 7 == 3) begin
        // start a block, then abandon it half way with a new key load
        load_key(rand80());
        data_load = 1'b1;
        din       = {16'h0, rand64()};
        @(negedge clk);
        data_load = 1'b0;
        repeat (10) @(negedge clk);
        load_key(k);
        repeat (40) begin
          @(negedge clk);
          expect_eq("no done for abandoned block", 64'(done), 64'd0);
        end
      end else if (n % 2 == 0) begin
        load_key(k);
      end
      if (n % 2 == 0 || n % 7 == 3) run_block(k, rand64(), 1'b0);
      else                          run_block(k, k[63:0], 1'b1);
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end

    // streaming: each combined load on the edge that stores the previous
    // ciphertext, so a block completes every 32 clocks
    seen = 0;
    t0 = -1;
    for (int n = 0; n < 12; n++) begin
      kn = rand80();
      if (n == 0) t0 = $time;
      exp_q.push_back(ref_encrypt(kn[63:0], kn));
      key_load  = 1'b1;
      data_load = 1'b1;
      din       = kn;
      @(negedge clk);
      key_load  = 1'b0;
      data_load = 1'b0;
      // the edge that took this load also stored the previous ciphertext
      expect_eq("done with the overlapping load", 64'(done), 64'(n > 0));
      if (done) begin
        expect_eq("streamed ciphertext", dout, exp_q.pop_front());
        seen++;
      end
      repeat (31) @(negedge clk);
      // the counter now reads 0: the next load shares the capture edge
      expect_eq("counter at capture", 64'(rc), 64'd0);
    end
    @(negedge clk);
    // first load edge to last capture edge: 12 x 32 clocks (the sampling
    // points, half a clock before and after, add one)
    expect_eq("12 blocks in 12 x 32 clocks", 64'(($time - t0) / 10 - 1), 64'(12 * 32));
    expect_eq("last streamed done", 64'(done), 64'd1);
    expect_eq("last streamed ciphertext", dout, exp_q.pop_front());
    seen++;
    expect_eq("streamed blocks", 64'(seen), 64'd12);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
