// tb_present_top -- end-to-end test of the two-lane PRESENT-80 encryptor at
// its default size (no parameter override).
//
// Each lane gets its own key and plaintext under the shared key_load and
// data_load strobes; both lanes must finish together, 32 clocks after the
// plaintext load, each with its reference ciphertext. The first pair is the
// pair of the design's parallel demonstration: key 0 / plaintext 0 giving
// 5579C1387B228445 on lane 0 and key FF..F / plaintext 0 giving
// E72C46C0F5945049 on lane 1. Then random pairs, including identical
// plaintexts on both lanes, a stream of pairs with each key load on the edge
// that stores the previous ciphertexts (33 clocks per pair), key and
// plaintext in one clock, a block abandoned by a new key load, and a reset in
// the middle of a block. Every mechanism is counted and must happen at least
// once: key load, plaintext load, both lanes finishing on one edge, round
// counter wrap 31 -> 0, key load overlapping the output, combined load,
// abandoned block and reset.
module tb_present_top;
  import present_ref_pkg::*;

  localparam int L = 2;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        key_load = 1'b0, data_load = 1'b0;
  logic [79:0] din   [L];
  logic [63:0] dout  [L];
  logic        done  [L];
  logic [4:0]  rc    [L];
  int checks = 0, failures = 0;
  int n_key_load = 0, n_data_load = 0, n_parallel_done = 0, n_wrap = 0;
  int n_overlap = 0, n_combined = 0, n_abandon = 0, n_reset = 0;

  always #5 clk = ~clk;

  present_top dut (
    .clk_i(clk), .rst_ni(rst_n), .key_load(key_load), .data_load(data_load),
    .data_i(din), .data_o(dout), .done_o(done), .round_counter(rc)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (key_load)  n_key_load++;
    if (data_load) n_data_load++;
    if (rst_n && rc[0] == 5'd31) n_wrap++;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_keys(input logic [79:0] k0, input logic [79:0] k1);
    key_load = 1'b1;
    din[0]   = k0;
    din[1]   = k1;
    @(negedge clk);
    key_load = 1'b0;
  endtask

  // Load both plaintexts, run 32 clocks, check both ciphertexts.
  // With combined set the keys are loaded in the same clock and the
  // plaintexts are their low 64 bits.
  task automatic run_pair(input logic [79:0] k0, input logic [79:0] k1,
                          input logic [63:0] p0, input logic [63:0] p1, input bit combined);
    int cycles;
    logic [63:0] e0, e1;
    if (combined) begin
      p0 = k0[63:0];
      p1 = k1[63:0];
      key_load = 1'b1;
      n_combined++;
    end
    e0 = ref_encrypt(p0, k0);
    e1 = ref_encrypt(p1, k1);
    din[0] = combined ? k0 : {16'($urandom()), p0};
    din[1] = combined ? k1 : {16'($urandom()), p1};
    data_load = 1'b1;
    @(negedge clk);
    data_load = 1'b0;
    key_load  = 1'b0;
    din[0] = rand80();
    din[1] = rand80();
    for (int n = 0; n < L; n++) expect_eq("counter after load", 64'(rc[n]), 64'd1);
    cycles = 0;
    while (!(done[0] || done[1]) && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    expect_eq("latency in clocks", 64'(cycles), 64'd32);
    if (done[0] && done[1]) n_parallel_done++;
    expect_eq("lanes finish together", 64'(done[0] && done[1]), 64'd1);
    expect_eq("lane 0 ciphertext", dout[0], e0);
    expect_eq("lane 1 ciphertext", dout[1], e1);
  endtask

  initial begin
    logic [79:0] k0, k1;
    logic [63:0] p0, p1;
    logic [63:0] e0, e1;
    longint t0;
    din[0] = '0;
    din[1] = '0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < L; n++) expect_eq("done low in reset", 64'(done[n]), 64'd0);
    n_reset++;
    rst_n = 1'b1;

    // the pair of the parallel demonstration, then the other two vectors
    load_keys('0, '1);
    run_pair('0, '1, '0, '0, 1'b0);
    expect_eq("lane 0 known answer", dout[0], 64'h5579_C138_7B22_8445);
    expect_eq("lane 1 known answer", dout[1], 64'hE72C_46C0_F594_5049);
    load_keys('1, '0);
    run_pair('1, '0, '1, '1, 1'b0);
    expect_eq("lane 0 known answer", dout[0], 64'h3333_DCD3_2132_10D2);
    expect_eq("lane 1 known answer", dout[1], 64'hA112_FFC7_2F68_417B);

    // random pairs: separate loads, combined loads, abandoned blocks
    for (int n = 0; n < 30; n++) begin
      k0 = rand80();
      k1 = rand80();
      p0 = rand64();
      p1 = (n % 6 == 1) ? p0 : rand64();
      if (n % 5 == 4) begin
        run_pair(k0, k1, p0, p1, 1'b1);
        continue;
      end
      if (n % 7 == 2) begin
        // start, then abandon with a new key load: no done for that block
        load_keys(rand80(), rand80());
        din[0] = {16'h0, rand64()};
        din[1] = {16'h0, rand64()};
        data_load = 1'b1;
        @(negedge clk);
        data_load = 1'b0;
        repeat (12) @(negedge clk);
        load_keys(k0, k1);
        repeat (40) begin
          @(negedge clk);
          expect_eq("abandoned block: no done", 64'(done[0] || done[1]), 64'd0);
        end
        n_abandon++;
      end else begin
        load_keys(k0, k1);
      end
      repeat ($urandom_range(0, 5)) @(negedge clk);
      run_pair(k0, k1, p0, p1, 1'b0);
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end

    // stream of 16 pairs: each key load shares the edge that stores the
    // previous ciphertexts, so a pair completes every 33 clocks
    k0 = rand80();
    k1 = rand80();
    load_keys(k0, k1);
    t0 = $time;
    for (int n = 0; n < 16; n++) begin
      p0 = rand64();
      p1 = rand64();
      e0 = ref_encrypt(p0, k0);
      e1 = ref_encrypt(p1, k1);
      din[0] = {16'h0, p0};
      din[1] = {16'h0, p1};
      data_load = 1'b1;
      @(negedge clk);
      data_load = 1'b0;
      repeat (31) @(negedge clk);
      expect_eq("counter at capture", 64'(rc[0]), 64'd0);
      // the next keys go in on the capture edge
      k0 = rand80();
      k1 = rand80();
      key_load = (n < 15);
      din[0]   = k0;
      din[1]   = k1;
      @(negedge clk);
      key_load = 1'b0;
      expect_eq("stream: done on both lanes", 64'(done[0] && done[1]), 64'd1);
      expect_eq("stream: lane 0", dout[0], e0);
      expect_eq("stream: lane 1", dout[1], e1);
      if (n < 15) n_overlap++;
    end
    // from half a clock before the first plaintext load to half a clock
    // after the last capture: 33 clocks per pair
    $display("stream: 16 pairs in %0d clocks", ($time - t0) / 10);
    expect_eq("stream: clocks for 16 pairs", 64'(($time - t0) / 10), 64'(16 * 33));

    // reset in the middle of a block clears the flags; the next block works
    load_keys('0, '1);
    din[0] = '0;
    din[1] = '0;
    data_load = 1'b1;
    @(negedge clk);
    data_load = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_reset++;
    repeat (40) begin
      @(negedge clk);
      expect_eq("no done after reset", 64'(done[0] || done[1]), 64'd0);
    end
    load_keys('0, '1);
    run_pair('0, '1, '0, '0, 1'b0);

    $display("mechanisms: key_load=%0d data_load=%0d parallel_done=%0d wrap=%0d overlap=%0d combined=%0d abandon=%0d reset=%0d",
             n_key_load, n_data_load, n_parallel_done, n_wrap, n_overlap, n_combined, n_abandon, n_reset);
    checks += 8;
    if (n_key_load == 0)      begin failures++; $display("FAIL never: key load"); end
    if (n_data_load == 0)     begin failures++; $display("FAIL never: data load"); end
    if (n_parallel_done == 0) begin failures++; $display("FAIL never: parallel finish"); end
    if (n_wrap == 0)          begin failures++; $display("FAIL never: counter wrap"); end
    if (n_overlap == 0)       begin failures++; $display("FAIL never: overlapped key load"); end
    if (n_combined == 0)      begin failures++; $display("FAIL never: combined load"); end
    if (n_abandon == 0)       begin failures++; $display("FAIL never: abandoned block"); end
    if (n_reset < 2)          begin failures++; $display("FAIL never: reset mid-block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
