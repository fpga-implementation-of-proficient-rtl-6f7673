// present_top -- LANES PRESENT-80 encryption lanes working in parallel under
// one shared control, two by default (a 2 x 64-bit datapath with 2 x 80-bit
// keys).
//
// Each lane is a present_core with its own 80-bit input data_i[n], its own
// key and state registers and round counter, and its own ciphertext output
// data_o[n]. The load strobes key_load and data_load are common to all lanes,
// so the lanes load, run and finish in lock step: LANES blocks are encrypted
// in the 32 clocks that one block takes. Use:
//   1. key_load = 1 for one clock with each lane's 80-bit key on data_i[n];
//   2. data_load = 1 for one clock with each plaintext on data_i[n][63:0];
//   3. both low for 32 clocks; on the last edge every data_o[n] takes its
//      ciphertext and done_o[n] is high for the next clock.
// Step 1 may share the 32nd clock of the previous block, so with a fresh key
// per block a new set of LANES blocks starts every 33 clocks. (Both strobes
// high in one clock load the key and, from its low 64 bits, the plaintext.)
// The latency of 32 clocks per block gives 2 x 64 / 32 = 4 bits per clock at
// LANES = 2; with the load clock included it is 128 / 33.
// The two-lane structure, the shared strobes and the 32-clock latency follow
// the design; the done pulses, the overlap of load and output, and the reset
// of the control flags are this implementation's additions.
module present_top
  import present_pkg::*;
#(
  parameter int unsigned LANES = 2  // parallel encryption lanes
) (
  input  logic   clk_i,
  input  logic   rst_ni,                      // asynchronous, active low
  input  logic   key_load,                    // shared key load strobe
  input  logic   data_load,                   // shared plaintext load strobe
  input  key_t   data_i        [LANES],       // per-lane 80-bit key / plaintext
  output state_t data_o        [LANES],       // per-lane ciphertext
  output logic   done_o        [LANES],       // per-lane ciphertext-written pulse
  output round_t round_counter [LANES]        // per-lane round counter
);

  for (genvar n = 0; n < LANES; n++) begin : g_lane
    present_core u_core (
      .clk_i        (clk_i),
      .rst_ni       (rst_ni),
      .key_load     (key_load),
      .data_load    (data_load),
      .data_i       (data_i[n]),
      .data_o       (data_o[n]),
      .done_o       (done_o[n]),
      .round_counter(round_counter[n])
    );
  end

endmodule
