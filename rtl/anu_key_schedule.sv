// anu_key_schedule: 128-bit ANU key register delivering two round keys per
// clock for the two-round-per-cycle ANU encryption core.
//
// The base key of the current cycle is key_i when load_i is high (first
// cycle of a block) and the stored register otherwise. rk0_o is the key of
// round rnd_i and rk1_o that of round rnd_i+1, each the low 32 bits of the
// key register before its update. On a clock with load_i or adv_i the
// register takes the key after both updates, ready for rounds rnd_i+2 and
// rnd_i+3. The update (rotate left by 13, S-box on the two low nibbles,
// round counter into bits 63:59) is the ANU definition; the
// two-updates-per-clock arrangement is this design's choice, made so that
// 25 rounds fit in the 13 clocks the cipher is given.
module anu_key_schedule
  import anu_pkg::*;
(
  input  logic         clk,
  input  logic         load_i,   // take key_i as the key of round rnd_i
  input  logic         adv_i,    // advance by two rounds
  input  logic [127:0] key_i,
  input  logic [4:0]   rnd_i,    // number (1..25) of the first round this clock
  output logic [31:0]  rk0_o,
  output logic [31:0]  rk1_o
);

  logic [127:0] key_q, base, k1, k2;

  always_comb begin
    base  = load_i ? key_i : key_q;
    k1    = anu_key_update(base, rnd_i);
    k2    = anu_key_update(k1, rnd_i + 5'd1);
    rk0_o = base[31:0];
    rk1_o = k1[31:0];
  end

  always_ff @(posedge clk) begin
    if (load_i || adv_i) key_q <= k2;
  end

endmodule
