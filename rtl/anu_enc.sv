// anu_enc: iterative ANU encryption core, one 64-bit block under a 128-bit
// key in 13 clocks.
//
// Two Feistel rounds are computed per clock from a 64-bit state register
// (the last of the 13 clocks computes the single 25th round), so the
// ciphertext is in the register after the 13th enabled clock and ready_o is
// high from then on. A block starts on an enabled clock when the core is idle
// (after rst2_i, or after a finished block): that clock takes the plaintext
// {p_msb_i, p_lsb_i} and the key straight from the inputs, so both must be
// valid in it. Holding ctr_anu_i high after ready_o rises starts the next
// block at once, which the ANU-PH II controller uses to encrypt the two hash
// blocks back to back; drop ctr_anu_i in the clock where ready_o is high to
// keep the result. cipher_o holds the last result while the core is not
// enabled. rst2_i is synchronous and clears the state and the counter.
//
// The 13-clock latency and the 64-bit/128-bit sizes come from the
// design description; the unroll by two and the restart behaviour are this
// design's choices.
module anu_enc
  import anu_pkg::*;
(
  input  logic        clk,
  input  logic        rst2_i,     // synchronous reset of the ANU logic
  input  logic        ctr_anu_i,  // enable
  input  logic [127:0] key_i,
  input  logic [31:0] p_lsb_i,
  input  logic [31:0] p_msb_i,
  output logic [63:0] cipher_o,
  output logic        ready_o
);

  localparam logic [3:0] LAST = 4'(ANU_CYCLES - 1);   // 12
  localparam logic [3:0] DONE = 4'(ANU_CYCLES);       // 13

  logic [3:0]  cnt_q;
  logic [63:0] st_q, base, r1, r2;
  logic        start;
  logic [3:0]  step;
  logic [4:0]  rnd;
  logic [31:0] rk0, rk1;

  assign start = ctr_anu_i && (cnt_q == 4'd0 || cnt_q == DONE);
  assign step  = start ? 4'd0 : cnt_q;
  assign rnd   = {step, 1'b0} + 5'd1;

  anu_key_schedule u_ks (
    .clk    (clk),
    .load_i (start),
    .adv_i  (ctr_anu_i && !start && cnt_q != DONE),
    .key_i  (key_i),
    .rnd_i  (rnd),
    .rk0_o  (rk0),
    .rk1_o  (rk1)
  );

  always_comb begin
    base = start ? {p_msb_i, p_lsb_i} : st_q;
    r1   = anu_round(base, rk0);
    r2   = anu_round(r1, rk1);
  end

  always_ff @(posedge clk) begin
    if (rst2_i) begin
      cnt_q <= '0;
      st_q  <= '0;
    end else if (ctr_anu_i && (start || cnt_q != DONE)) begin
      st_q  <= (step == LAST) ? r1 : r2;
      cnt_q <= step + 4'd1;
    end
  end

  assign cipher_o = st_q;
  assign ready_o  = (cnt_q == DONE);

endmodule
