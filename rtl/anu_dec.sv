// anu_dec: iterative ANU decryption core, the inverse of anu_enc.
//
// Decryption needs the round keys in reverse order, so a block takes two
// phases. Key preparation (12 clocks) runs the key register forward two
// updates per clock, from the user key to the key of round 25. Decryption
// (13 clocks) then undoes two rounds per clock, 25 and 24 first and round
// 1 alone in the last clock, stepping the key register backwards with the
// inverse update (counter XOR, inverse S-box on the two low nibbles, rotate
// right by 13). The ciphertext and the key are taken in the first enabled
// clock of a block (after rst_i or a finished block); plain_o is valid and
// ready_o high after 25 enabled clocks. Keeping en_i high after ready_o
// starts the next block. rst_i is synchronous.
//
// The cipher's decryption is only named in the design description (beside
// encryption and key scheduling); this core, its two phases and its 25-clock
// latency are this design's own. The authenticated-encryption datapath
// encrypts only and does not use it.
module anu_dec
  import anu_pkg::*;
(
  input  logic         clk,
  input  logic         rst_i,
  input  logic         en_i,
  input  logic [127:0] key_i,
  input  logic [63:0]  cipher_i,
  output logic [63:0]  plain_o,
  output logic         ready_o
);

  localparam logic [4:0] PREP = 5'd12;   // clocks of key preparation
  localparam logic [4:0] LAST = 5'd24;   // clock that undoes round 1 alone
  localparam logic [4:0] DONE = 5'd25;

  logic [4:0]   cnt_q, step, r;
  logic [127:0] key_q, kbase, kf1, kf2, kb1, kb2;
  logic [63:0]  st_q, d1, d2;
  logic         start, run;

  assign start = en_i && (cnt_q == 5'd0 || cnt_q == DONE);
  assign run   = en_i && (start || cnt_q != DONE);
  assign step  = start ? 5'd0 : cnt_q;
  // Round undone first in this clock (decrypt phase): 25, 23, ..., 1.
  assign r     = 5'd25 - 5'((step - PREP) << 1);

  always_comb begin
    kbase = start ? key_i : key_q;
    // Forward phase: updates after rounds 2*step+1 and 2*step+2.
    kf1 = anu_key_update(kbase, {step[3:0], 1'b0} + 5'd1);
    kf2 = anu_key_update(kf1,   {step[3:0], 1'b0} + 5'd2);
    // Backward phase: key of round r is kbase; step to rounds r-1, r-2.
    kb1 = anu_key_update_inv(kbase, r - 5'd1);
    kb2 = anu_key_update_inv(kb1,   r - 5'd2);
    d1  = anu_round_inv(st_q, kbase[31:0]);
    d2  = anu_round_inv(d1, kb1[31:0]);
  end

  always_ff @(posedge clk) begin
    if (rst_i) begin
      cnt_q <= '0;
      st_q  <= '0;
      key_q <= '0;
    end else if (run) begin
      cnt_q <= step + 5'd1;
      if (step < PREP) begin
        key_q <= kf2;
        if (start) st_q <= cipher_i;
      end else begin
        key_q <= kb2;
        st_q  <= (step == LAST) ? d1 : d2;
      end
    end
  end

  assign plain_o = st_q;
  assign ready_o = (cnt_q == DONE);

endmodule
