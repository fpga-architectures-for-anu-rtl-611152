// photon_hash: iterative PHOTON sponge over the 100-bit permutation P100,
// hashing a 148-bit input into a 100-bit value in 36 clocks.
//
// The input is padded with a single 1 and zeros to 3 blocks of 52 bits
// (RATE), taken most significant first. Each block is XORed into the top
// RATE bits of the state in the same clock as the first of its 12 rounds,
// one round per clock, so 3 x 12 = 36 enabled clocks give the result; the
// whole 100-bit state is then the hash value and ready_o stays high.
// din_i is read while the core runs, so it must stay stable until ready_o.
// rst1_i (synchronous) loads the initial value and restarts; ctr_i enables.
//
// The 148-bit input, the 100-bit permutation and output and the 36-clock
// latency come from the design description. The 52-bit rate, the padding,
// the initial value (bytes 25, 52, 52 in the low cells, in the PHOTON style
// n/4, r, r') and one round per clock are this design's choices: with 12
// rounds per permutation they are what makes 148 bits hash in 36 clocks.
module photon_hash
  import photon_pkg::*;
#(
  parameter int unsigned IN_W = 148,
  parameter int unsigned RATE = 52
) (
  input  logic            clk,
  input  logic            rst1_i,   // synchronous reset of the PHOTON logic
  input  logic            ctr_i,    // enable
  input  logic [IN_W-1:0] din_i,
  output logic [99:0]     hash_o,
  output logic            ready_o
);

  localparam int unsigned NBLK  = (IN_W + 1 + RATE - 1) / RATE;
  localparam int unsigned PAD_W = NBLK * RATE;
  localparam logic [99:0] IV    = {76'd0, 8'(100 / 4), 8'(RATE), 8'(RATE)};

  logic [99:0]      st_q, base;
  logic [3:0]       rnd_q;
  logic [3:0]       blk_q;
  logic [PAD_W-1:0] padded;
  logic [RATE-1:0]  blk;
  logic             busy;

  assign padded = {din_i, 1'b1, {(PAD_W - IN_W - 1){1'b0}}};
  assign busy   = (blk_q < 4'(NBLK));

  always_comb begin
    blk = '0;
    for (int b = 0; b < NBLK; b++)
      if (blk_q == 4'(b)) blk = padded[PAD_W - 1 - b*RATE -: RATE];
    base = st_q;
    if (rnd_q == 4'd0) base[99 -: RATE] = st_q[99 -: RATE] ^ blk;
  end

  always_ff @(posedge clk) begin
    if (rst1_i) begin
      st_q  <= IV;
      rnd_q <= '0;
      blk_q <= '0;
    end else if (ctr_i && busy) begin
      st_q <= photon_round(base, rnd_q);
      if (rnd_q == 4'(PH_ROUNDS - 1)) begin
        rnd_q <= '0;
        blk_q <= blk_q + 4'd1;
      end else begin
        rnd_q <= rnd_q + 4'd1;
      end
    end
  end

  assign hash_o  = st_q;
  assign ready_o = !busy;

endmodule
