// photon_pkg: constants and the round function of the 100-bit PHOTON
// permutation P100 (5 x 5 cells of 4 bits, 12 rounds).
//
// The state is held MSB first: cell (row i, column j) is bits
// 99-4*(5i+j) downto 96-4*(5i+j). A round is AddConstants (round constant
// and row constant into column 0), SubCells (the PRESENT S-box), ShiftRows
// (row i rotated left by i cells) and MixColumnsSerial (the serial matrix
// with last row 1,2,9,9,2 applied five times, over GF(2^4) modulo
// x^4 + x + 1). These follow the published PHOTON definition; the design
// description names PHOTON and its 100-bit permutation but not the internals.
package photon_pkg;

  localparam int unsigned PH_ROUNDS  = 12;

  localparam logic [3:0] PH_SBOX [16] = '{
    4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
    4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2
  };
  localparam logic [3:0] PH_RC [12] = '{
    4'd1, 4'd3, 4'd7, 4'd14, 4'd13, 4'd11, 4'd6, 4'd12, 4'd9, 4'd2, 4'd5, 4'd10
  };
  localparam logic [3:0] PH_IC [5] = '{4'd0, 4'd1, 4'd3, 4'd6, 4'd4};
  localparam logic [3:0] PH_Z  [5] = '{4'd1, 4'd2, 4'd9, 4'd9, 4'd2};

  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p = p ^ x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

  function automatic logic [99:0] photon_round(input logic [99:0] s,
                                               input logic [3:0]  rnd);
    logic [3:0] c [5][5];
    logic [3:0] t [5][5];
    logic [3:0] col [5];
    logic [3:0] acc;
    logic [99:0] y;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        c[i][j] = s[99 - 4*(5*i + j) -: 4];
    // AddConstants
    for (int i = 0; i < 5; i++) c[i][0] = c[i][0] ^ PH_RC[rnd] ^ PH_IC[i];
    // SubCells
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        c[i][j] = PH_SBOX[c[i][j]];
    // ShiftRows
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        t[i][j] = c[i][(j + i) % 5];
    // MixColumnsSerial
    for (int j = 0; j < 5; j++) begin
      for (int i = 0; i < 5; i++) col[i] = t[i][j];
      for (int step = 0; step < 5; step++) begin
        acc = '0;
        for (int k = 0; k < 5; k++) acc = acc ^ gf16_mul(PH_Z[k], col[k]);
        for (int k = 0; k < 4; k++) col[k] = col[k+1];
        col[4] = acc;
      end
      for (int i = 0; i < 5; i++) t[i][j] = col[i];
    end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        y[99 - 4*(5*i + j) -: 4] = t[i][j];
    return y;
  endfunction

endpackage
