// ae_datapath: the ANU-PHOTON authenticated-encryption datapath shared by
// ANU-PH I and ANU-PH II.
//
// The ANU cipher encrypts {Mux-3, Mux-2} = {P_MSB, P_LSB} under the 128-bit
// key. Mux-1 picks the ciphertext (EtM) or the message (MtE); its 64 bits
// are extended with 84 zero bits (bits 147:64) to the 148-bit PHOTON input.
// The 100-bit PHOTON output is the hash value. Mux-2/Mux-3 feed the cipher
// with the message (D0), the low 64 hash bits (D1) or the remaining 36 hash
// bits with 28 zero bits above them (D2), so that in MtE the hash is
// encrypted as two 64-bit blocks. All control (enables, resets, selects)
// comes in through ctrl_i; anu_ready_o and phot_ready_o tell the controller
// when each core has finished. The structure, widths and mux inputs follow
// the datapath as described; the core internals are in anu_enc and
// photon_hash.
module ae_datapath
  import ae_pkg::*;
(
  input  logic         clk,
  input  dp_ctrl_t     ctrl_i,
  input  logic [127:0] key_i,
  input  logic [63:0]  msg_i,
  output logic [63:0]  cipher_o,
  output logic [99:0]  hash_o,
  output logic         anu_ready_o,
  output logic         phot_ready_o
);

  logic [63:0] mux1_y;
  logic [31:0] p_lsb, p_msb;

  ae_mux2 #(.W(64)) u_mux1 (
    .sel_i (ctrl_i.mux1_sel),
    .d0_i  (cipher_o),
    .d1_i  (msg_i),
    .y_o   (mux1_y)
  );

  ae_mux3 #(.W(32)) u_mux2 (
    .sel_i (ctrl_i.mux23_sel),
    .d0_i  (msg_i[31:0]),
    .d1_i  (hash_o[31:0]),
    .d2_i  (hash_o[95:64]),
    .y_o   (p_lsb)
  );

  ae_mux3 #(.W(32)) u_mux3 (
    .sel_i (ctrl_i.mux23_sel),
    .d0_i  (msg_i[63:32]),
    .d1_i  (hash_o[63:32]),
    .d2_i  ({28'd0, hash_o[99:96]}),
    .y_o   (p_msb)
  );

  anu_enc u_anu (
    .clk       (clk),
    .rst2_i    (ctrl_i.rst2),
    .ctr_anu_i (ctrl_i.ctr_anu),
    .key_i     (key_i),
    .p_lsb_i   (p_lsb),
    .p_msb_i   (p_msb),
    .cipher_o  (cipher_o),
    .ready_o   (anu_ready_o)
  );

  photon_hash #(.IN_W(HIN_W), .RATE(52)) u_photon (
    .clk     (clk),
    .rst1_i  (ctrl_i.rst1),
    .ctr_i   (ctrl_i.ctr),
    .din_i   ({84'd0, mux1_y}),
    .hash_o  (hash_o),
    .ready_o (phot_ready_o)
  );

endmodule
