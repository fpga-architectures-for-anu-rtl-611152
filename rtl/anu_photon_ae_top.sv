// anu_photon_ae_top: the two proposed ANU-PHOTON authenticated-encryption
// designs side by side on one clock, each with its own ports.
//   ph1_* : ANU-PH I, sequenced from outside by EtM/Sel0/Sel1, the enables
//           ctr and ctr_anu_ii and the resets rst, rst1, rst2 (EtM 49 clocks,
//           MtE 75 clocks per 64-bit block).
//   ph2_* : ANU-PH II, sequenced by its own controller from EtM alone
//           (EtM 49 clocks, MtE 62 clocks per 64-bit block).
//   dec_* : the ANU decryption core, the inverse of the cipher used in both
//           designs (25 clocks per 64-bit block); the authenticated
//           encryption datapaths do not use it.
// Both AE designs take a 128-bit key and a 64-bit message block and give a 64-bit
// ciphertext port and a 100-bit hash (tag) port. See anu_ph1 and anu_ph2
// for the timing of each step.
module anu_photon_ae_top (
  input  logic         clk,
  // ANU-PH I
  input  logic [127:0] ph1_ShKEY,
  input  logic [63:0]  ph1_shmessege,
  input  logic         ph1_ctr,
  input  logic         ph1_ctr_anu_ii,
  input  logic         ph1_EtM,
  input  logic         ph1_Sel0,
  input  logic         ph1_Sel1,
  input  logic         ph1_rst,
  input  logic         ph1_rst1,
  input  logic         ph1_rst2,
  output logic [63:0]  ph1_cipher_text,
  output logic [99:0]  ph1_MACcipher_text,
  // ANU-PH II
  input  logic [127:0] ph2_ShKEY,
  input  logic [63:0]  ph2_shmessege,
  input  logic         ph2_EtM,
  input  logic         ph2_rst,
  input  logic         ph2_rst1,
  output logic [63:0]  ph2_cipher_text,
  output logic [99:0]  ph2_MACcipher_text,
  output logic         ph2_anu_ready,
  output logic         ph2_phot_ready,
  output logic         ph2_done,
  // ANU decryption
  input  logic         dec_rst,
  input  logic         dec_en,
  input  logic [127:0] dec_key,
  input  logic [63:0]  dec_cipher_text,
  output logic [63:0]  dec_plain_text,
  output logic         dec_ready
);

  anu_ph1 u_ph1 (
    .clk            (clk),
    .ShKEY          (ph1_ShKEY),
    .shmessege      (ph1_shmessege),
    .ctr            (ph1_ctr),
    .ctr_anu_ii     (ph1_ctr_anu_ii),
    .EtM            (ph1_EtM),
    .Sel0           (ph1_Sel0),
    .Sel1           (ph1_Sel1),
    .rst            (ph1_rst),
    .rst1           (ph1_rst1),
    .rst2           (ph1_rst2),
    .cipher_text    (ph1_cipher_text),
    .MACcipher_text (ph1_MACcipher_text)
  );

  anu_ph2 u_ph2 (
    .clk            (clk),
    .ShKEY          (ph2_ShKEY),
    .shmessege      (ph2_shmessege),
    .EtM            (ph2_EtM),
    .rst            (ph2_rst),
    .rst1           (ph2_rst1),
    .cipher_text    (ph2_cipher_text),
    .MACcipher_text (ph2_MACcipher_text),
    .anu_ready      (ph2_anu_ready),
    .phot_ready     (ph2_phot_ready),
    .done           (ph2_done)
  );

  anu_dec u_dec (
    .clk      (clk),
    .rst_i    (dec_rst),
    .en_i     (dec_en),
    .key_i    (dec_key),
    .cipher_i (dec_cipher_text),
    .plain_o  (dec_plain_text),
    .ready_o  (dec_ready)
  );

endmodule
