// anu_ph1: ANU-PH I, the externally sequenced ANU-PHOTON authenticated
// encryption design.
//
// The shared datapath is driven directly by the inputs: ctr enables PHOTON,
// ctr_anu_ii enables ANU, rst1 and rst2 reset PHOTON and ANU, and the
// State block turns EtM, Sel0 and Sel1 into the mux selects one clock later;
// rst resets the State block. An outside sequencer walks the steps of the
// operation table:
//   EtM : (EtM=1,Sel0=1) encrypt 13 clocks -> cipher_text;
//         (EtM=1,Sel0=0) hash the ciphertext 36 clocks -> MACcipher_text.
//         49 clocks in all.
//   MtE : (0,1,1) encrypt the plaintext 13 clocks; (0,1,0) hash the
//         plaintext 36 clocks; (0,0,1) encrypt hash bits 63:0 13 clocks;
//         (0,0,0) encrypt hash bits 99:64 padded, 13 clocks. 75 clocks.
// The ANU core starts a block on its first enabled clock after rst2 (or
// after a finished block), so between two encryptions the sequencer either
// pulses rst2 or drops ctr_anu_ii. The port list is that of the design's
// top-level symbol ("shmessege" is spelled as printed there); the clocking
// of each step is this implementation's.
module anu_ph1
  import ae_pkg::*;
(
  input  logic         clk,
  input  logic [127:0] ShKEY,
  input  logic [63:0]  shmessege,
  input  logic         ctr,
  input  logic         ctr_anu_ii,
  input  logic         EtM,
  input  logic         Sel0,
  input  logic         Sel1,
  input  logic         rst,
  input  logic         rst1,
  input  logic         rst2,
  output logic [63:0]  cipher_text,
  output logic [99:0]  MACcipher_text
);

  dp_ctrl_t ctrl;
  hin_sel_e state0;
  pt_sel_e  state1;

  ae_state_logic u_state (
    .clk      (clk),
    .rst      (rst),
    .etm_i    (EtM),
    .sel0_i   (Sel0),
    .sel1_i   (Sel1),
    .state0_o (state0),
    .state1_o (state1)
  );

  always_comb begin
    ctrl.ctr       = ctr;
    ctrl.ctr_anu   = ctr_anu_ii;
    ctrl.rst1      = rst1;
    ctrl.rst2      = rst2;
    ctrl.mux1_sel  = state0;
    ctrl.mux23_sel = state1;
  end

  // The ready flags are used by ANU-PH II only; here the sequencer counts.
  ae_datapath u_dp (
    .clk          (clk),
    .ctrl_i       (ctrl),
    .key_i        (ShKEY),
    .msg_i        (shmessege),
    .cipher_o     (cipher_text),
    .hash_o       (MACcipher_text),
    .anu_ready_o  (),
    .phot_ready_o ()
  );

endmodule
