// anu_ph2: ANU-PH II, the self-sequenced ANU-PHOTON authenticated encryption
// design. The shared datapath is driven by the ae_ph2_ctrl controller, so
// the only control inputs are the mode EtM and the resets rst (controller,
// and through rst2 the ANU core) and rst1 (PHOTON core).
//
// Use: hold rst and rst1 high for a clock with EtM, ShKEY and shmessege set,
// release both and keep the inputs stable. The ciphertext of the message
// appears on cipher_text after 13 clocks. In EtM the tag on MACcipher_text
// is final after 49 clocks. In MtE the tag of the message is on
// MACcipher_text after 36 clocks, its encrypted low 64 bits on cipher_text
// after 49 and its encrypted upper 36 bits (zero padded) after 62.
// anu_ready rises each time a new ciphertext is on cipher_text;
// phot_ready marks the final tag; done goes high when the operation is over.
// The ready flags and done are brought out as ports in addition to the six
// inputs and two outputs of the design's top-level symbol, so that a user
// can tell when to sample the shared cipher_text port.
module anu_ph2
  import ae_pkg::*;
(
  input  logic         clk,
  input  logic [127:0] ShKEY,
  input  logic [63:0]  shmessege,
  input  logic         EtM,
  input  logic         rst,
  input  logic         rst1,
  output logic [63:0]  cipher_text,
  output logic [99:0]  MACcipher_text,
  output logic         anu_ready,
  output logic         phot_ready,
  output logic         done
);

  dp_ctrl_t ctrl;
  logic     ctr, ctr_anu, rst2;
  hin_sel_e mux1_sel;
  pt_sel_e  mux23_sel;

  ae_ph2_ctrl u_ctrl (
    .clk          (clk),
    .rst          (rst),
    .etm_i        (EtM),
    .anu_ready_i  (anu_ready),
    .phot_ready_i (phot_ready),
    .ctr_o        (ctr),
    .ctr_anu_o    (ctr_anu),
    .rst2_o       (rst2),
    .mux1_sel_o   (mux1_sel),
    .mux23_sel_o  (mux23_sel),
    .done_o       (done)
  );

  always_comb begin
    ctrl.ctr       = ctr;
    ctrl.ctr_anu   = ctr_anu;
    ctrl.rst1      = rst1;
    ctrl.rst2      = rst2;
    ctrl.mux1_sel  = mux1_sel;
    ctrl.mux23_sel = mux23_sel;
  end

  ae_datapath u_dp (
    .clk          (clk),
    .ctrl_i       (ctrl),
    .key_i        (ShKEY),
    .msg_i        (shmessege),
    .cipher_o     (cipher_text),
    .hash_o       (MACcipher_text),
    .anu_ready_o  (anu_ready),
    .phot_ready_o (phot_ready)
  );

endmodule
