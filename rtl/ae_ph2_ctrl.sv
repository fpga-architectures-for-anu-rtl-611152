// ae_ph2_ctrl: the controller of ANU-PH II. From the mode input EtM and the
// two ready flags it generates the PHOTON enable ctr, the ANU enable
// ctr_anu, the ANU reset rst2 and the mux selects, so that one 64-bit block
// is processed with no outside sequencing after rst is released.
//
//   EtM (49 clocks): S_ENC encrypts the message (clocks 1-13); in the clock
//     where anu_ready rises PHOTON starts on the ciphertext and S_HASH runs
//     it to the end (clocks 14-49).
//   MtE (62 clocks): S_ENC encrypts the message while PHOTON hashes it at
//     the same time (ANU clocks 1-13, PHOTON clocks 1-36); S_HASH waits for
//     phot_ready and in that clock restarts ANU on hash bits 63:0 (clocks
//     37-49); S_ENC_H0 restarts ANU on the padded hash bits 99:64 in the
//     clock where anu_ready rises (clocks 50-62); S_ENC_H1 waits for the end.
// Running the plaintext encryption under the hash is how this design
// saves the 13 clocks that separate 75 (ANU-PH I) from 62; the Mealy-style
// enables that start each next step in the clock its ready flag rises are
// this design's choice. rst (synchronous) holds rst2 high and returns to
// S_ENC; PHOTON's own reset rst1 stays an input of the design, so rst2_o is
// simply rst. done_o is high in S_DONE until the next rst. EtM must be
// stable during an operation. Two assertions state the sequencing rules.
module ae_ph2_ctrl
  import ae_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     etm_i,
  input  logic     anu_ready_i,
  input  logic     phot_ready_i,
  output logic     ctr_o,
  output logic     ctr_anu_o,
  output logic     rst2_o,
  output hin_sel_e mux1_sel_o,
  output pt_sel_e  mux23_sel_o,
  output logic     done_o
);

  typedef enum logic [2:0] {
    S_ENC, S_HASH, S_ENC_H0, S_ENC_H1, S_DONE
  } state_e;

  state_e state_q, state_d;

  always_comb begin
    state_d     = state_q;
    ctr_o       = 1'b0;
    ctr_anu_o   = 1'b0;
    rst2_o      = rst;
    mux1_sel_o  = etm_i ? HIN_CIPHER : HIN_MSG;
    mux23_sel_o = PT_MSG;
    done_o      = 1'b0;
    unique case (state_q)
      S_ENC: begin
        ctr_anu_o = !anu_ready_i;
        if (etm_i) ctr_o = anu_ready_i;
        else       ctr_o = !phot_ready_i;
        if (anu_ready_i) state_d = S_HASH;
      end
      S_HASH: begin
        ctr_o = !phot_ready_i;
        if (!etm_i) begin
          mux23_sel_o = PT_HASH_LO;
          ctr_anu_o   = phot_ready_i;
        end
        if (phot_ready_i) state_d = etm_i ? S_DONE : S_ENC_H0;
      end
      S_ENC_H0: begin
        ctr_anu_o   = 1'b1;
        mux23_sel_o = anu_ready_i ? PT_HASH_HI : PT_HASH_LO;
        if (anu_ready_i) state_d = S_ENC_H1;
      end
      S_ENC_H1: begin
        ctr_anu_o   = !anu_ready_i;
        mux23_sel_o = PT_HASH_HI;
        if (anu_ready_i) state_d = S_DONE;
      end
      S_DONE: begin
        done_o = 1'b1;
      end
      default: state_d = S_ENC;
    endcase
    if (rst) begin
      ctr_o     = 1'b0;
      ctr_anu_o = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= S_ENC;
    else     state_q <= state_d;
  end

  // Encrypt-then-MAC: the hash may only run on a finished ciphertext.
  a_etm_hash_after_cipher: assert property (
    @(posedge clk) disable iff (rst) (etm_i && ctr_o) |-> anu_ready_i);
  // The cipher is never enabled while the controller is finished.
  a_idle_when_done: assert property (
    @(posedge clk) disable iff (rst) done_o |-> !(ctr_o || ctr_anu_o));

endmodule
