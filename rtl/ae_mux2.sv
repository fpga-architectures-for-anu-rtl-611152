// ae_mux2: Mux-1 of the datapath, W two-input multiplexers (W = 64) that
// choose the hash input: D0 (the ANU ciphertext, Encrypt-then-MAC) when
// sel_i is HIN_CIPHER, D1 (the message, MAC-then-Encrypt) when HIN_MSG.
// Purely combinational. Its size and inputs are as described for the
// datapath.
module ae_mux2
  import ae_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  hin_sel_e       sel_i,
  input  logic [W-1:0]   d0_i,
  input  logic [W-1:0]   d1_i,
  output logic [W-1:0]   y_o
);
  always_comb begin
    unique case (sel_i)
      HIN_CIPHER: y_o = d0_i;
      HIN_MSG:    y_o = d1_i;
      default:    y_o = d0_i;
    endcase
  end
endmodule
