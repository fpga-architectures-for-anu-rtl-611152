// ae_mux3: Mux-2 or Mux-3 of the datapath, W three-input multiplexers
// (W = 32) that choose one half of the ANU plaintext: D0 (message half),
// D1 (hash bits 31:0 or 63:32) or D2 (hash bits 95:64, or bits 99:96 with
// 28 zero bits above them). The unused fourth select code gives D0, a choice
// of this design. Purely combinational.
module ae_mux3
  import ae_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  pt_sel_e        sel_i,
  input  logic [W-1:0]   d0_i,
  input  logic [W-1:0]   d1_i,
  input  logic [W-1:0]   d2_i,
  output logic [W-1:0]   y_o
);
  always_comb begin
    case (sel_i)
      PT_MSG:     y_o = d0_i;
      PT_HASH_LO: y_o = d1_i;
      PT_HASH_HI: y_o = d2_i;
      default:    y_o = d0_i;
    endcase
  end
endmodule
