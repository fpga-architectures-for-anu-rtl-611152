// ae_state_logic: the "State" block of ANU-PH I. It registers the two
// datapath mux selects decoded from the external mode inputs EtM, Sel0 and
// Sel1, following the operation table of the scheme:
//   EtM=1            : Mux-1 = ciphertext (D0), Mux-2/3 = message (D0)
//   EtM=0, Sel0=1    : Mux-1 = message (D1),    Mux-2/3 = message (D0)
//                      (Sel1=1 encrypt the plaintext, Sel1=0 hash it)
//   EtM=0, Sel0=0, Sel1=1 : Mux-2/3 = hash bits 63:0 (D1)
//   EtM=0, Sel0=0, Sel1=0 : Mux-2/3 = hash bits 99:64 padded (D2)
// state0_o drives Mux-1 and state1_o drives Mux-2 and Mux-3. The selects
// change one clock after the mode inputs. rst (synchronous) gives the EtM
// selects. The decoding follows the table; registering the selects and the
// reset value are this design's choices (the block is clocked and reset,
// its insides are not given).
module ae_state_logic
  import ae_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     etm_i,
  input  logic     sel0_i,
  input  logic     sel1_i,
  output hin_sel_e state0_o,
  output pt_sel_e  state1_o
);

  hin_sel_e s0_d;
  pt_sel_e  s1_d;

  always_comb begin
    if (etm_i) begin
      s0_d = HIN_CIPHER;
      s1_d = PT_MSG;
    end else begin
      s0_d = HIN_MSG;
      unique casez ({sel0_i, sel1_i})
        2'b1?:   s1_d = PT_MSG;
        2'b01:   s1_d = PT_HASH_LO;
        default: s1_d = PT_HASH_HI;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state0_o <= HIN_CIPHER;
      state1_o <= PT_MSG;
    end else begin
      state0_o <= s0_d;
      state1_o <= s1_d;
    end
  end

endmodule
