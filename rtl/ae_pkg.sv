// ae_pkg: types shared by the ANU-PHOTON authenticated-encryption datapath
// and its two control schemes (ANU-PH I and ANU-PH II).
//
// Mux-1 chooses the hash input: the ANU ciphertext (D0, Encrypt-then-MAC)
// or the message (D1, MAC-then-Encrypt). Mux-2/Mux-3 choose the 64-bit
// cipher input: the message (D0), hash bits 63:0 (D1) or hash bits 99:64
// padded with zeros (D2).
package ae_pkg;

  localparam int unsigned HIN_W   = 148;   // PHOTON input width

  typedef enum logic {
    HIN_CIPHER = 1'b0,   // Mux-1 D0
    HIN_MSG    = 1'b1    // Mux-1 D1
  } hin_sel_e;

  typedef enum logic [1:0] {
    PT_MSG     = 2'd0,   // Mux-2/3 D0
    PT_HASH_LO = 2'd1,   // Mux-2/3 D1
    PT_HASH_HI = 2'd2    // Mux-2/3 D2
  } pt_sel_e;

  // Control bundle that drives the shared datapath.
  typedef struct packed {
    logic     ctr;       // PHOTON enable
    logic     ctr_anu;   // ANU enable
    logic     rst1;      // PHOTON synchronous reset
    logic     rst2;      // ANU synchronous reset
    hin_sel_e mux1_sel;
    pt_sel_e  mux23_sel;
  } dp_ctrl_t;

endpackage
