// tb_ae_datapath: drives the control bundle of the shared datapath by hand
// through an Encrypt-then-MAC and a MAC-then-Encrypt sequence for random
// keys and messages and compares the ciphertext, the hash, the encrypted
// hash blocks and the ready flags with the reference model.
module tb_ae_datapath;
  import ae_pkg::*;
  import ae_ref_pkg::*;

  logic         clk = 0;
  dp_ctrl_t     ctrl;
  logic [127:0] key;
  logic [63:0]  msg;
  logic [63:0]  ct;
  logic [99:0]  hash;
  logic         anu_ready, phot_ready;
  int checks = 0, failures = 0;

  ae_datapath dut (.clk(clk), .ctrl_i(ctrl), .key_i(key), .msg_i(msg), .cipher_o(ct),
                   .hash_o(hash), .anu_ready_o(anu_ready), .phot_ready_o(phot_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic idle();
    ctrl.ctr = 0; ctrl.ctr_anu = 0; ctrl.rst1 = 0; ctrl.rst2 = 0;
  endtask

  // Resets both cores for one clock with the given selects.
  task automatic reset_cores(input hin_sel_e m1, input pt_sel_e m23);
    idle();
    ctrl.mux1_sel = m1; ctrl.mux23_sel = m23;
    ctrl.rst1 = 1; ctrl.rst2 = 1;
    @(negedge clk);
    idle();
  endtask

  task automatic run_anu(input pt_sel_e m23, output int cyc);
    ctrl.mux23_sel = m23;
    ctrl.rst2 = 1;
    @(negedge clk);
    ctrl.rst2 = 0;
    ctrl.ctr_anu = 1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!anu_ready && cyc < 100);
    ctrl.ctr_anu = 0;
  endtask

  task automatic run_photon(input hin_sel_e m1, output int cyc);
    ctrl.mux1_sel = m1;
    ctrl.rst1 = 1;
    @(negedge clk);
    ctrl.rst1 = 0;
    ctrl.ctr = 1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!phot_ready && cyc < 100);
    ctrl.ctr = 0;
  endtask

  initial begin
    ae_out_t e;
    int c1, c2, c3, c4;
    idle();
    ctrl.mux1_sel = HIN_CIPHER; ctrl.mux23_sel = PT_MSG;
    key = '0; msg = '0;
    for (int v = 0; v < 12; v++) begin
      key = rand128(); msg = rand64();
      // Encrypt-then-MAC
      e = etm_ref(key, msg);
      reset_cores(HIN_CIPHER, PT_MSG);
      run_anu(PT_MSG, c1);
      check(ct == e.ct, $sformatf("EtM ct %h exp %h", ct, e.ct));
      run_photon(HIN_CIPHER, c2);
      check(hash == e.tag, $sformatf("EtM tag %h exp %h", hash, e.tag));
      check(c1 + c2 == 49, $sformatf("EtM %0d+%0d clocks, expected 49", c1, c2));
      // MAC-then-Encrypt
      e = mte_ref(key, msg);
      reset_cores(HIN_MSG, PT_MSG);
      run_anu(PT_MSG, c1);
      check(ct == e.ct, $sformatf("MtE ct %h exp %h", ct, e.ct));
      run_photon(HIN_MSG, c2);
      check(hash == e.tag, $sformatf("MtE tag %h exp %h", hash, e.tag));
      run_anu(PT_HASH_LO, c3);
      check(ct == e.ct_h0, $sformatf("MtE hash lo %h exp %h", ct, e.ct_h0));
      run_anu(PT_HASH_HI, c4);
      check(ct == e.ct_h1, $sformatf("MtE hash hi %h exp %h", ct, e.ct_h1));
      check(c1 + c2 + c3 + c4 == 75, $sformatf("MtE %0d clocks, expected 75", c1+c2+c3+c4));
      check(anu_ready && phot_ready, "both ready at the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
