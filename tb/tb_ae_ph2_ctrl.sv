// tb_ae_ph2_ctrl: runs the ANU-PH II controller against cycle models of the
// two cores (ANU: 13 enabled clocks per block, restarting when enabled
// after ready; PHOTON: 36 enabled clocks) and checks, for both modes, the
// block sequence the cipher is started on, the hash input selected while
// PHOTON runs, that PHOTON in EtM only starts once the ciphertext is ready,
// that in MtE the plaintext encryption overlaps the hash, and the total of
// 49 (EtM) and 62 (MtE) clocks to done.
module tb_ae_ph2_ctrl;
  import ae_pkg::*;

  logic     clk = 0;
  logic     rst, etm;
  logic     ctr, ctr_anu, rst2, done;
  hin_sel_e m1;
  pt_sel_e  m23;
  int       anu_cnt, ph_cnt;
  logic     anu_ready, phot_ready;
  int checks = 0, failures = 0;

  ae_ph2_ctrl dut (.clk(clk), .rst(rst), .etm_i(etm), .anu_ready_i(anu_ready),
                   .phot_ready_i(phot_ready), .ctr_o(ctr), .ctr_anu_o(ctr_anu), .rst2_o(rst2),
                   .mux1_sel_o(m1), .mux23_sel_o(m23), .done_o(done));

  always #5 clk = ~clk;

  assign anu_ready  = (anu_cnt == 13);
  assign phot_ready = (ph_cnt == 36);

  // Core models; the PHOTON model is reset together with rst, as rst1 is.
  always_ff @(posedge clk) begin
    if (rst2) anu_cnt <= 0;
    else if (ctr_anu) anu_cnt <= (anu_cnt == 13) ? 1 : anu_cnt + 1;
    if (rst) ph_cnt <= 0;
    else if (ctr && ph_cnt < 36) ph_cnt <= ph_cnt + 1;
  end

  initial begin
    repeat (2000) @(posedge clk);
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

  initial begin
    pt_sel_e starts [$];
    int cyc, overlap, bad_m1, ph_before_ct;
    rst = 1; etm = 1;
    for (int mode = 0; mode < 4; mode++) begin
      etm = (mode % 2 == 0);
      rst = 1;
      @(negedge clk);
      @(negedge clk);
      check(rst2 && !ctr && !ctr_anu, "reset holds the cores");
      rst = 0;
      starts.delete();
      cyc = 0; overlap = 0; bad_m1 = 0; ph_before_ct = 0;
      while (!done && cyc < 200) begin
        #1;
        if (ctr_anu && (anu_cnt == 0 || anu_cnt == 13)) starts.push_back(m23);
        if (ctr && ctr_anu) overlap++;
        if (ctr && m1 != (etm ? HIN_CIPHER : HIN_MSG)) bad_m1++;
        if (etm && ctr && starts.size() == 1 && anu_cnt < 13) ph_before_ct++;
        @(negedge clk);
        cyc++;
      end
      cyc--;   // done rises one clock after the last step ends
      check(cyc == (etm ? 49 : 62), $sformatf("etm=%0d: %0d clocks, expected %0d", etm, cyc, etm ? 49 : 62));
      check(bad_m1 == 0, "hash input select while PHOTON runs");
      if (etm) begin
        check(starts.size() == 1 && starts[0] == PT_MSG, "EtM encrypts the message once");
        check(ph_before_ct == 0 && overlap == 0, "EtM hashes only after the ciphertext is ready");
      end else begin
        check(starts.size() == 3, $sformatf("MtE starts %0d blocks, expected 3", starts.size()));
        if (starts.size() == 3)
          check(starts[0] == PT_MSG && starts[1] == PT_HASH_LO && starts[2] == PT_HASH_HI,
                "MtE block order message, hash low, hash high");
        check(overlap == 13, $sformatf("MtE overlap %0d clocks, expected 13", overlap));
      end
      repeat (3) @(negedge clk);
      check(done && !ctr && !ctr_anu, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
