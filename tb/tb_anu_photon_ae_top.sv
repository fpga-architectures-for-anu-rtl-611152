// tb_anu_photon_ae_top: end-to-end test of the top with both designs
// running at the same time at their default sizes. One thread sequences
// ANU-PH I through every row of its operation table, the other runs ANU-PH
// II from reset to done, both for random keys and messages in both modes.
// Every ciphertext and tag is compared with the reference model, the clock
// counts (PH I: 49/75 enabled clocks, PH II: 49/62 clocks) are checked, and
// each mechanism is counted: the six table rows of PH I, the PH II
// encryption running under the hash, the PH II back-to-back encryption of
// the two hash blocks and the zero-padded hash block. A third thread
// decrypts every ciphertext PH II produced with the ANU decryption core and
// checks that the message (or hash block) comes back. A mechanism that never
// happened counts as a failure.
module tb_anu_photon_ae_top;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] k1, k2;
  logic [63:0]  m1, m2;
  logic         ctr, ctr_anu, etm1, sel0, sel1, rst_a, rst1_a, rst2_a;
  logic         etm2, rst_b, rst1_b;
  logic [63:0]  ct1, ct2;
  logic [99:0]  mac1, mac2;
  logic         anu_ready2, phot_ready2, done2;
  int checks = 0, failures = 0;
  int table_row [1:6];
  logic         dec_rst, dec_en, dec_ready;
  logic [127:0] dec_key;
  logic [63:0]  dec_ct, dec_pt;
  int decrypted = 0;
  // Decryption jobs: key, ciphertext, expected plaintext.
  logic [255:0] jobs [$];
  int ph2_etm = 0, ph2_mte = 0, ph2_overlap = 0, ph2_back_to_back = 0, padded_blocks = 0;

  anu_photon_ae_top dut (
    .clk(clk),
    .ph1_ShKEY(k1), .ph1_shmessege(m1), .ph1_ctr(ctr), .ph1_ctr_anu_ii(ctr_anu),
    .ph1_EtM(etm1), .ph1_Sel0(sel0), .ph1_Sel1(sel1), .ph1_rst(rst_a), .ph1_rst1(rst1_a),
    .ph1_rst2(rst2_a), .ph1_cipher_text(ct1), .ph1_MACcipher_text(mac1),
    .ph2_ShKEY(k2), .ph2_shmessege(m2), .ph2_EtM(etm2), .ph2_rst(rst_b), .ph2_rst1(rst1_b),
    .ph2_cipher_text(ct2), .ph2_MACcipher_text(mac2), .ph2_anu_ready(anu_ready2),
    .ph2_phot_ready(phot_ready2), .ph2_done(done2),
    .dec_rst(dec_rst), .dec_en(dec_en), .dec_key(dec_key), .dec_cipher_text(dec_ct),
    .dec_plain_text(dec_pt), .dec_ready(dec_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // ---- ANU-PH I sequencer --------------------------------------------
  task automatic ph1_step(input int row, input bit anu, input int n);
    logic [2:0] mode [1:6] = '{3'b110, 3'b100, 3'b011, 3'b010, 3'b001, 3'b000};
    {etm1, sel0, sel1} = mode[row];
    rst1_a = !anu; rst2_a = anu;
    @(negedge clk);
    rst1_a = 0; rst2_a = 0;
    if (anu) ctr_anu = 1; else ctr = 1;
    repeat (n) @(negedge clk);
    ctr = 0; ctr_anu = 0;
    table_row[row]++;
  endtask

  task automatic ph1_run(input int nvec);
    ae_out_t e;
    int en;
    for (int v = 0; v < nvec; v++) begin
      k1 = rand128(); m1 = rand64();
      e = etm_ref(k1, m1);
      en = 0;
      ph1_step(1, 1, 13); en += 13;
      check(ct1 == e.ct, "PH I EtM ciphertext");
      ph1_step(2, 0, 36); en += 36;
      check(mac1 == e.tag, "PH I EtM tag");
      check(en == 49, "PH I EtM 49 clocks");
      e = mte_ref(k1, m1);
      en = 0;
      ph1_step(3, 1, 13); en += 13;
      check(ct1 == e.ct, "PH I MtE ciphertext");
      ph1_step(4, 0, 36); en += 36;
      check(mac1 == e.tag, "PH I MtE hash");
      ph1_step(5, 1, 13); en += 13;
      check(ct1 == e.ct_h0, "PH I MtE encrypted hash bits 63:0");
      ph1_step(6, 1, 13); en += 13;
      check(ct1 == e.ct_h1, "PH I MtE encrypted hash bits 99:64");
      padded_blocks++;
      check(en == 75, "PH I MtE 75 clocks");
    end
  endtask

  // ---- ANU-PH II operations -------------------------------------------
  task automatic ph2_run(input int nvec);
    ae_out_t e;
    logic [63:0] got [$];
    int at [$];
    int cyc;
    logic prev;
    for (int v = 0; v < nvec; v++) begin
      etm2 = v[0];
      k2 = rand128(); m2 = rand64();
      e = etm2 ? etm_ref(k2, m2) : mte_ref(k2, m2);
      rst_b = 1; rst1_b = 1;
      @(negedge clk);
      rst_b = 0; rst1_b = 0;
      got.delete(); at.delete();
      cyc = 0; prev = 0;
      while (!done2 && cyc < 200) begin
        @(negedge clk);
        cyc++;
        if (anu_ready2 && !prev) begin
          got.push_back(ct2); at.push_back(cyc);
          if (!phot_ready2 && !etm2) ph2_overlap++;
        end
        prev = anu_ready2;
      end
      check(cyc - 1 == (etm2 ? 49 : 62), $sformatf("PH II done after %0d clocks", cyc - 1));
      check(mac2 == e.tag, "PH II tag");
      if (etm2) begin
        ph2_etm++;
        check(got.size() == 1 && got[0] == e.ct, "PH II EtM ciphertext");
        if (got.size() == 1) jobs.push_back({k2, got[0], m2});
      end else begin
        ph2_mte++;
        check(got.size() == 3, "PH II MtE three ciphertexts");
        if (got.size() == 3) begin
          check(got[0] == e.ct && got[1] == e.ct_h0 && got[2] == e.ct_h1, "PH II MtE ciphertexts");
          if (at[2] - at[1] == 13) ph2_back_to_back++;
          jobs.push_back({k2, got[0], m2});
          jobs.push_back({k2, got[1], e.tag[63:0]});
          jobs.push_back({k2, got[2], 28'd0, e.tag[99:64]});
          padded_blocks++;
        end
      end
    end
  endtask

  // Decrypts queued ciphertexts until both designs have finished.
  bit ae_done = 0;
  task automatic dec_run();
    logic [255:0] j;
    int cyc;
    while (!ae_done || jobs.size() > 0) begin
      if (jobs.size() == 0) begin
        @(negedge clk);
      end else begin
        j = jobs.pop_front();
        dec_key = j[255:128]; dec_ct = j[127:64];
        dec_rst = 1;
        @(negedge clk);
        dec_rst = 0; dec_en = 1;
        cyc = 0;
        do begin @(negedge clk); cyc++; end while (!dec_ready && cyc < 100);
        dec_en = 0;
        check(cyc == 25 && dec_pt == j[63:0], "ANU decryption of a PH II ciphertext");
        decrypted++;
      end
    end
  endtask

  initial begin
    dec_rst = 1; dec_en = 0; dec_key = '0; dec_ct = '0;
    for (int r = 1; r <= 6; r++) table_row[r] = 0;
    ctr = 0; ctr_anu = 0; etm1 = 1; sel0 = 1; sel1 = 1;
    rst_a = 1; rst1_a = 1; rst2_a = 1; k1 = '0; m1 = '0;
    etm2 = 1; rst_b = 1; rst1_b = 1; k2 = '0; m2 = '0;
    @(negedge clk);
    rst_a = 0; rst1_a = 0; rst2_a = 0;
    fork
      ph1_run(6);
      begin ph2_run(12); ae_done = 1; end
      dec_run();
    join
    for (int r = 1; r <= 6; r++) begin
      $display("PH I table row %0d used %0d times", r, table_row[r]);
      check(table_row[r] > 0, $sformatf("table row %0d never used", r));
    end
    $display("PH II EtM %0d, MtE %0d, encrypt under hash %0d, back-to-back %0d, padded blocks %0d",
             ph2_etm, ph2_mte, ph2_overlap, ph2_back_to_back, padded_blocks);
    check(ph2_etm > 0, "PH II EtM never ran");
    check(ph2_mte > 0, "PH II MtE never ran");
    check(ph2_overlap > 0, "PH II encryption under the hash never happened");
    check(ph2_back_to_back > 0, "PH II back-to-back hash block encryption never happened");
    check(padded_blocks > 0, "zero-padded hash block never encrypted");
    $display("decrypted %0d blocks", decrypted);
    check(decrypted > 0, "decryption never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
