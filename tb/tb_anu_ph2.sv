// tb_anu_ph2: runs ANU-PH II in both modes for random keys and messages.
// After reset it only watches: it captures cipher_text each time anu_ready
// rises, compares the captured blocks and MACcipher_text with the reference
// model and checks the clock of each event: ciphertext after 13 clocks,
// EtM tag after 49, MtE hash after 36 and encrypted hash blocks after 49
// and 62.
module tb_anu_ph2;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] key;
  logic [63:0]  msg;
  logic         etm, rst, rst1;
  logic [63:0]  ct;
  logic [99:0]  mac;
  logic         anu_ready, phot_ready, done;
  int checks = 0, failures = 0;

  anu_ph2 dut (.clk(clk), .ShKEY(key), .shmessege(msg), .EtM(etm), .rst(rst), .rst1(rst1),
               .cipher_text(ct), .MACcipher_text(mac), .anu_ready(anu_ready),
               .phot_ready(phot_ready), .done(done));

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

  initial begin
    ae_out_t e;
    logic [63:0] got [$];
    int          at [$];
    int cyc, tag_at;
    logic prev_ready;
    etm = 1; rst = 1; rst1 = 1; key = '0; msg = '0;
    for (int v = 0; v < 16; v++) begin
      etm = v[0];
      key = rand128(); msg = rand64();
      e = etm ? etm_ref(key, msg) : mte_ref(key, msg);
      rst = 1; rst1 = 1;
      @(negedge clk);
      rst = 0; rst1 = 0;
      got.delete(); at.delete();
      cyc = 0; tag_at = -1; prev_ready = 0;
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
        if (anu_ready && !prev_ready) begin got.push_back(ct); at.push_back(cyc); end
        if (phot_ready && tag_at < 0) tag_at = cyc;
        prev_ready = anu_ready;
      end
      // cyc counts clocks since reset release; done rises one clock after the last working clock.
      if (etm) begin
        check(got.size() == 1, "EtM: one ciphertext");
        if (got.size() == 1) check(got[0] == e.ct && at[0] == 13,
                                   $sformatf("EtM ct %h at %0d, exp %h at 13", got[0], at[0], e.ct));
        check(tag_at == 49, $sformatf("EtM tag after %0d clocks, expected 49", tag_at));
        check(mac == e.tag, $sformatf("EtM tag %h exp %h", mac, e.tag));
      end else begin
        check(got.size() == 3, $sformatf("MtE: %0d ciphertexts, expected 3", got.size()));
        if (got.size() == 3) begin
          check(got[0] == e.ct    && at[0] == 13, "MtE ciphertext of the message at 13");
          check(got[1] == e.ct_h0 && at[1] == 49, "MtE encrypted hash bits 63:0 at 49");
          check(got[2] == e.ct_h1 && at[2] == 62,
                $sformatf("MtE encrypted hash bits 99:64 %h at %0d, exp %h at 62", got[2], at[2], e.ct_h1));
        end
        check(tag_at == 36, $sformatf("MtE hash after %0d clocks, expected 36", tag_at));
        check(mac == e.tag, $sformatf("MtE hash %h exp %h", mac, e.tag));
      end
      check(cyc - 1 == (etm ? 49 : 62), $sformatf("done after %0d clocks", cyc - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
