// tb_anu_ph1: acts as the outside sequencer of ANU-PH I. For random keys
// and messages it walks the steps of the operation table, Encrypt-then-MAC
// (EtM,Sel0) = (1,1),(1,0) and MAC-then-Encrypt (EtM,Sel0,Sel1) =
// (0,1,1),(0,1,0),(0,0,1),(0,0,0), counts the enabled clocks of each step and
// compares cipher_text and MACcipher_text with the reference model after
// every step. Totals must be 49 (EtM) and 75 (MtE) clocks.
module tb_anu_ph1;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic [127:0] key;
  logic [63:0]  msg;
  logic         ctr, ctr_anu, etm, sel0, sel1, rst, rst1, rst2;
  logic [63:0]  ct;
  logic [99:0]  mac;
  int checks = 0, failures = 0;

  anu_ph1 dut (.clk(clk), .ShKEY(key), .shmessege(msg), .ctr(ctr), .ctr_anu_ii(ctr_anu),
               .EtM(etm), .Sel0(sel0), .Sel1(sel1), .rst(rst), .rst1(rst1), .rst2(rst2),
               .cipher_text(ct), .MACcipher_text(mac));

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

  // One table step: set the mode, reset the core that will run (one setup
  // clock, in which the State block takes the mode), then enable it for
  // n clocks.
  task automatic step(input logic e, input logic s0, input logic s1, input bit anu, input int n);
    etm = e; sel0 = s0; sel1 = s1;
    rst1 = !anu; rst2 = anu;
    @(negedge clk);
    rst1 = 0; rst2 = 0;
    if (anu) ctr_anu = 1; else ctr = 1;
    repeat (n) @(negedge clk);
    ctr = 0; ctr_anu = 0;
  endtask

  initial begin
    ae_out_t e;
    int enabled;
    ctr = 0; ctr_anu = 0; etm = 1; sel0 = 1; sel1 = 1;
    rst = 1; rst1 = 1; rst2 = 1; key = '0; msg = '0;
    @(negedge clk);
    rst = 0; rst1 = 0; rst2 = 0;
    for (int v = 0; v < 10; v++) begin
      key = rand128(); msg = rand64();
      // EtM: 13 + 36 clocks
      e = etm_ref(key, msg);
      enabled = 0;
      step(1, 1, 0, 1, 13); enabled += 13;
      check(ct == e.ct, $sformatf("EtM cipher_text %h exp %h", ct, e.ct));
      step(1, 0, 0, 0, 36); enabled += 36;
      check(mac == e.tag, $sformatf("EtM MACcipher_text %h exp %h", mac, e.tag));
      check(ct == e.ct, "EtM cipher_text kept while hashing");
      check(enabled == 49, "EtM latency 49");
      // MtE: 13 + 36 + 13 + 13 clocks
      e = mte_ref(key, msg);
      enabled = 0;
      step(0, 1, 1, 1, 13); enabled += 13;
      check(ct == e.ct, $sformatf("MtE cipher_text %h exp %h", ct, e.ct));
      step(0, 1, 0, 0, 36); enabled += 36;
      check(mac == e.tag, $sformatf("MtE hash %h exp %h", mac, e.tag));
      step(0, 0, 1, 1, 13); enabled += 13;
      check(ct == e.ct_h0, $sformatf("MtE hash bits 63:0 encrypted %h exp %h", ct, e.ct_h0));
      step(0, 0, 0, 1, 13); enabled += 13;
      check(ct == e.ct_h1, $sformatf("MtE hash bits 99:64 encrypted %h exp %h", ct, e.ct_h1));
      check(enabled == 75, "MtE latency 75");
    end
    // A step one clock short must not give the result.
    key = rand128(); msg = rand64();
    e = etm_ref(key, msg);
    step(1, 1, 0, 1, 12);
    check(ct != e.ct, "ciphertext needs all 13 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
