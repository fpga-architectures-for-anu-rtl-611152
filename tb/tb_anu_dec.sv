// tb_anu_dec: decrypts reference-encrypted random blocks with the ANU
// decryption core and checks that the plaintext comes back after 25
// enabled clocks, that the result holds while disabled, and that a second
// block starts when the enable stays high after ready.
module tb_anu_dec;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic         rst, en;
  logic [127:0] key;
  logic [63:0]  ct, pt;
  logic         ready;
  int checks = 0, failures = 0;

  anu_dec dut (.clk(clk), .rst_i(rst), .en_i(en), .key_i(key), .cipher_i(ct),
               .plain_o(pt), .ready_o(ready));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    logic [63:0] p, p2;
    int cyc;
    rst = 1; en = 0; key = '0; ct = '0;
    @(negedge clk);
    rst = 0;
    for (int v = 0; v < 30; v++) begin
      key = (v == 0) ? '0 : rand128();
      p   = (v == 0) ? '0 : rand64();
      ct  = anu_ref(key, p);
      en  = 1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!ready && cyc < 100);
      en = 0;
      check(cyc == 25, $sformatf("latency %0d clocks, expected 25", cyc));
      check(pt == p, $sformatf("vector %0d plaintext %h exp %h", v, pt, p));
      ct = rand64(); key = rand128();
      repeat (2) @(negedge clk);
      check(pt == p && ready, "result holds while disabled");
    end
    key = rand128(); p = rand64(); p2 = rand64();
    ct = anu_ref(key, p); en = 1;
    repeat (25) @(negedge clk);
    check(ready && pt == p, "first of back-to-back blocks");
    ct = anu_ref(key, p2);
    repeat (25) @(negedge clk);
    check(ready && pt == p2, "second of back-to-back blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
