// tb_anu_enc: encrypts random blocks with the ANU core and compares the
// ciphertext with the reference cipher. Checks the 13-clock latency, that
// the result holds while the core is not enabled, that keeping the enable
// high after ready starts the next block at once (back-to-back blocks), and
// that rst2 clears the core.
module tb_anu_enc;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic         rst2, en;
  logic [127:0] key;
  logic [63:0]  pt;
  logic [63:0]  ct;
  logic         ready;
  int checks = 0, failures = 0;

  anu_enc dut (.clk(clk), .rst2_i(rst2), .ctr_anu_i(en), .key_i(key),
               .p_lsb_i(pt[31:0]), .p_msb_i(pt[63:32]), .cipher_o(ct), .ready_o(ready));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // Runs one block from an idle core; returns the number of enabled clocks.
  task automatic run_block(output int cycles);
    cycles = 0;
    en = 1;
    do begin
      @(negedge clk);
      cycles++;
    end while (!ready && cycles < 100);
    en = 0;
  endtask

  initial begin
    int cyc;
    logic [63:0] exp_ct, held;
    rst2 = 1; en = 0; key = '0; pt = '0;
    @(negedge clk);
    @(negedge clk);
    check(ct == 64'd0 && !ready, "reset clears state and ready");
    rst2 = 0;
    for (int v = 0; v < 30; v++) begin
      key = (v == 0) ? '0 : rand128();
      pt  = (v == 0) ? '0 : rand64();
      exp_ct = anu_ref(key, pt);
      run_block(cyc);
      check(cyc == 13, $sformatf("latency %0d clocks, expected 13", cyc));
      check(ct == exp_ct, $sformatf("vector %0d ct %h exp %h", v, ct, exp_ct));
      // Result holds while disabled, even if the inputs change.
      held = ct;
      pt = rand64();
      key = rand128();
      repeat (3) @(negedge clk);
      check(ct == held && ready, "result holds while disabled");
    end
    // Back-to-back: enable stays high through ready, a new block starts.
    begin
      logic [63:0] p1, p2;
      key = rand128(); p1 = rand64(); p2 = rand64();
      pt = p1; en = 1;
      repeat (13) @(negedge clk);
      check(ready && ct == anu_ref(key, p1), "first of back-to-back blocks");
      pt = p2;
      repeat (13) @(negedge clk);
      check(ready && ct == anu_ref(key, p2), "second of back-to-back blocks");
      en = 0;
    end
    // Synchronous reset in the middle of a block.
    pt = rand64(); en = 1;
    repeat (5) @(negedge clk);
    rst2 = 1;
    @(negedge clk);
    rst2 = 0;
    check(!ready && ct == 0, "rst2 aborts a block");
    run_block(cyc);
    check(cyc == 13 && ct == anu_ref(key, pt), "block after rst2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
