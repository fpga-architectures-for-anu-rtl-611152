// tb_photon_hash: hashes random 148-bit inputs (and the 64-bit-in-148
// zero-extended form the datapath uses) and compares the 100-bit result with
// the reference sponge. Checks the 36-clock latency, that disabled clocks do
// not advance the core, and that the result holds after ready.
module tb_photon_hash;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic         rst1, en;
  logic [147:0] din;
  logic [99:0]  hash;
  logic         ready;
  int checks = 0, failures = 0;

  photon_hash dut (.clk(clk), .rst1_i(rst1), .ctr_i(en), .din_i(din),
                   .hash_o(hash), .ready_o(ready));

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
    int cyc;
    logic [99:0] exp_h;
    rst1 = 1; en = 0; din = '0;
    @(negedge clk);
    check(hash == 100'h19_34_34 && !ready, "reset loads the initial value");
    for (int v = 0; v < 40; v++) begin
      din = (v == 0) ? '0 : (v < 20) ? {84'd0, rand64()} : {20'($urandom()), rand64(), rand64()};
      exp_h = photon_hash_ref(din);
      rst1 = 1;
      @(negedge clk);
      rst1 = 0;
      cyc = 0;
      do begin
        // Every fourth vector runs with gaps in the enable.
        en = (v % 4 == 3) ? ($urandom_range(0, 1) == 1) : 1'b1;
        @(negedge clk);
        if (en) cyc++;
      end while (!ready && cyc < 200);
      en = 0;
      check(cyc == 36, $sformatf("latency %0d enabled clocks, expected 36", cyc));
      check(hash == exp_h, $sformatf("vector %0d hash %h exp %h", v, hash, exp_h));
      en = 1;
      repeat (3) @(negedge clk);
      en = 0;
      check(hash == exp_h && ready, "result holds after ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
