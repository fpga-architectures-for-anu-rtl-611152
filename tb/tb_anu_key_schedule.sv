// tb_anu_key_schedule: checks the two round keys per clock of the ANU key
// register against the reference key schedule for random keys, over all
// 25 rounds (load in the first clock, then twelve advances).
module tb_anu_key_schedule;
  import ae_ref_pkg::*;

  logic         clk = 0;
  logic         load, adv;
  logic [127:0] key;
  logic [4:0]   rnd;
  logic [31:0]  rk0, rk1;
  int checks = 0, failures = 0;

  anu_key_schedule dut (.clk(clk), .load_i(load), .adv_i(adv), .key_i(key),
                        .rnd_i(rnd), .rk0_o(rk0), .rk1_o(rk1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; adv = 0; key = '0; rnd = 1;
    @(negedge clk);
    for (int v = 0; v < 20; v++) begin
      key = (v == 0) ? '0 : rand128();
      for (int s = 0; s < 13; s++) begin
        load = (s == 0);
        adv  = (s != 0);
        rnd  = 5'(2*s + 1);
        #1;
        checks++;
        if (rk0 !== anu_rk_ref(key, 2*s + 1)) begin
          failures++;
          $display("FAIL key %0d round %0d rk %h exp %h", v, 2*s+1, rk0, anu_rk_ref(key, 2*s+1));
        end
        if (s < 12) begin
          checks++;
          if (rk1 !== anu_rk_ref(key, 2*s + 2)) begin
            failures++;
            $display("FAIL key %0d round %0d rk %h exp %h", v, 2*s+2, rk1, anu_rk_ref(key, 2*s+2));
          end
        end
        @(negedge clk);
      end
      // Holding: with neither load nor adv the register keeps its value.
      load = 0; adv = 0; rnd = 5'd27;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
