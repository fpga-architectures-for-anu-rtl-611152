// tb_ae_state_logic: applies every EtM/Sel0/Sel1 combination of the ANU-PH I
// operation table and checks the registered mux selects one clock later,
// and the reset value.
module tb_ae_state_logic;
  import ae_pkg::*;

  logic     clk = 0;
  logic     rst, etm, sel0, sel1;
  hin_sel_e s0;
  pt_sel_e  s1;
  int checks = 0, failures = 0;

  ae_state_logic dut (.clk(clk), .rst(rst), .etm_i(etm), .sel0_i(sel0), .sel1_i(sel1),
                      .state0_o(s0), .state1_o(s1));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Expected (Mux-1, Mux-2/3) per {EtM, Sel0, Sel1}, from the table.
    hin_sel_e e0 [8];
    pt_sel_e  e1 [8];
    e0 = '{HIN_MSG, HIN_MSG, HIN_MSG, HIN_MSG, HIN_CIPHER, HIN_CIPHER, HIN_CIPHER, HIN_CIPHER};
    e1 = '{PT_HASH_HI, PT_HASH_LO, PT_MSG, PT_MSG, PT_MSG, PT_MSG, PT_MSG, PT_MSG};
    rst = 1; etm = 0; sel0 = 0; sel1 = 0;
    @(negedge clk);
    checks++;
    if (s0 != HIN_CIPHER || s1 != PT_MSG) begin failures++; $display("FAIL reset value"); end
    rst = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++) begin
        {etm, sel0, sel1} = 3'(c);
        #1;
        // Registered: not yet changed unless it equals the previous value.
        @(negedge clk);
        checks++;
        if (s0 != e0[c] || s1 != e1[c]) begin
          failures++;
          $display("FAIL etm/sel0/sel1=%b state0=%0d state1=%0d", 3'(c), s0, s1);
        end
      end
    // One-clock latency: change the inputs and look before the clock.
    {etm, sel0, sel1} = 3'b001;
    @(negedge clk);
    {etm, sel0, sel1} = 3'b000;
    #1;
    checks++;
    if (s1 != PT_HASH_LO) begin failures++; $display("FAIL select changed before the clock"); end
    @(negedge clk);
    checks++;
    if (s1 != PT_HASH_HI) begin failures++; $display("FAIL select did not follow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
