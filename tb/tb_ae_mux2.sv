// tb_ae_mux2: drives Mux-1 (64 two-input multiplexers) with random data and
// both selects and checks the output.
module tb_ae_mux2;
  import ae_pkg::*;
  import ae_ref_pkg::*;

  hin_sel_e    sel;
  logic [63:0] d0, d1, y;
  int checks = 0, failures = 0;

  ae_mux2 #(.W(64)) dut (.sel_i(sel), .d0_i(d0), .d1_i(d1), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 200; v++) begin
      d0 = rand64(); d1 = rand64();
      sel = (v % 2 == 0) ? HIN_CIPHER : HIN_MSG;
      #1;
      checks++;
      if (y !== ((v % 2 == 0) ? d0 : d1)) begin
        failures++;
        $display("FAIL sel %0d y %h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
