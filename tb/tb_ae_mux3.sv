// tb_ae_mux3: drives one 32-bit three-input multiplexer (Mux-2/Mux-3) with
// random data and every select code and checks the output, including the
// unused code 3, which gives D0.
module tb_ae_mux3;
  import ae_pkg::*;

  pt_sel_e     sel;
  logic [31:0] d0, d1, d2, y, exp_y;
  int checks = 0, failures = 0;

  ae_mux3 #(.W(32)) dut (.sel_i(sel), .d0_i(d0), .d1_i(d1), .d2_i(d2), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 400; v++) begin
      d0 = $urandom(); d1 = $urandom(); d2 = $urandom();
      sel = pt_sel_e'(v % 4);
      exp_y = (v % 4 == 1) ? d1 : (v % 4 == 2) ? d2 : d0;
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel %0d y %h exp %h", v % 4, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
