// tb_carry_predict_mux: self-checking test of the carry prediction mux.
//
// All eight combinations of cpre, ac and acc_mode: rec must equal ac in
// accurate mode (acc_mode = 1) and cpre in approximate mode (acc_mode = 0).
module tb_carry_predict_mux;
  int checks = 0, failures = 0;
  logic cpre, ac, acc_mode, rec;

  carry_predict_mux dut (.cpre, .ac, .acc_mode, .rec);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {acc_mode, ac, cpre} = 3'(v);
      #1;
      checks++;
      if (rec !== (acc_mode ? ac : cpre)) begin
        failures++;
        $display("cpre=%b ac=%b acc_mode=%b: rec=%b", cpre, ac, acc_mode, rec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
