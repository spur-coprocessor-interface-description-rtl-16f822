// tb_data_valid: exhaustive check of the dataValid composite against its truth table
// (valid when dataIsValid, or when dataMayBeValid and procTagMatch are both high).
module tb_data_valid;
  logic mbv, tm, iv, v;
  int checks = 0, failures = 0;
  data_valid dut (.data_may_be_valid(mbv), .proc_tag_match(tm), .data_is_valid(iv), .valid(v));
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // expected outputs for {mbv,tm,iv} = 0..7
    logic [7:0] expect_v = 8'b1110_1010;
    for (int i = 0; i < 8; i++) begin
      {mbv, tm, iv} = 3'(i);
      #1;
      checks++;
      if (v !== expect_v[i]) begin
        failures++;
        $display("FAIL: mbv=%0b tm=%0b iv=%0b valid=%0b", mbv, tm, iv, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
