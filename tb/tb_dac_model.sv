// tb_dac_model: checks the D/A transfer function vout = VREF*word/2^W at
// zero, mid-scale, full scale and random codes, against values computed here.
module tb_dac_model;
  logic [11:0] word = 0;
  real vout;
  int checks = 0, failures = 0;

  dac_model #(.W(12), .VREF(1.0)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    word = 0;     #1 check(vout == 0.0, "zero code");
    word = 2048;  #1 check(vout > 0.49999 && vout < 0.50001, "mid-scale 0.5 V");
    word = 4095;  #1 check(vout > 0.99970 && vout < 0.99980, "full scale");
    for (int i = 0; i < 200; i++) begin
      word = 12'($urandom);
      #1 e = real'(int'(word)) / 4096.0;
      check(vout > e - 1e-9 && vout < e + 1e-9, "random code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
