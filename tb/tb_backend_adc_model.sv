// tb_backend_adc_model: the ideal 10-bit backend. The centre of every code
// bin, (c + 0.5)/512 Vref, must give code c, points just inside each bin edge
// too, and inputs beyond +/-Vref clip to 511 and -512.
module tb_backend_adc_model;
  real vin = 0.0;
  logic signed [9:0] code;
  logic clk = 0;
  int checks = 0, failures = 0;

  backend_adc_model #(.BITS(10), .VREF(1.0)) dut (.vin, .code);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int c = -512; c < 512; c++) begin
      vin = (c + 0.5) / 512.0; #1;
      check(int'(code) == c, $sformatf("bin centre %0d gave %0d", c, code));
      vin = (c + 0.001) / 512.0; #1;
      check(int'(code) == c, $sformatf("bin start %0d gave %0d", c, code));
      vin = (c + 0.999) / 512.0; #1;
      check(int'(code) == c, $sformatf("bin end %0d gave %0d", c, code));
      @(posedge clk);
    end
    vin = 1.3;  #1; check(code == 10'sd511, "clip high");
    vin = -1.3; #1; check(code == -10'sd512, "clip low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
