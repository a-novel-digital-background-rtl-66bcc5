// tb_ladder_tolerance: the measured references must not depend on how
// accurate the calibration voltages are. Three copies of the ADC, identical
// except for the resistor string, convert the same 0.8 Vref sine: one with an
// exact ladder, one with inner taps off by 1 % of Vref, one by 3 % (the
// pattern of ref_ladder_model). After the first calibration pass the four
// references of each copy must agree with those of the exact ladder within
// half an LSB (32 in units of 1/64 LSB). Without the alternating sum of the
// eight steps, a 3 % tap error would move a first-stage reference by about
// 0.03 * 2^16, some 2000 units; what remains is averaging noise, since each
// copy's backend rounds its own residues differently (about 20 units seen).
module tb_ladder_tolerance;
  localparam int  NS = 8192, FBIN = 733;
  localparam real PI = 3.14159265358979;
  localparam real ERRS [3] = '{0.0, 0.01, 0.03};

  logic clk = 0, rst_n = 0;
  real  vin = 0.0;
  logic done [3];
  logic signed [19:0] ca [3][2];
  logic signed [19:0] cb [3][2];
  int checks = 0, failures = 0;

  for (genvar j = 0; j < 3; j++) begin : g_adc
    logic signed [11:0] dout;
    logic               val;
    logic signed [19:0] ch;
    split_pipelined_adc #(.TAP_ERR(ERRS[j])) u_adc (
      .clk, .rst_n, .cal_enable(1'b1), .vin, .dout, .dout_valid(val),
      .cal_done(done[j]), .ch_mis(ch), .coef_a(ca[j]), .coef_b(cb[j]));
  end

  always #5 clk = ~clk;

  longint n_in = 0;
  always @(negedge clk) begin
    n_in <= n_in + 1;
    vin  <= 0.8 * $sin(2.0 * PI * real'(FBIN) * real'(n_in + 1) / real'(NS));
  end

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    repeat (5) @(posedge clk);
    for (int j = 0; j < 3; j++)
      $display("tap error %0.2f: A %0d %0d  B %0d %0d", ERRS[j], ca[j][0], ca[j][1], cb[j][0], cb[j][1]);
    for (int j = 1; j < 3; j++)
      for (int s = 0; s < 2; s++) begin
        check(iabs(int'(ca[j][s]) - int'(ca[0][s])) <= 32, $sformatf("tap error %0.2f, A stage %0d", ERRS[j], s + 1));
        check(iabs(int'(cb[j][s]) - int'(cb[0][s])) <= 32, $sformatf("tap error %0.2f, B stage %0d", ERRS[j], s + 1));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
