// tb_channel_reconstruct: random test of the per-channel reconstruction.
// For random backend codes, comparator pairs (including the crossed pair
// d0=0, d1=1, which reads as k=0) and random references, the output must equal
// be*2^6 + sum k_s*coef[s] with k = -1/0/+1 worked out from the comparator
// thresholds in the testbench.
module tb_channel_reconstruct;
  localparam int NCAL = 2, BE_BITS = 10, FRAC = 6, D_W = 20;

  logic signed [BE_BITS-1:0] be;
  logic        [NCAL-1:0]    d0, d1;
  logic signed [D_W-1:0]     coef [NCAL];
  logic signed [D_W-1:0]     dout;
  logic clk = 0;
  int checks = 0, failures = 0;

  channel_reconstruct #(.NCAL(NCAL), .BE_BITS(BE_BITS), .FRAC(FRAC), .D_W(D_W)) dut (
    .be_code(be), .d0, .d1, .coef, .d_out(dout));

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint exp_v;
      be = BE_BITS'($urandom);
      d0 = NCAL'($urandom); d1 = NCAL'($urandom);
      foreach (coef[s]) coef[s] = D_W'(int'($urandom_range(0, 80000)));
      #1;
      exp_v = longint'(be) * 64;
      for (int s = 0; s < NCAL; s++) begin
        int k;
        if (d1[s] && d0[s])        k = 1;    // above +Vref/4
        else if (!d1[s] && !d0[s]) k = -1;   // below -Vref/4
        else                       k = 0;
        exp_v += k * longint'(coef[s]);
      end
      checks++;
      if (longint'(dout) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL: be=%0d d0=%b d1=%b got %0d exp %0d", be, d0, d1, dout, exp_v);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
