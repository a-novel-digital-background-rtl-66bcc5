// tb_split_output: random test of the output combiner. The expected code is
// worked out in real arithmetic: the mean of the two channels (or the one
// selected channel) divided by 2^6, rounded half up, limited to
// [-2048, 2047]; dout_valid follows in_valid one clock later.
module tb_split_output;
  import cal_pkg::*;
  localparam int D_W = 20, FRAC = 6, OUT_BITS = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [D_W-1:0] da = 0, db = 0;
  out_sel_e sel = OUT_AVG;
  logic signed [OUT_BITS-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int n_sat = 0;

  split_output #(.D_W(D_W), .FRAC(FRAC), .OUT_BITS(OUT_BITS)) dut (
    .clk, .rst_n, .in_valid, .d_a(da), .d_b(db), .sel, .dout, .dout_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      real x;
      int  e;
      @(negedge clk);
      da = D_W'(int'($urandom_range(0, 300000)) - 150000);
      db = D_W'(int'(da) + int'($urandom_range(0, 2000)) - 1000);
      sel = out_sel_e'($urandom_range(0, 2));
      in_valid = n[0];
      unique case (sel)
        OUT_A_ONLY: x = real'(da);
        OUT_B_ONLY: x = real'(db);
        default:    x = (real'(da) + real'(db)) / 2.0;
      endcase
      e = $rtoi($floor(x / 64.0 + 0.5));
      if (e > 2047) begin e = 2047; n_sat++; end
      if (e < -2048) begin e = -2048; n_sat++; end
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != e || dout_valid != in_valid) begin
        failures++;
        if (failures < 10) $display("FAIL: a=%0d b=%0d sel=%0d got %0d exp %0d", da, db, sel, dout, e);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
