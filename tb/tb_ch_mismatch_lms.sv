// tb_ch_mismatch_lms: sign-sign LMS test.
// Part 1: random codes, every step compared with the update rule
//   ch <- ch - sign(d_b - d_a) * sign(d_a), held when update_en is low.
// Part 2: closed loop. Channel B has a gain of 1.002 relative to channel A;
// the testbench applies (1 + ch_mis) to it, and after 4000 steps of 2^-16 the
// factor must sit within a few steps of -0.002/1.002 * 2^16 (about -131).
// Part 3: saturation at the most negative value with a 6-bit factor.
module tb_ch_mismatch_lms;
  localparam int D_W = 20, CH_W = 20;
  logic clk = 0, rst_n = 0, upd = 0;
  logic signed [D_W-1:0]  da, dbc;
  logic signed [CH_W-1:0] ch;
  logic signed [5:0]      ch_s;
  int checks = 0, failures = 0;

  ch_mismatch_lms #(.D_W(D_W), .CH_W(CH_W), .MU_LSB(1)) dut (
    .clk, .rst_n, .update_en(upd), .d_a(da), .d_b_corr(dbc), .ch_mis(ch));
  ch_mismatch_lms #(.D_W(D_W), .CH_W(6), .MU_LSB(1)) dut_s (
    .clk, .rst_n, .update_en(1'b1), .d_a(20'sd1000), .d_b_corr(20'sd2000), .ch_mis(ch_s));

  always #5 clk = ~clk;

  function automatic int sgn(input longint x);
    return x > 0 ? 1 : (x < 0 ? -1 : 0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int model;
    da = 0; dbc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      upd = ($urandom_range(0, 3) != 0);
      da  = D_W'(int'($urandom_range(0, 200)) - 100);
      dbc = D_W'(int'(da) + int'($urandom_range(0, 6)) - 3);
      if (upd) model = model - sgn(longint'(dbc) - longint'(da)) * sgn(longint'(da));
      @(posedge clk); #1;
      check(int'(ch) == model, $sformatf("step %0d: ch %0d model %0d", n, ch, model));
    end
    // closed loop with a 0.2 % gain mismatch
    rst_n = 0; #1; rst_n = 1;
    upd = 1;
    for (int n = 0; n < 4000; n++) begin
      real xb;
      @(negedge clk);
      da  = D_W'(int'($urandom_range(0, 200000)) - 100000);
      xb  = real'(da) * 1.002;
      dbc = D_W'($rtoi(xb + xb * real'(ch) / 65536.0));
    end
    @(posedge clk); #1;
    $display("converged ch_mis = %0d (expected about %0.1f)", ch, -0.002 / 1.002 * 65536.0);
    check(ch > -140 && ch < -122, "LMS converges to the channel gain mismatch");
    // saturation of the 6-bit copy: always pushed down, must stop at -32
    check(ch_s == -6'sd32, $sformatf("6-bit factor saturates at -32, got %0d", ch_s));
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
