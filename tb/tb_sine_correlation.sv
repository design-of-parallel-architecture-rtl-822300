// tb_sine_correlation: the sine-wave correlation examples run on the 32-lag
// linear correlator at its default size.
//
// A 1 Hz sine sampled at 200 Hz, N = 1024 samples, is quantised to signed
// 8 bits (amplitude 100 for the autocorrelation). One correlator takes the
// sine on both paths (autocorrelation); a second takes a smaller sine
// (amplitude 4) undelayed and the same sine plus Gaussian noise of ten times
// its amplitude (standard deviation 40, clipped to 8 bits) delayed
// (cross-correlation). Every lag 0..31 of both is compared with sums computed
// here. The autocorrelation must also peak at lag 0 and fall with the lag
// over these 32 lags (a quarter period is 50 samples).
module tb_sine_correlation;
  localparam int N = 1024;
  localparam int LAGS = 32;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en;
  logic [7:0] xa, xb, yb;
  logic [7:0] u0, d0, u1, d1;
  logic [LAGS-1:0][31:0] racc, xacc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  linear_correlator dut_auto (.clk, .rst_n, .clr, .en, .und_in(xa), .del_in(xa),
                              .und_out(u0), .del_out(d0), .acc(racc));
  linear_correlator dut_cross (.clk, .rst_n, .clr, .en, .und_in(xb), .del_in(yb),
                               .und_out(u1), .del_out(d1), .acc(xacc));

  int sa [N];
  int sb [N];
  int sy [N];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic int clip8(int v);
    return (v > 127) ? 127 : ((v < -128) ? -128 : v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp, prev;
    real g;
    for (int n = 0; n < N; n++) begin
      sa[n] = $rtoi($floor(100.0 * $sin(2.0 * PI * n / 200.0) + 0.5));
      sb[n] = $rtoi($floor(4.0 * $sin(2.0 * PI * n / 200.0) + 0.5));
      g = 0.0;
      for (int i = 0; i < 12; i++) g += real'($urandom_range(0, 65535)) / 65536.0;
      sy[n] = clip8(sb[n] + $rtoi($floor(40.0 * (g - 6.0) + 0.5)));
    end
    clr = 0; en = 0; xa = 0; xb = 0; yb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int n = 0; n < N; n++) begin
      en = 1;
      xa = 8'(sa[n]);
      xb = 8'(sb[n]);
      yb = 8'(sy[n]);
      @(negedge clk);
    end
    en = 0;
    repeat (2) @(negedge clk);
    prev = 0;
    for (int k = 0; k < LAGS; k++) begin
      exp = 0;
      for (int n = k; n < N; n++) exp += longint'(sa[n]) * longint'(sa[n-k]);
      check($sformatf("Rxx(%0d)", k), longint'($signed(racc[k])), exp);
      if (k > 0) check($sformatf("Rxx falls at lag %0d", k), longint'(exp < prev), 1);
      prev = exp;
      exp = 0;
      for (int n = k; n < N; n++) exp += longint'(sb[n]) * longint'(sy[n-k]);
      check($sformatf("Rxy(%0d)", k), longint'($signed(xacc[k])), exp);
    end
    for (int k = 1; k < LAGS; k++)
      check($sformatf("Rxx(0) >= Rxx(%0d)", k),
            longint'($signed(racc[0]) >= $signed(racc[k])), 1);
    $display("Rxx(0)=%0d Rxx(31)=%0d Rxy(0)=%0d", $signed(racc[0]), $signed(racc[31]),
             $signed(xacc[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
