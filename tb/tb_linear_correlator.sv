// tb_linear_correlator: self-checking test of the linear (lag) correlator.
//
// Two instances: a signed 32-lag correlator starting at lag 0 and an
// unsigned 8-lag correlator starting at lag 8 (as used by the later
// sampling time blocks of the multiple-tau correlator). Each frame clears
// the correlators, feeds a random number of random samples with random gaps
// in the enable, waits two cycles and compares every accumulator with
//     sum_t und(t) * del(t - lag)
// computed here from the stored sample history.
module tb_linear_correlator;
  localparam int unsigned DW = 8;
  localparam int unsigned LA = 32, LB = 8, L0B = 8;
  localparam int unsigned ACC_W = 32;
  localparam int MAXN = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en;
  logic [DW-1:0] und_in, del_in;
  logic [DW-1:0] und_a, del_a, und_b, del_b;
  logic [LA-1:0][ACC_W-1:0] acc_a;
  logic [LB-1:0][ACC_W-1:0] acc_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  linear_correlator #(.LAGS(LA), .LAG0(0), .DW(DW), .ACC_W(ACC_W), .SIGNED(1'b1)) dut_a (
    .clk, .rst_n, .clr, .en, .und_in, .del_in, .und_out(und_a), .del_out(del_a), .acc(acc_a));
  linear_correlator #(.LAGS(LB), .LAG0(L0B), .DW(DW), .ACC_W(ACC_W), .SIGNED(1'b0)) dut_b (
    .clk, .rst_n, .clr, .en, .und_in, .del_in, .und_out(und_b), .del_out(del_b), .acc(acc_b));

  int us [MAXN];
  int ds [MAXN];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    longint sa, sb;
    clr = 0; en = 0; und_in = 0; del_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 8; frame++) begin
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      n = (frame == 0) ? 5 : $urandom_range(20, MAXN);
      for (int t = 0; t < n; t++) begin
        // random idle cycles, none in odd frames (full rate)
        if (frame % 2 == 0) begin
          while ($urandom_range(0, 2) == 0) begin
            en = 0;
            @(negedge clk);
          end
        end
        en = 1;
        und_in = DW'($urandom);
        del_in = DW'($urandom);
        us[t] = int'(und_in);
        ds[t] = int'(del_in);
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);  // one cycle after the last sample: products land now
      @(negedge clk);
      for (int k = 0; k < LA; k++) begin
        sa = 0;
        for (int t = 0; t < n; t++)
          if (t - k >= 0) sa += longint'($signed(DW'(us[t]))) * longint'($signed(DW'(ds[t-k])));
        check($sformatf("A lag %0d", k), longint'($signed(acc_a[k])), sa);
      end
      for (int k = 0; k < LB; k++) begin
        sb = 0;
        for (int t = 0; t < n; t++)
          if (t - k - L0B >= 0) sb += longint'(us[t]) * longint'(ds[t-k-L0B]);
        check($sformatf("B lag %0d", k + L0B), longint'(acc_b[k]), sb);
      end
      check("und_out", longint'(und_a), longint'(us[n-1]));
      check("del_out A", longint'(del_a), (n >= LA) ? longint'(ds[n-LA]) : 0);
      check("del_out B", longint'(del_b), (n >= LB + L0B) ? longint'(ds[n-LB-L0B]) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
