// tb_multi_tau_correlator: self-checking test of the multiple-tau correlator.
//
// Uses 6 sampling time blocks of 8 channels (16 in block 0). Each frame
// clears the correlator and feeds T random unsigned samples, either one per
// cycle or with random gaps. The reference builds the input streams of each
// block here, by summing the raw samples in groups of 2^l, and computes for
// block l and lag j the sum over its complete samples k of
// u_l(k) * d_l(k - j). Every lag of every block is compared through the read
// port, lags that a block does not compute must read as zero, and the number
// of sample pulses of each block must be floor(T / 2^l). In the full-rate
// frames the spacing of the block-l pulses must be exactly 2^l cycles.
module tb_multi_tau_correlator;
  localparam int unsigned W = 8, NUM_STB = 6, STB_CH = 8;
  localparam int unsigned NLAG = 2 * STB_CH;
  localparam int unsigned RD_W = 2 * (W + NUM_STB - 1) + 16;
  localparam int MAXT = 1200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en;
  logic [W-1:0] n_und, n_del;
  logic [2:0] rd_stb;
  logic [3:0] rd_lag;
  logic [RD_W-1:0] rd_data;
  logic [NUM_STB-1:0] stb_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  multi_tau_correlator #(.W(W), .NUM_STB(NUM_STB), .STB_CH(STB_CH), .ACC_GUARD(16)) dut (.*);

  longint raw_u [MAXT];
  longint raw_d [MAXT];
  int pulse_cnt [NUM_STB];
  int last_pulse [NUM_STB];
  int bad_spacing [NUM_STB];
  int cyc = 0;
  bit full_rate;

  always @(posedge clk) begin
    cyc++;
    for (int l = 0; l < NUM_STB; l++) begin
      if (stb_en[l] && !clr) begin
        if (full_rate && pulse_cnt[l] > 0 && cyc - last_pulse[l] != (1 << l)) bad_spacing[l]++;
        pulse_cnt[l]++;
        last_pulse[l] = cyc;
      end
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // Sample k of block l: raw samples k*2^l .. (k+1)*2^l-1 summed.
  function automatic longint lvl(bit del_path, int l, int k);
    longint s = 0;
    for (int i = k * (1 << l); i < (k + 1) * (1 << l); i++) s += del_path ? raw_d[i] : raw_u[i];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int T, cnt, first;
    longint exp;
    clr = 0; en = 0; n_und = 0; n_del = 0; rd_stb = 0; rd_lag = 0; full_rate = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 4; frame++) begin
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int l = 0; l < NUM_STB; l++) begin
        pulse_cnt[l] = 0; bad_spacing[l] = 0;
      end
      full_rate = (frame % 2 == 0);
      T = (frame < 2) ? MAXT : $urandom_range(100, MAXT);
      for (int t = 0; t < T; t++) begin
        if (!full_rate) begin
          while ($urandom_range(0, 3) == 0) begin
            en = 0;
            @(negedge clk);
          end
        end
        en = 1;
        n_und = W'($urandom);
        n_del = (frame == 1) ? n_und : W'($urandom);  // frame 1: autocorrelation
        raw_u[t] = longint'(n_und);
        raw_d[t] = longint'(n_del);
        @(negedge clk);
      end
      en = 0;
      repeat (NUM_STB + 3) @(negedge clk);
      for (int l = 0; l < NUM_STB; l++) begin
        cnt = T >> l;
        first = (l == 0) ? 0 : STB_CH;
        check($sformatf("pulses of block %0d", l), longint'(pulse_cnt[l]), longint'(cnt));
        check($sformatf("spacing of block %0d", l), longint'(bad_spacing[l]), 0);
        for (int j = 0; j < NLAG; j++) begin
          rd_stb = 3'(l);
          rd_lag = 4'(j);
          #1;
          exp = 0;
          if (j >= first)
            for (int k = j; k < cnt; k++) exp += lvl(1'b0, l, k) * lvl(1'b1, l, k - j);
          check($sformatf("block %0d lag %0d", l, j), longint'(rd_data), exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
