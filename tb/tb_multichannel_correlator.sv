// tb_multichannel_correlator: self-checking test of the all-pairs correlator.
//
// Five channels (ten unique pairs) of 12 lags. Each frame clears the
// correlator and feeds random signed sample vectors, with random gaps in the
// enable in some frames. Every result p*LAGS + k is then read back and
// compared with sum_t x_i(t) * x_j(t - k) for the pair (i,j), i<j, that has
// row-order number p, computed here from the stored samples. Indices past the
// last result must read zero.
module tb_multichannel_correlator;
  import corr_pkg::*;
  localparam int unsigned NUM_CH = 5, LAGS = 12, W = 8, ACC_W = 32;
  localparam int unsigned NUM_PAIRS = NUM_CH * (NUM_CH - 1) / 2;
  localparam int unsigned NUM_RES = NUM_PAIRS * LAGS;
  localparam int unsigned IDX_W = $clog2(NUM_RES);
  localparam int MAXT = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en;
  logic [NUM_CH-1:0][W-1:0] samples;
  logic [IDX_W-1:0] rd_idx;
  logic [ACC_W-1:0] rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  multichannel_correlator #(.NUM_CH(NUM_CH), .LAGS(LAGS), .W(W), .ACC_W(ACC_W)) dut (.*);

  int x [MAXT][NUM_CH];

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
    int T, p;
    longint exp;
    clr = 0; en = 0; samples = '0; rd_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 4; frame++) begin
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      T = $urandom_range(LAGS, MAXT);
      for (int t = 0; t < T; t++) begin
        if (frame % 2 == 1) begin
          while ($urandom_range(0, 2) == 0) begin
            en = 0;
            @(negedge clk);
          end
        end
        en = 1;
        for (int c = 0; c < NUM_CH; c++) begin
          samples[c] = W'($urandom);
          x[t][c] = int'($signed(samples[c]));
        end
        @(negedge clk);
      end
      en = 0;
      repeat (2) @(negedge clk);
      for (int i = 0; i < NUM_CH; i++) begin
        for (int j = i + 1; j < NUM_CH; j++) begin
          p = int'(pair_index(i, j, NUM_CH));
          for (int k = 0; k < LAGS; k++) begin
            exp = 0;
            for (int t = k; t < T; t++) exp += longint'(x[t][i]) * longint'(x[t-k][j]);
            rd_idx = IDX_W'(p * LAGS + k);
            #1;
            check($sformatf("pair %0d,%0d lag %0d", i, j, k), longint'($signed(rd_data)), exp);
          end
        end
      end
      for (int r = NUM_RES; r < (1 << IDX_W); r++) begin
        rd_idx = IDX_W'(r);
        #1;
        check("past end", longint'(rd_data), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
