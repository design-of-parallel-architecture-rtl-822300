// tb_fsl_correlator: self-checking test of the FSL correlator coprocessor.
//
// The testbench plays the processor: a first-word-fall-through FIFO holds the
// words it sends, and an 8-word FIFO, emptied at a random rate, takes the
// words it receives, so the coprocessor is stalled by a full FIFO. Five
// channels of 8 bits need two FSL words per sample vector. Each frame sends
// CLEAR, a random number of sample vectors (with a NOP command among them),
// then READ, and checks every returned word against sum_t x_i(t) x_j(t-k)
// computed here, and that only the last word carries the control bit.
// The frames must see at least one stall of the result stream.
module tb_fsl_correlator;
  import corr_pkg::*;
  localparam int unsigned NUM_CH = 5, LAGS = 6, W = 8;
  localparam int unsigned NUM_PAIRS = NUM_CH * (NUM_CH - 1) / 2;
  localparam int unsigned NUM_RES = NUM_PAIRS * LAGS;
  localparam int unsigned WPS = (NUM_CH * W + 31) / 32;
  localparam int MAXT = 200;
  localparam int RX_DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] s_data, m_data;
  logic s_control, s_exists, s_read, m_control, m_write, m_full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fsl_correlator #(.NUM_CH(NUM_CH), .LAGS(LAGS), .W(W), .ACC_W(32)) dut (.*);

  // processor-to-coprocessor FIFO
  logic [32:0] txq [$];
  // coprocessor-to-processor FIFO
  logic [32:0] rxq [$];
  int drain_pct = 50;
  int stalls = 0;

  assign s_exists  = (txq.size() > 0);
  assign s_data    = s_exists ? txq[0][31:0] : '0;
  assign s_control = s_exists ? txq[0][32] : 1'b0;
  assign m_full    = (rxq.size() >= RX_DEPTH);

  logic [32:0] got [$];

  always @(posedge clk) begin
    if (s_read) void'(txq.pop_front());
    if (m_write) rxq.push_back({m_control, m_data});
    if (m_full && !m_write && !s_read && !s_exists) stalls++;
    if (rxq.size() > 0 && $urandom_range(0, 99) < drain_pct) got.push_back(rxq.pop_front());
  end

  task automatic check(string what, longint got_v, longint exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got_v, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [MAXT][NUM_CH];

  initial begin
    int T, p;
    longint exp;
    logic [WPS*32-1:0] vec;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 5; frame++) begin
      drain_pct = (frame % 2 == 0) ? 20 : 100;
      T = $urandom_range(LAGS, MAXT);
      txq.push_back({1'b1, 30'd0, CMD_CLEAR});
      for (int t = 0; t < T; t++) begin
        vec = '0;
        for (int c = 0; c < NUM_CH; c++) begin
          vec[c*W +: W] = W'($urandom);
          x[t][c] = int'($signed(vec[c*W +: W]));
        end
        for (int w = 0; w < WPS; w++) txq.push_back({1'b0, vec[w*32 +: 32]});
        if (t == T / 2) txq.push_back({1'b1, 30'd0, CMD_NOP});
      end
      txq.push_back({1'b1, 30'd0, CMD_READ});
      got.delete();
      while (got.size() < NUM_RES) @(posedge clk);
      repeat (5) @(posedge clk);
      check("no extra words", longint'(got.size()) + longint'(rxq.size()), longint'(NUM_RES));
      for (int i = 0; i < NUM_CH; i++) begin
        for (int j = i + 1; j < NUM_CH; j++) begin
          p = int'(pair_index(i, j, NUM_CH));
          for (int k = 0; k < LAGS; k++) begin
            exp = 0;
            for (int t = k; t < T; t++) exp += longint'(x[t][i]) * longint'(x[t-k][j]);
            check($sformatf("frame %0d pair %0d,%0d lag %0d", frame, i, j, k),
                  longint'($signed(got[p*LAGS+k][31:0])), exp);
            check("control bit", longint'(got[p*LAGS+k][32]),
                  longint'(p * LAGS + k == int'(NUM_RES) - 1));
          end
        end
      end
    end
    check("result stream stalled at least once", longint'(stalls > 0), 1);
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
