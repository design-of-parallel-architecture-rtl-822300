// tb_correlator_top: end-to-end test of the correlator system at full size.
//
// The top keeps its default sizes: eight 8-bit channels with 32 lags on the
// FSL coprocessor (28 pairs, 896 results) and a 40-block multiple-tau
// correlator. The testbench plays the processor on the FSL side, with an
// 8-word receive FIFO that it empties at a limited rate, and drives the
// multiple-tau inputs directly.
//
// FSL part, two frames: CLEAR, T sample vectors of two words each (a NOP
// command among them), READ; all 896 returned words are compared with
// sum_t x_i(t) x_j(t-k) computed here, and only the last may carry the
// control bit. Multiple-tau part: clear, 4096 samples at one per cycle, then
// every lag of all 40 blocks is read and compared with the correlation of the
// block's input streams (raw samples summed in groups of 2^l), and the pulse
// count of every block must be floor(4096 / 2^l); a second run with a
// different length checks that the clear restarts it.
// Mechanisms counted and required at least once: clear and read commands,
// an ignored command, two-word sample packing, a stalled result stream, the
// control bit on the last result, sample pulses reaching the slowest block
// that this run length can fill, and the uncomputed low lags of later blocks
// reading zero.
module tb_correlator_top;
  import corr_pkg::*;
  localparam int unsigned NUM_CH = 8, LAGS = 32, W = 8, NUM_STB = 40, STB_CH = 8;
  localparam int unsigned NUM_PAIRS = NUM_CH * (NUM_CH - 1) / 2;
  localparam int unsigned NUM_RES = NUM_PAIRS * LAGS;
  localparam int unsigned WPS = (NUM_CH * W + 31) / 32;
  localparam int unsigned MT_RD_W = 2 * (W + NUM_STB - 1) + 16;
  localparam int MAXT = 300;
  localparam int MT_T = 4096;
  localparam int RX_DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] fsl_s_data, fsl_m_data;
  logic fsl_s_control, fsl_s_exists, fsl_s_read;
  logic fsl_m_control, fsl_m_write, fsl_m_full;
  logic mt_clr, mt_en;
  logic [W-1:0] mt_n_und, mt_n_del;
  logic [5:0] mt_rd_stb;
  logic [3:0] mt_rd_lag;
  logic [MT_RD_W-1:0] mt_rd_data;
  logic [NUM_STB-1:0] mt_stb_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  correlator_top dut (.*);

  // ---------------- processor model on the FSL links ----------------
  logic [32:0] txq [$];
  logic [32:0] rxq [$];
  logic [32:0] got [$];
  int drain_pct = 30;
  int n_stall = 0, n_clear = 0, n_read = 0, n_nop = 0, n_vectors = 0, n_last = 0;
  int n_zero_low = 0;
  int mt_pulses [NUM_STB];

  assign fsl_s_exists  = (txq.size() > 0);
  assign fsl_s_data    = fsl_s_exists ? txq[0][31:0] : '0;
  assign fsl_s_control = fsl_s_exists ? txq[0][32] : 1'b0;
  assign fsl_m_full    = (rxq.size() >= RX_DEPTH);

  always @(posedge clk) begin
    if (fsl_s_read) begin
      if (txq[0][32]) begin
        case (txq[0][1:0])
          CMD_CLEAR: n_clear++;
          CMD_READ:  n_read++;
          default:   n_nop++;
        endcase
      end
      void'(txq.pop_front());
    end
    if (fsl_m_write) begin
      rxq.push_back({fsl_m_control, fsl_m_data});
      if (fsl_m_control) n_last++;
    end
    if (fsl_m_full && !fsl_s_exists) n_stall++;
    if (rxq.size() > 0 && $urandom_range(0, 99) < drain_pct) got.push_back(rxq.pop_front());
    for (int l = 0; l < NUM_STB; l++) if (mt_stb_en[l] && !mt_clr) mt_pulses[l]++;
  end

  task automatic check(string what, longint got_v, longint exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got_v, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [MAXT][NUM_CH];

  task automatic fsl_frame(int T);
    int p;
    longint exp;
    logic [WPS*32-1:0] vec;
    txq.push_back({1'b1, 30'd0, CMD_CLEAR});
    for (int t = 0; t < T; t++) begin
      vec = '0;
      for (int c = 0; c < NUM_CH; c++) begin
        vec[c*W +: W] = W'($urandom);
        x[t][c] = int'($signed(vec[c*W +: W]));
      end
      for (int w = 0; w < WPS; w++) txq.push_back({1'b0, vec[w*32 +: 32]});
      n_vectors++;
      if (t == T / 3) txq.push_back({1'b1, 30'd0, CMD_NOP});
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
          check($sformatf("pair %0d,%0d lag %0d", i, j, k),
                longint'($signed(got[p*LAGS+k][31:0])), exp);
          check("control bit", longint'(got[p*LAGS+k][32]),
                longint'(p * LAGS + k == int'(NUM_RES) - 1));
        end
      end
    end
  endtask

  // ---------------- multiple-tau stimulus and reference ----------------
  longint ru [MT_T];
  longint rd [MT_T];

  task automatic mt_run(int T);
    longint lu [], ld [];
    longint exp;
    int cnt, first;
    @(negedge clk);
    mt_clr = 1;
    @(negedge clk);
    mt_clr = 0;
    for (int l = 0; l < NUM_STB; l++) mt_pulses[l] = 0;
    for (int t = 0; t < T; t++) begin
      mt_en = 1;
      mt_n_und = W'($urandom);
      mt_n_del = W'($urandom);
      ru[t] = longint'(mt_n_und);
      rd[t] = longint'(mt_n_del);
      @(negedge clk);
    end
    mt_en = 0;
    repeat (NUM_STB + 3) @(negedge clk);
    for (int l = 0; l < NUM_STB; l++) begin
      cnt = (l < 31) ? (T >> l) : 0;
      first = (l == 0) ? 0 : STB_CH;
      check($sformatf("pulses of block %0d", l), longint'(mt_pulses[l]), longint'(cnt));
      lu = new[cnt];
      ld = new[cnt];
      for (int k = 0; k < cnt; k++) begin
        lu[k] = 0; ld[k] = 0;
        for (int i = k << l; i < (k + 1) << l; i++) begin
          lu[k] += ru[i]; ld[k] += rd[i];
        end
      end
      for (int j = 0; j < 2 * STB_CH; j++) begin
        mt_rd_stb = 6'(l);
        mt_rd_lag = 4'(j);
        #1;
        exp = 0;
        if (j >= first) for (int k = j; k < cnt; k++) exp += lu[k] * ld[k - j];
        else if (cnt > j) n_zero_low++;
        check($sformatf("block %0d lag %0d", l, j), longint'(mt_rd_data[63:0]), exp);
        check("upper result bits", longint'(mt_rd_data[MT_RD_W-1:64] != '0), 0);
      end
    end
  endtask

  int last_block;

  initial begin
    mt_clr = 0; mt_en = 0; mt_n_und = 0; mt_n_del = 0; mt_rd_stb = 0; mt_rd_lag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        fsl_frame(200);
        drain_pct = 100;
        fsl_frame(MAXT);
      end
      mt_run(MT_T);
    join
    last_block = 0;
    for (int l = 0; l < NUM_STB; l++) if (mt_pulses[l] > 0) last_block = l;
    mt_run(1000);
    $display("clear=%0d read=%0d nop=%0d vectors=%0d stall_cycles=%0d last_flag=%0d",
             n_clear, n_read, n_nop, n_vectors, n_stall, n_last);
    $display("slowest block reached by the 4096-sample run: %0d; zero low lags read: %0d",
             last_block, n_zero_low);
    check("clear command seen", longint'(n_clear > 0), 1);
    check("read command seen", longint'(n_read > 0), 1);
    check("ignored command seen", longint'(n_nop > 0), 1);
    check("two-word vectors sent", longint'(n_vectors > 0 && WPS == 2), 1);
    check("result stream stalled", longint'(n_stall > 0), 1);
    check("last-result control bit", longint'(n_last), 2);
    check("block 12 reached", longint'(last_block), 12);
    check("uncomputed lags read zero", longint'(n_zero_low > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
