// multi_tau_correlator: multiple-tau correlator built from sampling time blocks.
//
// A linear correlator needs one channel per lag, so a wide range of lag
// times costs a channel for every sampling interval in it. The multiple-tau
// scheme instead groups channels into sampling time blocks (STBs) and doubles
// the sampling time from one block to the next: block l sees both input
// streams summed over 2^l input samples and runs at 1/2^l of the sample rate.
// Block 0 has 2*STB_CH channels, lags 0 .. 2*STB_CH-1. Every later block
// has STB_CH channels, lags STB_CH .. 2*STB_CH-1 of its own sampling time,
// because its lower lags were already covered, at finer resolution, by the
// block before it. Channel j of block l thus covers the lag time
// j * 2^l input sampling intervals; with the default 40 blocks of 8 channels
// (16 in block 0) there are 328 channels reaching 15 * 2^39 intervals.
//
// Inputs are unsigned counts (photon counts per sampling interval in the
// classic use). Block l works on W+l bit samples and 2*(W+l)+ACC_GUARD bit
// accumulators, so the sums of longer sampling times are never truncated.
//
// Interface: en marks a valid input sample pair (n_und, n_del); en may be
// high every cycle. clr zeroes the whole correlator. Result read port:
// rd_data is the accumulator of lag index rd_lag (0 .. 2*STB_CH-1) in block
// rd_stb, zero-extended to RD_W bits; lags below STB_CH of blocks above 0 are
// not computed and read as zero. stb_en shows the sample pulse of each block;
// stb_en[0] is en itself, since block 0 runs at the input rate.
// Latency: a block-l sample is in its accumulators l+2 cycles after the input
// sample that completes it.
//
// Block sizes, the number of blocks, the doubling of the sampling time and
// the pairwise summing between blocks follow the document. Clock enables in
// place of divided clocks, fully parallel channels (rather than one processor
// shared over time by the blocks), the widths and the read port are this
// design's choices.
module multi_tau_correlator #(
  parameter int unsigned W         = 8,   // input sample width
  parameter int unsigned NUM_STB   = 40,  // number of sampling time blocks
  parameter int unsigned STB_CH    = 8,   // channels of each block after block 0
  parameter int unsigned ACC_GUARD = 16,  // accumulator bits beyond the product
  localparam int unsigned MAXW  = W + NUM_STB - 1,
  localparam int unsigned RD_W  = 2 * MAXW + ACC_GUARD,
  localparam int unsigned NLAG  = 2 * STB_CH,
  localparam int unsigned STB_BITS = (NUM_STB > 1) ? $clog2(NUM_STB) : 1,
  localparam int unsigned LAG_BITS = $clog2(NLAG)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic [W-1:0]        n_und,
  input  logic [W-1:0]        n_del,
  input  logic [STB_BITS-1:0] rd_stb,
  input  logic [LAG_BITS-1:0] rd_lag,
  output logic [RD_W-1:0]     rd_data,
  output logic [NUM_STB-1:0]  stb_en
);

  // Input stream of each block, at the widest block's width.
  logic [MAXW-1:0] und_s [NUM_STB];
  logic [MAXW-1:0] del_s [NUM_STB];
  logic [RD_W-1:0] stb_rd [NUM_STB];

  assign und_s[0] = MAXW'(n_und);
  assign del_s[0] = MAXW'(n_del);
  assign stb_en[0] = en;

  for (genvar l = 0; l < NUM_STB; l++) begin : g_stb
    localparam int unsigned DWL   = W + l;
    localparam int unsigned ACCL  = 2 * DWL + ACC_GUARD;
    localparam int unsigned NCH   = (l == 0) ? NLAG : STB_CH;
    localparam int unsigned FIRST = (l == 0) ? 0 : STB_CH;

    logic [NCH-1:0][ACCL-1:0] acc;

    linear_correlator #(
      .LAGS(NCH), .LAG0(FIRST), .DW(DWL), .ACC_W(ACCL), .SIGNED(1'b0)
    ) u_corr (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .en     (stb_en[l]),
      .und_in (und_s[l][DWL-1:0]),
      .del_in (del_s[l][DWL-1:0]),
      .und_out(),
      .del_out(),
      .acc    (acc)
    );

    // Read port of this block: lag index rd_lag, zero where not computed.
    always_comb begin
      stb_rd[l] = '0;
      if (32'(rd_lag) - FIRST < NCH)  // wraps high for rd_lag < FIRST
        stb_rd[l] = RD_W'(acc[32'(rd_lag) - FIRST]);
    end

    if (l + 1 < NUM_STB) begin : g_next
      logic [DWL:0] und_n, del_n;
      logic         en_n;
      stb_rate_halver #(.DW(DWL)) u_halve (
        .clk    (clk),
        .rst_n  (rst_n),
        .clr    (clr),
        .en_in  (stb_en[l]),
        .und_in (und_s[l][DWL-1:0]),
        .del_in (del_s[l][DWL-1:0]),
        .en_out (en_n),
        .und_out(und_n),
        .del_out(del_n)
      );
      assign stb_en[l+1] = en_n;
      assign und_s[l+1]  = MAXW'(und_n);
      assign del_s[l+1]  = MAXW'(del_n);
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(rd_stb) < NUM_STB) rd_data = stb_rd[rd_stb];
  end

endmodule
