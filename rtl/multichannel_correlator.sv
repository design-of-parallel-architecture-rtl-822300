// multichannel_correlator: lag cross-correlation of every pair of NUM_CH channels.
//
// A multi-channel (antenna array) correlator multiplies each channel with
// every other one at a set of lags. Of the NUM_CH*(NUM_CH-1) ordered
// cross products only NUM_CH*(NUM_CH-1)/2 are unique, because the
// correlation of y with x is the time-reversed correlation of x with y. This
// block therefore instantiates one LAGS-channel linear correlator per
// unordered pair (i,j), i<j, with channel i on the undelayed and channel j on
// the delayed path. After a frame of samples,
//     result(p, k) = sum over t of x_i(t) * x_j(t - k),   k = 0 .. LAGS-1,
// where p is the row-order number of pair (i,j) (see corr_pkg::pair_index).
// All NUM_PAIRS*LAGS multiply-accumulates run in the same cycle.
//
// Interface: en marks a valid sample vector (one signed W-bit sample per
// channel, channel c in samples[c]); clr zeroes all accumulators and delay
// lines. rd_idx = p*LAGS + k selects one result on the combinational read port
// rd_data. Results are complete two cycles after the last en.
//
// Default sizes (8 channels, 28 pairs, 32 lags, 8-bit samples) are the
// document's example of a multi-channel correlation; signed samples, the
// 32-bit accumulators and the read port are this design's choices.
module multichannel_correlator
  import corr_pkg::*;
#(
  parameter int unsigned NUM_CH = 8,   // input channels (antennas)
  parameter int unsigned LAGS   = 32,  // lags per pair
  parameter int unsigned W      = 8,   // sample width
  parameter int unsigned ACC_W  = 32,  // accumulator width
  localparam int unsigned NUM_PAIRS = NUM_CH * (NUM_CH - 1) / 2,
  localparam int unsigned NUM_RES   = NUM_PAIRS * LAGS,
  localparam int unsigned IDX_W     = (NUM_RES > 1) ? $clog2(NUM_RES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic [NUM_CH-1:0][W-1:0] samples,
  input  logic [IDX_W-1:0]         rd_idx,
  output logic [ACC_W-1:0]         rd_data
);

  logic [NUM_PAIRS-1:0][LAGS-1:0][ACC_W-1:0] res;

  for (genvar i = 0; i < NUM_CH; i++) begin : g_i
    for (genvar j = i + 1; j < NUM_CH; j++) begin : g_j
      localparam int unsigned P = pair_index(i, j, NUM_CH);
      linear_correlator #(
        .LAGS(LAGS), .LAG0(0), .DW(W), .ACC_W(ACC_W), .SIGNED(1'b1)
      ) u_pair (
        .clk    (clk),
        .rst_n  (rst_n),
        .clr    (clr),
        .en     (en),
        .und_in (samples[i]),
        .del_in (samples[j]),
        .und_out(),
        .del_out(),
        .acc    (res[P])
      );
    end
  end

  // Read port, flat index p*LAGS + k.
  logic [NUM_RES-1:0][ACC_W-1:0] res_flat;
  assign res_flat = res;

  always_comb begin
    rd_data = '0;
    if (32'(rd_idx) < NUM_RES) rd_data = res_flat[rd_idx];
  end

endmodule
