// linear_correlator: lag correlator with one multiply-accumulate channel per lag.
//
// The undelayed stream passes one register and is then shared by all
// channels; the delayed stream runs through a chain of delay registers, one
// per channel. After N samples, channel k holds
//     acc[k] = sum over t of und(t) * del(t - LAG0 - k),
// with samples before the last clear taken as zero. Channel k therefore
// covers lag LAG0 + k, in units of the sampling interval, and the channels of
// all lags work in parallel. LAG0 > 0 puts LAG0 plain delay registers ahead
// of the first channel, so that only lags LAG0 .. LAG0+LAGS-1 are computed;
// the multiple-tau correlator uses this for its later sampling time blocks.
//
// Interface: a sample pair (und_in, del_in) is taken on each cycle with en
// high; en may be high on every cycle. Its products reach the accumulators
// one cycle later, so acc is complete two cycles after the last en. clr
// zeroes every register. und_out and del_out are the stream values held in
// the first undelayed and the last delayed register, for cascading.
//
// The channel structure follows the document (linear correlator figure:
// a register on the undelayed input, a register per channel on the delayed
// path, a multiplier and an accumulator per channel). LAG0, the widths, the
// clear and the enable timing are this design's choices.
module linear_correlator #(
  parameter int unsigned LAGS   = 32,   // number of correlation channels
  parameter int unsigned LAG0   = 0,    // lag of the first channel
  parameter int unsigned DW     = 8,    // sample width
  parameter int unsigned ACC_W  = 32,   // accumulator width
  parameter bit          SIGNED = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       en,
  input  logic [DW-1:0]              und_in,
  input  logic [DW-1:0]              del_in,
  output logic [DW-1:0]              und_out,
  output logic [DW-1:0]              del_out,
  output logic [LAGS-1:0][ACC_W-1:0] acc
);

  logic [DW-1:0] und_q;
  logic          acc_en;
  logic [DW-1:0] chain [LAGS+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      und_q  <= '0;
      acc_en <= 1'b0;
    end else if (clr) begin
      und_q  <= '0;
      acc_en <= 1'b0;
    end else begin
      if (en) und_q <= und_in;
      acc_en <= en;
    end
  end

  // Plain delay registers for the lags below LAG0.
  if (LAG0 == 0) begin : g_nopre
    assign chain[0] = del_in;
  end else begin : g_pre
    logic [DW-1:0] pre_q [LAG0];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LAG0; i++) pre_q[i] <= '0;
      end else if (clr) begin
        for (int i = 0; i < LAG0; i++) pre_q[i] <= '0;
      end else if (en) begin
        pre_q[0] <= del_in;
        for (int i = 1; i < LAG0; i++) pre_q[i] <= pre_q[i-1];
      end
    end
    assign chain[0] = pre_q[LAG0-1];
  end

  for (genvar k = 0; k < LAGS; k++) begin : g_ch
    corr_channel #(.DW(DW), .ACC_W(ACC_W), .SIGNED(SIGNED)) u_ch (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .en     (en),
      .acc_en (acc_en),
      .del_in (chain[k]),
      .und    (und_q),
      .del_out(chain[k+1]),
      .acc    (acc[k])
    );
  end

  assign und_out = und_q;
  assign del_out = chain[LAGS];

endmodule
