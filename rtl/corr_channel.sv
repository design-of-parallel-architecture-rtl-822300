// corr_channel: one correlation channel of a lag correlator.
//
// A channel is a delay element on the delayed sample path, a multiplier and an
// accumulator, as drawn for one "correlation channel" of the linear
// correlator. Channels are chained through del_in/del_out, so the k-th channel
// of a chain sees the delayed stream k+1 samples late, while every channel
// sees the same undelayed sample und. Each accumulation adds und * del_q.
//
// Timing: on a cycle with en high the delay register takes del_in. On a cycle
// with acc_en high (the parent raises it one cycle after en) the accumulator
// adds the product of und and the delay register. clr zeroes the delay
// register and the accumulator and has priority over en and acc_en.
//
// The structure (delay, multiply, sum per channel) follows the document. The
// sample width, the accumulator width, signed or unsigned arithmetic, the
// clear input and the two-step en/acc_en timing are this design's choices.
// The accumulator wraps around when it overflows; the parent sizes ACC_W so
// that the intended frame length cannot overflow it.
module corr_channel #(
  parameter int unsigned DW     = 8,   // sample width
  parameter int unsigned ACC_W  = 32,  // accumulator width, must exceed 2*DW
  parameter bit          SIGNED = 1'b1 // samples are two's complement
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,      // shift the delay register
  input  logic             acc_en,  // accumulate und * del_q
  input  logic [DW-1:0]    del_in,  // delayed path from the previous channel
  input  logic [DW-1:0]    und,     // undelayed sample, common to all channels
  output logic [DW-1:0]    del_out, // delayed path to the next channel
  output logic [ACC_W-1:0] acc      // correlation sum of this lag
);

  localparam int unsigned PW = 2 * DW;

  logic [DW-1:0]    del_q;
  logic [PW-1:0]    prod;
  logic [ACC_W-1:0] prod_ext;

  always_comb begin
    if (SIGNED) begin
      prod     = PW'($signed(und) * $signed(del_q));
      prod_ext = {{(ACC_W - PW){prod[PW-1]}}, prod};
    end else begin
      prod     = PW'(und * del_q);
      prod_ext = {{(ACC_W - PW){1'b0}}, prod};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      del_q <= '0;
      acc   <= '0;
    end else if (clr) begin
      del_q <= '0;
      acc   <= '0;
    end else begin
      if (en)     del_q <= del_in;
      if (acc_en) acc   <= acc + prod_ext;
    end
  end

  assign del_out = del_q;

  initial begin
    assert (ACC_W > PW) else $error("corr_channel: ACC_W must exceed 2*DW");
  end

endmodule
