// stb_rate_halver: feeds one sampling time block of a multiple-tau correlator
// from the one before it.
//
// Both sample streams (undelayed and delayed) are added up over two
// consecutive samples of the faster block, and the sums are issued as one
// sample of the next block, which therefore runs at half the sample rate and
// with twice the sampling time. The sums are one bit wider than the inputs, so
// nothing is lost.
//
// Interface: en_in marks a valid input sample pair. Every second one of them
// (counted from reset or clr) produces, on the next cycle, a one-cycle pulse on
// en_out with und_out/del_out holding the two-sample sums; the outputs hold
// their value until the next pulse. clr restarts the pairing.
//
// Summing over two sampling periods to make the input of the next block, at
// half the clock rate, follows the document. Using a clock-enable pulse
// instead of a divided clock is this design's choice.
module stb_rate_halver #(
  parameter int unsigned DW = 8   // input sample width; outputs are DW+1 bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en_in,
  input  logic [DW-1:0] und_in,
  input  logic [DW-1:0] del_in,
  output logic          en_out,
  output logic [DW:0]   und_out,
  output logic [DW:0]   del_out
);

  logic          phase;   // 1: the first sample of a pair is held
  logic [DW-1:0] und_h, del_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      und_h   <= '0;
      del_h   <= '0;
      en_out  <= 1'b0;
      und_out <= '0;
      del_out <= '0;
    end else if (clr) begin
      phase   <= 1'b0;
      und_h   <= '0;
      del_h   <= '0;
      en_out  <= 1'b0;
      und_out <= '0;
      del_out <= '0;
    end else begin
      en_out <= 1'b0;
      if (en_in) begin
        if (!phase) begin
          und_h <= und_in;
          del_h <= del_in;
          phase <= 1'b1;
        end else begin
          und_out <= {1'b0, und_h} + {1'b0, und_in};
          del_out <= {1'b0, del_h} + {1'b0, del_in};
          en_out  <= 1'b1;
          phase   <= 1'b0;
        end
      end
    end
  end

endmodule
