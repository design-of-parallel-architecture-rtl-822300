// fsl_correlator: multi-channel correlator as a coprocessor on a pair of
// FSL (Fast Simplex Link) FIFO channels of a soft processor.
//
// The processor streams samples in with put-style writes and fetches results
// with get-style reads, as the software control loop of the document does
// (send a block of words, then read a block of words back). Words with the
// FSL control bit clear are data: NUM_CH signed W-bit samples, channel c in
// bits [c*W +: W] of the vector, are packed little-end first into
// WPS = ceil(NUM_CH*W/32) consecutive words; the last word of a vector
// starts one parallel correlation step of all pairs and lags. Words with the
// control bit set are commands (corr_pkg::fsl_cmd_e in bits 1:0):
//   CMD_CLEAR  zero all accumulators and delay lines, restart word packing;
//   CMD_READ   send all NUM_PAIRS*LAGS results, pair-major, lag-minor, each
//              sign-extended to 32 bits; the last word carries control = 1.
// Other command codes are ignored.
//
// Handshake (FSL, first-word-fall-through): s_data/s_control are valid while
// s_exists is high and are consumed on a cycle with s_read high; m_write
// pushes m_data/m_control and is only raised while m_full is low, so a full
// result FIFO stalls the readout. No input word is taken while results are
// being sent. Timing: a data word is taken every cycle; the correlation step
// of a vector starts the cycle after its last word; CMD_READ waits three
// cycles for the accumulators to settle, then sends one result per cycle
// unless stalled.
//
// The FSL link between the processor and a user coprocessor follows the
// document; the word packing, the command set and the readout order are this
// design's choices.
module fsl_correlator
  import corr_pkg::*;
#(
  parameter int unsigned NUM_CH = 8,
  parameter int unsigned LAGS   = 32,
  parameter int unsigned W      = 8,
  parameter int unsigned ACC_W  = 32,
  localparam int unsigned NUM_PAIRS = NUM_CH * (NUM_CH - 1) / 2,
  localparam int unsigned NUM_RES   = NUM_PAIRS * LAGS,
  localparam int unsigned IDX_W     = (NUM_RES > 1) ? $clog2(NUM_RES) : 1,
  localparam int unsigned WPS       = (NUM_CH * W + FSL_W - 1) / FSL_W,
  localparam int unsigned WC_W      = (WPS > 1) ? $clog2(WPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // FSL slave side: processor to coprocessor
  input  logic [FSL_W-1:0] s_data,
  input  logic             s_control,
  input  logic             s_exists,
  output logic             s_read,
  // FSL master side: coprocessor to processor
  output logic [FSL_W-1:0] m_data,
  output logic             m_control,
  output logic             m_write,
  input  logic             m_full
);

  typedef enum logic [1:0] {S_RUN, S_DRAIN, S_SEND} state_e;

  state_e                        state;
  logic [WPS-1:0][FSL_W-1:0]     vec;
  logic [WC_W-1:0]               word_cnt;
  logic                          step;     // start a correlation step
  logic                          clr;
  logic [1:0]                    drain_cnt;
  logic [IDX_W-1:0]              rd_idx;
  logic [ACC_W-1:0]              rd_data;
  logic [NUM_CH-1:0][W-1:0]      samples;
  logic                          take;
  fsl_cmd_e                      cmd;

  assign s_read = (state == S_RUN) && s_exists;
  assign take   = s_read;
  assign cmd    = fsl_cmd_e'(s_data[1:0]);
  assign clr    = take && s_control && (cmd == CMD_CLEAR);

  // Unpack the sample vector from the collected words.
  logic [WPS*FSL_W-1:0] vec_bits;
  assign vec_bits = vec;
  assign samples  = vec_bits[NUM_CH*W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RUN;
      vec       <= '0;
      word_cnt  <= '0;
      step      <= 1'b0;
      drain_cnt <= '0;
      rd_idx    <= '0;
    end else begin
      step <= 1'b0;
      unique case (state)
        S_RUN: begin
          if (take) begin
            if (s_control) begin
              if (cmd == CMD_CLEAR) begin
                word_cnt <= '0;
              end else if (cmd == CMD_READ) begin
                state     <= S_DRAIN;
                drain_cnt <= 2'd3;
              end
            end else begin
              vec[word_cnt] <= s_data;
              if (32'(word_cnt) == WPS - 1) begin
                word_cnt <= '0;
                step     <= 1'b1;
              end else begin
                word_cnt <= word_cnt + 1'b1;
              end
            end
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == 2'd1) begin
            state  <= S_SEND;
            rd_idx <= '0;
          end
        end
        S_SEND: begin
          if (m_write) begin
            if (32'(rd_idx) == NUM_RES - 1) state <= S_RUN;
            else rd_idx <= rd_idx + 1'b1;
          end
        end
        default: state <= S_RUN;
      endcase
    end
  end

  multichannel_correlator #(
    .NUM_CH(NUM_CH), .LAGS(LAGS), .W(W), .ACC_W(ACC_W)
  ) u_mcc (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (clr),
    .en     (step),
    .samples(samples),
    .rd_idx (rd_idx),
    .rd_data(rd_data)
  );

  assign m_write   = (state == S_SEND) && !m_full;
  assign m_data    = FSL_W'($signed(rd_data));
  assign m_control = (32'(rd_idx) == NUM_RES - 1);

  // FSL rules: never push into a full FIFO, never pop an empty one.
  a_no_write_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(m_write && m_full)) else $error("fsl_correlator: write while full");
  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n)
    !(s_read && !s_exists)) else $error("fsl_correlator: read while empty");

  initial begin
    assert (ACC_W <= FSL_W) else $error("fsl_correlator: ACC_W must fit an FSL word");
  end

endmodule
