// correlator_top: the parallel correlator system.
//
// Two correlators stand side by side, each with its own ports:
//  * the multi-channel cross-correlator coprocessor (fsl_correlator): eight
//    8-bit channels, all 28 unique pairs, 32 lags each, fed and read by a
//    soft processor over one FSL link in each direction;
//  * the multiple-tau correlator (multi_tau_correlator): one pair of unsigned
//    8-bit count streams, 40 sampling time blocks, 328 channels, with a
//    direct sample input and a result read port.
// The soft processor, its memory controller, UART and the rest of the
// embedded platform are not part of this RTL; the FSL ports are where the
// processor connects. Both correlators share clock and an active-low
// asynchronous reset. Sizes are the document's; see the two blocks for
// their interfaces and timing.
module correlator_top
  import corr_pkg::*;
#(
  parameter int unsigned NUM_CH  = 8,
  parameter int unsigned LAGS    = 32,
  parameter int unsigned W       = 8,
  parameter int unsigned NUM_STB = 40,
  parameter int unsigned STB_CH  = 8,
  localparam int unsigned MT_RD_W    = 2 * (W + NUM_STB - 1) + 16,
  localparam int unsigned STB_BITS   = (NUM_STB > 1) ? $clog2(NUM_STB) : 1,
  localparam int unsigned LAG_BITS   = $clog2(2 * STB_CH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // FSL from the processor
  input  logic [FSL_W-1:0]    fsl_s_data,
  input  logic                fsl_s_control,
  input  logic                fsl_s_exists,
  output logic                fsl_s_read,
  // FSL to the processor
  output logic [FSL_W-1:0]    fsl_m_data,
  output logic                fsl_m_control,
  output logic                fsl_m_write,
  input  logic                fsl_m_full,
  // multiple-tau correlator
  input  logic                mt_clr,
  input  logic                mt_en,
  input  logic [W-1:0]        mt_n_und,
  input  logic [W-1:0]        mt_n_del,
  input  logic [STB_BITS-1:0] mt_rd_stb,
  input  logic [LAG_BITS-1:0] mt_rd_lag,
  output logic [MT_RD_W-1:0]  mt_rd_data,
  output logic [NUM_STB-1:0]  mt_stb_en
);

  fsl_correlator #(
    .NUM_CH(NUM_CH), .LAGS(LAGS), .W(W), .ACC_W(FSL_W)
  ) u_fsl_corr (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_data   (fsl_s_data),
    .s_control(fsl_s_control),
    .s_exists (fsl_s_exists),
    .s_read   (fsl_s_read),
    .m_data   (fsl_m_data),
    .m_control(fsl_m_control),
    .m_write  (fsl_m_write),
    .m_full   (fsl_m_full)
  );

  multi_tau_correlator #(
    .W(W), .NUM_STB(NUM_STB), .STB_CH(STB_CH), .ACC_GUARD(16)
  ) u_multi_tau (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (mt_clr),
    .en     (mt_en),
    .n_und  (mt_n_und),
    .n_del  (mt_n_del),
    .rd_stb (mt_rd_stb),
    .rd_lag (mt_rd_lag),
    .rd_data(mt_rd_data),
    .stb_en (mt_stb_en)
  );

endmodule
