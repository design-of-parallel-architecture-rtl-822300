// corr_pkg: types and constants shared by the correlator modules.
//
// It holds the command encoding of the FSL (Fast Simplex Link) coprocessor
// port, the FSL word width and a helper that numbers the unique channel pairs
// of a multi-channel correlator. A correlator of NS channels has
// NS*(NS-1)/2 unique cross products; pair (i,j) with i<j is numbered in row
// order: (0,1),(0,2)...(0,NS-1),(1,2),... The pair count formula follows the
// document; the numbering and the command codes are this design's choice.
package corr_pkg;

  // Width of one FSL data word (the MicroBlaze FSL bus is 32 bits wide).
  localparam int unsigned FSL_W = 32;

  // Commands carried in the data bits of an FSL word whose control bit is 1.
  typedef enum logic [1:0] {
    CMD_NOP   = 2'd0,
    CMD_CLEAR = 2'd1,   // zero accumulators and delay lines, start a new frame
    CMD_READ  = 2'd2    // send every correlation result back to the processor
  } fsl_cmd_e;

  // Number of unique cross products of ns channels.
  function automatic int unsigned num_pairs(int unsigned ns);
    return ns * (ns - 1) / 2;
  endfunction

  // Row-order index of pair (i,j), i<j, among ns channels.
  function automatic int unsigned pair_index(int unsigned i, int unsigned j,
                                             int unsigned ns);
    return i * ns - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

endpackage
