// onn_pkg: constants and types shared by the digital oscillatory neural
// network (ONN) and its AXI4-Lite register interface.
//
// The register map (four 32-bit registers) and the control/status bit
// positions are this design's own choice; the number of registers, their
// 32-bit width and the packing of several signed weights per word follow the
// architecture this RTL implements.
package onn_pkg;

  // Register indices (byte address = index * 4).
  typedef enum logic [1:0] {
    REG_CTRL    = 2'd0,   // W: commands, R: status
    REG_ADDR    = 2'd1,   // R/W: word pointer for WDATA and PATTERN
    REG_WDATA   = 2'd2,   // R/W: packed weights at ADDR, ADDR auto-increments
    REG_PATTERN = 2'd3    // W: input pattern word, R: output pattern word
  } reg_idx_e;

  // CTRL write bits
  localparam int unsigned CTRL_START     = 0;  // start an inference (pulse)
  localparam int unsigned CTRL_WMODE     = 1;  // 1: weight-update mode, ONN held in reset
  localparam int unsigned CTRL_CLEAR     = 2;  // clear every weight to zero (pulse)
  localparam int unsigned CTRL_ACK       = 3;  // clear the done / weights-ready flags (pulse)

  // STATUS read bits
  localparam int unsigned STAT_BUSY      = 0;  // inference running
  localparam int unsigned STAT_DONE      = 1;  // inference finished (sticky)
  localparam int unsigned STAT_TIMEOUT   = 2;  // last inference hit the period limit
  localparam int unsigned STAT_WMODE     = 3;  // weight-update mode active
  localparam int unsigned STAT_WREADY    = 4;  // weight update finished (sticky)
  localparam int unsigned STAT_PERIODS   = 8;  // [15:8] periods used by the last inference

  // Number of WB-bit weights in one 32-bit word.
  function automatic int unsigned weights_per_word(int unsigned wb);
    return 32 / wb;
  endfunction

  // Number of 32-bit words holding an n x n weight matrix.
  function automatic int unsigned weight_words(int unsigned n, int unsigned wb);
    return (n * n + weights_per_word(wb) - 1) / weights_per_word(wb);
  endfunction

  // Number of 32-bit words holding an n-bit pattern.
  function automatic int unsigned pattern_words(int unsigned n);
    return (n + 31) / 32;
  endfunction

endpackage
