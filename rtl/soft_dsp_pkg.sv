// soft_dsp_pkg: types and constants shared by the Soft DSP datapath.
//
// The datapath is a 32-bit processor ALU (add/subtract, shift, AND) with one
// extra operation whose result comes from a small dedicated logic block, the
// "custom instruction" of a soft processor. The 32-bit operand and result
// width matches the custom instruction port of the published design. The
// operation encoding below is this design's own choice; no encoding is
// published.
package soft_dsp_pkg;

  // Operand and result width of the ALU and of the custom instruction.
  localparam int unsigned DATA_W = 32;

  // Number of entries of the start-state quantiser table (a 1x8 table).
  localparam int unsigned SQ3_ENTRIES = 8;

  // ALU operation select. ALU_CUSTOM routes the dedicated logic's result.
  typedef enum logic [2:0] {
    ALU_ADD    = 3'd0,  // a + b
    ALU_SUB    = 3'd1,  // a - b
    ALU_SLL    = 3'd2,  // a << b[4:0]
    ALU_SRL    = 3'd3,  // a >> b[4:0], logical
    ALU_AND    = 3'd4,  // a & b
    ALU_CUSTOM = 3'd5   // result of the custom instruction logic
  } alu_op_e;

endpackage
