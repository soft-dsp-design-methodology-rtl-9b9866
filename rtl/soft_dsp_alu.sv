// soft_dsp_alu: processor ALU with a custom instruction slot (Soft DSP).
//
// What it does: the execute stage of a soft processor extended by one
// custom instruction. Both operands, data_a and data_b, go to the ordinary
// ALU functions (add/subtract, shifts, AND) and, in parallel, to a dedicated
// logic block next to the ALU; the result multiplexer picks one of them.
// The dedicated block here is state_sq3tbl, the start-state table lookup of
// an iLBC speech decoder, so software calls it like any other ALU
// instruction instead of loading the table from memory.
//
// How it works: fully combinational, one operation per processor cycle.
// The arrangement (operands fanned out to ALU and dedicated logic, result
// mux feeding a single result port, ALU functions + / -, << / >> and &)
// follows the published circuit configuration. The operation encoding, the
// logical right shift, the use of data_b[4:0] as shift amount and the width
// parameter are this design's own choices.
//
// Interface:
//   op     alu_op_e        in   operation select (soft_dsp_pkg)
//   data_a [DATA_W-1:0]    in   operand A (custom instruction: table index)
//   data_b [DATA_W-1:0]    in   operand B (custom instruction: 0)
//   result [DATA_W-1:0]    out  result, valid in the same cycle
module soft_dsp_alu #(
  parameter int unsigned DATA_W = soft_dsp_pkg::DATA_W
) (
  input  soft_dsp_pkg::alu_op_e op,
  input  logic [DATA_W-1:0] data_a,
  input  logic [DATA_W-1:0] data_b,
  output logic [DATA_W-1:0] result
);

  localparam int unsigned SH_W = $clog2(DATA_W);

  logic [DATA_W-1:0] ci_result;
  logic [SH_W-1:0]   shamt;

  // Dedicated logic next to the ALU, fed by the same operands.
  state_sq3tbl #(.DATA_W(DATA_W)) u_state_sq3tbl (
    .dataa  (data_a),
    .datab  (data_b),
    .result (ci_result)
  );

  assign shamt = data_b[SH_W-1:0];

  // Result multiplexer.
  always_comb begin
    unique case (op)
      soft_dsp_pkg::ALU_ADD:    result = data_a + data_b;
      soft_dsp_pkg::ALU_SUB:    result = data_a - data_b;
      soft_dsp_pkg::ALU_SLL:    result = data_a << shamt;
      soft_dsp_pkg::ALU_SRL:    result = data_a >> shamt;
      soft_dsp_pkg::ALU_AND:    result = data_a & data_b;
      soft_dsp_pkg::ALU_CUSTOM: result = ci_result;
      default:    result = '0;
    endcase
  end

endmodule
