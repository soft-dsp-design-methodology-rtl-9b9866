// state_sq3tbl: custom instruction logic for the iLBC start-state table.
//
// What it does: returns entry dataa of the 1x8 start-state quantiser table,
// {-4, -2, -1, -1, 1, 0, 2, 4}, as a signed 32-bit integer. It replaces the
// software read of that table from external memory inside the start-state
// reconstruction loop of an iLBC decoder (8 reads per sample, 240 or 160
// samples per frame). The table values, the port names and widths and the
// select condition (dataa = 0..7 with datab = 0) follow the published design.
//
// How it works: purely combinational, a case on dataa[2:0] gated by a range
// check on the rest of dataa and on datab. This matches the soft processor's
// single-cycle combinational custom instruction: the result is valid in the
// same cycle as the operands, with no clock, reset or handshake.
//
// Own choice: an operand pair outside the table (dataa > 7 or datab /= 0)
// returns 0. The published logic leaves the result undriven there, which a
// synthesizable one-driver design cannot express.
//
// Interface:
//   dataa  [DATA_W-1:0]  in   table index, 0..7
//   datab  [DATA_W-1:0]  in   must be 0 to select the table
//   result [DATA_W-1:0]  out  table entry, two's complement
module state_sq3tbl #(
  parameter int unsigned DATA_W = soft_dsp_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] dataa,
  input  logic [DATA_W-1:0] datab,
  output logic [DATA_W-1:0] result
);

  logic                     in_range;
  logic signed [DATA_W-1:0] level;

  assign in_range = (dataa < DATA_W'(soft_dsp_pkg::SQ3_ENTRIES)) && (datab == '0);

  always_comb begin
    unique case (dataa[2:0])
      3'd0:    level = DATA_W'(-4);
      3'd1:    level = DATA_W'(-2);
      3'd2:    level = DATA_W'(-1);
      3'd3:    level = DATA_W'(-1);
      3'd4:    level =  DATA_W'(1);
      3'd5:    level =  '0;
      3'd6:    level =  DATA_W'(2);
      default: level =  DATA_W'(4);
    endcase
  end

  assign result = in_range ? level : '0;

endmodule
