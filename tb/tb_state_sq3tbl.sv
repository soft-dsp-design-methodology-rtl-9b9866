// tb_state_sq3tbl: self-checking testbench of the start-state table custom
// instruction.
//
// Applies every table index 0..7 with datab = 0 and compares the result
// against the start-state table {-4, -2, -1, -1, 1, 0, 2, 4} held here as
// plain integers. Then applies random operand pairs outside the table
// (index above 7, or datab not 0) and expects 0. The logic is
// combinational: each result is checked in the same clock cycle its
// operands are applied, which is the one-cycle latency of a combinational
// custom instruction. A watchdog ends the run with a failure if it hangs.
module tb_state_sq3tbl;

  localparam int unsigned W = 32;

  logic          clk = 1'b0;
  logic [W-1:0]  dataa, datab, result;
  int            checks = 0, failures = 0;

  // Reference table, written as the software's integer array.
  int ref_tbl [8] = '{-4, -2, -1, -1, 1, 0, 2, 4};

  state_sq3tbl #(.DATA_W(W)) dut (.dataa(dataa), .datab(datab), .result(result));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b, input int expected);
    @(negedge clk);
    dataa = a;
    datab = b;
    @(posedge clk);  // result must be settled within this single cycle
    checks++;
    if ($signed(result) != expected) begin
      failures++;
      $display("FAIL dataa=%0d datab=%0d result=%0d expected=%0d",
               a, b, $signed(result), expected);
    end
  endtask

  initial begin
    dataa = '0;
    datab = '0;
    // Every table entry, twice, in both orders.
    for (int i = 0; i < 8; i++) check(W'(i), '0, ref_tbl[i]);
    for (int i = 7; i >= 0; i--) check(W'(i), '0, ref_tbl[i]);
    // Index out of range.
    for (int n = 0; n < 200; n++) check(W'($urandom_range(32'hFFFF_FFFF, 8)), '0, 0);
    check(32'd8, '0, 0);
    check(32'hFFFF_FFFF, '0, 0);
    // Valid index, datab not 0.
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] b;
      b = W'($urandom);
      if (b == '0) b = 1;
      check(W'($urandom_range(7, 0)), b, 0);
    end
    check(32'd0, 32'h8000_0000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
