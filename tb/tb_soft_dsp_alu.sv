// tb_soft_dsp_alu: end-to-end testbench of the Soft DSP datapath at its
// default 32-bit width.
//
// Plays the processor's part in the iLBC start-state decoding loop:
//   for k in 0..len-1: for tmpi in 0..7: tmp[k][tmpi] = maxVal * CI(tmpi, 0)
// for one 30 ms frame (len = 240) and one 20 ms frame (len = 160), with
// maxVal = 200. The loop counters are advanced with the ALU's own ADD and
// compared with SUB, so the ordinary ALU path runs interleaved with the
// custom instruction as it would in the compiled loop; the multiply by
// maxVal, done by the processor's multiplier, is done here. Each product is
// compared with maxVal times the reference table. One ALU operation is
// issued per clock cycle and the number of custom instruction cycles per
// frame must equal 8*len. After the frames, random operands check
// ADD/SUB/SLL/SRL/AND against SystemVerilog operators, and a few custom
// instruction calls outside the table must return 0. Every mechanism
// (each operation, table hit, out-of-range call) is counted and a failure
// is counted for one that never happened.
module tb_soft_dsp_alu;
  import soft_dsp_pkg::*;

  localparam int unsigned W = soft_dsp_pkg::DATA_W;
  localparam int MAXVAL = 200;

  logic         clk = 1'b0;
  alu_op_e      op;
  logic [W-1:0] a, b, y;
  int           checks = 0, failures = 0;
  int           n_op [6];
  int           n_ci_hit = 0, n_ci_miss = 0;
  longint       cycles = 0;
  int           frame_sum, exp_sum;  // per-frame sums of the products

  int ref_tbl [8] = '{-4, -2, -1, -1, 1, 0, 2, 4};

  soft_dsp_alu dut (.op(op), .data_a(a), .data_b(b), .result(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Issue one ALU operation in one cycle; return its result.
  task automatic issue(input alu_op_e o, input logic [W-1:0] x1, input logic [W-1:0] x2,
                       output logic [W-1:0] r);
    @(negedge clk);
    op = o;
    a  = x1;
    b  = x2;
    @(posedge clk);
    r = y;
    n_op[int'(o)]++;
  endtask

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_frame(input int len);
    logic [W-1:0] k, tmpi, r, diff;
    longint       c0, ci_cycles;
    int           ci0, prod, tbl_sum, exp_frame, exp_prod;
    c0 = cycles;
    ci0 = n_op[int'(ALU_CUSTOM)];
    frame_sum = 0;
    exp_sum = 0;
    k = '0;
    do begin
      tmpi = '0;
      do begin
        issue(ALU_CUSTOM, tmpi, '0, r);
        prod = MAXVAL * $signed(r);
        exp_prod = MAXVAL * ref_tbl[tmpi[2:0]];
        frame_sum = frame_sum + prod;
        exp_sum = exp_sum + exp_prod;
        checks++;
        if (prod != exp_prod) begin
          failures++;
          $display("FAIL frame len=%0d k=%0d tmpi=%0d: %0d expected %0d",
                   len, k, tmpi, prod, exp_prod);
        end else n_ci_hit++;
        issue(ALU_ADD, tmpi, 32'd1, tmpi);
        issue(ALU_SUB, tmpi, 32'd8, diff);
      end while (diff != '0);
      issue(ALU_ADD, k, 32'd1, k);
      issue(ALU_SUB, k, W'(len), diff);
    end while (diff != '0);
    ci_cycles = longint'(n_op[int'(ALU_CUSTOM)]) - longint'(ci0);
    checks++;
    if (ci_cycles != 8 * len) begin
      failures++;
      $display("FAIL frame len=%0d: %0d custom instruction cycles, expected %0d",
               len, ci_cycles, 8 * len);
    end
    checks++;
    // The table sums to -1, so a frame sums to -len * maxVal.
    tbl_sum = 0;
    foreach (ref_tbl[i]) tbl_sum += ref_tbl[i];
    exp_frame = len * MAXVAL * tbl_sum;
    if (frame_sum != exp_sum || exp_sum != exp_frame) begin
      failures++;
      $display("FAIL frame len=%0d: sum %0d reference %0d expected %0d", len, frame_sum, exp_sum, len * MAXVAL * tbl_sum);
    end
    $display("frame len=%0d: %0d custom instructions in %0d cycles",
             len, ci_cycles, cycles - c0);
  endtask

  initial begin
    logic [W-1:0] x1, x2, r;
    foreach (n_op[i]) n_op[i] = 0;
    op = ALU_ADD;
    a  = '0;
    b  = '0;

    run_frame(240);  // 30 ms frame
    run_frame(160);  // 20 ms frame

    // Ordinary ALU functions.
    for (int n = 0; n < 500; n++) begin
      x1 = W'($urandom);
      x2 = W'($urandom);
      issue(ALU_ADD, x1, x2, r); expect_eq(r, x1 + x2, "ADD");
      issue(ALU_SUB, x1, x2, r); expect_eq(r, x1 - x2, "SUB");
      issue(ALU_SLL, x1, x2, r); expect_eq(r, x1 << x2[4:0], "SLL");
      issue(ALU_SRL, x1, x2, r); expect_eq(r, x1 >> x2[4:0], "SRL");
      issue(ALU_AND, x1, x2, r); expect_eq(r, x1 & x2, "AND");
    end

    // Custom instruction outside its table.
    for (int n = 0; n < 50; n++) begin
      issue(ALU_CUSTOM, W'($urandom_range(1000, 8)), '0, r);
      expect_eq(r, '0, "CUSTOM index > 7");
      n_ci_miss++;
      issue(ALU_CUSTOM, W'($urandom_range(7, 0)), W'($urandom_range(1000, 1)), r);
      expect_eq(r, '0, "CUSTOM datab != 0");
      n_ci_miss++;
    end

    // Every mechanism must have happened.
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (n_op[i] == 0) begin
        failures++;
        $display("FAIL operation %s never issued", alu_op_e'(i));
      end
    end
    checks++;
    if (n_ci_hit == 0 || n_ci_miss == 0) begin
      failures++;
      $display("FAIL custom instruction hits=%0d misses=%0d", n_ci_hit, n_ci_miss);
    end
    $display("operations: ADD=%0d SUB=%0d SLL=%0d SRL=%0d AND=%0d CUSTOM=%0d (table hits=%0d, out of range=%0d)",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_ci_hit, n_ci_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
