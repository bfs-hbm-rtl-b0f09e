// tb_visited_bitmap: self-checking test of the visited bitmap.
//
// Drives random check and set operations (random vertex IDs from a small pool,
// so the same bit is often checked right after being set, and random idle
// gaps) into a 1024-vertex bitmap and compares every response against a
// reference bit array kept by the testbench. Timing checks: the response
// (chk_valid or set_done) arrives exactly one cycle after the accepting edge,
// busy is high exactly in that cycle, and with op_valid held high the unit
// accepts one operation every two cycles. Also checks that reset does not
// clear the stored bits.
module tb_visited_bitmap;
  localparam int unsigned VERTEX_W = 10;
  localparam int unsigned NV = 1 << VERTEX_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic op_valid = 1'b0, op_set = 1'b0;
  logic [VERTEX_W-1:0] op_vid = '0;
  logic busy, chk_valid, chk_visited, set_done;

  int checks = 0, failures = 0;
  bit ref_bits [NV];

  always #2 clk = ~clk;

  visited_bitmap #(.VERTEX_W(VERTEX_W)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Issue one operation, wait for acceptance, check the response next cycle.
  task automatic do_op(input bit set, input logic [VERTEX_W-1:0] vid);
    op_valid <= 1'b1; op_set <= set; op_vid <= vid;
    @(posedge clk);
    while (busy) @(posedge clk);
    // accepted on this edge
    #1;
    op_valid <= 1'b0;
    check(busy, "busy in stage 1");
    if (set) begin
      check(set_done && !chk_valid, "set_done one cycle after accept");
      ref_bits[vid] = 1'b1;
    end else begin
      check(chk_valid && !set_done, "chk_valid one cycle after accept");
      check(chk_visited == ref_bits[vid], $sformatf("chk_visited vid %0d", vid));
    end
    @(posedge clk); #1;
    check(!busy && !chk_valid && !set_done, "pipeline empty after response");
  endtask

  initial begin
    for (int i = 0; i < NV; i++) ref_bits[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // every bit starts clear
    for (int i = 0; i < 64; i++) do_op(1'b0, VERTEX_W'(i * 16 + 3));
    // random traffic on a pool of 48 vertices
    for (int n = 0; n < 2000; n++) begin
      automatic logic [VERTEX_W-1:0] v;
      v = VERTEX_W'((($urandom % 48) * 37) % NV);
      do_op(($urandom % 3) == 0, v);
      repeat ($urandom % 2) @(posedge clk);
    end
    // throughput: op_valid held high for 20 cycles -> 10 acceptances
    begin
      automatic int accepted = 0;
      @(negedge clk);
      op_valid = 1'b1; op_set = 1'b0; op_vid = VERTEX_W'(5);
      for (int c = 0; c < 20; c++) begin
        if (!busy) accepted++;
        @(negedge clk);
      end
      op_valid = 1'b0;
      check(accepted == 10, $sformatf("one op per 2 cycles (%0d in 20)", accepted));
      @(negedge clk);
    end
    // reset keeps the bitmap contents
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NV; i += 37) do_op(1'b0, VERTEX_W'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
