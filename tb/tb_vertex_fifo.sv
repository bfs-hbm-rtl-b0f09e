// tb_vertex_fifo: self-checking test of the frontier FIFO.
//
// A 16-entry, 36-bit FIFO receives random pushes and pops (with phases biased
// towards filling and towards draining, so it reaches both full and empty)
// and is compared against a testbench queue. Checks: popped data and order,
// rd_valid exactly one cycle after an accepted pop and never otherwise,
// empty/full/count against the reference, pushes while full are dropped, pops
// while empty are ignored, and simultaneous push and pop.
module tb_vertex_fifo;
  localparam int unsigned DATA_W = 36;
  localparam int unsigned DEPTH  = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [DATA_W-1:0] wr_data = '0;
  logic [DATA_W-1:0] rd_data;
  logic rd_valid, empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] q [$];
  logic [DATA_W-1:0] exp_data;
  bit   exp_valid = 1'b0;
  int   n_full = 0, n_empty_pop = 0, n_full_push = 0, n_both = 0;

  always #2 clk = ~clk;

  vertex_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 6000; n++) begin
      automatic int phase = (n / 200) % 3;   // 0 fill, 1 drain, 2 balanced
      automatic int wp = (phase == 0) ? 80 : (phase == 1) ? 20 : 50;
      automatic int rp = (phase == 1) ? 80 : (phase == 0) ? 20 : 50;
      @(negedge clk);
      // outputs of the previous edge
      check(rd_valid == exp_valid, "rd_valid timing");
      if (exp_valid) check(rd_data == exp_data, "rd_data");
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(int'(count) == q.size(), "count");
      if (full) n_full++;
      // next operation
      wr_en   = (($urandom % 100) < wp);
      rd_en   = (($urandom % 100) < rp);
      wr_data = DATA_W'({$urandom, $urandom});
      exp_valid = 1'b0;
      if (wr_en && rd_en && !empty && !full) n_both++;
      if (wr_en && full) n_full_push++;
      if (rd_en && empty) n_empty_pop++;
      if (rd_en && q.size() != 0) begin
        exp_data  = q.pop_front();
        exp_valid = 1'b1;
      end
      if (wr_en && q.size() + (exp_valid ? 1 : 0) < DEPTH) q.push_back(wr_data);
    end
    check(n_full > 0 && n_full_push > 0 && n_empty_pop > 0 && n_both > 0, "corner cases reached");
    $display("full cycles %0d, push-when-full %0d, pop-when-empty %0d, push+pop %0d",
             n_full, n_full_push, n_empty_pop, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
