// tb_bfs_ctrl: self-checking test of the traversal controller.
//
// The controller is connected to the real frontier FIFO and visited bitmap
// and to a behavioural responder on its request/beat interface (fixed latency
// plus random gaps between beats), which serves a CSR graph from a word array.
// Six random directed graphs of up to 256 vertices (leaves, high-degree hubs,
// duplicate edges and self loops included) are traversed from random sources;
// between runs the bitmap RAM is cleared, standing in for a fresh
// configuration. A reference BFS in the testbench produces the expected
// discovery sequence. Checks: the exact (vid, level) sequence and its length,
// visited_count, done, no overflow, the issued request addresses and lengths,
// and the cycle costs of the loop: 2 cycles per frontier pop, 3 cycles per
// already-visited neighbour and 5 per newly discovered one.
module tb_bfs_ctrl;
  import bfs_pkg::*;
  localparam int unsigned VERTEX_W = 8;
  localparam int unsigned NV = 1 << VERTEX_W;
  localparam int unsigned AW = 33, DW = 256, LEN_W = 32;
  localparam logic [AW-1:0] RP_BASE = 33'h0;
  localparam logic [AW-1:0] CI_BASE = 33'h1_0000;
  localparam int unsigned MEM_WORDS = 1 << 15;
  localparam int unsigned LAT = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [VERTEX_W-1:0] source = '0;
  logic done, overflow;
  logic [VERTEX_W:0] visited_count;
  logic out_valid;
  logic [VERTEX_W-1:0] out_vid;
  logic [LEVEL_W-1:0] out_level;
  logic req_valid, req_ready;
  logic [AW-1:0] req_addr;
  logic [LEN_W-1:0] req_len;
  logic beat_valid, beat_last, beat_ready;
  logic [DW-1:0] beat_data;
  logic fifo_wr_en, fifo_rd_en, fifo_rd_valid, fifo_empty, fifo_full;
  logic [LEVEL_W+VERTEX_W-1:0] fifo_wr_data, fifo_rd_data;
  logic [$clog2(2048+1)-1:0] fifo_count;
  logic bm_op_valid, bm_op_set, bm_busy, bm_chk_valid, bm_chk_visited, bm_set_done;
  logic [VERTEX_W-1:0] bm_op_vid;

  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  bfs_ctrl #(.VERTEX_W(VERTEX_W), .AXI_ADDR_W(AW), .AXI_DATA_W(DW), .REQ_LEN_W(LEN_W),
             .ROW_PTR_BASE(RP_BASE), .COL_IDX_BASE(CI_BASE)) dut (.*);

  vertex_fifo #(.DATA_W(LEVEL_W + VERTEX_W), .DEPTH(2048)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr_en), .wr_data(fifo_wr_data), .rd_en(fifo_rd_en),
    .rd_data(fifo_rd_data), .rd_valid(fifo_rd_valid), .empty(fifo_empty),
    .full(fifo_full), .count(fifo_count));

  visited_bitmap #(.VERTEX_W(VERTEX_W)) u_bm (
    .clk, .rst_n, .op_valid(bm_op_valid), .op_set(bm_op_set), .op_vid(bm_op_vid),
    .busy(bm_busy), .chk_valid(bm_chk_valid), .chk_visited(bm_chk_visited),
    .set_done(bm_set_done));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ responder
  logic [31:0] mem [MEM_WORDS];
  bit          r_busy = 1'b0;
  int unsigned r_wait, r_left;
  longint unsigned r_addr;
  bit          r_gate;

  assign req_ready  = !r_busy;
  assign beat_valid = r_busy && (r_wait == 0) && r_gate;
  assign beat_last  = (r_left == 1);
  always_comb
    for (int i = 0; i < 8; i++) beat_data[i*32 +: 32] = mem[15'((r_addr / 4) + longint'(i))];

  always @(posedge clk) begin
    r_gate <= ($urandom % 4) != 0;
    if (req_valid && req_ready) begin
      r_busy <= 1'b1; r_addr <= longint'(req_addr); r_left <= req_len + 1; r_wait <= LAT - 1;
    end else if (r_busy) begin
      if (r_wait != 0) r_wait <= r_wait - 1;
      else if (beat_valid && beat_ready) begin
        r_addr <= r_addr + 32;
        r_left <= r_left - 1;
        if (r_left == 1) r_busy <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ graph and reference
  int unsigned n_vert;
  int unsigned row_ptr [NV+1];
  int unsigned col_idx [$];
  int unsigned exp_vid [$], exp_lvl [$];
  int unsigned exp_expanded_edges, exp_dequeues;

  task automatic make_graph(input int unsigned n);
    n_vert = n;
    col_idx.delete();
    for (int v = 0; v < NV; v++) begin
      automatic int unsigned r = $urandom % 100;
      automatic int unsigned d = (v >= int'(n)) ? 0 : (r < 15) ? 0 : (r < 25) ? 9 + $urandom % 40 : 1 + $urandom % 5;
      row_ptr[v] = col_idx.size();
      for (int k = 0; k < int'(d); k++) col_idx.push_back($urandom % n);
    end
    row_ptr[NV] = col_idx.size();
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = '0;
    for (int v = 0; v <= NV; v++) mem[15'(RP_BASE / 4) + 15'(v)] = row_ptr[v];
    foreach (col_idx[e]) mem[15'(CI_BASE / 4) + 15'(e)] = col_idx[e];
  endtask

  task automatic golden(input int unsigned s);
    bit seen [NV];
    int unsigned q [$];
    int unsigned lvl [NV];
    exp_vid.delete(); exp_lvl.delete();
    exp_expanded_edges = 0; exp_dequeues = 0;
    for (int v = 0; v < NV; v++) seen[v] = 0;
    seen[s] = 1; lvl[s] = 0; q.push_back(s);
    exp_vid.push_back(s); exp_lvl.push_back(0);
    while (q.size() != 0) begin
      automatic int unsigned u = q.pop_front();
      exp_dequeues++;
      for (int e = row_ptr[u]; e < row_ptr[u+1]; e++) begin
        automatic int unsigned w = col_idx[e];
        exp_expanded_edges++;
        if (!seen[w]) begin
          seen[w] = 1; lvl[w] = lvl[u] + 1; q.push_back(w);
          exp_vid.push_back(w); exp_lvl.push_back(lvl[w]);
        end
      end
    end
  endtask

  // ------------------------------------------------------------ monitors
  int unsigned got_vid [$], got_lvl [$];
  int unsigned cyc_scatter, cyc_dequeue, n_ptr_req, n_edge_req;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin got_vid.push_back(32'(out_vid)); got_lvl.push_back(32'(out_level)); end
    if (dut.state inside {ST_SCATTER_RD, ST_SCATTER_CHK, ST_NEXT_EDGE}) cyc_scatter++;
    if (dut.state == ST_DEQUEUE) cyc_dequeue++;
    if (req_valid && req_ready) begin
      if (dut.state == ST_FETCH_PTR) begin
        n_ptr_req++;
        check(req_addr == ((RP_BASE + 4 * dut.cur_vid) & ~33'h1f), "row_ptr request address");
        check(req_len == ((dut.cur_vid % 8 == 7) ? 1 : 0), "row_ptr request length");
      end else begin
        n_edge_req++;
        check(req_addr == ((CI_BASE + 4 * dut.edge_start) & ~33'h1f), "col_idx request address");
        check(req_len == ((dut.edge_end - 1) / 8 - dut.edge_start / 8), "col_idx burst length");
      end
    end
  end

  task automatic run_bfs(input int unsigned n, input int unsigned s);
    int cyc = 0;
    make_graph(n);
    golden(s);
    for (int i = 0; i < NV / 32; i++) u_bm.mem[i] = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    got_vid.delete(); got_lvl.delete();
    cyc_scatter = 0; cyc_dequeue = 0; n_ptr_req = 0; n_edge_req = 0;
    @(negedge clk);
    source = VERTEX_W'(s); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 200000) begin @(negedge clk); cyc++; end
    check(done, "done");
    check(!overflow, "no overflow");
    check(got_vid.size() == exp_vid.size(), $sformatf("discoveries %0d vs %0d", got_vid.size(), exp_vid.size()));
    check(int'(visited_count) == exp_vid.size(), "visited_count");
    for (int i = 0; i < exp_vid.size() && i < got_vid.size(); i++)
      check(got_vid[i] == exp_vid[i] && got_lvl[i] == exp_lvl[i],
            $sformatf("discovery %0d: got %0d@%0d exp %0d@%0d", i, got_vid[i], got_lvl[i], exp_vid[i], exp_lvl[i]));
    check(cyc_scatter == 3 * exp_expanded_edges + 2 * (exp_vid.size() - 1),
          $sformatf("scatter cycles %0d for %0d edges, %0d new", cyc_scatter, exp_expanded_edges, exp_vid.size() - 1));
    check(cyc_dequeue == 2 * exp_dequeues + 1, $sformatf("dequeue cycles %0d for %0d pops", cyc_dequeue, exp_dequeues));
    check(n_ptr_req == exp_dequeues, "one pointer request per expanded vertex");
    $display("graph n=%0d src=%0d: %0d discovered, %0d edges, %0d cycles", n, s, exp_vid.size(), exp_expanded_edges, cyc);
  endtask

  initial begin
    run_bfs(8, 0);
    run_bfs(40, 3);
    run_bfs(120, 7);
    run_bfs(200, 15);
    run_bfs(256, 0);
    run_bfs(256, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
