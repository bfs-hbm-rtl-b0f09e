// tb_bfs_top_full: the engine at its full default size (2^20-vertex bitmap,
// 2048-entry frontier, 256-bit AXI4, row_ptr at 0, col_idx at 1 MB) traversing
// the 8-vertex ladder graph
//
//     0--1--2--3
//     |  |  |  |
//     4--5--6--7
//
// stored as an undirected CSR graph (each edge in both directions,
// row_ptr = 0 2 5 8 10 12 15 18 20), from source 0, with the behavioural
// HBM model at a fixed 20-cycle read latency and no stalls.
//
// Checks: discovery order 0 1 4 2 5 3 6 7 with levels 0 1 1 2 2 3 3 4,
// visited_count = 8, done, no overflow or error, one pointer read per vertex
// and the total run time. The run time is compared with an exact cycle count
// for this engine: from start to done it takes
//   3 (start, INIT) + per vertex [2 pop + 1 request + 1 AR + 20 latency
//   + 1 CHECK_EDGES + 1 request + 1 AR + 20 latency] + 3 per neighbour
//   + 2 per discovery + 1 final pop + 1 per extra beat (vertex 7's
//   pointer pair straddles a beat boundary, vertex 6's list spans two beats),
// and also with the 514 cycles the reference design reports for this graph
// (it must be within 20 %).
module tb_bfs_top_full;
  import bfs_pkg::*;
  localparam int unsigned VERTEX_W = 20;
  localparam int unsigned AW = 33, DW = 256, IW = 4;
  localparam int unsigned LAT = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [VERTEX_W-1:0] source = '0;
  logic done, overflow, axi_err;
  logic [VERTEX_W:0] visited_count;
  logic out_valid;
  logic [VERTEX_W-1:0] out_vid;
  logic [LEVEL_W-1:0] out_level;
  logic arvalid, arready, arlock, rvalid, rready, rlast;
  logic [AW-1:0] araddr;
  logic [7:0] arlen;
  logic [2:0] arsize, arprot;
  logic [1:0] arburst, rresp;
  logic [3:0] arcache;
  logic [IW-1:0] arid, rid;
  logic [DW-1:0] rdata;

  int checks = 0, failures = 0;
  always #2 clk = ~clk;   // 4 ns period, 250 MHz

  bfs_top dut (
    .clk, .rst_n, .start, .source, .done, .visited_count, .overflow, .axi_err,
    .out_valid, .out_vid, .out_level,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arid(arid), .m_axi_arlock(arlock), .m_axi_arcache(arcache), .m_axi_arprot(arprot),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rlast(rlast), .m_axi_rresp(rresp), .m_axi_rid(rid));

  hbm_mem_model #(.AXI_ADDR_W(AW), .AXI_DATA_W(DW), .AXI_ID_W(IW), .LATENCY(LAT)) u_hbm (
    .clk, .rst_n, .err_inject(1'b0), .stall_pct(0),
    .s_axi_arvalid(arvalid), .s_axi_arready(arready), .s_axi_araddr(araddr),
    .s_axi_arlen(arlen), .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arid(arid),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready), .s_axi_rdata(rdata),
    .s_axi_rlast(rlast), .s_axi_rresp(rresp), .s_axi_rid(rid));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned row_ptr [9] = '{0, 2, 5, 8, 10, 12, 15, 18, 20};
  int unsigned col_idx [20] = '{1, 4, 0, 2, 5, 1, 3, 6, 2, 7, 0, 5, 1, 4, 6, 2, 5, 7, 3, 6};
  int unsigned exp_vid [8] = '{0, 1, 4, 2, 5, 3, 6, 7};
  int unsigned exp_lvl [8] = '{0, 1, 1, 2, 2, 3, 3, 4};

  int unsigned got_vid [$], got_lvl [$], got_cyc [$];
  int cyc = 0;
  int n_ar = 0;
  always @(posedge clk) begin
    if (rst_n) cyc++;
    if (out_valid) begin
      got_vid.push_back(32'(out_vid)); got_lvl.push_back(32'(out_level)); got_cyc.push_back(cyc);
    end
    if (arvalid && arready) n_ar++;
  end

  initial begin
    int unsigned expected;
    for (int v = 0; v < 9; v++) u_hbm.mem[v] = row_ptr[v];
    for (int e = 0; e < 20; e++) u_hbm.mem[(1 << 20) / 4 + e] = col_idx[e];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cyc = 0;
    source = '0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 5000) @(negedge clk);
    check(done, "done");
    check(!overflow && !axi_err, "no overflow, no bus error");
    check(int'(visited_count) == 8, $sformatf("visited_count %0d", visited_count));
    check(got_vid.size() == 8, "8 discoveries");
    for (int i = 0; i < 8 && i < got_vid.size(); i++) begin
      check(got_vid[i] == exp_vid[i] && got_lvl[i] == exp_lvl[i],
            $sformatf("discovery %0d: vertex %0d level %0d", i, got_vid[i], got_lvl[i]));
      $display("vertex %0d level %0d discovered at cycle %0d", got_vid[i], got_lvl[i], got_cyc[i]);
    end
    // 8 pointer reads + 8 adjacency bursts (vertex 6's list spans two beats
    // but is still one burst)
    check(n_ar == 16, $sformatf("AR count %0d", n_ar));
    expected = 3 + 8 * (2 + 1 + 1 + LAT + 1 + 1 + 1 + LAT) + 3 * 20 + 2 * 7 + 1 + 2;
    $display("BFS complete in %0d cycles (model %0d, reference design 514)", cyc, expected);
    check(cyc == int'(expected), "cycle count matches the engine's cycle model");
    check(cyc > 411 && cyc < 617, "cycle count within 20 % of 514");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
