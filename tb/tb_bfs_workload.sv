// tb_bfs_workload: the default-size engine on large random power-law graphs.
//
// Two graphs are generated in the testbench. Out-degrees follow a Pareto
// distribution (shape 1.5, capped at 4000) and neighbours are uniform:
//   graph 1: 250,000 vertices, mean degree about 10 (close to the largest
//            graph the default memory map holds: row_ptr has 1 MB below
//            col_idx, i.e. 262,143 vertices);
//   graph 2:  60,000 vertices, mean degree about 40.
// The HBM model answers after 20 cycles and never stalls. Between the runs the
// bitmap RAM is cleared through the hierarchy (a fresh configuration).
//
// Checks: the exact discovery sequence against a reference BFS that models
// the 2048-entry frontier (so overflow is reproduced vertex for vertex), the
// overflow flag, visited_count, done, the memory model's AXI4 checks, and the
// run time against the engine's cycle model: the stall-free cost
//   3 + sum over popped vertices (2+1+1+L+1 [+1 if vid%8=7]
//   [+ 1+1+L + beats-1 if it has edges]) + 3 per edge + 2 per new vertex + 1
// is a lower bound, and each extra burst forced by a 4 KB boundary may add at
// most L+2 cycles. It also reports how many vertices lie within 3 hops of the
// source, the cycle by which all of them were reported, and the share of
// cycles spent on bitmap read-modify-writes (2 per edge).
module tb_bfs_workload;
  import bfs_pkg::*;
  localparam int unsigned VERTEX_W = 20;
  localparam int unsigned AW = 33, DW = 256, IW = 4, LAT = 20;
  localparam int unsigned MEM_WORDS = 1 << 22;
  localparam int unsigned CI_WORD = (1 << 20) / 4;
  localparam int unsigned DEPTH = 2048;

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
  always #2 clk = ~clk;

  bfs_top dut (
    .clk, .rst_n, .start, .source, .done, .visited_count, .overflow, .axi_err,
    .out_valid, .out_vid, .out_level,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arid(arid), .m_axi_arlock(arlock), .m_axi_arcache(arcache), .m_axi_arprot(arprot),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rlast(rlast), .m_axi_rresp(rresp), .m_axi_rid(rid));

  hbm_mem_model #(.AXI_ADDR_W(AW), .AXI_DATA_W(DW), .AXI_ID_W(IW), .LATENCY(LAT),
                  .MEM_WORDS(MEM_WORDS)) u_hbm (
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

  int unsigned row_ptr [];
  int unsigned col_idx [];
  int unsigned exp_vid [$], exp_lvl [$];
  bit          exp_overflow;
  longint      exp_min_cycles, exp_slack;
  int unsigned exp_edges;

  // Pareto out-degree: floor(xm / u^(1/1.5)), capped.
  function automatic int unsigned pareto_degree(input real xm);
    real u, d;
    u = (real'($urandom) + 1.0) / 4294967296.0;
    d = xm / (u ** (1.0 / 1.5));
    return (d > 4000.0) ? 4000 : int'($floor(d));
  endfunction

  task automatic make_graph(input int unsigned nv, input real xm);
    int unsigned ne = 0;
    int unsigned deg [];
    deg = new[nv];
    for (int v = 0; v < int'(nv); v++) begin deg[v] = pareto_degree(xm); ne += deg[v]; end
    row_ptr = new[nv + 1];
    col_idx = new[ne];
    ne = 0;
    for (int v = 0; v < int'(nv); v++) begin
      row_ptr[v] = ne;
      for (int k = 0; k < int'(deg[v]); k++) begin col_idx[ne] = $urandom % nv; ne++; end
    end
    row_ptr[nv] = ne;
    for (int v = 0; v <= int'(nv); v++) u_hbm.mem[v] = row_ptr[v];
    for (int e = 0; e < int'(ne); e++) u_hbm.mem[CI_WORD + e] = col_idx[e];
  endtask

  task automatic golden(input int unsigned nv, input int unsigned s);
    bit seen [];
    int unsigned lvl [];
    int unsigned q [$];
    seen = new[nv]; lvl = new[nv];
    exp_vid.delete(); exp_lvl.delete(); exp_overflow = 0; exp_edges = 0;
    exp_min_cycles = 3 + 1; exp_slack = 0;
    seen[s] = 1; q.push_back(s);
    exp_vid.push_back(s); exp_lvl.push_back(0);
    while (q.size() != 0) begin
      automatic int unsigned u = q.pop_front();
      automatic int unsigned e0 = row_ptr[u], e1 = row_ptr[u+1];
      exp_min_cycles += 5 + longint'(LAT) + ((u % 8 == 7) ? 1 : 0);
      if (e1 > e0) begin
        automatic longint unsigned b0 = (longint'(CI_WORD) + longint'(e0)) / 8;
        automatic longint unsigned b1 = (longint'(CI_WORD) + longint'(e1) - 1) / 8;
        exp_min_cycles += 2 + longint'(LAT) + longint'(b1 - b0);
        // extra bursts where the list crosses 4 KB (128-beat) boundaries
        exp_slack += longint'(b1 / 128 - b0 / 128) * (longint'(LAT) + 2);
      end
      for (int unsigned e = e0; e < e1; e++) begin
        automatic int unsigned w = col_idx[e];
        exp_edges++;
        exp_min_cycles += 3;
        if (!seen[w]) begin
          seen[w] = 1; lvl[w] = lvl[u] + 1;
          exp_min_cycles += 2;
          exp_vid.push_back(w); exp_lvl.push_back(lvl[w]);
          if (q.size() < DEPTH) q.push_back(w);
          else exp_overflow = 1;
        end
      end
    end
  endtask

  int unsigned got_vid [$], got_lvl [$];
  longint cyc;
  longint last_k3_cycle;
  int unsigned n_k3;
  always @(posedge clk) begin
    if (rst_n) cyc++;
    if (out_valid) begin
      got_vid.push_back(32'(out_vid)); got_lvl.push_back(32'(out_level));
      if (out_level <= 3) begin n_k3++; last_k3_cycle = cyc; end
    end
  end

  task automatic run(input int unsigned nv, input real xm, input int unsigned s);
    make_graph(nv, xm);
    golden(nv, s);
    for (int i = 0; i < (1 << (VERTEX_W - 5)); i++) dut.u_bitmap.mem[i] = '0;
    got_vid.delete(); got_lvl.delete(); n_k3 = 0; last_k3_cycle = 0;
    rst_n = 1'b0; repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    cyc = 0;
    source = VERTEX_W'(s); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 400_000_000) @(negedge clk);
    check(done, "done");
    check(!axi_err, "no bus error");
    check(overflow == exp_overflow, $sformatf("overflow flag %0d, reference %0d", overflow, exp_overflow));
    check(int'(visited_count) == exp_vid.size(), $sformatf("visited_count %0d vs %0d", visited_count, exp_vid.size()));
    check(got_vid.size() == exp_vid.size(), "discovery count");
    begin
      automatic int bad = 0;
      for (int i = 0; i < exp_vid.size() && i < got_vid.size(); i++)
        if (got_vid[i] != exp_vid[i] || got_lvl[i] != exp_lvl[i]) bad++;
      check(bad == 0, $sformatf("%0d discoveries differ from the reference", bad));
    end
    check(u_hbm.protocol_errors == 0, "AXI4 rules");
    check(cyc >= exp_min_cycles && cyc <= exp_min_cycles + exp_slack,
          $sformatf("cycles %0d within [%0d, %0d]", cyc, exp_min_cycles, exp_min_cycles + exp_slack));
    $display("graph: %0d vertices, %0d edges (mean degree %0.1f), source %0d", nv, col_idx.size(),
             real'(col_idx.size()) / real'(nv), s);
    $display("  discovered %0d vertices, deepest level %0d, overflow %0d", got_vid.size(),
             (got_lvl.size() != 0) ? got_lvl[got_lvl.size()-1] : 0, overflow);
    $display("  %0d vertices within 3 hops, all reported by cycle %0d (%0.1f us at 250 MHz)",
             n_k3, last_k3_cycle, real'(last_k3_cycle) * 0.004);
    $display("  %0d cycles in all, %0d edges examined, bitmap RMW share %0.1f %%", cyc, exp_edges,
             200.0 * real'(exp_edges) / real'(cyc));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(250_000, 3.4, 0);
    run(60_000, 13.5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
