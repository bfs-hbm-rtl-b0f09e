// tb_bfs_top: end-to-end test of the BFS engine with the behavioural HBM model.
//
// Engine A (4096-vertex bitmap, 2048-entry frontier) traverses random
// directed CSR graphs of 1500 vertices: leaves, hubs, one vertex with 1500
// out-edges (its burst is split at 4 KB boundaries), duplicate edges and self
// loops. The memory withholds arready/rvalid at random (20 %) and has a
// 20-cycle latency. Between runs the bitmap RAM is cleared through the
// hierarchy, standing in for a fresh configuration.
//
// Engine B (64-vertex bitmap, 4-entry frontier) traverses a star-like graph
// whose frontier outgrows the queue, with every read answered SLVERR, to
// exercise the overflow and bus-error flags.
//
// A reference BFS (with the same queue capacity) gives the expected discovery
// sequence; the test checks the exact (vid, level) sequence, visited_count,
// done, the flags and the memory model's protocol checks. It also counts how
// often each mechanism of the engine happened and fails if one never did:
// leaf skip, 2-beat pointer read, multi-beat adjacency burst, 4 KB burst
// split, first-beat lane offset, already-visited neighbour, discovery, read
// data back-pressure, address-channel stall, frontier overflow, bus error.
module tb_bfs_top;
  import bfs_pkg::*;
  localparam int unsigned AW = 33, DW = 256, IW = 4, LAT = 20;
  localparam int unsigned VW_A = 12, NV_A = 1 << VW_A;
  localparam int unsigned VW_B = 6,  NV_B = 1 << VW_B;
  localparam int unsigned DEPTH_A = 2048, DEPTH_B = 4;
  localparam int unsigned CI_WORD = (1 << 20) / 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #2 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- engine A
  logic start_a = 1'b0;
  logic [VW_A-1:0] source_a = '0;
  logic done_a, overflow_a, axi_err_a, out_valid_a;
  logic [VW_A:0] count_a;
  logic [VW_A-1:0] out_vid_a;
  logic [LEVEL_W-1:0] out_level_a;
  logic a_arvalid, a_arready, a_arlock, a_rvalid, a_rready, a_rlast;
  logic [AW-1:0] a_araddr;
  logic [7:0] a_arlen;
  logic [2:0] a_arsize, a_arprot;
  logic [1:0] a_arburst, a_rresp;
  logic [3:0] a_arcache;
  logic [IW-1:0] a_arid, a_rid;
  logic [DW-1:0] a_rdata;
  int unsigned stall_a = 20;

  bfs_top #(.VERTEX_W(VW_A), .FIFO_DEPTH(DEPTH_A)) dut_a (
    .clk, .rst_n, .start(start_a), .source(source_a), .done(done_a), .visited_count(count_a),
    .overflow(overflow_a), .axi_err(axi_err_a),
    .out_valid(out_valid_a), .out_vid(out_vid_a), .out_level(out_level_a),
    .m_axi_arvalid(a_arvalid), .m_axi_arready(a_arready), .m_axi_araddr(a_araddr),
    .m_axi_arlen(a_arlen), .m_axi_arsize(a_arsize), .m_axi_arburst(a_arburst),
    .m_axi_arid(a_arid), .m_axi_arlock(a_arlock), .m_axi_arcache(a_arcache), .m_axi_arprot(a_arprot),
    .m_axi_rvalid(a_rvalid), .m_axi_rready(a_rready), .m_axi_rdata(a_rdata),
    .m_axi_rlast(a_rlast), .m_axi_rresp(a_rresp), .m_axi_rid(a_rid));

  hbm_mem_model #(.AXI_ADDR_W(AW), .AXI_DATA_W(DW), .AXI_ID_W(IW), .LATENCY(LAT)) hbm_a (
    .clk, .rst_n, .err_inject(1'b0), .stall_pct(stall_a),
    .s_axi_arvalid(a_arvalid), .s_axi_arready(a_arready), .s_axi_araddr(a_araddr),
    .s_axi_arlen(a_arlen), .s_axi_arsize(a_arsize), .s_axi_arburst(a_arburst), .s_axi_arid(a_arid),
    .s_axi_rvalid(a_rvalid), .s_axi_rready(a_rready), .s_axi_rdata(a_rdata),
    .s_axi_rlast(a_rlast), .s_axi_rresp(a_rresp), .s_axi_rid(a_rid));

  // ---------------------------------------------------------------- engine B
  logic start_b = 1'b0;
  logic [VW_B-1:0] source_b = '0;
  logic done_b, overflow_b, axi_err_b, out_valid_b;
  logic [VW_B:0] count_b;
  logic [VW_B-1:0] out_vid_b;
  logic [LEVEL_W-1:0] out_level_b;
  logic b_arvalid, b_arready, b_arlock, b_rvalid, b_rready, b_rlast;
  logic [AW-1:0] b_araddr;
  logic [7:0] b_arlen;
  logic [2:0] b_arsize, b_arprot;
  logic [1:0] b_arburst, b_rresp;
  logic [3:0] b_arcache;
  logic [IW-1:0] b_arid, b_rid;
  logic [DW-1:0] b_rdata;

  bfs_top #(.VERTEX_W(VW_B), .FIFO_DEPTH(DEPTH_B)) dut_b (
    .clk, .rst_n, .start(start_b), .source(source_b), .done(done_b), .visited_count(count_b),
    .overflow(overflow_b), .axi_err(axi_err_b),
    .out_valid(out_valid_b), .out_vid(out_vid_b), .out_level(out_level_b),
    .m_axi_arvalid(b_arvalid), .m_axi_arready(b_arready), .m_axi_araddr(b_araddr),
    .m_axi_arlen(b_arlen), .m_axi_arsize(b_arsize), .m_axi_arburst(b_arburst),
    .m_axi_arid(b_arid), .m_axi_arlock(b_arlock), .m_axi_arcache(b_arcache), .m_axi_arprot(b_arprot),
    .m_axi_rvalid(b_rvalid), .m_axi_rready(b_rready), .m_axi_rdata(b_rdata),
    .m_axi_rlast(b_rlast), .m_axi_rresp(b_rresp), .m_axi_rid(b_rid));

  hbm_mem_model #(.AXI_ADDR_W(AW), .AXI_DATA_W(DW), .AXI_ID_W(IW), .LATENCY(LAT)) hbm_b (
    .clk, .rst_n, .err_inject(1'b1), .stall_pct(0),
    .s_axi_arvalid(b_arvalid), .s_axi_arready(b_arready), .s_axi_araddr(b_araddr),
    .s_axi_arlen(b_arlen), .s_axi_arsize(b_arsize), .s_axi_arburst(b_arburst), .s_axi_arid(b_arid),
    .s_axi_rvalid(b_rvalid), .s_axi_rready(b_rready), .s_axi_rdata(b_rdata),
    .s_axi_rlast(b_rlast), .s_axi_rresp(b_rresp), .s_axi_rid(b_rid));

  // ---------------------------------------------------------------- graph and reference
  int unsigned row_ptr [$];
  int unsigned col_idx [$];
  int unsigned exp_vid [$], exp_lvl [$];
  bit          exp_overflow;

  task automatic golden(input int unsigned nv, input int unsigned s, input int unsigned depth);
    bit seen [];
    int unsigned lvl [];
    int unsigned q [$];
    seen = new[nv]; lvl = new[nv];
    exp_vid.delete(); exp_lvl.delete(); exp_overflow = 0;
    seen[s] = 1; lvl[s] = 0; q.push_back(s);
    exp_vid.push_back(s); exp_lvl.push_back(0);
    while (q.size() != 0) begin
      automatic int unsigned u = q.pop_front();
      for (int e = row_ptr[u]; e < row_ptr[u+1]; e++) begin
        automatic int unsigned w = col_idx[e];
        if (!seen[w]) begin
          seen[w] = 1; lvl[w] = lvl[u] + 1;
          exp_vid.push_back(w); exp_lvl.push_back(lvl[w]);
          if (q.size() < depth) q.push_back(w);
          else exp_overflow = 1;
        end
      end
    end
  endtask

  task automatic load_a();
    for (int i = 0; i < row_ptr.size(); i++) hbm_a.mem[i] = row_ptr[i];
    foreach (col_idx[e]) hbm_a.mem[CI_WORD + e] = col_idx[e];
  endtask

  task automatic load_b();
    for (int i = 0; i < row_ptr.size(); i++) hbm_b.mem[i] = row_ptr[i];
    foreach (col_idx[e]) hbm_b.mem[CI_WORD + e] = col_idx[e];
  endtask

  // ---------------------------------------------------------------- monitors
  int unsigned got_vid_a [$], got_lvl_a [$], got_vid_b [$], got_lvl_b [$];
  int unsigned n_leaf, n_ptr2, n_multibeat, n_split, n_lane, n_visited, n_disc;
  int unsigned n_rstall, n_arstall, n_overflow, n_err;

  always @(posedge clk) if (rst_n) begin
    if (out_valid_a) begin got_vid_a.push_back(32'(out_vid_a)); got_lvl_a.push_back(32'(out_level_a)); n_disc++; end
    if (out_valid_b) begin got_vid_b.push_back(32'(out_vid_b)); got_lvl_b.push_back(32'(out_level_b)); n_disc++; end
    if (dut_a.u_ctrl.state == ST_CHECK_EDGES && dut_a.u_ctrl.edge_end <= dut_a.u_ctrl.edge_start) n_leaf++;
    if (dut_a.u_ctrl.req_valid && dut_a.u_ctrl.req_ready) begin
      if (dut_a.u_ctrl.state == ST_FETCH_PTR && dut_a.u_ctrl.req_len == 1) n_ptr2++;
      if (dut_a.u_ctrl.state == ST_ISSUE_EDGES && dut_a.u_ctrl.req_len != 0) n_multibeat++;
    end
    if (a_rvalid && a_rready && a_rlast && !dut_a.u_axi.final_seg) n_split++;
    if (dut_a.u_ctrl.state == ST_RECV_BEAT && dut_a.u_ctrl.beat_valid && dut_a.u_ctrl.first_beat &&
        dut_a.u_ctrl.edge_start % 8 != 0) n_lane++;
    if (dut_a.u_ctrl.bm_chk_valid && dut_a.u_ctrl.bm_chk_visited) n_visited++;
    if (a_rvalid && !a_rready) n_rstall++;
    if (a_arvalid && !a_arready) n_arstall++;
    if (overflow_b) n_overflow++;
    if (axi_err_b) n_err++;
  end

  // ---------------------------------------------------------------- runs
  task automatic make_random_graph(input int unsigned nv, input int unsigned hub);
    row_ptr.delete(); col_idx.delete();
    for (int v = 0; v < int'(nv); v++) begin
      automatic int unsigned r = $urandom % 100;
      automatic int unsigned d = (v == int'(hub)) ? 1500 : (r < 15) ? 0 : (r < 20) ? 20 + $urandom % 200 : 1 + $urandom % 6;
      row_ptr.push_back(col_idx.size());
      for (int k = 0; k < int'(d); k++) col_idx.push_back($urandom % nv);
    end
    row_ptr.push_back(col_idx.size());
  endtask

  task automatic run_a(input int unsigned nv, input int unsigned s);
    int cyc = 0;
    make_random_graph(nv, (s + 17) % nv);
    // let the source reach the hub when it has out-edges
    if (row_ptr[s] != row_ptr[s+1]) col_idx[row_ptr[s]] = (s + 17) % nv;
    load_a();
    golden(nv, s, DEPTH_A);
    for (int i = 0; i < NV_A / 32; i++) dut_a.u_bitmap.mem[i] = '0;
    got_vid_a.delete(); got_lvl_a.delete();
    rst_n = 1'b0; repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    source_a = VW_A'(s); start_a = 1'b1;
    @(negedge clk);
    start_a = 1'b0;
    while (!done_a && cyc < 2000000) begin @(negedge clk); cyc++; end
    check(done_a, "engine A done");
    check(!overflow_a && !axi_err_a, "engine A flags clear");
    check(int'(count_a) == exp_vid.size(), $sformatf("engine A visited_count %0d vs %0d", count_a, exp_vid.size()));
    check(got_vid_a.size() == exp_vid.size(), "engine A discovery count");
    for (int i = 0; i < exp_vid.size() && i < got_vid_a.size(); i++)
      check(got_vid_a[i] == exp_vid[i] && got_lvl_a[i] == exp_lvl[i], $sformatf("engine A discovery %0d", i));
    check(hbm_a.protocol_errors == 0, "engine A AXI rules");
    $display("engine A: %0d vertices, %0d edges, source %0d: %0d discovered, %0d levels, %0d cycles",
             nv, col_idx.size(), s, exp_vid.size(), exp_lvl[exp_lvl.size()-1] + 1, cyc);
  endtask

  task automatic run_b();
    int cyc = 0;
    // 0 -> 1..12, each of 1..12 -> three vertices of 13..40, 13..40 -> 0
    row_ptr.delete(); col_idx.delete();
    for (int v = 0; v < int'(NV_B); v++) begin
      row_ptr.push_back(col_idx.size());
      if (v == 0) for (int k = 1; k <= 12; k++) col_idx.push_back(k);
      else if (v <= 12) for (int k = 0; k < 3; k++) col_idx.push_back(13 + (v * 3 + k) % 28);
      else if (v <= 40) col_idx.push_back(0);
    end
    row_ptr.push_back(col_idx.size());
    load_b();
    golden(NV_B, 0, DEPTH_B);
    got_vid_b.delete(); got_lvl_b.delete();
    @(negedge clk);
    source_b = '0; start_b = 1'b1;
    @(negedge clk);
    start_b = 1'b0;
    while (!done_b && cyc < 100000) begin @(negedge clk); cyc++; end
    check(done_b, "engine B done");
    check(exp_overflow && overflow_b, "engine B overflow flagged");
    check(axi_err_b, "engine B bus error flagged");
    check(int'(count_b) == exp_vid.size(), $sformatf("engine B visited_count %0d vs %0d", count_b, exp_vid.size()));
    check(got_vid_b.size() == exp_vid.size(), "engine B discovery count");
    for (int i = 0; i < exp_vid.size() && i < got_vid_b.size(); i++)
      check(got_vid_b[i] == exp_vid[i] && got_lvl_b[i] == exp_lvl[i], $sformatf("engine B discovery %0d", i));
    $display("engine B: %0d discovered with a %0d-entry frontier, %0d cycles", exp_vid.size(), DEPTH_B, cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_b();
    run_a(1500, 0);
    run_a(1500, 777);
    stall_a = 0;
    run_a(600, 5);
    $display("mechanisms: leaf skip %0d, 2-beat pointer read %0d, multi-beat burst %0d, 4KB split %0d,",
             n_leaf, n_ptr2, n_multibeat, n_split);
    $display("  lane offset %0d, visited neighbour %0d, discovery %0d, R back-pressure %0d, AR stall %0d,",
             n_lane, n_visited, n_disc, n_rstall, n_arstall);
    $display("  overflow cycles %0d, bus-error cycles %0d", n_overflow, n_err);
    check(n_leaf > 0, "leaf skip happened");
    check(n_ptr2 > 0, "2-beat pointer read happened");
    check(n_multibeat > 0, "multi-beat burst happened");
    check(n_split > 0, "4 KB split happened");
    check(n_lane > 0, "lane offset happened");
    check(n_visited > 0, "visited neighbour happened");
    check(n_disc > 0, "discovery happened");
    check(n_rstall > 0, "R back-pressure happened");
    check(n_arstall > 0, "AR stall happened");
    check(n_overflow > 0, "overflow happened");
    check(n_err > 0, "bus error happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
