// tb_axi4_rd_master: self-checking test of the AXI4 read master.
//
// The master talks to the behavioural HBM model (latency 20), whose memory
// holds a known pattern (word i = i * 2654435761 + 7). Random requests, from
// single beats to 700-beat runs at random beat-aligned addresses, are issued
// while the consumer randomly withholds beat_ready and the memory randomly
// withholds arready and rvalid. Checks: every beat's data against the
// pattern, beat_last only on the request's final beat, the number of beats,
// every AR (fixed attributes, no 4 KB crossing, at most 256 beats, bursts
// contiguous and covering the request exactly), req_ready only when idle,
// the 20-cycle latency from request to first beat with no stalls
// (1 cycle for AR plus the memory latency) and the sticky error flag.
module tb_axi4_rd_master;
  localparam int unsigned AW = 33, DW = 256, IW = 4, LEN_W = 32;
  localparam int unsigned LAT = 20;
  localparam int unsigned MEM_WORDS = 1 << 19;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready;
  logic [AW-1:0] req_addr = '0;
  logic [LEN_W-1:0] req_len = '0;
  logic beat_valid, beat_last;
  logic beat_ready = 1'b0;
  logic [DW-1:0] beat_data;
  logic arvalid, arready, arlock, rvalid, rready, rlast, resp_err;
  logic [AW-1:0] araddr;
  logic [7:0] arlen;
  logic [2:0] arsize, arprot;
  logic [1:0] arburst, rresp;
  logic [3:0] arcache;
  logic [IW-1:0] arid, rid;
  logic [DW-1:0] rdata;
  logic err_inject = 1'b0;
  int unsigned stall_pct = 25;

  int checks = 0, failures = 0;
  int n_split = 0, n_ready_stall = 0;

  always #2 clk = ~clk;

  axi4_rd_master #(.AXI_ADDR_W(AW), .AXI_DATA_W(DW), .AXI_ID_W(IW), .REQ_LEN_W(LEN_W)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_len,
    .beat_valid, .beat_data, .beat_last, .beat_ready,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arid(arid), .m_axi_arlock(arlock), .m_axi_arcache(arcache), .m_axi_arprot(arprot),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_rdata(rdata),
    .m_axi_rlast(rlast), .m_axi_rresp(rresp), .m_axi_rid(rid), .resp_err);

  hbm_mem_model #(.AXI_ADDR_W(AW), .AXI_DATA_W(DW), .AXI_ID_W(IW), .LATENCY(LAT),
                  .MEM_WORDS(MEM_WORDS)) u_hbm (
    .clk, .rst_n, .err_inject, .stall_pct,
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

  function automatic logic [31:0] pattern(input longint unsigned w);
    return 32'(w * 64'd2654435761 + 64'd7);
  endfunction

  function automatic logic [DW-1:0] exp_beat(input longint unsigned byte_addr);
    logic [DW-1:0] d;
    for (int i = 0; i < DW / 32; i++) d[i*32 +: 32] = pattern((byte_addr / 4 + longint'(i)) % MEM_WORDS);
    return d;
  endfunction

  // AR monitor: the bursts of the current request must be contiguous.
  longint unsigned next_ar_addr;
  longint unsigned ar_beats;
  always @(posedge clk) begin
    if (rst_n && arvalid && arready) begin
      check(arsize == 3'd5 && arburst == 2'b01 && arlock == 1'b0 &&
            arcache == 4'b0011 && arprot == 3'b010 && arid == '0, "AR fixed attributes");
      check((araddr % 4096) + (longint'(arlen) + 1) * 32 <= 4096, "AR within 4 KB");
      check(longint'(araddr) == next_ar_addr, "AR contiguous");
      if (longint'(araddr) != longint'(req_addr)) n_split++;
      next_ar_addr = longint'(araddr) + (longint'(arlen) + 1) * 32;
      ar_beats += longint'(arlen) + 1;
    end
    if (rst_n && beat_valid && !beat_ready) n_ready_stall++;
  end

  // Run one request and check its beat stream; returns cycles to first beat.
  task automatic run_req(input longint unsigned addr, input int unsigned len, output int first_lat);
    int got = 0, cyc = 0;
    bit seen_last = 0;
    first_lat = -1;
    @(negedge clk);
    check(req_ready, "req_ready when idle");
    req_valid = 1'b1; req_addr = AW'(addr); req_len = LEN_W'(len);
    next_ar_addr = addr; ar_beats = 0;
    @(negedge clk);
    req_valid = 1'b0;
    check(!req_ready, "req_ready low while busy");
    while (!seen_last && cyc < 100000) begin
      beat_ready = (stall_pct == 0) || (($urandom % 100) >= 30);
      #1;
      if (beat_valid && beat_ready) begin
        if (first_lat < 0) first_lat = cyc + 1;
        check(beat_data == exp_beat(addr + longint'(got) * 32), $sformatf("beat %0d data", got));
        check(beat_last == (got == int'(len)), $sformatf("beat_last at beat %0d of %0d", got, len + 1));
        seen_last = beat_last;
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    beat_ready = 1'b0;
    check(got == int'(len) + 1, "beat count");
    check(ar_beats == longint'(len) + 1, "AR bursts cover the request");
  endtask

  initial begin
    int lat;
    for (int i = 0; i < MEM_WORDS; i++) u_hbm.mem[i] = pattern(i);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // latency without stalls
    stall_pct = 0;
    run_req(64'h100, 0, lat);
    check(lat == int'(LAT) + 1, $sformatf("request-to-first-beat latency %0d", lat));
    run_req(64'h10_0000 + 64'd4000 * 32, 3, lat);
    // random traffic with stalls on both sides
    stall_pct = 25;
    for (int n = 0; n < 150; n++) begin
      automatic longint unsigned a = longint'($urandom % 40000) * 32;
      automatic int unsigned l = ($urandom % 4 == 0) ? $urandom % 700 : $urandom % 10;
      run_req(a, l, lat);
    end
    // a run crossing several 4 KB pages from an unaligned-to-page start
    run_req(64'd4096 - 64, 300, lat);
    check(n_split > 0 && n_ready_stall > 0, "4 KB splits and consumer stalls exercised");
    check(!resp_err, "no error flag on OKAY responses");
    err_inject = 1'b1;
    run_req(64'h2000, 1, lat);
    err_inject = 1'b0;
    check(resp_err, "error flag after SLVERR");
    check(u_hbm.protocol_errors == 0, "memory model saw no protocol error");
    $display("splits %0d, consumer stall cycles %0d", n_split, n_ready_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
