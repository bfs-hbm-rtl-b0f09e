// hbm_mem_model: behavioural model (not synthesizable) of one HBM
// pseudo-channel behind its controller, seen as a 256-bit AXI4 read slave.
//
// Storage is an array of MEM_WORDS 32-bit words; byte address A reads word
// (A/4) modulo MEM_WORDS, so a 2 MB model covers row_ptr at 0 and col_idx at
// 1 MB. Testbenches fill `mem` directly by hierarchical reference.
//
// Timing: the address handshake happens on the edge where arvalid and arready
// are both high; the first data beat is presented LATENCY cycles later and
// the rest of the burst follows one beat per cycle while rready is high. One
// burst is served at a time (arready stays low meanwhile). With stall_pct > 0,
// arready and rvalid are each withheld at random in about stall_pct percent of
// cycles. When err_inject is high, beats return SLVERR instead of OKAY.
// The model also checks the master's AR signals against the AXI4 rules the
// engine relies on and counts violations in `protocol_errors`.
module hbm_mem_model #(
  parameter int unsigned AXI_ADDR_W = 33,
  parameter int unsigned AXI_DATA_W = 256,
  parameter int unsigned AXI_ID_W   = 4,
  parameter int unsigned LATENCY    = 20,
  parameter int unsigned MEM_WORDS  = 1 << 19
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  err_inject,
  input  int unsigned           stall_pct,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  input  logic [AXI_ADDR_W-1:0] s_axi_araddr,
  input  logic [7:0]            s_axi_arlen,
  input  logic [2:0]            s_axi_arsize,
  input  logic [1:0]            s_axi_arburst,
  input  logic [AXI_ID_W-1:0]   s_axi_arid,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  output logic [AXI_DATA_W-1:0] s_axi_rdata,
  output logic                  s_axi_rlast,
  output logic [1:0]            s_axi_rresp,
  output logic [AXI_ID_W-1:0]   s_axi_rid
);

  localparam int unsigned WPB = AXI_DATA_W / 32;

  logic [31:0] mem [MEM_WORDS];

  int unsigned protocol_errors = 0;
  int unsigned ar_count = 0;
  int unsigned stall_cycles = 0;

  logic                  busy;
  logic [AXI_ADDR_W-1:0] addr;
  logic [8:0]            beats_left;
  int unsigned           wait_cnt;
  logic                  ar_gate, r_gate;
  logic [AXI_ID_W-1:0]   id_q;

  function automatic logic [AXI_DATA_W-1:0] read_beat(input logic [AXI_ADDR_W-1:0] a);
    logic [AXI_DATA_W-1:0] d;
    longint unsigned w0;
    w0 = longint'(a) / 4;
    for (int i = 0; i < WPB; i++) d[i*32 +: 32] = mem[$clog2(MEM_WORDS)'((w0 + longint'(i)) % longint'(MEM_WORDS))];
    return d;
  endfunction

  initial begin
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = '0;
  end

  assign s_axi_arready = rst_n && !busy && ar_gate;
  assign s_axi_rvalid  = busy && (wait_cnt == 0) && r_gate;
  assign s_axi_rdata   = read_beat(addr);
  assign s_axi_rlast   = (beats_left == 9'd1);
  assign s_axi_rresp   = err_inject ? 2'b10 : 2'b00;
  assign s_axi_rid     = id_q;

  always_ff @(posedge clk) begin
    ar_gate <= (stall_pct == 0) || (($urandom % 100) >= stall_pct);
    r_gate  <= (stall_pct == 0) || (($urandom % 100) >= stall_pct);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      addr       <= '0;
      beats_left <= '0;
      wait_cnt   <= 0;
      id_q       <= '0;
    end else begin
      if (s_axi_arvalid && s_axi_arready) begin
        ar_count++;
        if (s_axi_arburst != 2'b01) protocol_errors++;
        if ((1 << s_axi_arsize) != AXI_DATA_W / 8) protocol_errors++;
        if ((longint'(s_axi_araddr) % 4096) + (longint'(s_axi_arlen) + 1) * longint'(AXI_DATA_W / 8) > 4096) protocol_errors++;
        busy       <= 1'b1;
        addr       <= s_axi_araddr;
        beats_left <= 9'(s_axi_arlen) + 9'd1;
        wait_cnt   <= (LATENCY > 0) ? LATENCY - 1 : 0;
        id_q       <= s_axi_arid;
      end else if (busy) begin
        if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
        else if (s_axi_rvalid && s_axi_rready) begin
          addr       <= addr + AXI_ADDR_W'(AXI_DATA_W / 8);
          beats_left <= beats_left - 1'b1;
          if (beats_left == 9'd1) busy <= 1'b0;
        end else if (!s_axi_rready || !r_gate) stall_cycles++;
      end
    end
  end

endmodule
