// axi4_rd_master: AXI4 read-channel (AR + R) manager for the BFS engine.
//
// Function. Accepts a request (req_addr, req_len) meaning "read req_len+1
// consecutive data beats starting at byte address req_addr" and performs it as
// AXI4 INCR read bursts, presenting the returned data as a plain stream
// (beat_data, beat_last). beat_last marks the final beat of the whole request.
// The AR attributes are fixed: full-width beats (size code log2 of the bus
// width in bytes, 32 bytes for a 256-bit bus), INCR bursts, no lock, cache
// 4'b0011, protection 3'b010, ID 0.
//
// Burst splitting. An AXI4 burst may neither cross a 4 KB boundary nor exceed
// 256 beats, so a long request (a high-degree vertex's adjacency list) is
// issued as several bursts, one after another; each burst's AR is issued only
// after the previous burst's last R beat. Short requests are a single burst
// with arlen = req_len.
//
// Handshakes. req: valid/ready; req_ready is high only when no request is in
// progress (one outstanding transaction). beat: valid/ready, mapped directly
// onto rvalid/rready while a burst is being received, so the stream adds no
// latency and back-pressure from the consumer reaches the memory directly.
// resp_err is a sticky flag set by any non-OKAY rresp; the data of such a beat
// is still delivered.
//
// req_addr must be aligned to the bus width. Fixed attribute values follow the
// described design (the size code is 3 bits, as AXI4 defines it); burst
// splitting, the one-request-at-a-time policy and resp_err are this
// implementation's choices.
module axi4_rd_master
  import bfs_pkg::*;
#(
  parameter int unsigned AXI_ADDR_W = 33,
  parameter int unsigned AXI_DATA_W = 256,
  parameter int unsigned AXI_ID_W   = 4,
  parameter int unsigned REQ_LEN_W  = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request from the controller
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [AXI_ADDR_W-1:0] req_addr,
  input  logic [REQ_LEN_W-1:0]  req_len,    // beats - 1
  // beat stream to the controller
  output logic                  beat_valid,
  output logic [AXI_DATA_W-1:0] beat_data,
  output logic                  beat_last,
  input  logic                  beat_ready,
  // AXI4 AR channel
  output logic                  m_axi_arvalid,
  input  logic                  m_axi_arready,
  output logic [AXI_ADDR_W-1:0] m_axi_araddr,
  output logic [7:0]            m_axi_arlen,
  output logic [2:0]            m_axi_arsize,
  output logic [1:0]            m_axi_arburst,
  output logic [AXI_ID_W-1:0]   m_axi_arid,
  output logic                  m_axi_arlock,
  output logic [3:0]            m_axi_arcache,
  output logic [2:0]            m_axi_arprot,
  // AXI4 R channel
  input  logic                  m_axi_rvalid,
  output logic                  m_axi_rready,
  input  logic [AXI_DATA_W-1:0] m_axi_rdata,
  input  logic                  m_axi_rlast,
  input  logic [1:0]            m_axi_rresp,
  input  logic [AXI_ID_W-1:0]   m_axi_rid,
  // status
  output logic                  resp_err
);

  localparam int unsigned BEAT_BYTES  = AXI_DATA_W / 8;
  localparam int unsigned OFFS_W      = $clog2(BEAT_BYTES);
  localparam int unsigned PAGE_BEATS  = AXI_BOUNDARY_BYTES / BEAT_BYTES;
  localparam int unsigned MAX_BEATS   = (PAGE_BEATS < AXI_MAX_BURST) ? PAGE_BEATS : AXI_MAX_BURST;
  localparam int unsigned PAGE_IDX_W  = $clog2(PAGE_BEATS);
  localparam int unsigned SEG_W       = $clog2(MAX_BEATS + 1);

  typedef enum logic [1:0] {M_IDLE, M_AR, M_R} mstate_e;

  mstate_e                 state;
  logic [AXI_ADDR_W-1:0]   cur_addr;
  logic [REQ_LEN_W:0]      beats_left;   // beats of the request not yet covered by an AR
  logic                    final_seg;    // the burst in flight is the request's last

  // Beats from cur_addr up to the next 4 KB boundary, capped at the AXI maximum.
  logic [PAGE_IDX_W-1:0]   page_idx;
  logic [SEG_W-1:0]        to_boundary;
  logic [SEG_W-1:0]        next_seg;

  always_comb begin
    page_idx    = PAGE_IDX_W'(cur_addr >> OFFS_W);
    to_boundary = SEG_W'(PAGE_BEATS) - SEG_W'(page_idx);
    if (to_boundary > SEG_W'(MAX_BEATS)) to_boundary = SEG_W'(MAX_BEATS);
    if (beats_left < (REQ_LEN_W+1)'(to_boundary)) next_seg = SEG_W'(beats_left);
    else                                          next_seg = to_boundary;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      cur_addr   <= '0;
      beats_left <= '0;
      final_seg  <= 1'b0;
      resp_err   <= 1'b0;
    end else begin
      case (state)
        M_IDLE: if (req_valid) begin
          cur_addr   <= req_addr;
          beats_left <= (REQ_LEN_W+1)'(req_len) + 1'b1;
          state      <= M_AR;
        end
        M_AR: begin
          final_seg <= (beats_left == (REQ_LEN_W+1)'(next_seg));
          if (m_axi_arready) begin
            cur_addr   <= cur_addr + AXI_ADDR_W'(next_seg) * AXI_ADDR_W'(BEAT_BYTES);
            beats_left <= beats_left - (REQ_LEN_W+1)'(next_seg);
            state      <= M_R;
          end
        end
        M_R: if (m_axi_rvalid && beat_ready) begin
          if (m_axi_rresp != AXI_RESP_OKAY) resp_err <= 1'b1;
          if (m_axi_rlast) state <= final_seg ? M_IDLE : M_AR;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assign req_ready     = (state == M_IDLE);

  assign m_axi_arvalid = (state == M_AR);
  assign m_axi_araddr  = cur_addr;
  assign m_axi_arlen   = 8'(next_seg - 1'b1);
  assign m_axi_arsize  = 3'(OFFS_W);
  assign m_axi_arburst = AXI_BURST_INCR;
  assign m_axi_arid    = '0;
  assign m_axi_arlock  = 1'b0;
  assign m_axi_arcache = AXI_CACHE_VAL;
  assign m_axi_arprot  = AXI_PROT_VAL;

  assign m_axi_rready  = (state == M_R) && beat_ready;
  assign beat_valid    = (state == M_R) && m_axi_rvalid;
  assign beat_data     = m_axi_rdata;
  assign beat_last     = m_axi_rlast && final_seg;

  // Only one transaction is ever outstanding, so the returned ID carries no
  // information; it is checked against the issued ID 0 below.
  a_rid_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axi_rvalid && m_axi_rready) |-> (m_axi_rid == '0));

  // AXI4 rules the master relies on or guarantees.
  property p_ar_stable;
    @(posedge clk) disable iff (!rst_n)
      (m_axi_arvalid && !m_axi_arready) |=> (m_axi_arvalid && $stable(m_axi_araddr) && $stable(m_axi_arlen));
  endproperty
  a_ar_stable: assert property (p_ar_stable);

  a_req_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_ready) |-> (req_addr[OFFS_W-1:0] == '0));

  a_no_r_before_ar: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_rvalid |-> (state == M_R));

endmodule
