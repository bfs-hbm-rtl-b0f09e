// bfs_top: single-engine breadth-first traversal of a CSR graph in
// High-Bandwidth Memory, behind one AXI4 read master port.
//
// Structure. bfs_ctrl (traversal state machine) drives three units:
// axi4_rd_master (AR/R channels of the memory port), vertex_fifo (frontier
// queue of {level[15:0], vid} entries) and visited_bitmap (one bit per vertex
// in on-chip block RAM, 2-cycle read-modify-write). Only the read channels of
// AXI4 exist: the traversal never writes external memory.
//
// Interface. Control: pulse start with source valid while the engine is idle;
// done rises when the frontier is exhausted and stays high until rst_n
// (active low, asynchronous). Discovery stream: out_valid/out_vid/out_level
// for every newly reached vertex, source first at level 0, in BFS order.
// visited_count counts discovered vertices. Status: overflow (a discovered
// vertex could not be enqueued because the frontier queue was full) and
// axi_err (a read returned a non-OKAY response). AXI4: m_axi_ar* and m_axi_r*
// of a 256-bit read master with 33-bit addresses.
//
// Memory map. row_ptr at ROW_PTR_BASE, col_idx at COL_IDX_BASE, 32-bit
// elements, both bases aligned to the bus width.
//
// The visited bitmap is not cleared by reset: one traversal per bitmap
// initialisation (configuration or power-up), as in the described design.
//
// Parameter defaults are the described design's: 2^20 vertices, 256-bit data,
// 33-bit addresses, 4-bit IDs, 2048-entry frontier, row_ptr at 0 and col_idx
// at 1 MB. The overflow and axi_err flags are this implementation's additions.
module bfs_top
  import bfs_pkg::*;
#(
  parameter int unsigned           VERTEX_W     = 20,
  parameter int unsigned           AXI_DATA_W   = 256,
  parameter int unsigned           AXI_ADDR_W   = 33,
  parameter int unsigned           AXI_ID_W     = 4,
  parameter int unsigned           FIFO_DEPTH   = 2048,
  parameter logic [AXI_ADDR_W-1:0] ROW_PTR_BASE = '0,
  parameter logic [AXI_ADDR_W-1:0] COL_IDX_BASE = AXI_ADDR_W'(33'h0_0010_0000)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // BFS control
  input  logic                  start,
  input  logic [VERTEX_W-1:0]   source,
  output logic                  done,
  output logic [VERTEX_W:0]     visited_count,
  output logic                  overflow,
  output logic                  axi_err,
  // discovery stream
  output logic                  out_valid,
  output logic [VERTEX_W-1:0]   out_vid,
  output logic [LEVEL_W-1:0]    out_level,
  // AXI4 read address channel
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
  // AXI4 read data channel
  input  logic                  m_axi_rvalid,
  output logic                  m_axi_rready,
  input  logic [AXI_DATA_W-1:0] m_axi_rdata,
  input  logic                  m_axi_rlast,
  input  logic [1:0]            m_axi_rresp,
  input  logic [AXI_ID_W-1:0]   m_axi_rid
);

  localparam int unsigned REQ_LEN_W = 32;
  localparam int unsigned ENTRY_W   = LEVEL_W + VERTEX_W;

  // controller <-> read master
  logic                  req_valid, req_ready;
  logic [AXI_ADDR_W-1:0] req_addr;
  logic [REQ_LEN_W-1:0]  req_len;
  logic                  beat_valid, beat_last, beat_ready;
  logic [AXI_DATA_W-1:0] beat_data;

  // controller <-> frontier FIFO
  logic                  fifo_wr_en, fifo_rd_en, fifo_rd_valid, fifo_empty, fifo_full;
  logic [ENTRY_W-1:0]    fifo_wr_data, fifo_rd_data;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  // controller <-> visited bitmap
  logic                  bm_op_valid, bm_op_set, bm_busy;
  logic                  bm_chk_valid, bm_chk_visited, bm_set_done;
  logic [VERTEX_W-1:0]   bm_op_vid;

  bfs_ctrl #(
    .VERTEX_W     (VERTEX_W),
    .AXI_ADDR_W   (AXI_ADDR_W),
    .AXI_DATA_W   (AXI_DATA_W),
    .REQ_LEN_W    (REQ_LEN_W),
    .ROW_PTR_BASE (ROW_PTR_BASE),
    .COL_IDX_BASE (COL_IDX_BASE)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .source, .done, .overflow, .visited_count,
    .out_valid, .out_vid, .out_level,
    .req_valid, .req_ready, .req_addr, .req_len,
    .beat_valid, .beat_data, .beat_last, .beat_ready,
    .fifo_wr_en, .fifo_wr_data, .fifo_full,
    .fifo_rd_en, .fifo_rd_data, .fifo_rd_valid, .fifo_empty,
    .bm_op_valid, .bm_op_set, .bm_op_vid, .bm_busy,
    .bm_chk_valid, .bm_chk_visited, .bm_set_done
  );

  axi4_rd_master #(
    .AXI_ADDR_W (AXI_ADDR_W),
    .AXI_DATA_W (AXI_DATA_W),
    .AXI_ID_W   (AXI_ID_W),
    .REQ_LEN_W  (REQ_LEN_W)
  ) u_axi (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_addr, .req_len,
    .beat_valid, .beat_data, .beat_last, .beat_ready,
    .m_axi_arvalid, .m_axi_arready, .m_axi_araddr, .m_axi_arlen, .m_axi_arsize,
    .m_axi_arburst, .m_axi_arid, .m_axi_arlock, .m_axi_arcache, .m_axi_arprot,
    .m_axi_rvalid, .m_axi_rready, .m_axi_rdata, .m_axi_rlast, .m_axi_rresp, .m_axi_rid,
    .resp_err (axi_err)
  );

  vertex_fifo #(
    .DATA_W (ENTRY_W),
    .DEPTH  (FIFO_DEPTH)
  ) u_fifo (
    .clk, .rst_n,
    .wr_en    (fifo_wr_en),
    .wr_data  (fifo_wr_data),
    .rd_en    (fifo_rd_en),
    .rd_data  (fifo_rd_data),
    .rd_valid (fifo_rd_valid),
    .empty    (fifo_empty),
    .full     (fifo_full),
    .count    (fifo_count)
  );

  visited_bitmap #(
    .VERTEX_W (VERTEX_W)
  ) u_bitmap (
    .clk, .rst_n,
    .op_valid    (bm_op_valid),
    .op_set      (bm_op_set),
    .op_vid      (bm_op_vid),
    .busy        (bm_busy),
    .chk_valid   (bm_chk_valid),
    .chk_visited (bm_chk_visited),
    .set_done    (bm_set_done)
  );

  // The frontier occupancy is not needed by the controller (it uses empty and
  // full); it is checked here against the queue's capacity.
  a_fifo_bound: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_count <= ($clog2(FIFO_DEPTH+1))'(FIFO_DEPTH));

endmodule
