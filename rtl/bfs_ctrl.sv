// bfs_ctrl: breadth-first traversal controller for a CSR graph held in
// external memory.
//
// Graph layout. row_ptr (|V|+1 32-bit offsets) starts at ROW_PTR_BASE and
// col_idx (|E| 32-bit destination vertex IDs) at COL_IDX_BASE; both bases must
// be aligned to the memory beat (32 bytes for a 256-bit bus). The out-edges of
// vertex v are col_idx[row_ptr[v] .. row_ptr[v+1]-1].
//
// Operation. On start the source vertex is marked visited, reported on the
// discovery stream at level 0 and enqueued. The controller then repeats:
// pop a frontier entry {level, vid}; read row_ptr[vid] and row_ptr[vid+1] in
// ONE read transaction (both sit in the same beat, at lanes vid%8 and vid%8+1;
// only when vid%8 is the last lane does the transaction carry a second beat);
// skip the vertex if it has no out-edges; otherwise issue one burst covering
// the beats that hold col_idx[edge_start .. edge_end-1]; latch each returned
// beat into an eight-entry buffer and walk its valid lanes: check the neighbour
// in the visited bitmap and, if it is unvisited, set its bit, report it on the
// discovery stream with level+1 and enqueue it. When the frontier queue is
// empty the traversal is complete and done stays high until reset.
//
// States (bfs_pkg::bfs_state_e): IDLE, INIT, DEQUEUE, FETCH_PTR, WAIT_PTR,
// CHECK_EDGES, ISSUE_EDGES, RECV_BEAT, SCATTER_RD, SCATTER_CHK, NEXT_EDGE,
// DONE. Multi-cycle states use a small phase counter (INIT, DEQUEUE,
// SCATTER_CHK) instead of extra states.
//
// Timing. The bitmap accepts one operation per two cycles, so a neighbour that
// is already visited costs 3 cycles (SCATTER_RD, SCATTER_CHK, NEXT_EDGE) and a
// newly discovered one 5 (the set needs its own bitmap slot). A frontier pop
// takes 2 cycles (registered FIFO output). Only one memory transaction is in
// flight at a time; the next vertex's pointer read starts after the current
// vertex's scatter loop ends.
//
// Discovery stream. out_valid is high for exactly the cycle in which the
// bitmap reports set_done for the discovered vertex; out_vid/out_level
// are valid with it. visited_count counts discoveries, source included.
//
// Frontier overflow. If a vertex is discovered while the frontier queue is
// full it is still marked visited and reported, but cannot be enqueued; the
// sticky overflow flag is raised and its neighbours are never expanded.
//
// Follows the described design: the state list, the single-transaction row
// pointer fetch, the 8-entry beat buffer, the level carried in the FIFO entry,
// reporting at set_done, and hold-in-DONE-until-reset. This implementation's
// own choices: beat-aligned bursts with lane masking, the second pointer beat
// for vid%8 = 7, the overflow policy, and neighbour IDs taken from the low
// VERTEX_W bits of each 32-bit col_idx entry.
module bfs_ctrl
  import bfs_pkg::*;
#(
  parameter int unsigned     VERTEX_W     = 20,
  parameter int unsigned     AXI_ADDR_W   = 33,
  parameter int unsigned     AXI_DATA_W   = 256,
  parameter int unsigned     REQ_LEN_W    = 32,
  parameter logic [AXI_ADDR_W-1:0] ROW_PTR_BASE = '0,
  parameter logic [AXI_ADDR_W-1:0] COL_IDX_BASE = AXI_ADDR_W'(33'h0_0010_0000)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // control
  input  logic                         start,
  input  logic [VERTEX_W-1:0]          source,
  output logic                         done,
  output logic                         overflow,
  output logic [VERTEX_W:0]            visited_count,
  // discovery stream
  output logic                         out_valid,
  output logic [VERTEX_W-1:0]          out_vid,
  output logic [LEVEL_W-1:0]           out_level,
  // read master request / beat stream
  output logic                         req_valid,
  input  logic                         req_ready,
  output logic [AXI_ADDR_W-1:0]        req_addr,
  output logic [REQ_LEN_W-1:0]         req_len,
  input  logic                         beat_valid,
  input  logic [AXI_DATA_W-1:0]        beat_data,
  input  logic                         beat_last,
  output logic                         beat_ready,
  // frontier FIFO
  output logic                         fifo_wr_en,
  output logic [LEVEL_W+VERTEX_W-1:0]  fifo_wr_data,
  input  logic                         fifo_full,
  output logic                         fifo_rd_en,
  input  logic [LEVEL_W+VERTEX_W-1:0]  fifo_rd_data,
  input  logic                         fifo_rd_valid,
  input  logic                         fifo_empty,
  // visited bitmap
  output logic                         bm_op_valid,
  output logic                         bm_op_set,
  output logic [VERTEX_W-1:0]          bm_op_vid,
  input  logic                         bm_busy,
  input  logic                         bm_chk_valid,
  input  logic                         bm_chk_visited,
  input  logic                         bm_set_done
);

  localparam int unsigned VPB        = AXI_DATA_W / CSR_ELEM_W;   // vertex IDs per beat
  localparam int unsigned LANE_W     = $clog2(VPB);
  localparam int unsigned BEAT_BYTES = AXI_DATA_W / 8;
  localparam int unsigned OFFS_W     = $clog2(BEAT_BYTES);

  bfs_state_e                 state;
  logic [1:0]                 phase;
  logic [VERTEX_W-1:0]        cur_vid;
  logic [LEVEL_W-1:0]         cur_level;
  logic [CSR_ELEM_W-1:0]      edge_start, edge_end, edge_remaining;
  logic [CSR_ELEM_W-1:0]      beat_buf [VPB];
  logic [LANE_W-1:0]          beat_idx;
  logic                       first_beat;
  logic                       ptr_second;   // row_ptr read is on its second beat
  logic [VERTEX_W-1:0]        nbr_vid;

  // ---------------------------------------------------------------- addresses
  logic [LANE_W-1:0]          ptr_lane;
  logic [AXI_ADDR_W-1:0]      ptr_addr, edge_addr;
  logic [CSR_ELEM_W-1:0]      edge_first_beat, edge_last_beat;

  always_comb begin
    ptr_lane  = LANE_W'(cur_vid);
    ptr_addr  = ROW_PTR_BASE + (AXI_ADDR_W'(cur_vid) << 2);
    ptr_addr[OFFS_W-1:0] = '0;
    edge_addr = COL_IDX_BASE + (AXI_ADDR_W'(edge_start) << 2);
    edge_addr[OFFS_W-1:0] = '0;
    edge_first_beat = edge_start >> LANE_W;
    edge_last_beat  = (edge_end - 1'b1) >> LANE_W;
  end

  function automatic logic [CSR_ELEM_W-1:0] lane_of(input logic [AXI_DATA_W-1:0] d,
                                                    input logic [LANE_W-1:0] l);
    return d[l*CSR_ELEM_W +: CSR_ELEM_W];
  endfunction

  // ---------------------------------------------------------------- outputs
  always_comb begin
    req_valid    = 1'b0;
    req_addr     = '0;
    req_len      = '0;
    beat_ready   = 1'b0;
    fifo_wr_en   = 1'b0;
    fifo_wr_data = '0;
    fifo_rd_en   = 1'b0;
    bm_op_valid  = 1'b0;
    bm_op_set    = 1'b0;
    bm_op_vid    = '0;
    out_valid    = 1'b0;
    out_vid      = '0;
    out_level    = '0;
    unique case (state)
      ST_INIT: begin
        bm_op_set = 1'b1;
        bm_op_vid = cur_vid;
        if (phase == 2'd0) bm_op_valid = 1'b1;
        if (phase == 2'd1 && bm_set_done) begin
          out_valid    = 1'b1;
          out_vid      = cur_vid;
          out_level    = '0;
          fifo_wr_en   = 1'b1;
          fifo_wr_data = {LEVEL_W'(0), cur_vid};
        end
      end
      ST_DEQUEUE: fifo_rd_en = (phase == 2'd0) && !fifo_empty;
      ST_FETCH_PTR: begin
        req_valid = 1'b1;
        req_addr  = ptr_addr;
        req_len   = (ptr_lane == LANE_W'(VPB - 1)) ? REQ_LEN_W'(1) : REQ_LEN_W'(0);
      end
      ST_WAIT_PTR:  beat_ready = 1'b1;
      ST_ISSUE_EDGES: begin
        req_valid = 1'b1;
        req_addr  = edge_addr;
        req_len   = REQ_LEN_W'(edge_last_beat - edge_first_beat);
      end
      ST_RECV_BEAT: beat_ready = 1'b1;
      ST_SCATTER_RD: begin
        bm_op_valid = 1'b1;
        bm_op_vid   = VERTEX_W'(beat_buf[beat_idx]);
      end
      ST_SCATTER_CHK: begin
        bm_op_set = 1'b1;
        bm_op_vid = nbr_vid;
        if (phase == 2'd1) bm_op_valid = 1'b1;
        if (phase == 2'd2 && bm_set_done) begin
          out_valid    = 1'b1;
          out_vid      = nbr_vid;
          out_level    = cur_level + 1'b1;
          fifo_wr_en   = !fifo_full;
          fifo_wr_data = {cur_level + LEVEL_W'(1), nbr_vid};
        end
      end
      default: ;
    endcase
  end

  assign done = (state == ST_DONE);

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= ST_IDLE;
      phase          <= '0;
      cur_vid        <= '0;
      cur_level      <= '0;
      edge_start     <= '0;
      edge_end       <= '0;
      edge_remaining <= '0;
      beat_idx       <= '0;
      first_beat     <= 1'b0;
      ptr_second     <= 1'b0;
      nbr_vid        <= '0;
      overflow       <= 1'b0;
      visited_count  <= '0;
      for (int i = 0; i < VPB; i++) beat_buf[i] <= '0;
    end else begin
      if (out_valid) visited_count <= visited_count + 1'b1;

      unique case (state)
        ST_IDLE: if (start) begin
          cur_vid       <= source;
          cur_level     <= '0;
          phase         <= '0;
          overflow      <= 1'b0;
          visited_count <= '0;
          state         <= ST_INIT;
        end

        ST_INIT: begin
          if (phase == 2'd0 && !bm_busy) phase <= 2'd1;
          if (phase == 2'd1 && bm_set_done) begin
            if (fifo_full) overflow <= 1'b1;
            phase <= '0;
            state <= ST_DEQUEUE;
          end
        end

        ST_DEQUEUE: begin
          if (phase == 2'd0) begin
            if (fifo_empty) state <= ST_DONE;
            else            phase <= 2'd1;
          end else if (fifo_rd_valid) begin
            {cur_level, cur_vid} <= fifo_rd_data;
            phase <= '0;
            state <= ST_FETCH_PTR;
          end
        end

        ST_FETCH_PTR: if (req_ready) begin
          ptr_second <= 1'b0;
          state      <= ST_WAIT_PTR;
        end

        ST_WAIT_PTR: if (beat_valid) begin
          if (!ptr_second) begin
            edge_start <= lane_of(beat_data, ptr_lane);
            if (ptr_lane != LANE_W'(VPB - 1))
              edge_end <= lane_of(beat_data, ptr_lane + 1'b1);
          end else begin
            edge_end <= lane_of(beat_data, '0);
          end
          ptr_second <= 1'b1;
          if (beat_last) state <= ST_CHECK_EDGES;
        end

        ST_CHECK_EDGES: begin
          edge_remaining <= edge_end - edge_start;
          if (edge_end > edge_start) state <= ST_ISSUE_EDGES;
          else                       state <= ST_DEQUEUE;
        end

        ST_ISSUE_EDGES: if (req_ready) begin
          first_beat <= 1'b1;
          state      <= ST_RECV_BEAT;
        end

        ST_RECV_BEAT: if (beat_valid) begin
          for (int i = 0; i < VPB; i++) beat_buf[i] <= lane_of(beat_data, LANE_W'(i));
          beat_idx   <= first_beat ? LANE_W'(edge_start) : '0;
          first_beat <= 1'b0;
          state      <= ST_SCATTER_RD;
        end

        ST_SCATTER_RD: if (!bm_busy) begin
          nbr_vid <= VERTEX_W'(beat_buf[beat_idx]);
          phase   <= '0;
          state   <= ST_SCATTER_CHK;
        end

        ST_SCATTER_CHK: begin
          unique case (phase)
            2'd0: if (bm_chk_valid) begin
              if (bm_chk_visited) state <= ST_NEXT_EDGE;
              else                phase <= 2'd1;
            end
            2'd1: if (!bm_busy) phase <= 2'd2;
            2'd2: if (bm_set_done) begin
              if (fifo_full) overflow <= 1'b1;
              phase <= '0;
              state <= ST_NEXT_EDGE;
            end
            default: phase <= '0;
          endcase
        end

        ST_NEXT_EDGE: begin
          edge_remaining <= edge_remaining - 1'b1;
          beat_idx       <= beat_idx + 1'b1;
          if (edge_remaining == 32'd1)              state <= ST_DEQUEUE;
          else if (beat_idx == LANE_W'(VPB - 1))    state <= ST_RECV_BEAT;
          else                                      state <= ST_SCATTER_RD;
        end

        ST_DONE: ;

        default: state <= ST_IDLE;
      endcase
    end
  end

  // The burst length was chosen so that the last useful neighbour sits in the
  // last beat: the scatter loop must never run out of edges early or late.
  a_last_beat_consistent: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_RECV_BEAT && beat_valid && beat_last) |->
      (edge_remaining <= CSR_ELEM_W'(VPB) - (first_beat ? CSR_ELEM_W'(LANE_W'(edge_start)) : '0)));

  a_bitmap_free: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_SCATTER_RD) |-> !bm_busy);

endmodule
