// bfs_pkg: types and constants shared by the BFS traversal engine.
//
// Holds the traversal controller's state encoding (the twelve states of the
// traversal loop), the width of the BFS level carried with every frontier entry
// and discovery (16 bits), the CSR element size (32-bit row pointers and column
// indices, eight per 256-bit memory beat) and the fixed AXI4 read-channel
// attribute values the read master drives (INCR bursts, normal/non-secure/data
// protection, modifiable bufferable cache attribute). The AXI size code is
// derived from the bus width rather than stored as a constant.
package bfs_pkg;

  // Width of the BFS level (hop count) stored with each vertex.
  localparam int unsigned LEVEL_W = 16;

  // CSR arrays hold 32-bit elements (row_ptr offsets and col_idx vertex IDs).
  localparam int unsigned CSR_ELEM_W     = 32;

  // AXI4 read-channel constants driven by the read master.
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [3:0] AXI_CACHE_VAL  = 4'b0011;
  localparam logic [2:0] AXI_PROT_VAL   = 3'b010;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;
  // An AXI4 burst may not cross a 4 KB address boundary.
  localparam int unsigned AXI_BOUNDARY_BYTES = 4096;
  // Largest INCR burst AXI4 allows, in beats.
  localparam int unsigned AXI_MAX_BURST = 256;

  // Traversal controller states.
  typedef enum logic [3:0] {
    ST_IDLE        = 4'd0,
    ST_INIT        = 4'd1,
    ST_DEQUEUE     = 4'd2,
    ST_FETCH_PTR   = 4'd3,
    ST_WAIT_PTR    = 4'd4,
    ST_CHECK_EDGES = 4'd5,
    ST_ISSUE_EDGES = 4'd6,
    ST_RECV_BEAT   = 4'd7,
    ST_SCATTER_RD  = 4'd8,
    ST_SCATTER_CHK = 4'd9,
    ST_NEXT_EDGE   = 4'd10,
    ST_DONE        = 4'd11
  } bfs_state_e;

endpackage
