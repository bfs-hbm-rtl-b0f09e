// vertex_fifo: synchronous first-in first-out frontier queue with a
// registered read port, sized for block RAM.
//
// Function. Each entry is one frontier vertex packed as {level, vid}
// (DATA_W = 16 + VERTEX_W bits in the engine). Since vertices of level L are
// all enqueued before any vertex of level L+1, first-in first-out order is
// exactly BFS order and no separate level bookkeeping is needed.
//
// Interface and timing. Write: wr_en with wr_data stores the entry on the
// clock edge if the queue is not full; a write while full is dropped (the
// controller sees full and reports the overflow). Read: rd_en while not empty
// pops the head on the clock edge; the popped entry appears on rd_data with
// rd_valid high in the next cycle (registered output, as a block RAM read
// port). rd_en while empty is ignored. A simultaneous read and write are both
// performed. empty, full and count reflect the current contents.
//
// Depth default (2048) follows the described design; the drop-on-full
// behaviour and the rd_valid flag are this implementation's choices.
module vertex_fifo #(
  parameter int unsigned DATA_W = 36,
  parameter int unsigned DEPTH  = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [DATA_W-1:0]          wr_data,
  input  logic                       rd_en,
  output logic [DATA_W-1:0]          rd_data,
  output logic                       rd_valid,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wptr, rptr;
  logic [CNT_W-1:0]  cnt;
  logic              do_wr, do_rd;

  assign empty = (cnt == '0);
  assign full  = (cnt == CNT_W'(DEPTH));
  assign count = cnt;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      cnt      <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (do_wr) wptr <= ptr_inc(wptr);
      if (do_rd) rptr <= ptr_inc(rptr);
      case ({do_wr, do_rd})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
      rd_valid <= do_rd;
    end
  end

  // Storage and registered read port (no reset, block-RAM style).
  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
    if (do_rd) rd_data <= mem[rptr];
  end

endmodule
