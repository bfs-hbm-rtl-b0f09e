// visited_bitmap: one visited bit per vertex, kept in a single-port block RAM
// and accessed through a two-stage read-modify-write pipeline.
//
// Function. A request (op_valid, op_set, op_vid) either checks whether vertex
// op_vid has been visited or marks it visited. The RAM holds BITMAP_WORDS
// 32-bit words; a vertex ID splits into a word address op_vid[VERTEX_W-1:5]
// and a bit select op_vid[4:0].
//
// Timing. Stage 0: a request is accepted on the clock edge where op_valid is
// high and busy is low; on that same edge the operation, the word address and
// the bit select are registered and the RAM word is read. Stage 1: in the
// following cycle the read word is available. For a check, chk_valid is high
// for that one cycle and chk_visited carries the addressed bit. For a set, the
// word with the bit OR-ed in is written back on the closing edge of that cycle
// and set_done is high during it. busy equals the stage-1 valid flag, so only
// one operation is ever in flight: the earliest next acceptance is two edges
// after the previous one, i.e. one bitmap operation per two cycles. Because an
// operation completes its write before the next read, there is no
// read-after-write hazard and no bypass path.
//
// Initialisation. The RAM is cleared by an initial block (block-RAM init
// values on an FPGA); no write reaches it while rst_n is low, and reset
// clears only the pipeline registers, so a reset
// does not forget visited vertices. A cleared bitmap needs a fresh
// configuration or power-up, as in the described design, which has no
// RAM-clearing scan.
//
// Parameters and the pipeline structure follow the described design; the
// output registering style (chk/set flags derived combinationally from the
// stage-1 registers) is this implementation's choice.
module visited_bitmap #(
  parameter int unsigned VERTEX_W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  // request port
  input  logic                op_valid,
  input  logic                op_set,      // 1: set the bit, 0: check it
  input  logic [VERTEX_W-1:0] op_vid,
  output logic                busy,        // an operation is in stage 1
  // check response
  output logic                chk_valid,
  output logic                chk_visited,
  // set response
  output logic                set_done
);

  localparam int unsigned WORD_W       = 32;
  localparam int unsigned BSEL_W       = 5;
  localparam int unsigned ADDR_W       = (VERTEX_W > BSEL_W) ? VERTEX_W - BSEL_W : 1;
  localparam int unsigned BITMAP_WORDS = (VERTEX_W > BSEL_W) ? (1 << (VERTEX_W - BSEL_W)) : 1;

  logic [WORD_W-1:0] mem [BITMAP_WORDS];

  initial begin
    for (int i = 0; i < BITMAP_WORDS; i++) mem[i] = '0;
  end

  logic [ADDR_W-1:0] waddr;
  logic [BSEL_W-1:0] bsel;
  logic              accept;

  always_comb begin
    if (VERTEX_W > BSEL_W) waddr = ADDR_W'(op_vid >> BSEL_W);
    else                   waddr = '0;
    bsel = BSEL_W'(op_vid);
  end

  assign accept = op_valid && !busy;

  // stage-1 registers
  logic              p1_valid;
  logic              p1_set;
  logic [ADDR_W-1:0] p1_waddr;
  logic [BSEL_W-1:0] p1_bsel;
  logic [WORD_W-1:0] rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_valid <= 1'b0;
      p1_set   <= 1'b0;
      p1_waddr <= '0;
      p1_bsel  <= '0;
    end else begin
      p1_valid <= accept;
      if (accept) begin
        p1_set   <= op_set;
        p1_waddr <= waddr;
        p1_bsel  <= bsel;
      end
    end
  end

  // Block RAM: synchronous read in stage 0, write-back in stage 1. The two
  // never happen in the same cycle because accept requires !p1_valid. The
  // write is blocked while rst_n is low, so stage-1 registers that have not
  // yet been reset at power-up cannot corrupt the initialised contents.
  always_ff @(posedge clk) begin
    if (accept) rdata <= mem[waddr];
    if (rst_n && p1_valid && p1_set) mem[p1_waddr] <= rdata | (WORD_W'(1) << p1_bsel);
  end

  assign busy        = p1_valid;
  assign chk_valid   = p1_valid && !p1_set;
  assign chk_visited = rdata[p1_bsel];
  assign set_done    = p1_valid && p1_set;

endmodule
