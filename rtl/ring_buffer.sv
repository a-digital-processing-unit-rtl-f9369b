// ring_buffer: internal storage of the main data processor.
//
// A circular buffer between the tagging stage and the output formatter. It
// absorbs the extra output words (reset word, metadata) that the formatter
// inserts ahead of data, and is drained faster again while noise words are
// being compressed two-to-one.
//
// Implementation: DEPTH entries of WIDTH bits in a register array, a write and
// a read pointer that wrap around, and an occupancy counter. The read side is
// first-word-fall-through with two read windows: rd_data shows the oldest entry
// (valid when rd_valid), rd_data2 the one after it (valid when rd_valid2), and
// rd_pop removes 0, 1 or 2 entries. Reading two at once lets the formatter drain
// the buffer twice as fast as it fills while it packs two noise words into one
// output word. A write and a read may happen in the same cycle, also when the
// buffer is full. max_level records the highest occupancy seen since
// reset (a monitor for the worst-case data rates the buffer is sized for).
//
// The ring organisation follows the source design; DEPTH is not given there and
// its default of 64 entries is this design's own choice (DEPTH must be a power
// of two).
//
// Timing: a write in cycle n is visible on the read side in cycle n+1.
module ring_buffer #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   full,
  input  logic [1:0]             rd_pop,    // entries to remove: 0, 1 or 2
  output logic                   rd_valid,
  output logic [WIDTH-1:0]       rd_data,
  output logic                   rd_valid2,
  output logic [WIDTH-1:0]       rd_data2,
  output logic [$clog2(DEPTH):0] level,
  output logic [$clog2(DEPTH):0] max_level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic [1:0] n_rd;
  logic       do_wr;
  assign rd_valid  = (level != '0);
  assign rd_valid2 = (level > (AW+1)'(1));
  assign full      = (level == (AW+1)'(DEPTH));
  assign n_rd      = (rd_pop == 2'd2 && rd_valid2) ? 2'd2 :
                     (rd_pop != 2'd0 && rd_valid)  ? 2'd1 : 2'd0;
  assign do_wr     = wr_en && (!full || n_rd != 2'd0);
  assign rd_data   = mem[rd_ptr];
  assign rd_data2  = mem[rd_ptr + 1'b1];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      level     <= '0;
      max_level <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      rd_ptr <= rd_ptr + AW'(n_rd);
      level  <= level + (AW+1)'(do_wr) - (AW+1)'(n_rd);
      if (level > max_level) max_level <= level;
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("ring_buffer: DEPTH must be a power of two");
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   (rd_pop == 2'd1 |-> rd_valid) and (rd_pop == 2'd2 |-> rd_valid2)
                                   and rd_pop != 2'd3)
    else $error("ring_buffer: read of an absent entry");
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_pop != 2'd0))
    else $error("ring_buffer: write while full");

endmodule
