// flit_fifo: synchronous first-in first-out buffer for one virtual channel.
//
// DEPTH entries of W bits in a register array with read and write pointers
// and an occupancy counter. The oldest entry is always visible on rd_data
// (show-ahead), so a reader can look at a flit before deciding to pop it.
// A write and a read may happen in the same clock. Writing a full FIFO or
// reading an empty one is a protocol error, caught by assertions; the
// write is then ignored. Synchronous active-high reset empties the buffer.
module flit_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // The array needs no reset: an entry is read only after it was written.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  assert property (@(posedge clk) disable iff (rst) wr_en |-> !full)
    else $error("flit_fifo: write to a full FIFO");
  assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty)
    else $error("flit_fifo: read from an empty FIFO");

endmodule
