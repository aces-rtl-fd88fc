// c_fiber_store: on-chip store of the partial output fibers of C for the rows
// currently in flight (the C region of the global cache).
//
// It holds ROWS row slots (one per row of the current window of A). Each slot
// has two copies of up to MAXLEN elements; one copy is current. An APE merging
// into row r reads the current copy through its read port while writing the
// merged fiber into the other copy through its write port, and commits at the
// end, which flips the current copy and records the new length. The
// synchronization scheduler guarantees one APE per row at a time, so ports
// never collide on a slot. A drain port reads the current copy for output and
// clear empties all slots before the next window.
//
// Timing: reads are combinational; writes and commits take effect at the clock
// edge. Keeping partial fibers in a dedicated double-buffered array instead of
// in cache lines of the global cache is this design's simplification.
module c_fiber_store
  import aces_pkg::*;
#(
  parameter int unsigned NPORT  = 16,
  parameter int unsigned ROWS   = 32,
  parameter int unsigned MAXLEN = 128,
  parameter int unsigned LEN_W  = 16
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  clear,
  // per-APE ports
  input  logic [NPORT-1:0][$clog2(ROWS)-1:0]    p_row,
  input  logic [NPORT-1:0][LEN_W-1:0]           p_rd_idx,
  output elem_t [NPORT-1:0]                     p_rd_elem,
  output logic [NPORT-1:0][LEN_W-1:0]           p_len,
  input  logic [NPORT-1:0]                      p_wr,
  input  logic [NPORT-1:0][LEN_W-1:0]           p_wr_idx,
  input  elem_t [NPORT-1:0]                     p_wr_elem,
  input  logic [NPORT-1:0]                      p_commit,
  input  logic [NPORT-1:0][LEN_W-1:0]           p_commit_len,
  // drain
  input  logic [$clog2(ROWS)-1:0]               d_row,
  input  logic [LEN_W-1:0]                      d_idx,
  output elem_t                                 d_elem,
  output logic [LEN_W-1:0]                      d_len,
  output logic                                  overflow
);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned IW = $clog2(MAXLEN);

  elem_t            mem [2*ROWS*MAXLEN];
  logic [ROWS-1:0]  cur;
  logic [LEN_W-1:0] len [ROWS];

  function automatic int unsigned addr(input logic [RW-1:0] r, input logic c,
                                       input logic [LEN_W-1:0] i);
    return ((int'(r) * 2 + int'(c)) * MAXLEN) + int'(i[IW-1:0]);
  endfunction

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      p_rd_elem[p] = mem[addr(p_row[p], cur[p_row[p]], p_rd_idx[p])];
      p_len[p]     = len[p_row[p]];
    end
    d_elem = mem[addr(d_row, cur[d_row], d_idx)];
    d_len  = len[d_row];
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NPORT; p++)
      if (p_wr[p]) mem[addr(p_row[p], !cur[p_row[p]], p_wr_idx[p])] <= p_wr_elem[p];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur      <= '0;
      overflow <= 1'b0;
      for (int r = 0; r < ROWS; r++) len[r] <= '0;
    end else if (clear) begin
      for (int r = 0; r < ROWS; r++) len[r] <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++)
        if (p_commit[p]) begin
          cur[p_row[p]] <= !cur[p_row[p]];
          len[p_row[p]] <= p_commit_len[p];
          if (p_commit_len[p] > LEN_W'(MAXLEN)) overflow <= 1'b1;
        end
    end
  end
endmodule
