// global_buffer: the lightweight buffer that holds the non-zeros of A fetched
// ahead of execution, in the condensed-column order chosen by the fetcher.
//
// It is a FIFO of DEPTH (row, column, value) entries. Because the entries
// waiting behind the head are exactly the coming uses of B rows, the buffer
// also derives the next request distance (RD) of the head's B row for the
// PureFiber policy: the number of entries between the head and the next entry
// with the same column of A (the same row of B), or RD_FAR when none is
// buffered. Measuring RD in dispatched elements rather than cycles is this
// design's choice.
//
// Timing: push and pop with valid/ready; head and RD are combinational.
module global_buffer
  import aces_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned RD_W  = 16,
  parameter logic [RD_W-1:0] RD_FAR = RD_W'(1024)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push_valid,
  output logic           push_ready,
  input  a_elem_t        push_elem,
  output logic           pop_valid,
  input  logic           pop_ready,
  output a_elem_t        pop_elem,
  output logic [RD_W-1:0] pop_rd,
  output logic           empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  a_elem_t       mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;

  assign push_ready = (cnt < (AW+1)'(DEPTH));
  assign pop_valid  = (cnt != '0);
  assign empty      = (cnt == '0);
  assign pop_elem   = mem[rp];

  always_comb begin
    logic found;
    found  = 1'b0;
    pop_rd = RD_FAR;
    for (int k = 1; k < DEPTH; k++)
      if (!found && (AW+1)'(k) < cnt && mem[AW'(rp + AW'(k))].col == mem[rp].col) begin
        found  = 1'b1;
        pop_rd = RD_W'(k);
      end
  end

  always_ff @(posedge clk) if (push_valid && push_ready) mem[wp] <= push_elem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      if (push_valid && push_ready) wp <= wp + 1'b1;
      if (pop_valid && pop_ready)   rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(push_valid && push_ready) - (AW+1)'(pop_valid && pop_ready);
    end
  end
endmodule
