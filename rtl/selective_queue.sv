// selective_queue (SQ): buffers the partial output fibers an MPE produces and
// lets the synchronization scheduler take them out of order.
//
// Elements are written in arrival order into a circular element store of DEPTH
// entries (2 KB per queue: 128 slots of 16 bytes). Each fiber gets a descriptor
// (row, start, length) in a circular descriptor list kept in arrival order.
// The list is presented to the scheduler oldest first (cand_* index 0 = head
// of the queue); a fiber is a candidate once its last element is written. The
// scheduler claims a candidate by its descriptor slot; the paired APE then
// reads its elements by (slot, index) combinationally and frees the slot when
// it is done. Freed space is reclaimed when it reaches the head of the queue,
// so a fiber taken early holds its space until the older ones are gone.
//
// Write side: valid/ready, in_first opens a descriptor, in_last closes it. A
// fiber must fit in DEPTH elements (assumed). Reads and frees take effect in
// the cycle they are asserted.
module selective_queue
  import aces_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned NFIB  = 8,
  parameter int unsigned LEN_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from the MPE
  input  logic                    in_valid,
  output logic                    in_ready,
  input  elem_t                   in_elem,
  input  logic [ROW_W-1:0]        in_row,
  input  logic                    in_first,
  input  logic                    in_last,
  // candidates, oldest first
  output logic [NFIB-1:0]         cand_valid,
  output logic [NFIB-1:0][ROW_W-1:0] cand_row,
  output logic [NFIB-1:0][$clog2(NFIB)-1:0] cand_slot,
  // claim: the scheduler took a fiber
  input  logic                    claim_valid,
  input  logic [$clog2(NFIB)-1:0] claim_slot,
  // element read by the APE
  input  logic [$clog2(NFIB)-1:0] rd_slot,
  input  logic [LEN_W-1:0]        rd_idx,
  output elem_t                   rd_elem,
  output logic [LEN_W-1:0]        rd_len,
  // release after merging
  input  logic                    free_valid,
  input  logic [$clog2(NFIB)-1:0] free_slot,
  output logic                    empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned SW = $clog2(NFIB);

  elem_t            mem [DEPTH];
  logic [AW-1:0]    d_start [NFIB];
  logic [LEN_W-1:0] d_len   [NFIB];
  logic [ROW_W-1:0] d_row   [NFIB];
  logic [NFIB-1:0]  d_done, d_claim, d_freed;

  logic [SW-1:0]  dh, dt;          // descriptor head / tail
  logic [SW:0]    dcnt;
  logic [AW-1:0]  wp;              // element write pointer
  logic [AW:0]    ecnt;            // elements held (including freed, not yet reclaimed)
  logic           open_q;          // a fiber is being written into slot dt-1

  logic [SW-1:0]  cur;             // slot being written
  assign cur = open_q ? SW'(dt - 1'b1) : dt;

  assign in_ready = (ecnt < (AW+1)'(DEPTH)) && (open_q || (dcnt < (SW+1)'(NFIB)));
  assign empty    = (dcnt == '0);

  always_comb begin
    for (int p = 0; p < NFIB; p++) begin
      cand_slot[p]  = SW'(dh + SW'(p));
      cand_row[p]   = d_row[cand_slot[p]];
      cand_valid[p] = ((SW+1)'(p) < dcnt) && d_done[cand_slot[p]] && !d_claim[cand_slot[p]];
    end
    rd_elem = mem[AW'(d_start[rd_slot] + AW'(rd_idx))];
    rd_len  = d_len[rd_slot];
  end

  logic push, pop_head;
  assign push     = in_valid && in_ready;
  assign pop_head = (dcnt != '0) && d_freed[dh];

  always_ff @(posedge clk) if (push) mem[wp] <= in_elem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dh <= '0; dt <= '0; dcnt <= '0; wp <= '0; ecnt <= '0; open_q <= 1'b0;
      d_done <= '0; d_claim <= '0; d_freed <= '0;
      for (int i = 0; i < NFIB; i++) begin
        d_start[i] <= '0; d_len[i] <= '0; d_row[i] <= '0;
      end
    end else begin
      logic [SW:0] dcnt_n;
      logic [AW:0] ecnt_n;
      dcnt_n = dcnt;
      ecnt_n = ecnt;
      if (push) begin
        wp     <= wp + 1'b1;
        ecnt_n = ecnt_n + 1'b1;
        if (!open_q) begin
          d_start[cur] <= wp;
          d_len[cur]   <= LEN_W'(1);
          d_row[cur]   <= in_row;
          d_done[cur]  <= in_last;
          d_claim[cur] <= 1'b0;
          d_freed[cur] <= 1'b0;
          dt           <= dt + 1'b1;
          dcnt_n       = dcnt_n + 1'b1;
          open_q       <= !in_last;
        end else begin
          d_len[cur]  <= d_len[cur] + 1'b1;
          d_done[cur] <= in_last;
          open_q      <= !in_last;
        end
      end
      if (claim_valid) d_claim[claim_slot] <= 1'b1;
      if (free_valid)  d_freed[free_slot]  <= 1'b1;
      if (pop_head) begin
        dh     <= dh + 1'b1;
        dcnt_n = dcnt_n - 1'b1;
        ecnt_n = ecnt_n - (AW+1)'(d_len[dh]);
        d_freed[dh] <= 1'b0;
      end
      dcnt <= dcnt_n;
      ecnt <= ecnt_n;
    end
  end

  a_first_opens: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (in_first == !open_q));
  a_free_claimed: assert property (@(posedge clk) disable iff (!rst_n)
    free_valid |-> d_claim[free_slot]);
endmodule
