// sync_scheduler: synchronization scheduler. Hands partial fibers from the
// selective queues to their paired APEs so that no two APEs merge into the same
// output row at once.
//
// It keeps, per APE, the row that APE is merging. When APE i is idle it looks
// at SQ i's complete fibers oldest first and grants the first whose row is
// neither being merged by another APE nor granted to a lower-numbered APE in
// the same cycle. Taking a fiber other than the head is a bypass (reported);
// an idle APE whose SQ holds only conflicting fibers is a conflict stall
// (reported). The document picks one APE at random when the heads of two SQs
// hold the same row; here the lower-numbered APE wins, and the two fibers are
// merged one after the other through the row's stored partial fiber rather
// than with each other first. One grant per APE per cycle; release clears the
// row when the APE's merge commits.
module sync_scheduler
  import aces_pkg::*;
#(
  parameter int unsigned NPE  = 16,
  parameter int unsigned NFIB = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NPE-1:0]                         ape_idle,
  input  logic [NPE-1:0][NFIB-1:0]               cand_valid,
  input  logic [NPE-1:0][NFIB-1:0][ROW_W-1:0]    cand_row,
  input  logic [NPE-1:0][NFIB-1:0][$clog2(NFIB)-1:0] cand_slot,
  input  logic [NPE-1:0]                         release_i,
  output logic [NPE-1:0]                         grant,
  output logic [NPE-1:0][$clog2(NFIB)-1:0]       grant_slot,
  output logic [NPE-1:0][ROW_W-1:0]              grant_row,
  output logic [NPE-1:0]                         bypass,
  output logic [NPE-1:0]                         conflict
);
  logic [NPE-1:0]            busy_q;
  logic [NPE-1:0][ROW_W-1:0] row_q;

  always_comb begin
    logic [NPE-1:0]            bz;
    logic [NPE-1:0][ROW_W-1:0] br;
    logic                      hit, any;
    bz         = busy_q;
    br         = row_q;
    grant      = '0;
    grant_slot = '0;
    grant_row  = '0;
    bypass     = '0;
    conflict   = '0;
    hit        = 1'b0;
    for (int i = 0; i < NPE; i++) begin
      any = 1'b0;
      if (ape_idle[i] && !busy_q[i]) begin
        for (int p = 0; p < NFIB; p++) begin
          if (!grant[i] && cand_valid[i][p]) begin
            any = 1'b1;
            hit = 1'b0;
            for (int j = 0; j < NPE; j++)
              if (bz[j] && br[j] == cand_row[i][p]) hit = 1'b1;
            if (!hit) begin
              grant[i]      = 1'b1;
              grant_slot[i] = cand_slot[i][p];
              grant_row[i]  = cand_row[i][p];
              bypass[i]     = (p != 0);
              bz[i]         = 1'b1;
              br[i]         = cand_row[i][p];
            end
          end
        end
        conflict[i] = any && !grant[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      row_q  <= '0;
    end else begin
      for (int i = 0; i < NPE; i++) begin
        if (grant[i]) begin
          busy_q[i] <= 1'b1;
          row_q[i]  <= grant_row[i];
        end else if (release_i[i]) busy_q[i] <= 1'b0;
      end
    end
  end
endmodule
