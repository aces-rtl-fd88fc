// global_cache: the multi-banked, set-associative global cache of ACES together
// with its non-blocking (NB) buffer, forming a non-blocking cache for lines of
// matrix B.
//
// Every bank (cache_bank, PureFiber replacement) takes one request per cycle
// from the crossbar. A hit is answered with the line one cycle later. The
// misses of all banks in a cycle compete, round robin, for the single NB
// buffer allocation port: the one taken is answered MISS (the requester waits
// for its notice), the others NACK (the requester asks again). The NB buffer
// sends one memory request per cycle and, when a line returns, fills it into
// its bank and raises the notice bits of all requesters that missed on it.
//
// Default geometry: 1 MB as 16 banks x 64 sets x 16 ways of 64-byte lines.
// The bank count and associativity follow the evaluated configuration; the
// line size is this design's choice. The on-chip region that holds the partial
// output fibers of C is modelled separately (c_fiber_store).
// Timing: reply (br_*) one cycle after the request; fill notice in the cycle
// the memory reply arrives.
module global_cache
  import aces_pkg::*;
#(
  parameter int unsigned NBANKS     = 16,
  parameter int unsigned SETS       = 64,
  parameter int unsigned WAYS       = 16,
  parameter int unsigned NREQ       = 16,
  parameter int unsigned NB_ENTRIES = 32,
  parameter int unsigned NB_SUBS    = 64,
  parameter int unsigned RD_W       = 16,
  parameter int unsigned FD_W       = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // bank request ports (from the crossbar)
  input  logic [NBANKS-1:0]                   b_valid,
  input  logic [NBANKS-1:0][LINE_W-1:0]       b_line,
  input  logic [NBANKS-1:0][RD_W-1:0]         b_rd,
  input  logic [NBANKS-1:0][FD_W-1:0]         b_fd,
  input  logic [NBANKS-1:0][$clog2(NREQ)-1:0] b_id,
  output logic [NBANKS-1:0]                   br_valid,
  output logic [NBANKS-1:0][$clog2(NREQ)-1:0] br_id,
  output cresp_t [NBANKS-1:0]                 br_status,
  output line_t [NBANKS-1:0]                  br_data,
  // fill notices
  output logic [NREQ-1:0]                     notify_mask,
  // memory
  output logic                                mem_req_valid,
  input  logic                                mem_req_ready,
  output logic [LINE_W-1:0]                   mem_req_line,
  input  logic                                mem_resp_valid,
  input  logic [LINE_W-1:0]                   mem_resp_line,
  input  line_t                               mem_resp_data,
  // events
  output logic [NBANKS-1:0]                   hit_ev,
  output logic [NBANKS-1:0]                   miss_ev,
  output logic [NBANKS-1:0]                   nack_ev,
  output logic                                evict_ev,
  output logic                                nb_merge_ev   // secondary miss merged
);
  localparam int unsigned BW = $clog2(NBANKS);
  localparam int unsigned T_W = 32;

  logic [T_W-1:0]   now;
  logic [NBANKS-1:0] hit;
  logic [NBANKS-1:0] bank_fill;
  logic [NBANKS-1:0] bank_evict;
  logic              fill_valid;
  logic [LINE_W-1:0] fill_line;
  line_t             fill_data;
  logic [RD_W-1:0]   fill_rd;
  logic [FD_W-1:0]   fill_fd;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    assign bank_fill[b] = fill_valid && (int'(fill_line[BW-1:0]) == b);
    cache_bank #(.SETS(SETS), .WAYS(WAYS), .NBANKS(NBANKS), .RD_W(RD_W), .FD_W(FD_W),
                 .T_W(T_W)) u_bank (
      .clk, .rst_n, .now,
      .req_valid(b_valid[b]), .req_line(b_line[b]), .req_rd(b_rd[b]), .req_fd(b_fd[b]),
      .hit_now(hit[b]), .resp_data(br_data[b]),
      .fill_valid(bank_fill[b]), .fill_line, .fill_data, .fill_rd, .fill_fd,
      .evict_event(bank_evict[b]));
  end

  // one miss per cycle goes to the NB buffer
  logic [BW-1:0] rr_q, sel;
  logic          sel_any;
  logic          alloc_ok, alloc_primary;
  always_comb begin
    int c;
    sel     = '0;
    sel_any = 1'b0;
    for (int k = 1; k <= NBANKS; k++) begin
      c = (int'(rr_q) + k) % NBANKS;
      if (!sel_any && b_valid[c] && !hit[c]) begin
        sel_any = 1'b1;
        sel     = BW'(c);
      end
    end
  end

  nb_buffer #(.ENTRIES(NB_ENTRIES), .SUBENTRIES(NB_SUBS), .NREQ(NREQ), .RD_W(RD_W),
              .FD_W(FD_W)) u_nb (
    .clk, .rst_n,
    .alloc_valid(sel_any), .alloc_line(b_line[sel]), .alloc_id(b_id[sel]),
    .alloc_rd(b_rd[sel]), .alloc_fd(b_fd[sel]),
    .alloc_ok, .alloc_primary,
    .mem_req_valid, .mem_req_ready, .mem_req_line,
    .mem_resp_valid, .mem_resp_line, .mem_resp_data,
    .fill_valid, .fill_line, .fill_data, .fill_rd, .fill_fd,
    .notify_mask, .full(), .used());

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      hit_ev[b]  = b_valid[b] && hit[b];
      miss_ev[b] = b_valid[b] && !hit[b] && sel_any && (int'(sel) == b) && alloc_ok;
      nack_ev[b] = b_valid[b] && !hit[b] && !miss_ev[b];
    end
  end
  assign evict_ev    = |bank_evict;
  assign nb_merge_ev = alloc_ok && !alloc_primary;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q      <= '0;
      br_valid  <= '0;
      br_id     <= '0;
      br_status <= '{default: CR_NACK};
    end else begin
      if (sel_any) rr_q <= sel;
      br_valid <= b_valid;
      br_id    <= b_id;
      for (int b = 0; b < NBANKS; b++)
        br_status[b] <= hit_ev[b] ? CR_HIT : (miss_ev[b] ? CR_MISS : CR_NACK);
    end
  end
endmodule
