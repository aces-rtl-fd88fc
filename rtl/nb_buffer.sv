// nb_buffer: non-blocking (NB) buffer of the global cache, a miss-status table
// that lets the cache keep serving requests while misses are outstanding.
//
// Each of ENTRIES entries tracks one missing line: its address, whether its
// memory request has been sent, and the RD/FD hints for the fill. Subentries
// (a shared pool of SUBENTRIES) record which requester waits on which entry.
// A miss to a line that already has an entry only takes a subentry and sends
// no second memory request. A miss with no free entry or subentry is refused
// (alloc_ok low), and the cache answers NACK so the requester retries. One
// memory request is sent per cycle (oldest-numbered unsent entry first). When
// the line returns, the fill is passed to the cache in the same cycle, every
// waiting requester is flagged in notify_mask, and the entry and its
// subentries are released. A miss that targets the entry being released in
// that cycle is refused, so no notice is lost.
//
// Sizes: 32 entries and 64 subentries, as in the evaluated configuration; the
// shared subentry pool is this design's reading of "64 subentries".
// Timing: allocation is decided combinationally from the alloc_* inputs; the
// table updates at the clock edge. mem_resp is always accepted.
module nb_buffer
  import aces_pkg::*;
#(
  parameter int unsigned ENTRIES    = 32,
  parameter int unsigned SUBENTRIES = 64,
  parameter int unsigned NREQ       = 16,
  parameter int unsigned RD_W       = 16,
  parameter int unsigned FD_W       = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // allocation of one miss per cycle
  input  logic                     alloc_valid,
  input  logic [LINE_W-1:0]        alloc_line,
  input  logic [$clog2(NREQ)-1:0]  alloc_id,
  input  logic [RD_W-1:0]          alloc_rd,
  input  logic [FD_W-1:0]          alloc_fd,
  output logic                     alloc_ok,
  output logic                     alloc_primary,  // first miss to the line
  // memory
  output logic                     mem_req_valid,
  input  logic                     mem_req_ready,
  output logic [LINE_W-1:0]        mem_req_line,
  input  logic                     mem_resp_valid,
  input  logic [LINE_W-1:0]        mem_resp_line,
  input  line_t                    mem_resp_data,
  // fill to the cache and notice to the requesters
  output logic                     fill_valid,
  output logic [LINE_W-1:0]        fill_line,
  output line_t                    fill_data,
  output logic [RD_W-1:0]          fill_rd,
  output logic [FD_W-1:0]          fill_fd,
  output logic [NREQ-1:0]          notify_mask,
  output logic                     full,
  output logic [$clog2(ENTRIES+1)-1:0] used
);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned RW = $clog2(NREQ);

  logic [ENTRIES-1:0]             ev, eiss;
  logic [ENTRIES-1:0][LINE_W-1:0] eline;
  logic [ENTRIES-1:0][RD_W-1:0]   erd;
  logic [ENTRIES-1:0][FD_W-1:0]   efd;
  logic [SUBENTRIES-1:0]          sv;
  logic [SUBENTRIES-1:0][EW-1:0]  sent;
  logic [SUBENTRIES-1:0][RW-1:0]  sid;

  // lookups
  logic          m_hit, f_hit, e_free, s_free, m_rel;
  logic [EW-1:0] m_idx, f_idx, e_idx, r_idx;
  logic [$clog2(SUBENTRIES)-1:0] s_idx;
  logic          r_any;
  always_comb begin
    m_hit = 1'b0; m_idx = '0;
    f_hit = 1'b0; f_idx = '0;
    e_free = 1'b0; e_idx = '0;
    s_free = 1'b0; s_idx = '0;
    r_any = 1'b0; r_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (ev[e] && eline[e] == alloc_line) begin m_hit = 1'b1; m_idx = EW'(e); end
      if (ev[e] && eiss[e] && eline[e] == mem_resp_line) begin f_hit = 1'b1; f_idx = EW'(e); end
      if (!ev[e]) begin e_free = 1'b1; e_idx = EW'(e); end
      if (ev[e] && !eiss[e]) begin r_any = 1'b1; r_idx = EW'(e); end
    end
    for (int s = SUBENTRIES - 1; s >= 0; s--)
      if (!sv[s]) begin s_free = 1'b1; s_idx = $clog2(SUBENTRIES)'(s); end
    m_rel         = mem_resp_valid && f_hit && m_hit && (m_idx == f_idx);
    alloc_ok      = alloc_valid && s_free && !m_rel && (m_hit || e_free);
    alloc_primary = alloc_ok && !m_hit;
    fill_valid    = mem_resp_valid && f_hit;
    fill_line     = mem_resp_line;
    fill_data     = mem_resp_data;
    fill_rd       = erd[f_idx];
    fill_fd       = efd[f_idx];
    notify_mask   = '0;
    if (fill_valid)
      for (int s = 0; s < SUBENTRIES; s++)
        if (sv[s] && sent[s] == f_idx) notify_mask[sid[s]] = 1'b1;
    mem_req_valid = r_any;
    mem_req_line  = eline[r_idx];
    full          = !e_free || !s_free;
  end

  always_comb begin
    used = '0;
    for (int e = 0; e < ENTRIES; e++) used = used + ev[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev <= '0; eiss <= '0; eline <= '0; erd <= '0; efd <= '0;
      sv <= '0; sent <= '0; sid <= '0;
    end else begin
      if (mem_req_valid && mem_req_ready) eiss[r_idx] <= 1'b1;
      if (fill_valid) begin
        ev[f_idx]   <= 1'b0;
        eiss[f_idx] <= 1'b0;
        for (int s = 0; s < SUBENTRIES; s++)
          if (sv[s] && sent[s] == f_idx) sv[s] <= 1'b0;
      end
      if (alloc_ok) begin
        sv[s_idx]  <= 1'b1;
        sid[s_idx] <= alloc_id;
        if (m_hit) begin
          sent[s_idx] <= m_idx;
          erd[m_idx]  <= alloc_rd;   // keep the latest hint
        end else begin
          sent[s_idx]  <= e_idx;
          ev[e_idx]    <= 1'b1;
          eiss[e_idx]  <= 1'b0;
          eline[e_idx] <= alloc_line;
          erd[e_idx]   <= alloc_rd;
          efd[e_idx]   <= alloc_fd;
        end
      end
    end
  end

  a_no_stray_fill: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> f_hit);
endmodule
