// aces_top: the ACES sparse matrix-matrix multiplication accelerator,
// C = A x B, with A in CSR form and B as line-aligned row fibers.
//
// Data flow (row-wise products, traversed by condensed columns of A):
//   condensing_adapter  splits A into bands by row length, samples the three
//                       condensing degrees on big bands and issues windows of
//                       rows with a degree;
//   a_fetcher           walks the window in that degree's order into the
//   global_buffer       which also yields the next-request distance of each
//                       B row for the cache policy;
//   b_fetcher           looks up row k of B for a(i,k) and hands the task to a
//                       free MPE;
//   mpe x NPE           request the fiber's lines through the crossbar from
//                       the non-blocking global_cache (PureFiber banks plus
//                       NB buffer) and stream a(i,k)*B(k,:) into their
//   selective_queue     (one per MPE); the
//   sync_scheduler      gives each APE a fiber of its own SQ whose output row
//                       no other APE is merging;
//   ape x NPE           merge that fiber with row i's partial fiber in the
//   c_fiber_store       (immediate merging), or write it there if none.
// When a window has been fully multiplied and merged, its rows are streamed
// out on c_* (row, coordinate, value) in row order and the next window starts.
//
// Off-chip memory (HBM) is outside: each agent has its own read channel
// (A offsets for the adapter, A offsets and elements for the fetcher, B row
// information, B lines for the cache), a choice of this design standing for
// the multi-channel HBM. The first four have a fixed one-cycle latency; the
// line channel is a request/reply pair with any latency.
//
// Final merging: partial fibers never leave the chip here (the store holds a
// whole window), so every row ends as a single fiber. The Huffman merging
// scheduler is instantiated with its ports brought out (ms_*) so a final-merge
// stage, for partial fibers spilled off chip, can drive it.
//
// Default parameters follow the evaluated configuration: 16 MPEs and 16 APEs,
// 2 KB selective queues, a 1 MB 16-bank 16-way global cache, a 32-entry NB
// buffer with 64 subentries, a 16x16 crossbar. Window, buffer and store sizes
// are this design's choices.
module aces_top
  import aces_pkg::*;
#(
  parameter int unsigned NPE        = 16,
  parameter int unsigned NBANKS     = 16,
  parameter int unsigned SETS       = 64,
  parameter int unsigned WAYS       = 16,
  parameter int unsigned NB_ENTRIES = 32,
  parameter int unsigned NB_SUBS    = 64,
  parameter int unsigned SQ_DEPTH   = 128,
  parameter int unsigned SQ_NFIB    = 8,
  parameter int unsigned GB_DEPTH   = 64,
  parameter int unsigned WIN        = 32,
  parameter int unsigned C_MAXLEN   = 128,
  parameter int unsigned BIG_BAND   = 256,
  parameter int unsigned THRESH     = 10,
  parameter int unsigned MS_ID_W    = 8,
  parameter int unsigned MS_W_W     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ROW_W-1:0]    n_rows,
  input  logic [COORD_W-1:0]  n_cols,
  output logic                done,
  // A offsets read by the condensing adapter (1-cycle latency)
  output logic                ad_off_en,
  output logic [ROW_W-1:0]    ad_off_addr,
  input  logic [31:0]         ad_off_data,
  // A offsets and elements read by the A fetcher (1-cycle latency)
  output logic                af_off_en,
  output logic [ROW_W-1:0]    af_off_addr,
  input  logic [31:0]         af_off_data,
  output logic                af_el_en,
  output logic [31:0]         af_el_addr,
  input  logic [COORD_W-1:0]  af_el_col,
  input  logic [VAL_W-1:0]    af_el_val,
  // B row information (1-cycle latency)
  output logic                binfo_en,
  output logic [COORD_W-1:0]  binfo_row,
  input  logic [LINE_W-1:0]   binfo_line0,
  input  logic [15:0]         binfo_len,
  // B line channel
  output logic                mem_req_valid,
  input  logic                mem_req_ready,
  output logic [LINE_W-1:0]   mem_req_line,
  input  logic                mem_resp_valid,
  input  logic [LINE_W-1:0]   mem_resp_line,
  input  line_t               mem_resp_data,
  // output rows of C
  output logic                c_valid,
  output logic [ROW_W-1:0]    c_row,
  output elem_t               c_elem,
  // merging scheduler of the final merging stage
  input  logic                ms_leaf_valid,
  output logic                ms_leaf_ready,
  input  logic [MS_ID_W-1:0]  ms_leaf_id,
  input  logic [MS_W_W-1:0]   ms_leaf_w,
  input  logic                ms_row_end,
  output logic                ms_root_valid,
  output logic [MS_ID_W-1:0]  ms_root_id,
  output logic                ms_task_valid,
  input  logic                ms_task_ready,
  output logic [MS_ID_W-1:0]  ms_task_a,
  output logic [MS_ID_W-1:0]  ms_task_b,
  output logic [MS_ID_W-1:0]  ms_task_dst,
  output logic [MS_W_W-1:0]   ms_task_w,
  input  logic                ms_task_done,
  input  logic [MS_ID_W-1:0]  ms_task_done_id,
  output logic                ms_idle,
  // statistics
  output stats_t              stats,
  output logic                c_overflow
);
  localparam int unsigned LEN_W = 16;
  localparam int unsigned RD_W  = 16;
  localparam int unsigned SW    = $clog2(SQ_NFIB);
  localparam int unsigned WRW   = $clog2(WIN);
  localparam int unsigned NW    = $clog2(WIN) + 1;

  // ---------------- adapter and A fetcher ----------------
  logic            win_valid, win_ready, win_sample, window_done, ad_done, ad_busy;
  logic [ROW_W-1:0] win_row0;
  logic [NW-1:0]   win_nrows;
  degree_t         win_degree, chosen;
  logic [15:0]     n_bands;
  logic            band_ev, sample_ev, choose_ev;

  condensing_adapter #(.THRESH(THRESH), .BIG_BAND(BIG_BAND), .SAMPLE_ROWS(32), .WIN(WIN))
  u_adapter (
    .clk, .rst_n, .start, .n_rows,
    .off_en(ad_off_en), .off_addr(ad_off_addr), .off_data(ad_off_data),
    .win_valid, .win_ready, .win_row0, .win_nrows, .win_degree, .win_sample,
    .window_done, .done(ad_done), .busy(ad_busy), .n_bands,
    .band_event(band_ev), .sample_event(sample_ev), .choose_event(choose_ev), .chosen);

  logic      af_valid, af_ready, af_done, af_busy;
  a_elem_t   af_elem;
  a_fetcher #(.WIN(WIN)) u_afetch (
    .clk, .rst_n,
    .cmd_valid(win_valid && win_ready), .cmd_ready(), .cmd_row0(win_row0),
    .cmd_nrows(win_nrows), .cmd_degree(win_degree), .cmd_ncols(n_cols),
    .off_en(af_off_en), .off_addr(af_off_addr), .off_data(af_off_data),
    .el_en(af_el_en), .el_addr(af_el_addr), .el_col(af_el_col), .el_val(af_el_val),
    .out_valid(af_valid), .out_ready(af_ready), .out_elem(af_elem),
    .done(af_done), .busy(af_busy));

  logic      gb_valid, gb_ready, gb_empty;
  a_elem_t   gb_elem;
  logic [RD_W-1:0] gb_rd;
  global_buffer #(.DEPTH(GB_DEPTH), .RD_W(RD_W)) u_gbuf (
    .clk, .rst_n,
    .push_valid(af_valid), .push_ready(af_ready), .push_elem(af_elem),
    .pop_valid(gb_valid), .pop_ready(gb_ready), .pop_elem(gb_elem), .pop_rd(gb_rd),
    .empty(gb_empty));

  // ---------------- B fetcher and MPEs ----------------
  logic [NPE-1:0]    mpe_task_ready, mpe_task_valid, mpe_busy, mpe_pure, mpe_miss;
  logic [ROW_W-1:0]  t_row;
  logic [VAL_W-1:0]  t_aval;
  logic [LINE_W-1:0] t_line0;
  logic [LEN_W-1:0]  t_len;
  logic [RD_W-1:0]   t_rd;
  logic              bf_busy;

  b_fetcher #(.NPE(NPE), .LEN_W(LEN_W), .RD_W(RD_W)) u_bfetch (
    .clk, .rst_n,
    .a_valid(gb_valid), .a_ready(gb_ready), .a_elem(gb_elem), .a_rd(gb_rd),
    .binfo_en, .binfo_row, .binfo_line0, .binfo_len,
    .mpe_ready(mpe_task_ready), .task_valid(mpe_task_valid),
    .task_row(t_row), .task_aval(t_aval), .task_line0(t_line0), .task_len(t_len),
    .task_rd(t_rd), .busy(bf_busy));

  logic [NPE-1:0]              x_req_valid, x_req_ready, x_resp_valid;
  logic [NPE-1:0][LINE_W-1:0]  x_req_line;
  logic [NPE-1:0][RD_W-1:0]    x_req_rd;
  logic [NPE-1:0][LEN_W-1:0]   x_req_fd;
  cresp_t [NPE-1:0]            x_resp_status;
  line_t [NPE-1:0]             x_resp_data;
  logic [NPE-1:0]              notify_mask;

  logic [NPE-1:0]              q_valid, q_ready, q_first, q_last;
  elem_t [NPE-1:0]             q_elem;
  logic [NPE-1:0][ROW_W-1:0]   q_row;

  for (genvar i = 0; i < NPE; i++) begin : g_mpe
    mpe #(.LEN_W(LEN_W), .RD_W(RD_W)) u_mpe (
      .clk, .rst_n,
      .task_valid(mpe_task_valid[i]), .task_ready(mpe_task_ready[i]),
      .task_row(t_row), .task_aval(t_aval), .task_line0(t_line0), .task_len(t_len),
      .task_rd(t_rd),
      .req_valid(x_req_valid[i]), .req_ready(x_req_ready[i]), .req_line(x_req_line[i]),
      .req_rd(x_req_rd[i]), .req_fd(x_req_fd[i]),
      .resp_valid(x_resp_valid[i]), .resp_status(x_resp_status[i]),
      .resp_data(x_resp_data[i]), .fill_notify(notify_mask[i]),
      .out_valid(q_valid[i]), .out_ready(q_ready[i]), .out_elem(q_elem[i]),
      .out_row(q_row[i]), .out_first(q_first[i]), .out_last(q_last[i]),
      .busy(mpe_busy[i]), .pure_fiber(mpe_pure[i]), .miss_event(mpe_miss[i]));
  end

  // ---------------- crossbar and global cache ----------------
  localparam int unsigned IDW = $clog2(NPE);
  logic [NBANKS-1:0]             b_valid, br_valid;
  logic [NBANKS-1:0][LINE_W-1:0] b_line;
  logic [NBANKS-1:0][RD_W-1:0]   b_rd;
  logic [NBANKS-1:0][LEN_W-1:0]  b_fd;
  logic [NBANKS-1:0][IDW-1:0]    b_id, br_id;
  cresp_t [NBANKS-1:0]           br_status;
  line_t [NBANKS-1:0]            br_data;
  logic [NBANKS-1:0]             hit_ev, miss_ev, nack_ev;
  logic                          evict_ev, nbm_ev;

  crossbar #(.NREQ(NPE), .NBANKS(NBANKS), .RD_W(RD_W), .FD_W(LEN_W)) u_xbar (
    .clk, .rst_n,
    .req_valid(x_req_valid), .req_ready(x_req_ready), .req_line(x_req_line),
    .req_rd(x_req_rd), .req_fd(x_req_fd),
    .resp_valid(x_resp_valid), .resp_status(x_resp_status), .resp_data(x_resp_data),
    .b_valid, .b_line, .b_rd, .b_fd, .b_id,
    .br_valid, .br_id, .br_status, .br_data);

  global_cache #(.NBANKS(NBANKS), .SETS(SETS), .WAYS(WAYS), .NREQ(NPE),
                 .NB_ENTRIES(NB_ENTRIES), .NB_SUBS(NB_SUBS), .RD_W(RD_W), .FD_W(LEN_W))
  u_cache (
    .clk, .rst_n,
    .b_valid, .b_line, .b_rd, .b_fd, .b_id,
    .br_valid, .br_id, .br_status, .br_data,
    .notify_mask,
    .mem_req_valid, .mem_req_ready, .mem_req_line,
    .mem_resp_valid, .mem_resp_line, .mem_resp_data,
    .hit_ev, .miss_ev, .nack_ev, .evict_ev, .nb_merge_ev(nbm_ev));

  // ---------------- selective queues, scheduler, APEs ----------------
  logic [NPE-1:0][SQ_NFIB-1:0]            cand_valid;
  logic [NPE-1:0][SQ_NFIB-1:0][ROW_W-1:0] cand_row;
  logic [NPE-1:0][SQ_NFIB-1:0][SW-1:0]    cand_slot;
  logic [NPE-1:0]             sq_empty, grant, bypass, conflict, ape_busy, ape_done, ape_add;
  logic [NPE-1:0][SW-1:0]     grant_slot, slot_q, rd_slot;
  logic [NPE-1:0][ROW_W-1:0]  grant_row;
  logic [NPE-1:0][WRW-1:0]    lrow_q, p_row;
  logic [NPE-1:0][LEN_W-1:0]  x_idx, y_idx, x_len, y_len, z_idx, z_len;
  elem_t [NPE-1:0]            x_elem, y_elem, z_elem;
  logic [NPE-1:0]             z_valid;

  for (genvar i = 0; i < NPE; i++) begin : g_sq
    assign rd_slot[i] = grant[i] ? grant_slot[i] : slot_q[i];
    selective_queue #(.DEPTH(SQ_DEPTH), .NFIB(SQ_NFIB), .LEN_W(LEN_W)) u_sq (
      .clk, .rst_n,
      .in_valid(q_valid[i]), .in_ready(q_ready[i]), .in_elem(q_elem[i]), .in_row(q_row[i]),
      .in_first(q_first[i]), .in_last(q_last[i]),
      .cand_valid(cand_valid[i]), .cand_row(cand_row[i]), .cand_slot(cand_slot[i]),
      .claim_valid(grant[i]), .claim_slot(grant_slot[i]),
      .rd_slot(rd_slot[i]), .rd_idx(x_idx[i]), .rd_elem(x_elem[i]), .rd_len(x_len[i]),
      .free_valid(ape_done[i]), .free_slot(slot_q[i]), .empty(sq_empty[i]));
  end

  sync_scheduler #(.NPE(NPE), .NFIB(SQ_NFIB)) u_sync (
    .clk, .rst_n,
    .ape_idle(~ape_busy), .cand_valid, .cand_row, .cand_slot,
    .release_i(ape_done), .grant, .grant_slot, .grant_row, .bypass, .conflict);

  logic [ROW_W-1:0] wrow0_q;
  logic [NW-1:0]    wn_q;

  for (genvar i = 0; i < NPE; i++) begin : g_ape
    assign p_row[i] = grant[i] ? WRW'(grant_row[i] - wrow0_q) : lrow_q[i];
    ape #(.LEN_W(LEN_W)) u_ape (
      .clk, .rst_n,
      .start(grant[i]), .x_len(x_len[i]), .y_len(y_len[i]), .busy(ape_busy[i]),
      .x_idx(x_idx[i]), .x_elem(x_elem[i]), .y_idx(y_idx[i]), .y_elem(y_elem[i]),
      .z_valid(z_valid[i]), .z_idx(z_idx[i]), .z_elem(z_elem[i]),
      .done(ape_done[i]), .z_len(z_len[i]), .add_event(ape_add[i]));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        slot_q[i] <= '0;
        lrow_q[i] <= '0;
      end else if (grant[i]) begin
        slot_q[i] <= grant_slot[i];
        lrow_q[i] <= p_row[i];
      end
    end
  end

  // ---------------- partial output store and drain ----------------
  typedef enum logic [1:0] {W_IDLE, W_RUN, W_DRAIN, W_NEXT} wstate_t;
  wstate_t          ws;
  logic             fetch_done_q, store_clear;
  logic [WRW:0]     dr_q;
  logic [LEN_W-1:0] di_q, d_len;
  elem_t            d_elem;

  c_fiber_store #(.NPORT(NPE), .ROWS(WIN), .MAXLEN(C_MAXLEN), .LEN_W(LEN_W)) u_cstore (
    .clk, .rst_n, .clear(store_clear),
    .p_row, .p_rd_idx(y_idx), .p_rd_elem(y_elem), .p_len(y_len),
    .p_wr(z_valid), .p_wr_idx(z_idx), .p_wr_elem(z_elem),
    .p_commit(ape_done), .p_commit_len(z_len),
    .d_row(dr_q[WRW-1:0]), .d_idx(di_q), .d_elem, .d_len, .overflow(c_overflow));

  logic quiet;
  assign quiet = fetch_done_q && !af_busy && gb_empty && !bf_busy && (mpe_busy == '0) &&
                 (&sq_empty) && (ape_busy == '0) && (ape_done == '0);

  assign win_ready   = (ws == W_IDLE);
  assign c_valid     = (ws == W_DRAIN) && (dr_q < (WRW+1)'(wn_q)) && (di_q < d_len);
  assign c_row       = wrow0_q + ROW_W'(dr_q);
  assign c_elem      = d_elem;
  assign store_clear = (ws == W_NEXT);
  assign window_done = (ws == W_NEXT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= W_IDLE; wrow0_q <= '0; wn_q <= '0; fetch_done_q <= 1'b0;
      dr_q <= '0; di_q <= '0; done <= 1'b0;
    end else begin
      if (start) done <= 1'b0;
      if (ad_done) done <= 1'b1;
      unique case (ws)
        W_IDLE: if (win_valid) begin
          wrow0_q      <= win_row0;
          wn_q         <= win_nrows;
          fetch_done_q <= 1'b0;
          ws           <= W_RUN;
        end
        W_RUN: begin
          if (af_done) fetch_done_q <= 1'b1;
          if (quiet) begin
            dr_q <= '0;
            di_q <= '0;
            ws   <= W_DRAIN;
          end
        end
        W_DRAIN: begin
          if (dr_q == (WRW+1)'(wn_q)) ws <= W_NEXT;
          else if (di_q < d_len) di_q <= di_q + 1'b1;
          else begin
            di_q <= '0;
            dr_q <= dr_q + 1'b1;
          end
        end
        W_NEXT: ws <= W_IDLE;
        default: ws <= W_IDLE;
      endcase
    end
  end

  merge_scheduler #(.ID_W(MS_ID_W), .W_W(MS_W_W)) u_msched (
    .clk, .rst_n,
    .leaf_valid(ms_leaf_valid), .leaf_ready(ms_leaf_ready), .leaf_id(ms_leaf_id),
    .leaf_w(ms_leaf_w), .row_end(ms_row_end),
    .root_valid(ms_root_valid), .root_id(ms_root_id),
    .task_valid(ms_task_valid), .task_ready(ms_task_ready), .task_a(ms_task_a),
    .task_b(ms_task_b), .task_dst(ms_task_dst), .task_w(ms_task_w),
    .task_done(ms_task_done), .task_done_id(ms_task_done_id), .idle(ms_idle));

  // ---------------- statistics ----------------
  function automatic logic [31:0] popc(input logic [NPE-1:0] v);
    logic [31:0] c;
    c = '0;
    for (int i = 0; i < NPE; i++) c = c + 32'(v[i]);
    return c;
  endfunction
  function automatic logic [31:0] popb(input logic [NBANKS-1:0] v);
    logic [31:0] c;
    c = '0;
    for (int i = 0; i < NBANKS; i++) c = c + 32'(v[i]);
    return c;
  endfunction

  logic [NPE-1:0] imm_v, dir_v;
  always_comb
    for (int i = 0; i < NPE; i++) begin
      imm_v[i] = grant[i] && (y_len[i] != '0);
      dir_v[i] = grant[i] && (y_len[i] == '0);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stats <= '0;
    else if (start) stats <= '0;
    else begin
      if (ad_busy || ws != W_IDLE) stats.cycles <= stats.cycles + 1'b1;
      stats.a_elems       <= stats.a_elems + popc(mpe_task_valid & mpe_task_ready);
      stats.pure_fibers   <= stats.pure_fibers + popc(mpe_pure);
      stats.hits          <= stats.hits + popb(hit_ev);
      stats.misses        <= stats.misses + popb(miss_ev);
      stats.nacks         <= stats.nacks + popb(nack_ev);
      stats.nb_merges     <= stats.nb_merges + 32'(nbm_ev);
      stats.evictions     <= stats.evictions + 32'(evict_ev);
      stats.sq_bypass     <= stats.sq_bypass + popc(bypass);
      stats.sync_conflict <= stats.sync_conflict + popc(conflict);
      stats.imm_merges    <= stats.imm_merges + popc(imm_v);
      stats.direct_writes <= stats.direct_writes + popc(dir_v);
      stats.adds          <= stats.adds + popc(ape_add);
      stats.bands         <= stats.bands + 32'(band_ev);
      stats.sample_passes <= stats.sample_passes + 32'(sample_ev);
      stats.choices       <= stats.choices + 32'(choose_ev);
      if (ws == W_IDLE && win_valid) begin
        if (win_degree == DEG_NONE)     stats.win_none       <= stats.win_none + 1'b1;
        if (win_degree == DEG_MODERATE) stats.win_moderate   <= stats.win_moderate + 1'b1;
        if (win_degree == DEG_AGGRESSIVE) stats.win_aggressive <= stats.win_aggressive + 1'b1;
      end
      stats.c_elems <= stats.c_elems + 32'(c_valid);
    end
  end
endmodule
