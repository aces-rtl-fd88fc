// tb_aces_top: end-to-end test of the accelerator at its default parameters.
//
// It builds a sparse A (M x K) and B (K x N) with small integer values, so
// every product and sum is exact in double precision, and compares each output
// row of C against an integer reference computed here. A has one long band of
// short rows (big enough to be sampled with all three condensing degrees) and
// a short band of long rows (run with moderate condensing). B rows are placed
// 256 lines apart so they crowd few cache sets and force PureFiber evictions.
// The off-chip memory is a behavioural model: one-cycle read channels for the
// CSR arrays and a line channel with a fixed latency.
//
// It also drives one Huffman tree through the merging-scheduler ports. Every
// mechanism (hits, misses, merged misses, NACKs, evictions, pure fibers, SQ
// bypasses, synchronisation conflicts, immediate merges, direct writes,
// sampling, each degree) is counted and must occur at least once.
module tb_aces_top;
  import aces_pkg::*;

  localparam int M = 300, K = 128, N = 128;
  localparam int BIG_ROWS = 270;
  localparam int LAT = 24;
  localparam int LINE_SPACING = 256;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- matrices ----------------
  int a_off [M+1];
  int a_col [$];
  int a_val [$];
  int b_len [K];
  int b_crd [K][16];
  int b_val [K][16];
  longint ref_c [M][N];

  function automatic int rnd(int n); return int'($urandom % n); endfunction

  initial begin
    int nz;
    bit used [K];
    // B: 1..12 non-zeros per row, sorted coordinates
    for (int k = 0; k < K; k++) begin
      bit taken [N];
      int cnt;
      for (int c = 0; c < N; c++) taken[c] = 0;
      b_len[k] = 1 + rnd(12);
      cnt = 0;
      while (cnt < b_len[k]) begin
        int c;
        c = rnd(N);
        if (!taken[c]) begin taken[c] = 1; cnt++; end
      end
      cnt = 0;
      for (int c = 0; c < N; c++) if (taken[c]) begin
        b_crd[k][cnt] = c; b_val[k][cnt] = 1 + rnd(7); cnt++;
      end
    end
    // A: rows 0..BIG_ROWS-1 hold 2..5 non-zeros drawn from a narrow column
    // range (many rows share B rows); the rest hold 18..20 spread out
    a_off[0] = 0;
    for (int r = 0; r < M; r++) begin
      nz = (r < BIG_ROWS) ? 2 + rnd(4) : 18 + rnd(3);
      for (int k = 0; k < K; k++) used[k] = 0;
      for (int j = 0; j < nz; j++) begin
        int k;
        do k = (r < BIG_ROWS) ? rnd(K/2) : rnd(K); while (used[k]);
        used[k] = 1;
      end
      for (int k = 0; k < K; k++) if (used[k]) begin
        a_col.push_back(k); a_val.push_back(1 + rnd(5));
      end
      a_off[r+1] = a_col.size();
    end
    // reference
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < N; c++) ref_c[r][c] = 0;
      for (int p = a_off[r]; p < a_off[r+1]; p++)
        for (int j = 0; j < b_len[a_col[p]]; j++)
          ref_c[r][b_crd[a_col[p]][j]] += longint'(a_val[p]) * b_val[a_col[p]][j];
    end
  end

  // ---------------- DUT ----------------
  logic ad_off_en, af_off_en, af_el_en, binfo_en;
  logic [ROW_W-1:0] ad_off_addr, af_off_addr;
  logic [31:0] ad_off_data, af_off_data, af_el_addr;
  logic [COORD_W-1:0] af_el_col, binfo_row;
  logic [VAL_W-1:0] af_el_val;
  logic [LINE_W-1:0] binfo_line0;
  logic [15:0] binfo_len;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [LINE_W-1:0] mem_req_line, mem_resp_line;
  line_t mem_resp_data;
  logic c_valid, done, c_overflow;
  logic [ROW_W-1:0] c_row;
  elem_t c_elem;
  stats_t stats;
  logic ms_leaf_valid = 0, ms_leaf_ready, ms_row_end = 0, ms_root_valid, ms_task_valid;
  logic ms_task_ready = 0, ms_task_done = 0, ms_idle;
  logic [7:0] ms_leaf_id = 0, ms_root_id, ms_task_a, ms_task_b, ms_task_dst, ms_task_done_id = 0;
  logic [15:0] ms_leaf_w = 0, ms_task_w;

  aces_top dut (
    .clk, .rst_n, .start, .n_rows(ROW_W'(M)), .n_cols(COORD_W'(K)), .done,
    .ad_off_en, .ad_off_addr, .ad_off_data,
    .af_off_en, .af_off_addr, .af_off_data, .af_el_en, .af_el_addr, .af_el_col, .af_el_val,
    .binfo_en, .binfo_row, .binfo_line0, .binfo_len,
    .mem_req_valid, .mem_req_ready, .mem_req_line,
    .mem_resp_valid, .mem_resp_line, .mem_resp_data,
    .c_valid, .c_row, .c_elem,
    .ms_leaf_valid, .ms_leaf_ready, .ms_leaf_id, .ms_leaf_w, .ms_row_end,
    .ms_root_valid, .ms_root_id, .ms_task_valid, .ms_task_ready, .ms_task_a, .ms_task_b,
    .ms_task_dst, .ms_task_w, .ms_task_done, .ms_task_done_id, .ms_idle,
    .stats, .c_overflow);

  // ---------------- memory model ----------------
  always_ff @(posedge clk) begin
    if (ad_off_en) ad_off_data <= (ad_off_addr <= M) ? 32'(a_off[ad_off_addr]) : '0;
    if (af_off_en) af_off_data <= (af_off_addr <= M) ? 32'(a_off[af_off_addr]) : '0;
    if (af_el_en) begin
      if (af_el_addr < a_col.size()) begin
        af_el_col <= COORD_W'(a_col[af_el_addr]);
        af_el_val <= $realtobits(real'(a_val[af_el_addr]));
      end else begin
        af_el_col <= '0; af_el_val <= '0;
      end
    end
    if (binfo_en) begin
      binfo_line0 <= LINE_W'(binfo_row * LINE_SPACING);
      binfo_len   <= 16'(b_len[binfo_row]);
    end
  end

  typedef struct { longint t; logic [LINE_W-1:0] line; } mreq_t;
  mreq_t mq [$];
  longint now = 0;
  assign mem_req_ready = 1'b1;
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (rst_n && mem_req_valid && mem_req_ready) mq.push_back('{now + LAT, mem_req_line});
    mem_resp_valid <= 1'b0;
    if (mq.size() > 0 && mq[0].t <= now) begin
      int k, j0;
      mreq_t q;
      q = mq.pop_front();
      k  = int'(q.line) / LINE_SPACING;
      j0 = (int'(q.line) % LINE_SPACING) * LINE_ELEMS;
      mem_resp_valid <= 1'b1;
      mem_resp_line  <= q.line;
      for (int e = 0; e < LINE_ELEMS; e++)
        if (k < K && j0 + e < b_len[k])
          mem_resp_data[e] <= '{coord: COORD_W'(b_crd[k][j0+e]),
                                val: $realtobits(real'(b_val[k][j0+e]))};
        else mem_resp_data[e] <= '0;
    end
  end

  // ---------------- output checking ----------------
  int got_cnt [M];
  int last_row = -1, last_crd = -1, out_elems = 0;
  always_ff @(posedge clk) if (c_valid) begin
    int r, c;
    r = int'(c_row); c = int'(c_elem.coord);
    out_elems++;
    if (r < last_row || (r == last_row && c <= last_crd)) begin
      failures++;
      $display("order error row %0d coord %0d", r, c);
    end
    last_row = r; last_crd = c;
    checks++;
    if (r >= M || c >= N || $bitstoreal(c_elem.val) != real'(ref_c[r][c]) || ref_c[r][c] == 0) begin
      failures++;
      if (failures < 10)
        $display("value error C[%0d][%0d] = %f, expected %0d", r, c,
                 $bitstoreal(c_elem.val), (r < M && c < N) ? ref_c[r][c] : -1);
    end
  end

  // ---------------- merging scheduler through the top ----------------
  int ms_tasks = 0, ms_sum = 0;
  task automatic ms_run();
    int w [4] = '{5, 1, 3, 2};
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      ms_leaf_valid = 1; ms_leaf_id = 8'(i); ms_leaf_w = 16'(w[i]);
    end
    @(negedge clk); ms_leaf_valid = 0; ms_row_end = 1;
    @(negedge clk); ms_row_end = 0;
    repeat (30) begin
      @(negedge clk);
      ms_task_done = 0;
      if (ms_task_ready) begin
        ms_task_ready = 0; ms_task_done = 1;
      end else if (ms_task_valid) begin
        ms_tasks++; ms_sum += int'(ms_task_w); ms_task_ready = 1;
        ms_task_done_id = ms_task_dst;
      end
    end
    ms_task_done = 0;
    // Huffman on {5,1,3,2}: 1+2=3, 3+3=6, 5+6=11 -> 3 tasks, weights 3+6+11
    checks++;
    if (ms_tasks != 3 || ms_sum != 20) begin
      failures++;
      $display("merge scheduler: %0d tasks, weight sum %0d", ms_tasks, ms_sum);
    end
  endtask

  // ---------------- run ----------------
  task automatic need(string what, logic [31:0] v);
    checks++;
    $display("  %-16s %0d", what, v);
    if (v == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_nnz;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    ms_run();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done);
    repeat (4) @(posedge clk);
    exp_nnz = 0;
    for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) if (ref_c[r][c] != 0) exp_nnz++;
    checks++;
    if (out_elems != exp_nnz) begin
      failures++;
      $display("output count %0d, expected %0d", out_elems, exp_nnz);
    end
    checks++;
    if (c_overflow) begin failures++; $display("partial store overflow"); end
    $display("cycles %0d, A non-zeros %0d, output non-zeros %0d", stats.cycles, stats.a_elems, out_elems);
    need("hits", stats.hits);
    need("misses", stats.misses);
    need("nb_merges", stats.nb_merges);
    need("nacks", stats.nacks);
    need("evictions", stats.evictions);
    need("pure_fibers", stats.pure_fibers);
    need("sq_bypass", stats.sq_bypass);
    need("sync_conflict", stats.sync_conflict);
    need("imm_merges", stats.imm_merges);
    need("direct_writes", stats.direct_writes);
    need("adds", stats.adds);
    need("bands>1", 32'(stats.bands > 1));
    $display("  bands            %0d", stats.bands);
    need("sample_passes", stats.sample_passes);
    need("choices", stats.choices);
    need("win_none", stats.win_none);
    need("win_moderate", stats.win_moderate);
    need("win_aggressive", stats.win_aggressive);
    checks++;
    if (stats.a_elems != 32'(a_col.size())) begin
      failures++;
      $display("dispatched %0d A elements, expected %0d", stats.a_elems, a_col.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
