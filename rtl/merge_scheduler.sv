// merge_scheduler: merging scheduler for the final merging stage. For one
// output row at a time it orders the pairwise merges of that row's partial
// fibers as a Huffman tree, so that light fibers are merged first and the
// total number of elements moved is smallest.
//
// The leaves (fiber id, weight = number of non-zeros) of a row are loaded into
// a priority queue. After row_end, each step extracts the two lightest entries
// (the lower id wins a tie), emits the task "merge a and b into new id n" with
// weight wa + wb, and reinserts n. New ids count up from NEW_ID_BASE and
// restart with every row, so a row may have at most NEW_ID_BASE leaves and
// 2^ID_W - NEW_ID_BASE merges. When one
// entry is left it is reported as the row's root and the queue is reused for
// the next row. Tasks wait in a small FIFO in creation order; an APE takes the
// oldest task whose two inputs are both ready, i.e. not outputs of tasks still
// in flight, which keeps the Huffman order and avoids synchronisation
// conflicts. The weight of a merged node is the sum of its children's weights,
// an upper bound on the true count when coordinates intersect (as in the
// document's own simplification).
//
// Timing: one leaf per cycle on load; one task created per cycle; one issued
// per cycle. task_done marks an id as produced (available as an input).
module merge_scheduler #(
  parameter int unsigned PQ_DEPTH = 32,
  parameter int unsigned TASK_BUF = 16,
  parameter int unsigned ID_W     = 8,
  parameter int unsigned W_W      = 16,
  parameter logic [ID_W-1:0] NEW_ID_BASE = ID_W'(128)
) (
  input  logic            clk,
  input  logic            rst_n,
  // leaves of one row
  input  logic            leaf_valid,
  output logic            leaf_ready,
  input  logic [ID_W-1:0] leaf_id,
  input  logic [W_W-1:0]  leaf_w,
  input  logic            row_end,
  // root of the row once its tree is built
  output logic            root_valid,
  output logic [ID_W-1:0] root_id,
  // issue to an APE
  output logic            task_valid,
  input  logic            task_ready,
  output logic [ID_W-1:0] task_a,
  output logic [ID_W-1:0] task_b,
  output logic [ID_W-1:0] task_dst,
  output logic [W_W-1:0]  task_w,
  // completion of a task: its destination becomes an available input
  input  logic            task_done,
  input  logic [ID_W-1:0] task_done_id,
  output logic            idle
);
  typedef struct packed {
    logic [ID_W-1:0] a, b, dst;
    logic [W_W-1:0]  w;
  } mtask_t;

  logic [PQ_DEPTH-1:0]            pv;
  logic [PQ_DEPTH-1:0][ID_W-1:0]  pid;
  logic [PQ_DEPTH-1:0][W_W-1:0]   pw;
  logic                           building;
  logic [ID_W-1:0]                next_id;
  logic [(1<<ID_W)-1:0]           pending;   // id is an unfinished task output

  mtask_t                  tq [TASK_BUF];
  logic [TASK_BUF-1:0]     tv;

  // two lightest entries
  int m1, m2, cnt;
  always_comb begin
    m1 = -1; m2 = -1; cnt = 0;
    for (int i = 0; i < PQ_DEPTH; i++) if (pv[i]) begin
      cnt++;
      if (m1 < 0 || pw[i] < pw[m1] || (pw[i] == pw[m1] && pid[i] < pid[m1])) begin
        m2 = m1; m1 = i;
      end else if (m2 < 0 || pw[i] < pw[m2] || (pw[i] == pw[m2] && pid[i] < pid[m2])) m2 = i;
    end
  end

  int tfree, tsel;
  always_comb begin
    tfree = -1;
    for (int i = TASK_BUF - 1; i >= 0; i--) if (!tv[i]) tfree = i;
    tsel = -1;
    for (int i = TASK_BUF - 1; i >= 0; i--)
      if (tv[i] && !pending[tq[i].a] && !pending[tq[i].b]) tsel = i;
  end

  // the task order is kept by scanning slots in age order: slots are compacted
  // on issue, so slot 0 is always the oldest
  assign leaf_ready = !building && (cnt < PQ_DEPTH);
  assign task_valid = (tsel >= 0);
  assign task_a     = (tsel >= 0) ? tq[tsel].a   : '0;
  assign task_b     = (tsel >= 0) ? tq[tsel].b   : '0;
  assign task_dst   = (tsel >= 0) ? tq[tsel].dst : '0;
  assign task_w     = (tsel >= 0) ? tq[tsel].w   : '0;
  assign idle       = !building && (tv == '0) && (pending == '0);

  logic create;
  assign create = building && (cnt >= 2) && (tfree >= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv <= '0; pid <= '0; pw <= '0; building <= 1'b0;
      next_id <= NEW_ID_BASE; pending <= '0; tv <= '0;
      root_valid <= 1'b0; root_id <= '0;
      for (int i = 0; i < TASK_BUF; i++) tq[i] <= '0;
    end else begin
      mtask_t            nt;
      logic [TASK_BUF-1:0] tv_n;
      root_valid <= 1'b0;
      tv_n = tv;
      // load leaves
      if (!building && leaf_valid && leaf_ready) begin
        begin : ins
          int f;
          f = -1;
          for (int i = PQ_DEPTH - 1; i >= 0; i--) if (!pv[i]) f = i;
          pv[f]  <= 1'b1;
          pid[f] <= leaf_id;
          pw[f]  <= leaf_w;
        end
      end
      if (!building && row_end) building <= 1'b1;
      // build one tree node per cycle
      if (create) begin
        nt.a   = pid[m1];
        nt.b   = pid[m2];
        nt.dst = next_id;
        nt.w   = pw[m1] + pw[m2];
        pv[m2]  <= 1'b0;
        pid[m1] <= next_id;
        pw[m1]  <= nt.w;
        next_id <= next_id + 1'b1;
        pending[next_id] <= 1'b1;
      end else if (building && cnt <= 1) begin
        building   <= 1'b0;
        root_valid <= 1'b1;
        root_id    <= (m1 >= 0) ? pid[m1] : '0;
        pv         <= '0;
        next_id    <= NEW_ID_BASE;
      end
      // issue and compact
      if (task_valid && task_ready) begin
        for (int i = 0; i < TASK_BUF - 1; i++)
          if (i >= tsel) begin
            tq[i]   <= tq[i+1];
            tv_n[i] = tv[i+1];
          end
        tv_n[TASK_BUF-1] = 1'b0;
      end
      if (create) begin
        int slot;
        slot = -1;
        for (int i = TASK_BUF - 1; i >= 0; i--) if (!tv_n[i]) slot = i;
        tq[slot]   <= nt;
        tv_n[slot] = 1'b1;
      end
      tv <= tv_n;
      if (task_done) pending[task_done_id] <= 1'b0;
    end
  end
endmodule
