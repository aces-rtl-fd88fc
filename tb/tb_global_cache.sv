// tb_global_cache: a small cache (2 banks x 2 sets x 2 ways, NB buffer of 4
// entries) driven directly on its bank ports by 4 requester models, each with
// one request outstanding, against a memory model of random latency. Line L
// holds coordinates 4L..4L+3. Checks that every HIT returns the right line,
// that a MISS is always followed by a fill notice for that requester, that a
// NACK is answered when two banks miss in the same cycle, and that every
// requester completes all its reads.
module tb_global_cache;
  import aces_pkg::*;
  localparam int NB = 2, NREQ = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NB-1:0] b_valid = '0, br_valid, hit_ev, miss_ev, nack_ev;
  logic [NB-1:0][31:0] b_line = '0;
  logic [NB-1:0][15:0] b_rd = '0, b_fd = '0;
  logic [NB-1:0][1:0] b_id = '0, br_id;
  cresp_t [NB-1:0] br_status;
  line_t [NB-1:0] br_data;
  logic [NREQ-1:0] notify_mask;
  logic mem_req_valid, mem_req_ready = 1, mem_resp_valid = 0, evict_ev, nb_merge_ev;
  logic [31:0] mem_req_line, mem_resp_line = 0;
  line_t mem_resp_data = '0;
  global_cache #(.NBANKS(NB), .SETS(2), .WAYS(2), .NREQ(NREQ), .NB_ENTRIES(4), .NB_SUBS(4)) dut (.*);

  function automatic line_t dat(int l);
    line_t d;
    for (int e = 0; e < LINE_ELEMS; e++) d[e] = '{coord: 32'(l * 4 + e), val: 64'(l)};
    return d;
  endfunction

  typedef struct { longint t; int line; } mr_t;
  mr_t mq [$];
  longint now = 0;
  // requester state: 0 idle-to-send, 1 sent, 2 waiting for notice
  int st [NREQ], rl [NREQ], done_n [NREQ];
  bit bank_used [NB];
  int rr, bb;
  mr_t q;
  int n_hit = 0, n_miss = 0, n_nack = 0;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NREQ; i++) begin st[i] = 0; done_n[i] = 0; rl[i] = int'($urandom % 16); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      now++;
      // replies to requests of the previous cycle
      for (int b = 0; b < NB; b++) if (br_valid[b]) begin
        rr = int'(br_id[b]);
        checks++;
        if (st[rr] != 1) begin failures++; $display("unexpected reply to %0d", rr); end
        case (br_status[b])
          CR_HIT: begin
            n_hit++;
            checks++;
            if (br_data[b] != dat(rl[rr])) begin failures++; $display("req %0d line %0d: wrong data", rr, rl[rr]); end
            st[rr] = 0; done_n[rr]++; rl[rr] = int'($urandom % 16);
          end
          CR_MISS: begin n_miss++; st[rr] = 2; end
          default: begin n_nack++; st[rr] = 0; end
        endcase
      end
      // memory
      mem_resp_valid = 0;
      if (mq.size() > 0 && mq[0].t <= now) begin
        q = mq.pop_front();
        mem_resp_valid = 1; mem_resp_line = 32'(q.line); mem_resp_data = dat(q.line);
      end
      if (mem_req_valid) mq.push_back('{now + 2 + longint'($urandom % 15), int'(mem_req_line)});
      #1;
      // fill notices
      for (int r = 0; r < NREQ; r++) if (notify_mask[r]) begin
        checks++;
        if (st[r] != 2 && st[r] != 1) begin failures++; $display("stray notice to %0d", r); end
        if (st[r] == 2) st[r] = 0;
      end
      // new requests, one per bank
      b_valid = '0;
      for (int b = 0; b < NB; b++) bank_used[b] = 0;
      for (int r = 0; r < NREQ; r++) if (st[r] == 0 && done_n[r] < 200) begin
        bb = rl[r] % NB;
        if (!bank_used[bb]) begin
          bank_used[bb] = 1;
          b_valid[bb] = 1; b_line[bb] = 32'(rl[r]); b_id[bb] = 2'(r); b_rd[bb] = 16'($urandom % 20); b_fd[bb] = 1;
          st[r] = 1;
        end
      end
    end
    for (int r = 0; r < NREQ; r++) begin
      checks++;
      if (done_n[r] != 200) begin failures++; $display("requester %0d finished %0d reads", r, done_n[r]); end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_nack == 0) begin failures++; $display("hit/miss/nack missing"); end
    $display("hits %0d misses %0d nacks %0d", n_hit, n_miss, n_nack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
