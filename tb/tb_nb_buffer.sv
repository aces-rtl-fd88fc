// tb_nb_buffer: a buffer of 4 entries and 6 subentries with 8 requesters and a
// memory model of random latency. Requesters miss on lines from a small set so
// that misses to the same line are common. The testbench checks that a line
// has at most one memory request in flight, that a miss to a line already
// pending sends none, that the notice on each fill names exactly the
// requesters that missed on that line, that allocations are refused exactly
// when no entry (for a new line) or no subentry is free, and that every
// waiting requester is eventually served.
module tb_nb_buffer;
  import aces_pkg::*;
  localparam int ENT = 4, SUBS = 6, NREQ = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, refused = 0, merged = 0;

  logic alloc_valid = 0, alloc_ok, alloc_primary, mem_req_valid, mem_req_ready = 1;
  logic [31:0] alloc_line = 0, mem_req_line, mem_resp_line = 0, fill_line;
  logic [2:0] alloc_id = 0;
  logic [15:0] alloc_rd = 0, alloc_fd = 0, fill_rd, fill_fd;
  logic mem_resp_valid = 0, fill_valid, full;
  line_t mem_resp_data = '0, fill_data;
  logic [NREQ-1:0] notify_mask;
  logic [2:0] used;
  nb_buffer #(.ENTRIES(ENT), .SUBENTRIES(SUBS), .NREQ(NREQ)) dut (.*);

  bit waiting [NREQ];
  int wline [NREQ];
  int inflight [int];     // line -> 1 while its memory request is out
  typedef struct { longint t; int line; } mr_t;
  mr_t mq [$];
  longint now = 0;
  int served = 0;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int r;
      bit pending_line [int];
      int nsub, nent;
      @(negedge clk);
      now++;
      // memory reply
      mem_resp_valid = 0;
      if (mq.size() > 0 && mq[0].t <= now) begin
        mr_t q;
        q = mq.pop_front();
        mem_resp_valid = 1; mem_resp_line = 32'(q.line);
      end
      // a random idle requester misses
      r = int'($urandom % NREQ);
      alloc_valid = (cyc < 3800) && !waiting[r] && ($urandom % 2 == 0);
      alloc_id = 3'(r); alloc_line = 32'($urandom % 6); alloc_rd = 16'(cyc); alloc_fd = 1;
      #1;
      // model of the occupancy
      pending_line.delete(); nsub = 0;
      for (int i = 0; i < NREQ; i++) if (waiting[i]) begin pending_line[wline[i]] = 1; nsub++; end
      nent = pending_line.size();
      if (alloc_valid) begin
        bit exp_ok;
        bit releasing;
        releasing = mem_resp_valid && int'(mem_resp_line) == int'(alloc_line);
        exp_ok = (nsub < SUBS) && !releasing &&
                 (pending_line.exists(int'(alloc_line)) || nent < ENT);
        checks++;
        if (alloc_ok != exp_ok || (alloc_ok && alloc_primary == pending_line.exists(int'(alloc_line)))) begin
          failures++;
          $display("cycle %0d: alloc_ok %b primary %b, expected ok %b", cyc, alloc_ok, alloc_primary, exp_ok);
        end
        if (!alloc_ok) refused++;
        else if (!alloc_primary) merged++;
      end
      // fill notice
      if (mem_resp_valid) begin
        logic [NREQ-1:0] exp_mask;
        exp_mask = '0;
        for (int i = 0; i < NREQ; i++) if (waiting[i] && wline[i] == int'(mem_resp_line)) exp_mask[i] = 1;
        checks++;
        if (!fill_valid || notify_mask != exp_mask) begin
          failures++; $display("cycle %0d: notice %b, expected %b", cyc, notify_mask, exp_mask);
        end
        for (int i = 0; i < NREQ; i++) if (exp_mask[i]) begin waiting[i] = 0; served++; end
        inflight.delete(int'(mem_resp_line));
      end
      if (alloc_valid && alloc_ok) begin waiting[r] = 1; wline[r] = int'(alloc_line); end
      // memory request
      if (mem_req_valid) begin
        checks++;
        if (inflight.exists(int'(mem_req_line))) begin
          failures++; $display("second request for line %0d", mem_req_line);
        end
        inflight[int'(mem_req_line)] = 1;
        mq.push_back('{now + 3 + longint'($urandom % 20), int'(mem_req_line)});
      end
    end
    for (int i = 0; i < NREQ; i++) begin
      checks++;
      if (waiting[i]) begin failures++; $display("requester %0d never served", i); end
    end
    checks++;
    if (refused == 0 || merged == 0) begin failures++; $display("refusal or merge never seen"); end
    $display("served %0d, merged %0d, refused %0d", served, merged, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
