// tb_cache_bank: one bank of 4 sets x 4 ways. The testbench keeps its own
// model of every line (valid, tag, predicted next use, fiber density) and of
// the PureFiber rule: an invalid way first, else the largest RD + FD with RD
// the time to the predicted next use floored at zero, ties to the larger FD,
// then the lower way. Random lookups and fills are checked for hit/miss, the
// data returned a cycle after a hit, and which line each fill evicts. It ends
// with the example of a dense fiber and two sparse ones: with equal reuse
// distance the dense fiber's line is the one evicted.
module tb_cache_bank;
  import aces_pkg::*;
  localparam int SETS = 4, WAYS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] now = 0;
  logic req_valid = 0, hit_now, fill_valid = 0, evict_event;
  logic [31:0] req_line = 0, fill_line = 0;
  logic [15:0] req_rd = 0, req_fd = 0, fill_rd = 0, fill_fd = 0;
  line_t resp_data, fill_data = '0;
  cache_bank #(.SETS(SETS), .WAYS(WAYS), .NBANKS(1)) dut (.*);

  bit          mv [SETS][WAYS];
  logic [31:0] ml [SETS][WAYS];
  longint      mt [SETS][WAYS];
  int          mf [SETS][WAYS];

  function automatic line_t dat(logic [31:0] l);
    line_t d;
    for (int e = 0; e < LINE_ELEMS; e++) d[e] = '{coord: l, val: 64'(l) * 64'(e + 3)};
    return d;
  endfunction

  function automatic int find(logic [31:0] l);
    int s;
    s = int'(l) % SETS;
    for (int w = 0; w < WAYS; w++) if (mv[s][w] && ml[s][w] == l) return w;
    return -1;
  endfunction

  function automatic int victim(int s);
    int best, bw, bf;
    for (int w = 0; w < WAYS; w++) if (!mv[s][w]) return w;
    best = -1; bw = 0; bf = 0;
    for (int w = 0; w < WAYS; w++) begin
      longint rd;
      int sc;
      rd = mt[s][w] - longint'(now);
      if (rd < 0) rd = 0;
      sc = int'(rd) + mf[s][w];
      if (best < 0 || sc > best || (sc == best && mf[s][w] > bf)) begin
        best = sc; bw = w; bf = mf[s][w];
      end
    end
    return bw;
  endfunction

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(logic [31:0] l, int rd, int fd);
    int w;
    @(negedge clk);
    req_valid = 1; req_line = l; req_rd = 16'(rd); req_fd = 16'(fd);
    #1;
    w = find(l);
    checks++;
    if (hit_now != (w >= 0)) begin failures++; $display("line %0d: hit %b, model %0d", l, hit_now, w); end
    @(posedge clk);
    if (w >= 0) begin mt[l % SETS][w] = longint'(now) + rd; mf[l % SETS][w] = fd; end
    #1 req_valid = 0;
    if (w >= 0) begin
      checks++;
      if (resp_data != dat(l)) begin failures++; $display("line %0d: wrong data", l); end
    end
  endtask

  task automatic fill(logic [31:0] l, int rd, int fd);
    int s, w;
    @(negedge clk);
    fill_valid = 1; fill_line = l; fill_rd = 16'(rd); fill_fd = 16'(fd); fill_data = dat(l);
    s = int'(l) % SETS;
    w = victim(s);
    #1;
    checks++;
    if (evict_event != mv[s][w]) begin failures++; $display("evict flag"); end
    @(posedge clk);
    mv[s][w] = 1; ml[s][w] = l; mt[s][w] = longint'(now) + rd; mf[s][w] = fd;
    #1 fill_valid = 0;
  endtask

  always @(posedge clk) now <= now + 1;

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) mv[s][w] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] l;
      l = 32'($urandom % 40);
      if (find(l) < 0 && $urandom % 2 == 0) fill(l, int'($urandom % 50), 1 + int'($urandom % 8));
      else lookup(l, int'($urandom % 50), 1 + int'($urandom % 8));
      // after every fill, every modelled line must still be found
      if (i % 50 == 0)
        for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++)
          if (mv[s][w]) lookup(ml[s][w], int'(mt[s][w] - longint'(now)) > 0 ? int'(mt[s][w] - longint'(now)) : 0, mf[s][w]);
    end
    // dense fiber vs sparse fibers, same reuse distance: set 0 holds lines of a
    // 4-line fiber (FD 4) and of 1-line fibers (FD 1); the next fill must evict
    // a line of the dense fiber
    for (int w = 0; w < WAYS; w++) fill(32'(100 + w * SETS), 10, (w < 2) ? 4 : 1);
    fill(32'(200), 10, 1);
    for (int w = 0; w < WAYS; w++) lookup(32'(100 + w * SETS), 10, (w < 2) ? 4 : 1);
    checks++;
    if (find(32'(100)) >= 0 && find(32'(100 + SETS)) >= 0) begin
      failures++; $display("dense fiber line not evicted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
