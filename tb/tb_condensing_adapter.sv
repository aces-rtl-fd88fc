// tb_condensing_adapter: scaled parameters (big band 16 rows, sampling passes
// of 4 rows, windows of 8 rows, threshold 10). Random matrices are made of
// segments whose row lengths drift by at most 3 from row to row, separated by
// jumps of more than 10. A responder acknowledges each window after a delay
// that depends on its degree through a random cost table, so the fastest
// degree of a band is known (ties go to none, then moderate). Checks the band
// count, that windows tile the rows in order without crossing a band edge,
// that big bands start with three 4-row sampling windows in the order none,
// moderate, aggressive and then use the fastest, that small bands use
// moderate, and the event outputs.
module tb_condensing_adapter;
  import aces_pkg::*;
  localparam int BIG = 16, SR = 4, WIN = 8, MR = 120;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, off_en, win_valid, win_ready = 0, win_sample, window_done = 0, done, busy;
  logic band_event, sample_event, choose_event;
  logic [31:0] n_rows = 0, off_addr, off_data = 0, win_row0;
  logic [3:0] win_nrows;
  logic [15:0] n_bands;
  degree_t win_degree, chosen;
  condensing_adapter #(.THRESH(10), .BIG_BAND(BIG), .SAMPLE_ROWS(SR), .WIN(WIN)) dut (.*);

  int offs [MR + 1];
  int bstart [$];
  always_ff @(posedge clk) if (off_en) off_data <= 32'(offs[off_addr]);

  initial begin : watchdog
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_be, n_se, n_ce;
  always @(posedge clk) begin
    if (band_event) n_be++;
    if (sample_event) n_se++;
    if (choose_event) n_ce++;
  end

  initial begin
    int n_big_total = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int m, len, b, nxt, cost [3], best, sampled, seen_done, cyc;
      // matrix
      m = 1 + int'($urandom % MR);
      bstart.delete();
      offs[0] = 0;
      len = 0;
      for (int r = 0; r < m; r++) begin
        int nl;
        if (r == 0) nl = int'($urandom % 30);
        else if ($urandom % 12 == 0) nl = len + 11 + int'($urandom % 10);
        else if ($urandom % 12 == 0 && len > 11) nl = len - 11 - int'($urandom % (len - 10));
        else nl = len + int'($urandom % 7) - 3;
        if (nl < 0) nl = 0;
        if (r == 0 || (nl > len ? nl - len : len - nl) > 10) bstart.push_back(r);
        len = nl;
        offs[r + 1] = offs[r] + len;
      end
      n_be = 0; n_se = 0; n_ce = 0;
      @(negedge clk);
      start = 1; n_rows = 32'(m);
      @(negedge clk);
      start = 0;
      b = 0; nxt = 0; seen_done = 0; cyc = 0; sampled = 0;
      for (int k = 0; k < 3; k++) cost[k] = int'($urandom % 4);
      best = 0;
      for (int k = 1; k < 3; k++) if (cost[k] < cost[best]) best = k;
      while (!seen_done && cyc < 200000) begin
        win_ready = ($urandom % 2) == 0;
        #1;
        if (done) seen_done = 1;
        if (win_valid && win_ready) begin
          int bend, bsz, n;
          degree_t d;
          while (b + 1 < bstart.size() && nxt >= bstart[b + 1]) b++;
          bend = (b + 1 < bstart.size()) ? bstart[b + 1] : m;
          bsz = bend - bstart[b];
          n = int'(win_nrows);
          d = win_degree;
          checks += 3;
          if (int'(win_row0) != nxt) begin failures++; $display("test %0d: window at %0d exp %0d", t, win_row0, nxt); end
          if (n == 0 || n > WIN || nxt + n > bend) begin failures++; $display("test %0d: window size %0d at %0d crosses band end %0d", t, n, nxt, bend); end
          if (bsz >= BIG) begin
            int off;
            off = nxt - bstart[b];
            if (off < 3 * SR) begin
              if (!win_sample || n != SR || int'(d) != off / SR) begin failures++; $display("test %0d: bad sampling window", t); end
            end else if (win_sample || int'(d) != best) begin
              failures++; $display("test %0d: band at %0d ran %0d exp %0d", t, bstart[b], d, best);
            end
          end else if (win_sample || d != DEG_MODERATE) begin
            failures++; $display("test %0d: small band not moderate", t);
          end
          nxt += n;
          @(negedge clk);
          win_ready = 0;
          repeat (2 + 3 * cost[int'(d)]) @(negedge clk);
          window_done = 1;
          @(negedge clk);
          window_done = 0;
        end else begin
          @(negedge clk);
        end
        cyc++;
      end
      begin
        int nbig;
        nbig = 0;
        for (int i = 0; i < bstart.size(); i++)
          if (((i + 1 < bstart.size()) ? bstart[i + 1] : m) - bstart[i] >= BIG) nbig++;
        n_big_total += nbig;
        checks += 6;
        if (!seen_done) begin failures++; $display("test %0d: no done", t); end
        if (nxt != m) begin failures++; $display("test %0d: covered %0d of %0d", t, nxt, m); end
        if (int'(n_bands) != bstart.size()) begin failures++; $display("test %0d: %0d bands exp %0d", t, n_bands, bstart.size()); end
        if (n_be != bstart.size()) failures++;
        if (n_se != 3 * nbig) begin failures++; $display("test %0d: %0d sample events", t, n_se); end
        if (n_ce != nbig) failures++;
      end
    end
    checks++;
    if (n_big_total == 0) begin failures++; $display("no big band generated"); end
    $display("big bands %0d", n_big_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
