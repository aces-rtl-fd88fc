// tb_a_fetcher: random CSR matrices of A (up to 40 rows, 24 columns) held in
// one-cycle read memories. Random windows of up to 8 rows are run with each
// condensing degree, with a randomly stalling output. The expected stream is
// built from the definition of the degrees: aggressive takes the j-th non-zero
// of every row for j = 0, 1, ...; moderate does the same first for the
// non-zeros in the first half of the columns and then for the second half;
// none walks the original columns in order, all rows per column. Each element
// keeps its original column. Checks every element, the count, and done.
module tb_a_fetcher;
  import aces_pkg::*;
  localparam int WIN = 8, MR = 40, NC = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid = 0, cmd_ready, off_en, el_en, out_valid, out_ready = 0, done, busy;
  logic [31:0] cmd_row0 = 0, cmd_ncols = NC, off_addr, off_data = 0, el_addr, el_col = 0;
  logic [3:0] cmd_nrows = 0;
  degree_t cmd_degree = DEG_NONE;
  logic [63:0] el_val = 0;
  a_elem_t out_elem;
  a_fetcher #(.WIN(WIN)) dut (.*);

  int offs [MR + 1];
  int cols [$];
  longint vals [$];
  always_ff @(posedge clk) begin
    if (off_en) off_data <= 32'(offs[off_addr]);
    if (el_en) begin
      el_col <= (int'(el_addr) < cols.size()) ? 32'(cols[el_addr]) : 32'hdead;
      el_val <= (int'(el_addr) < vals.size()) ? 64'(vals[el_addr]) : 64'h0;
    end
  end

  a_elem_t exp_q [$];

  task automatic make_matrix();
    cols.delete(); vals.delete();
    offs[0] = 0;
    for (int r = 0; r < MR; r++) begin
      int dens;
      dens = int'($urandom % 4);
      for (int c = 0; c < NC; c++)
        if (int'($urandom % 8) < dens) begin
          cols.push_back(c);
          vals.push_back(longint'({$urandom, $urandom}));
        end
      offs[r + 1] = cols.size();
    end
  endtask

  // append the condensed walk over columns [lo, hi) of rows r0 .. r0+n-1
  task automatic walk(int r0, int n, int lo, int hi);
    int j;
    bit any;
    j = 0;
    do begin
      any = 0;
      for (int r = r0; r < r0 + n; r++) begin
        int k;
        k = 0;
        for (int p = offs[r]; p < offs[r + 1]; p++)
          if (cols[p] >= lo && cols[p] < hi) begin
            if (k == j) begin
              exp_q.push_back('{row: 32'(r), col: 32'(cols[p]), val: 64'(vals[p])});
              any = 1;
            end
            k++;
          end
      end
      j++;
    end while (any);
  endtask

  initial begin : watchdog
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int r0, n, got, cyc;
      degree_t d;
      bit seen_done;
      if (t % 10 == 0) make_matrix();
      n = int'($urandom % (WIN + 1));
      r0 = int'($urandom % (MR - n + 1));
      d = degree_t'(t % 3);
      exp_q.delete();
      case (d)
        DEG_AGGRESSIVE: walk(r0, n, 0, NC);
        DEG_MODERATE: begin walk(r0, n, 0, NC / 2); walk(r0, n, NC / 2, NC); end
        default: for (int c = 0; c < NC; c++) walk(r0, n, c, c + 1);
      endcase
      @(negedge clk);
      cmd_valid = 1; cmd_row0 = 32'(r0); cmd_nrows = 4'(n); cmd_degree = d;
      @(negedge clk);
      cmd_valid = 0;
      got = 0; seen_done = 0; cyc = 0;
      while (!seen_done && cyc < 5000) begin
        out_ready = ($urandom % 3) != 0;
        #1;
        if (done) seen_done = 1;
        if (out_valid && out_ready) begin
          checks++;
          if (got >= exp_q.size() || out_elem != exp_q[got]) begin
            failures++;
            $display("window %0d deg %0d elem %0d: got r%0d c%0d", t, d, got, out_elem.row, out_elem.col);
          end
          got++;
        end
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (!seen_done) begin failures++; $display("window %0d: no done", t); end
      if (got != exp_q.size()) begin failures++; $display("window %0d: %0d of %0d", t, got, exp_q.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
