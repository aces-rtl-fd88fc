// tb_sync_scheduler: random candidate lists for 4 APEs with rows drawn from a
// small range, so conflicts are frequent. Each cycle it checks, against its
// own record of the rows the APEs are merging, that no granted row is already
// being merged or granted twice, that each grant is the oldest eligible
// candidate of that APE's queue, that an APE with an eligible candidate is
// never left idle, and that bypass and conflict are flagged correctly.
module tb_sync_scheduler;
  localparam int NPE = 4, NFIB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_bypass = 0, n_conflict = 0;

  logic [NPE-1:0] ape_idle = '1, release_i = '0, grant, bypass, conflict;
  logic [NPE-1:0][NFIB-1:0] cand_valid = '0;
  logic [NPE-1:0][NFIB-1:0][31:0] cand_row = '0;
  logic [NPE-1:0][NFIB-1:0][1:0] cand_slot = '0;
  logic [NPE-1:0][1:0] grant_slot;
  logic [NPE-1:0][31:0] grant_row;
  sync_scheduler #(.NPE(NPE), .NFIB(NFIB)) dut (.*);

  bit busy [NPE];
  int brow [NPE];
  int left [NPE];

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPE; i++) begin busy[i] = 0; left[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      release_i = '0;
      for (int i = 0; i < NPE; i++) begin
        if (busy[i]) begin
          left[i]--;
          if (left[i] == 0) begin release_i[i] = 1; end
        end
        ape_idle[i] = !busy[i];
        for (int p = 0; p < NFIB; p++) begin
          cand_valid[i][p] = ($urandom % 3 != 0);
          cand_row[i][p]   = 32'($urandom % 6);
          cand_slot[i][p]  = 2'(p + i);
        end
      end
      #1;
      begin
        bit taken [int];
        taken.delete();
        for (int i = 0; i < NPE; i++) if (busy[i] && !release_i[i]) taken[brow[i]] = 1;
        // rows released this cycle are still busy in this cycle
        for (int i = 0; i < NPE; i++) if (busy[i] && release_i[i]) taken[brow[i]] = 1;
        for (int i = 0; i < NPE; i++) begin
          int exp_p;
          exp_p = -1;
          if (!busy[i])
            for (int p = 0; p < NFIB; p++)
              if (exp_p < 0 && cand_valid[i][p] && !taken.exists(int'(cand_row[i][p]))) exp_p = p;
          checks++;
          if ((exp_p >= 0) != grant[i] ||
              (grant[i] && (grant_slot[i] != cand_slot[i][exp_p] ||
                            grant_row[i] != cand_row[i][exp_p] || bypass[i] != (exp_p != 0)))) begin
            failures++;
            $display("cycle %0d APE %0d: grant %b slot %0d, expected position %0d", cyc, i, grant[i], grant_slot[i], exp_p);
          end
          checks++;
          if (conflict[i] != (!busy[i] && exp_p < 0 && cand_valid[i] != 0)) begin
            failures++; $display("cycle %0d APE %0d conflict flag", cyc, i);
          end
          if (grant[i]) taken[int'(grant_row[i])] = 1;
          n_bypass += bypass[i]; n_conflict += conflict[i];
        end
      end
      // apply the grants seen before the clock edge
      for (int i = 0; i < NPE; i++) begin
        if (release_i[i]) busy[i] = 0;
        if (grant[i]) begin busy[i] = 1; brow[i] = int'(grant_row[i]); left[i] = 1 + int'($urandom % 4); end
      end
      @(posedge clk);
    end
    checks++;
    if (n_bypass == 0 || n_conflict == 0) begin failures++; $display("bypass or conflict never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
