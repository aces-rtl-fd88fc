// tb_crossbar: 4 requesters and 2 banks. Requesters issue random line
// requests; a bank model answers each granted request one cycle later with
// data derived from the line and the requester number. Checks that each bank
// receives only lines that map to it, at most one grant per bank per cycle,
// that replies reach the requester that asked, and that round-robin
// arbitration serves a waiting requester within NREQ grants of its bank.
module tb_crossbar;
  import aces_pkg::*;
  localparam int NREQ = 4, NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NREQ-1:0] req_valid = '0, req_ready, resp_valid;
  logic [NREQ-1:0][31:0] req_line = '0;
  logic [NREQ-1:0][15:0] req_rd = '0, req_fd = '0;
  cresp_t [NREQ-1:0] resp_status;
  line_t [NREQ-1:0] resp_data;
  logic [NB-1:0] b_valid, br_valid = '0;
  logic [NB-1:0][31:0] b_line;
  logic [NB-1:0][15:0] b_rd, b_fd;
  logic [NB-1:0][1:0] b_id, br_id = '0;
  cresp_t [NB-1:0] br_status = '{default: CR_HIT};
  line_t [NB-1:0] br_data = '0;
  crossbar #(.NREQ(NREQ), .NBANKS(NB)) dut (.*);

  int waitc [NREQ], st [NREQ], served = 0;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NREQ; r++) begin st[r] = 0; waitc[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // bank replies for last cycle's grants are already on br_*
      #1;
      for (int r = 0; r < NREQ; r++) if (resp_valid[r]) begin
        checks++;
        if (st[r] != 2 || resp_data[r][0].coord != req_line[r] || resp_data[r][0].val != 64'(r)) begin
          failures++; $display("reply to %0d wrong", r);
        end
        st[r] = 0; served++;
      end
      for (int r = 0; r < NREQ; r++) begin
        if (st[r] == 0 && $urandom % 3 != 0) begin
          st[r] = 1; req_valid[r] = 1; req_line[r] = 32'($urandom % 64); waitc[r] = 0;
        end else if (st[r] == 0) req_valid[r] = 0;
      end
      #1;
      // check grants
      br_valid = '0;
      for (int b = 0; b < NB; b++) if (b_valid[b]) begin
        int r;
        r = int'(b_id[b]);
        checks++;
        if (int'(b_line[b]) % NB != b || !req_valid[r] || !req_ready[r] || b_line[b] != req_line[r]) begin
          failures++; $display("bank %0d grant to %0d wrong", b, r);
        end
      end
      for (int r = 0; r < NREQ; r++) if (st[r] == 1) begin
        if (req_ready[r]) st[r] = 3;
        else begin
          waitc[r]++;
          checks++;
          if (waitc[r] > NREQ) begin failures++; $display("requester %0d starved", r); end
        end
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < NB; b++) begin
        br_valid[b] = b_valid[b] === 1'b1 ? 1'b0 : 1'b0;
      end
      for (int r = 0; r < NREQ; r++) if (st[r] == 3) begin
        int b;
        b = int'(req_line[r]) % NB;
        br_valid[b] = 1; br_id[b] = 2'(r);
        br_data[b][0] = '{coord: req_line[r], val: 64'(r)};
        st[r] = 2; req_valid[r] = 0;
      end
    end
    checks++;
    if (served < 1000) begin failures++; $display("only %0d served", served); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
