// crossbar: request/reply network between the NREQ processing elements and the
// NBANKS banks of the global cache (a 16x16 switch in the evaluated
// configuration, modelled there as a swizzle-switch network).
//
// Each requester holds at most one request; it is steered to bank
// (line mod NBANKS). Every bank grants one requester per cycle, round robin
// starting after the last one granted. The bank's reply carries the requester
// number and is steered back to it. Arbitration is combinational; the reply
// path has no added latency. The swizzle-switch circuit itself is not
// modelled, only its function: any requester to any bank, one grant per bank
// per cycle.
module crossbar
  import aces_pkg::*;
#(
  parameter int unsigned NREQ   = 16,
  parameter int unsigned NBANKS = 16,
  parameter int unsigned RD_W   = 16,
  parameter int unsigned FD_W   = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // requester side
  input  logic [NREQ-1:0]                     req_valid,
  output logic [NREQ-1:0]                     req_ready,
  input  logic [NREQ-1:0][LINE_W-1:0]         req_line,
  input  logic [NREQ-1:0][RD_W-1:0]           req_rd,
  input  logic [NREQ-1:0][FD_W-1:0]           req_fd,
  output logic [NREQ-1:0]                     resp_valid,
  output cresp_t [NREQ-1:0]                   resp_status,
  output line_t [NREQ-1:0]                    resp_data,
  // bank side
  output logic [NBANKS-1:0]                   b_valid,
  output logic [NBANKS-1:0][LINE_W-1:0]       b_line,
  output logic [NBANKS-1:0][RD_W-1:0]         b_rd,
  output logic [NBANKS-1:0][FD_W-1:0]         b_fd,
  output logic [NBANKS-1:0][$clog2(NREQ)-1:0] b_id,
  input  logic [NBANKS-1:0]                   br_valid,
  input  logic [NBANKS-1:0][$clog2(NREQ)-1:0] br_id,
  input  cresp_t [NBANKS-1:0]                 br_status,
  input  line_t [NBANKS-1:0]                  br_data
);
  localparam int unsigned RW = $clog2(NREQ);
  localparam int unsigned BW = $clog2(NBANKS);

  logic [NBANKS-1:0][RW-1:0] last_q;

  always_comb begin
    int r;
    req_ready = '0;
    b_valid   = '0;
    b_line    = '0;
    b_rd      = '0;
    b_fd      = '0;
    b_id      = '0;
    for (int b = 0; b < NBANKS; b++) begin
      for (int k = 1; k <= NREQ; k++) begin
        r = (int'(last_q[b]) + k) % NREQ;
        if (!b_valid[b] && req_valid[r] && int'(req_line[r][BW-1:0]) == b) begin
          b_valid[b]   = 1'b1;
          b_line[b]    = req_line[r];
          b_rd[b]      = req_rd[r];
          b_fd[b]      = req_fd[r];
          b_id[b]      = RW'(r);
          req_ready[r] = 1'b1;
        end
      end
    end
    resp_valid  = '0;
    resp_status = '{default: CR_NACK};
    resp_data   = '0;
    for (int b = 0; b < NBANKS; b++)
      if (br_valid[b]) begin
        resp_valid[br_id[b]]  = 1'b1;
        resp_status[br_id[b]] = br_status[b];
        resp_data[br_id[b]]   = br_data[b];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= '0;
    else for (int b = 0; b < NBANKS; b++) if (b_valid[b]) last_q[b] <= b_id[b];
  end
endmodule
