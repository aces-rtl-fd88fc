// b_fetcher: the fetcher for matrix B. Takes the next non-zero a(i,k) from the
// global buffer, looks up where row k of B (its fiber) lies, and dispatches the
// scalar-vector task to a free MPE.
//
// B is kept as line-aligned fibers: row k starts at cache line line0(k) and has
// len(k) non-zeros, read from the row-information table through a read port
// with a fixed one-cycle latency (one HBM channel). The task carries the RD
// hint of the global buffer; the MPE derives the fiber density from len. Tasks
// go to the lowest-numbered idle MPE. The MPEs then request the fiber's lines
// from the global cache themselves.
//
// Timing: one task every two cycles at best (lookup, then dispatch).
module b_fetcher
  import aces_pkg::*;
#(
  parameter int unsigned NPE   = 16,
  parameter int unsigned LEN_W = 16,
  parameter int unsigned RD_W  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // global buffer head
  input  logic                     a_valid,
  output logic                     a_ready,
  input  a_elem_t                  a_elem,
  input  logic [RD_W-1:0]          a_rd,
  // B row information (one-cycle read)
  output logic                     binfo_en,
  output logic [COORD_W-1:0]       binfo_row,
  input  logic [LINE_W-1:0]        binfo_line0,
  input  logic [LEN_W-1:0]         binfo_len,
  // MPE task ports
  input  logic [NPE-1:0]           mpe_ready,
  output logic [NPE-1:0]           task_valid,
  output logic [ROW_W-1:0]         task_row,
  output logic [VAL_W-1:0]         task_aval,
  output logic [LINE_W-1:0]        task_line0,
  output logic [LEN_W-1:0]         task_len,
  output logic [RD_W-1:0]          task_rd,
  output logic                     busy
);
  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_SEND} state_t;
  state_t state;
  a_elem_t          e_q;
  logic [RD_W-1:0]  rd_q;
  logic [LINE_W-1:0] l0_q;
  logic [LEN_W-1:0] len_q;
  logic [NPE-1:0]   pick;

  assign a_ready   = (state == S_IDLE);
  assign binfo_en  = (state == S_IDLE) && a_valid;
  assign binfo_row = a_elem.col;
  assign busy      = (state != S_IDLE);

  always_comb begin
    pick = '0;
    for (int i = NPE - 1; i >= 0; i--) if (mpe_ready[i]) pick = NPE'(1) << i;
  end

  assign task_valid = (state == S_SEND) ? pick : '0;
  assign task_row   = e_q.row;
  assign task_aval  = e_q.val;
  assign task_line0 = l0_q;
  assign task_len   = len_q;
  assign task_rd    = rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; e_q <= '0; rd_q <= '0; l0_q <= '0; len_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (a_valid) begin
          e_q   <= a_elem;
          rd_q  <= a_rd;
          state <= S_LOOK;
        end
        S_LOOK: begin
          l0_q  <= binfo_line0;
          len_q <= binfo_len;
          state <= S_SEND;
        end
        S_SEND: if (pick != '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
