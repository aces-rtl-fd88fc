// mpe: multiplication processing element. Computes one scalar-vector product
// a(i,k) * B(k,:) and streams the resulting partial output fiber of row i into
// its selective queue.
//
// A task names the scalar (row i, value) and the B fiber as its first cache
// line, its line count (the fiber density) and its element count. The MPE asks
// the global cache for the lines one after another through its crossbar port,
// passing the next-request distance and fiber density used by the PureFiber
// replacement policy. A hit returns the line and its elements are multiplied
// and pushed, one per cycle. A miss has been parked in the non-blocking buffer:
// the MPE waits for the fill notice for that line and asks again. A NACK (buffer
// full) is retried at once. A fiber all of whose lines hit on first request is
// a "pure fiber" and is reported with a one-cycle pulse when the task ends.
//
// Timing: a request is accepted when req_valid & req_ready; exactly one reply
// (resp_valid) follows, at least one cycle later. Output elements use
// valid/ready; out_first/out_last mark the fiber bounds. An empty B fiber
// produces no output. Requesting lines one at a time per MPE is this design's
// choice; concurrency across a fiber's lines comes from the 16 MPEs sharing
// the non-blocking cache.
module mpe
  import aces_pkg::*;
#(
  parameter int unsigned LEN_W = 16,
  parameter int unsigned RD_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // task
  input  logic              task_valid,
  output logic              task_ready,
  input  logic [ROW_W-1:0]  task_row,
  input  logic [VAL_W-1:0]  task_aval,
  input  logic [LINE_W-1:0] task_line0,
  input  logic [LEN_W-1:0]  task_len,
  input  logic [RD_W-1:0]   task_rd,
  // cache port
  output logic              req_valid,
  input  logic              req_ready,
  output logic [LINE_W-1:0] req_line,
  output logic [RD_W-1:0]   req_rd,
  output logic [LEN_W-1:0]  req_fd,
  input  logic              resp_valid,
  input  cresp_t            resp_status,
  input  line_t             resp_data,
  input  logic              fill_notify,   // my parked miss has been filled
  // output fiber to the selective queue
  output logic              out_valid,
  input  logic              out_ready,
  output elem_t             out_elem,
  output logic [ROW_W-1:0]  out_row,
  output logic              out_first,
  output logic              out_last,
  // status
  output logic              busy,
  output logic              pure_fiber,
  output logic              miss_event
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_FILL, S_EMIT} state_t;
  state_t state;

  logic [ROW_W-1:0]  row_q;
  logic [VAL_W-1:0]  aval_q;
  logic [LINE_W-1:0] line_q;
  logic [LEN_W-1:0]  left_q;     // elements still to produce
  logic [LEN_W-1:0]  fd_q;
  logic [RD_W-1:0]   rd_q;
  line_t             buf_q;
  logic [$clog2(LINE_ELEMS)-1:0] idx_q;
  logic              first_q;
  logic              pure_q;
  logic [63:0]       prod;

  fp64_mul u_mul (.a(aval_q), .b(buf_q[idx_q].val), .y(prod));

  assign task_ready = (state == S_IDLE);
  assign busy       = (state != S_IDLE);
  assign req_valid  = (state == S_REQ);
  assign req_line   = line_q;
  assign req_rd     = rd_q;
  assign req_fd     = fd_q;
  assign out_valid  = (state == S_EMIT);
  assign out_elem   = '{coord: buf_q[idx_q].coord, val: prod};
  assign out_row    = row_q;
  assign out_first  = first_q;
  assign out_last   = (left_q == LEN_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row_q      <= '0;
      aval_q     <= '0;
      line_q     <= '0;
      left_q     <= '0;
      fd_q       <= '0;
      rd_q       <= '0;
      buf_q      <= '0;
      idx_q      <= '0;
      first_q    <= 1'b0;
      pure_q     <= 1'b0;
      pure_fiber <= 1'b0;
      miss_event <= 1'b0;
    end else begin
      pure_fiber <= 1'b0;
      miss_event <= 1'b0;
      unique case (state)
        S_IDLE: if (task_valid) begin
          row_q   <= task_row;
          aval_q  <= task_aval;
          line_q  <= task_line0;
          left_q  <= task_len;
          fd_q    <= LEN_W'((task_len + LEN_W'(LINE_ELEMS - 1)) / LEN_W'(LINE_ELEMS));
          rd_q    <= task_rd;
          first_q <= 1'b1;
          pure_q  <= 1'b1;
          if (task_len != '0) state <= S_REQ;
        end
        S_REQ: if (req_ready) state <= S_WAIT;
        S_WAIT: if (resp_valid) begin
          unique case (resp_status)
            CR_HIT: begin
              buf_q <= resp_data;
              idx_q <= '0;
              state <= S_EMIT;
            end
            CR_MISS: begin
              pure_q     <= 1'b0;
              miss_event <= 1'b1;
              // the fill may already be arriving in the reply's cycle
              state      <= fill_notify ? S_REQ : S_FILL;
            end
            default: begin
              pure_q <= 1'b0;
              state  <= S_REQ;
            end
          endcase
        end
        S_FILL: if (fill_notify) state <= S_REQ;
        S_EMIT: if (out_ready) begin
          first_q <= 1'b0;
          left_q  <= left_q - LEN_W'(1);
          idx_q   <= idx_q + 1'b1;
          if (left_q == LEN_W'(1)) begin
            pure_fiber <= pure_q;
            state      <= S_IDLE;
          end else if (idx_q == $clog2(LINE_ELEMS)'(LINE_ELEMS - 1)) begin
            line_q <= line_q + LINE_W'(1);
            state  <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // At most one outstanding request: a reply never arrives unasked.
  a_resp_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> state == S_WAIT);
endmodule
