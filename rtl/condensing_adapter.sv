// condensing_adapter: chooses the condensing degree of A (none, moderate or
// aggressive) band by band and issues the windows of rows the fetcher runs.
//
// Phase 1 reads the CSR offsets of A once and splits the rows into bands: a new
// band starts wherever the row length (offset difference) changes by more than
// THRESH (10) from the previous row. Phase 2 walks the bands. A band of at
// least BIG_BAND (256) rows starts with three sampling passes of SAMPLE_ROWS
// (32) rows each, run with no, moderate and aggressive condensing; the adapter
// times each pass (multiplication and immediate merging, from the window's
// issue to window_done) and runs the rest of the band with the fastest degree
// (ties go to the earlier degree in that order). Smaller bands run with
// moderate condensing. Sampled rows are real work: their results are kept.
// Rows are issued in windows of at most WIN rows.
//
// Interface: start with the matrix size; a one-cycle-latency offsets read
// port; windows on win_* with valid/ready; window_done from the datapath when
// the issued window has been fully merged and written out; done at the end.
// At most MAX_BANDS bands are recorded; rows past the last one join it (this
// design's choice).
module condensing_adapter
  import aces_pkg::*;
#(
  parameter int unsigned THRESH      = 10,
  parameter int unsigned BIG_BAND    = 256,
  parameter int unsigned SAMPLE_ROWS = 32,
  parameter int unsigned WIN         = 32,
  parameter int unsigned MAX_BANDS   = 64,
  parameter int unsigned PTR_W       = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [ROW_W-1:0]     n_rows,
  output logic                 off_en,
  output logic [ROW_W-1:0]     off_addr,
  input  logic [PTR_W-1:0]     off_data,
  output logic                 win_valid,
  input  logic                 win_ready,
  output logic [ROW_W-1:0]     win_row0,
  output logic [$clog2(WIN):0] win_nrows,
  output degree_t              win_degree,
  output logic                 win_sample,
  input  logic                 window_done,
  output logic                 done,
  output logic                 busy,
  output logic [15:0]          n_bands,
  output logic                 band_event,     // a new band was found
  output logic                 sample_event,   // a sampling pass ended
  output logic                 choose_event,   // a degree was chosen from samples
  output degree_t              chosen
);
  localparam int unsigned BW = $clog2(MAX_BANDS);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_CAP, S_BAND, S_ISSUE, S_WAIT, S_DONE} state_t;
  state_t state;

  logic [ROW_W-1:0] bstart [MAX_BANDS];
  logic [BW:0]      nb_q;
  logic [ROW_W-1:0] m_q, r_q;
  logic [PTR_W-1:0] prev_off, prev_len;
  logic [BW:0]      b_q;
  logic [ROW_W-1:0] p_q, e_q;      // next row, end of band
  logic [1:0]       samp_q;        // sampling pass 0..2, 3 = no sampling
  degree_t          deg_q;
  logic [31:0]      t_q, best_t;
  degree_t          best_d;
  logic [PTR_W-1:0] len, diff;

  assign len  = off_data - prev_off;
  assign diff = (len > prev_len) ? len - prev_len : prev_len - len;

  assign off_en   = (state == S_RD);
  assign off_addr = r_q;
  assign busy     = (state != S_IDLE);
  assign n_bands  = 16'(nb_q);

  logic [ROW_W-1:0] left;
  assign left       = e_q - p_q;
  assign win_valid  = (state == S_ISSUE);
  assign win_row0   = p_q;
  assign win_sample = (samp_q != 2'd3);
  assign win_degree = (samp_q == 2'd3) ? deg_q : degree_t'(samp_q);
  always_comb begin
    if (samp_q != 2'd3) win_nrows = ($clog2(WIN)+1)'(SAMPLE_ROWS);
    else if (left < ROW_W'(WIN)) win_nrows = ($clog2(WIN)+1)'(left);
    else win_nrows = ($clog2(WIN)+1)'(WIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; nb_q <= '0; m_q <= '0; r_q <= '0; prev_off <= '0; prev_len <= '0;
      b_q <= '0; p_q <= '0; e_q <= '0; samp_q <= 2'd3; deg_q <= DEG_MODERATE;
      t_q <= '0; best_t <= '0; best_d <= DEG_NONE; done <= 1'b0;
      band_event <= 1'b0; sample_event <= 1'b0; choose_event <= 1'b0; chosen <= DEG_NONE;
      for (int i = 0; i < MAX_BANDS; i++) bstart[i] <= '0;
    end else begin
      done <= 1'b0; band_event <= 1'b0; sample_event <= 1'b0; choose_event <= 1'b0;
      t_q <= t_q + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          m_q   <= n_rows;
          r_q   <= '0;
          nb_q  <= '0;
          state <= S_RD;
        end
        S_RD: state <= S_CAP;
        S_CAP: begin
          // off_data = offset of row r_q; row r_q-1 has length len
          if (r_q == ROW_W'(1) || (r_q > ROW_W'(1) && diff > PTR_W'(THRESH) &&
                                   nb_q < (BW+1)'(MAX_BANDS))) begin
            bstart[BW'(nb_q)] <= r_q - 1'b1;
            nb_q       <= nb_q + 1'b1;
            band_event <= 1'b1;
          end
          prev_off <= off_data;
          if (r_q != '0) prev_len <= len;
          if (r_q == m_q) begin
            b_q   <= '0;
            state <= S_BAND;
          end else begin
            r_q   <= r_q + 1'b1;
            state <= S_RD;
          end
        end
        S_BAND: begin
          if (b_q == nb_q) state <= S_DONE;
          else begin
            logic [ROW_W-1:0] be;
            be  = (b_q + 1'b1 == nb_q) ? m_q : bstart[BW'(b_q + 1'b1)];
            p_q <= bstart[BW'(b_q)];
            e_q <= be;
            if (be - bstart[BW'(b_q)] >= ROW_W'(BIG_BAND)) begin
              samp_q <= 2'd0;
              best_t <= '1;
            end else begin
              samp_q <= 2'd3;
              deg_q  <= DEG_MODERATE;
            end
            b_q   <= b_q + 1'b1;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: if (win_ready) begin
          p_q   <= p_q + ROW_W'(win_nrows);
          t_q   <= '0;
          state <= S_WAIT;
        end
        S_WAIT: if (window_done) begin
          if (samp_q != 2'd3) begin
            sample_event <= 1'b1;
            if (t_q < best_t) begin
              best_t <= t_q;
              best_d <= degree_t'(samp_q);
            end
            if (samp_q == 2'd2) begin
              samp_q       <= 2'd3;
              deg_q        <= (t_q < best_t) ? DEG_AGGRESSIVE : best_d;
              chosen       <= (t_q < best_t) ? DEG_AGGRESSIVE : best_d;
              choose_event <= 1'b1;
            end else samp_q <= samp_q + 1'b1;
          end
          state <= (p_q == e_q) ? S_BAND : S_ISSUE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
