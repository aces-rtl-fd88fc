// a_fetcher: the fetcher for matrix A. Streams the non-zeros of a window of A
// rows into the global buffer in the traversal order of the chosen condensing
// degree, reading A in its original CSR form.
//
// Condensing shifts the non-zeros of each row to the left inside a column
// group; the condensed columns are then walked one after another, all rows of
// the window per condensed column. Every degree is the same walk with a
// different grouping: aggressive uses one group (all columns), moderate two
// (the first and second half of the columns), none one group per column, so
// that the walk is the original column order. The fetcher keeps a pointer to
// the next unread non-zero of each row; in one pass over the rows it takes the
// next non-zero of each row whose column is below the group's upper bound.
// Passes repeat until one takes nothing, then the next group starts (for no
// condensing the next group is the smallest column still unread). Each
// element keeps its original column index.
//
// Interface: cmd starts a window (first row, row count <= WIN, degree, number
// of columns). CSR offsets and (column, value) arrays are read through two
// read ports with a fixed one-cycle latency. Output: valid/ready into the
// global buffer. done pulses when the window's last element has been sent.
// Timing: two cycles per element plus one per row skipped in a pass. The
// window of WIN rows is this design's choice (the document condenses whole
// bands; its sampling passes are 32 rows).
module a_fetcher
  import aces_pkg::*;
#(
  parameter int unsigned WIN   = 32,
  parameter int unsigned PTR_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [ROW_W-1:0]     cmd_row0,
  input  logic [$clog2(WIN):0] cmd_nrows,
  input  degree_t              cmd_degree,
  input  logic [COORD_W-1:0]   cmd_ncols,
  // CSR offsets of A
  output logic                 off_en,
  output logic [ROW_W-1:0]     off_addr,
  input  logic [PTR_W-1:0]     off_data,
  // CSR (column, value) of A
  output logic                 el_en,
  output logic [PTR_W-1:0]     el_addr,
  input  logic [COORD_W-1:0]   el_col,
  input  logic [VAL_W-1:0]     el_val,
  // to the global buffer
  output logic                 out_valid,
  input  logic                 out_ready,
  output a_elem_t              out_elem,
  output logic                 done,
  output logic                 busy
);
  localparam int unsigned RW = $clog2(WIN);
  typedef enum logic [3:0] {
    S_IDLE, S_OFF_REQ, S_OFF_CAP, S_INIT_REQ, S_INIT_CAP, S_GROUP, S_SCAN, S_EMIT, S_NEXT_CAP
  } state_t;
  state_t state;

  logic [PTR_W-1:0]   ptr [WIN];
  logic [PTR_W-1:0]   pend [WIN];
  logic [COORD_W-1:0] ccol [WIN];
  logic [VAL_W-1:0]   cval [WIN];
  logic [ROW_W-1:0]   row0_q;
  logic [RW:0]        n_q;
  degree_t            deg_q;
  logic [COORD_W-1:0] ncols_q;
  logic [RW:0]        r_q;
  logic [COORD_W-1:0] hi_q;
  logic               grp_q;       // moderate: 0 = first half, 1 = second half
  logic               took_q;      // something taken in this pass

  logic [WIN-1:0]     live;
  logic               any_live;
  logic [COORD_W-1:0] min_col;
  always_comb begin
    any_live = 1'b0;
    min_col  = '1;
    for (int r = 0; r < WIN; r++) begin
      live[r] = ((RW+1)'(r) < n_q) && (ptr[r] < pend[r]);
      if (live[r]) begin
        any_live = 1'b1;
        if (ccol[r] < min_col) min_col = ccol[r];
      end
    end
  end

  logic [RW-1:0] ri;
  assign ri        = r_q[RW-1:0];
  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign off_en    = (state == S_OFF_REQ);
  assign off_addr  = row0_q + ROW_W'(r_q);
  assign el_en     = (state == S_INIT_REQ) || (state == S_EMIT && out_ready);
  assign el_addr   = (state == S_EMIT) ? ptr[ri] + 1'b1 : ptr[ri];
  assign out_valid = (state == S_EMIT);
  assign out_elem  = '{row: row0_q + ROW_W'(r_q), col: ccol[ri], val: cval[ri]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; row0_q <= '0; n_q <= '0; deg_q <= DEG_NONE; ncols_q <= '0;
      r_q <= '0; hi_q <= '0; grp_q <= 1'b0; took_q <= 1'b0; done <= 1'b0;
      for (int r = 0; r < WIN; r++) begin
        ptr[r] <= '0; pend[r] <= '0; ccol[r] <= '0; cval[r] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          row0_q  <= cmd_row0;
          n_q     <= cmd_nrows;
          deg_q   <= cmd_degree;
          ncols_q <= cmd_ncols;
          r_q     <= '0;
          grp_q   <= 1'b0;
          state   <= S_OFF_REQ;
        end
        S_OFF_REQ: state <= S_OFF_CAP;
        S_OFF_CAP: begin
          if (r_q != '0) pend[RW'(r_q - 1'b1)] <= off_data;
          if (r_q != n_q) ptr[ri] <= off_data;
          if (r_q == n_q) begin
            r_q   <= '0;
            state <= (n_q == '0) ? S_GROUP : S_INIT_REQ;
          end else begin
            r_q   <= r_q + 1'b1;
            state <= S_OFF_REQ;
          end
        end
        S_INIT_REQ: state <= S_INIT_CAP;
        S_INIT_CAP: begin
          ccol[ri] <= el_col;
          cval[ri] <= el_val;
          if (r_q + 1'b1 == n_q) state <= S_GROUP;
          else begin
            r_q   <= r_q + 1'b1;
            state <= S_INIT_REQ;
          end
        end
        S_GROUP: begin
          r_q    <= '0;
          took_q <= 1'b0;
          if (!any_live) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            unique case (deg_q)
              DEG_AGGRESSIVE: hi_q <= '1;
              DEG_MODERATE:   hi_q <= grp_q ? '1 : (ncols_q >> 1);
              default:        hi_q <= min_col + 1'b1;
            endcase
            state <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (r_q == n_q) begin
            r_q    <= '0;
            took_q <= 1'b0;
            if (!took_q) begin
              if (deg_q == DEG_MODERATE) grp_q <= 1'b1;
              state <= S_GROUP;
            end
          end else if (live[ri] && ccol[ri] < hi_q) state <= S_EMIT;
          else r_q <= r_q + 1'b1;
        end
        S_EMIT: if (out_ready) begin
          ptr[ri] <= ptr[ri] + 1'b1;
          took_q  <= 1'b1;
          state   <= S_NEXT_CAP;
        end
        S_NEXT_CAP: begin
          ccol[ri] <= el_col;
          cval[ri] <= el_val;
          r_q      <= r_q + 1'b1;
          state    <= S_SCAN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
