// ape: addition (merging) processing element. Merges two coordinate-sorted
// fibers into one sorted fiber, adding the values of equal coordinates.
//
// Two pointers walk fiber X (a partial fiber read from the selective queue, or
// the first operand of a final-merge task) and fiber Y (the partial fiber of
// the same output row held on chip). Each cycle the smaller coordinate is
// written out and its pointer advances; on equal coordinates the two values are
// added in double precision and both pointers advance. When Y is empty the
// merge degenerates to a copy of X, which is how a fiber with no partner is
// written straight back. One output element per cycle; an add that cancels to
// zero is kept as an explicit zero (this design's choice).
//
// Interface: start with x_len and y_len, both fibers are then read through
// combinational index ports (x_idx -> x_elem, y_idx -> y_elem). Output elements
// appear on z_valid/z_idx/z_elem with no back-pressure; done pulses one cycle
// after the last with the merged length z_len.
module ape
  import aces_pkg::*;
#(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] x_len,
  input  logic [LEN_W-1:0] y_len,
  output logic             busy,
  output logic [LEN_W-1:0] x_idx,
  input  elem_t            x_elem,
  output logic [LEN_W-1:0] y_idx,
  input  elem_t            y_elem,
  output logic             z_valid,
  output logic [LEN_W-1:0] z_idx,
  output elem_t            z_elem,
  output logic             done,
  output logic [LEN_W-1:0] z_len,
  output logic             add_event     // an element pair was summed
);
  logic [LEN_W-1:0] i_q, j_q, xl_q, yl_q, k_q;
  logic             run_q;
  logic             xa, ya;
  logic [63:0]      sum;

  fp64_add u_add (.a(x_elem.val), .b(y_elem.val), .y(sum));

  assign busy  = run_q;
  assign x_idx = i_q;
  assign y_idx = j_q;
  assign xa    = (i_q < xl_q);
  assign ya    = (j_q < yl_q);

  always_comb begin
    z_valid   = run_q && (xa || ya);
    z_idx     = k_q;
    z_elem    = x_elem;
    add_event = 1'b0;
    if (xa && ya) begin
      if (y_elem.coord < x_elem.coord) z_elem = y_elem;
      else if (y_elem.coord == x_elem.coord) begin
        z_elem.val = sum;
        add_event  = run_q;
      end
    end else if (ya) z_elem = y_elem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_q <= '0; j_q <= '0; xl_q <= '0; yl_q <= '0; k_q <= '0;
      run_q <= 1'b0; done <= 1'b0; z_len <= '0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          i_q <= '0; j_q <= '0; k_q <= '0;
          xl_q <= x_len; yl_q <= y_len;
          run_q <= 1'b1;
        end
      end else if (xa || ya) begin
        k_q <= k_q + 1'b1;
        if (xa && ya) begin
          if (x_elem.coord < y_elem.coord)       i_q <= i_q + 1'b1;
          else if (y_elem.coord < x_elem.coord)  j_q <= j_q + 1'b1;
          else begin i_q <= i_q + 1'b1; j_q <= j_q + 1'b1; end
        end else if (xa) i_q <= i_q + 1'b1;
        else             j_q <= j_q + 1'b1;
      end else begin
        run_q <= 1'b0;
        done  <= 1'b1;
        z_len <= k_q;
      end
    end
  end
endmodule
