// cache_bank: one bank of the global cache, set-associative, holding lines of B
// fibers, managed with the PureFiber concurrency-aware replacement policy.
//
// Each line keeps, besides its tag, the two PureFiber quantities: the next
// request distance (RD) and the fiber density (FD, the number of lines of the
// fiber it belongs to). RD is set when the line is inserted or hit and then
// counts down each cycle until the line is used again. Instead of decrementing
// every counter, the bank stores the predicted time of next use T = now + RD
// and evaluates RD = T - now (floored at 0) when it has to choose; this gives
// the same values. On a fill the victim is an invalid way if there is one,
// otherwise the way with the largest RD + FD, ties going to the larger FD and
// then to the lower way.
//
// Lookup: req_valid with line address, RD and FD hints; the hit flag and way
// are combinational (hit_now), the line data follows one cycle later on
// resp_data. A hit refreshes T and FD. Fill: fill_valid writes the line into
// the chosen way at the clock edge (fill has priority over the hit update in
// the same set-way). Address split: bank = line mod NBANKS (done outside),
// set = (line / NBANKS) mod SETS, tag = the rest. RD and FD hints are supplied
// by the requester (the dispatcher knows them from the A elements waiting in
// the global buffer and from B's row lengths).
module cache_bank
  import aces_pkg::*;
#(
  parameter int unsigned SETS   = 64,
  parameter int unsigned WAYS   = 16,
  parameter int unsigned NBANKS = 16,
  parameter int unsigned RD_W   = 16,
  parameter int unsigned FD_W   = 16,
  parameter int unsigned T_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [T_W-1:0]    now,
  // lookup
  input  logic              req_valid,
  input  logic [LINE_W-1:0] req_line,
  input  logic [RD_W-1:0]   req_rd,
  input  logic [FD_W-1:0]   req_fd,
  output logic              hit_now,
  output line_t             resp_data,
  // fill from the NB buffer
  input  logic              fill_valid,
  input  logic [LINE_W-1:0] fill_line,
  input  line_t             fill_data,
  input  logic [RD_W-1:0]   fill_rd,
  input  logic [FD_W-1:0]   fill_fd,
  output logic              evict_event
);
  localparam int unsigned SW  = $clog2(SETS);
  localparam int unsigned BW  = $clog2(NBANKS);
  localparam int unsigned TGW = LINE_W - SW - BW;
  localparam int unsigned WW  = $clog2(WAYS);

  logic [WAYS-1:0]  vld [SETS];
  logic [TGW-1:0]   tag [SETS][WAYS];
  logic [T_W-1:0]   tnx [SETS][WAYS];
  logic [FD_W-1:0]  fdv [SETS][WAYS];
  line_t            data [SETS*WAYS];

  function automatic logic [SW-1:0] set_of(input logic [LINE_W-1:0] l);
    return l[BW +: SW];
  endfunction
  function automatic logic [TGW-1:0] tag_of(input logic [LINE_W-1:0] l);
    return l[LINE_W-1 -: TGW];
  endfunction

  // lookup
  logic [SW-1:0] rs;
  logic [WW-1:0] hway;
  always_comb begin
    rs      = set_of(req_line);
    hit_now = 1'b0;
    hway    = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[rs][w] && tag[rs][w] == tag_of(req_line) && !hit_now) begin
        hit_now = req_valid;
        hway    = WW'(w);
      end
  end

  // PureFiber victim choice in the fill set
  logic [SW-1:0]   fs;
  logic [WW-1:0]   vway;
  logic            vinv;
  logic [T_W:0]    best_sc, sc;
  logic [FD_W-1:0] best_fd;
  logic [T_W-1:0]  rd_now;
  always_comb begin
    fs      = set_of(fill_line);
    vway    = '0;
    vinv    = 1'b0;
    best_sc = '0;
    best_fd = '0;
    rd_now  = '0;
    sc      = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld[fs][w]) begin vinv = 1'b1; vway = WW'(w); end
    if (!vinv) begin
      for (int w = 0; w < WAYS; w++) begin
        rd_now = ($signed(tnx[fs][w] - now) > 0) ? (tnx[fs][w] - now) : '0;
        sc     = {1'b0, rd_now} + (T_W+1)'(fdv[fs][w]);
        if (w == 0 || sc > best_sc || (sc == best_sc && fdv[fs][w] > best_fd)) begin
          best_sc = sc;
          best_fd = fdv[fs][w];
          vway    = WW'(w);
        end
      end
    end
  end

  assign evict_event = fill_valid && !vinv;

  always_ff @(posedge clk) begin
    if (req_valid) resp_data <= data[{rs, hway}];
    if (fill_valid) data[{fs, vway}] <= fill_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        vld[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          tag[s][w] <= '0; tnx[s][w] <= '0; fdv[s][w] <= '0;
        end
      end
    end else begin
      if (hit_now) begin
        tnx[rs][hway] <= now + T_W'(req_rd);
        fdv[rs][hway] <= req_fd;
      end
      if (fill_valid) begin
        vld[fs][vway] <= 1'b1;
        tag[fs][vway] <= tag_of(fill_line);
        tnx[fs][vway] <= now + T_W'(fill_rd);
        fdv[fs][vway] <= fill_fd;
      end
    end
  end
endmodule
