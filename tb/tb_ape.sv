// tb_ape: merges random pairs of sorted fibers (including empty ones) and
// compares the output with a reference merge computed here: sorted union of
// coordinates, values summed where they meet. Also checks one output per
// cycle: done comes (merged length + 2) cycles after start.
module tb_ape;
  import aces_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, z_valid, done, add_event;
  logic [15:0] x_len = 0, y_len = 0, x_idx, y_idx, z_idx, z_len;
  elem_t x_elem, y_elem, z_elem;
  ape dut (.*);

  elem_t xs [64], ys [64], zs [$];
  assign x_elem = xs[x_idx[5:0]];
  assign y_elem = ys[y_idx[5:0]];

  function automatic void mkfiber(ref elem_t f [64], output int n);
    int c;
    n = int'($urandom % 20);
    if ($urandom % 5 == 0) n = 0;
    c = 0;
    for (int i = 0; i < n; i++) begin
      c += 1 + int'($urandom % 3);
      f[i] = '{coord: 32'(c), val: $realtobits(real'(1 + int'($urandom % 9)))};
    end
  endfunction

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  elem_t got [64];
  always @(posedge clk) if (z_valid) got[z_idx[5:0]] <= z_elem;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int nx, ny, i, j, t0, t1;
      mkfiber(xs, nx);
      mkfiber(ys, ny);
      zs.delete();
      i = 0; j = 0;
      while (i < nx || j < ny) begin
        if (j >= ny || (i < nx && xs[i].coord < ys[j].coord)) zs.push_back(xs[i++]);
        else if (i >= nx || ys[j].coord < xs[i].coord) zs.push_back(ys[j++]);
        else begin
          zs.push_back('{coord: xs[i].coord,
                         val: $realtobits($bitstoreal(xs[i].val) + $bitstoreal(ys[j].val))});
          i++; j++;
        end
      end
      @(negedge clk);
      start = 1; x_len = 16'(nx); y_len = 16'(ny);
      @(posedge clk); t0 = $time; #1 start = 0;
      while (!done) @(posedge clk);
      t1 = $time;
      checks++;
      if (int'(z_len) != zs.size()) begin failures++; $display("len %0d vs %0d", z_len, zs.size()); end
      for (int k = 0; k < zs.size(); k++) begin
        checks++;
        if (got[k] != zs[k]) begin failures++; $display("t%0d elem %0d wrong", t, k); end
      end
      checks++;
      if ((t1 - t0) / 10 != zs.size() + 2) begin
        failures++; $display("t%0d took %0d cycles for %0d", t, (t1 - t0) / 10, zs.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
