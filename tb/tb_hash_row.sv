// tb_hash_row: random hash functions and random locations in every column of
// the row. The expected module number and hash-table word are computed by
// summing a_i * x^i mod P term by term (not by Horner's rule, and without
// the row's low/high split). Also checks that `done` comes exactly ZETA+1
// cycles after `start` (one coefficient per node per cycle, 8n cycles in
// all), that `busy` covers that time, and that a second `start` while busy
// restarts the evaluation with the new locations.
module tb_hash_row;
  import emu_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [P_W-1:0] coef [ZETA];
  logic start, busy, done;
  logic [ADDR_W-1:0] x   [LEVELS];
  logic [NODE_W-1:0] h   [LEVELS];
  logic [LOC_W-1:0]  loc [LEVELS];

  hash_row dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned ref_a(logic [ADDR_W-1:0] xv);
    longint unsigned acc, pw;
    acc = 0;
    pw  = 1;
    for (int i = 0; i < ZETA; i++) begin
      acc = (acc + longint'(coef[i]) * pw) % longint'(P);
      pw  = (pw * xv) % longint'(P);
    end
    return int'(acc) % M;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0;
    for (int c = 0; c < LEVELS; c++) x[c] = '0;
    for (int i = 0; i < ZETA; i++) coef[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int unsigned lat;
      int unsigned a [LEVELS];
      logic [ADDR_W-1:0] xs [LEVELS];
      if (t % 20 == 0) for (int i = 0; i < ZETA; i++) coef[i] = P_W'($urandom_range(P - 1));
      for (int c = 0; c < LEVELS; c++) begin
        xs[c] = (t * LEVELS + c < M) ? ADDR_W'(t * LEVELS + c) : ADDR_W'($urandom_range(M - 1));
        x[c]  = xs[c];
        a[c]  = ref_a(xs[c]);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      if (t % 3 == 0) begin
        // restart a few cycles later with new locations
        repeat ($urandom_range(ZETA - 2)) @(negedge clk);
        for (int c = 0; c < LEVELS; c++) begin
          xs[c] = ADDR_W'($urandom_range(M - 1));
          x[c]  = xs[c];
          a[c]  = ref_a(xs[c]);
        end
        start = 1;
        @(negedge clk);
        start = 0;
      end
      for (int c = 0; c < LEVELS; c++) x[c] = ADDR_W'($urandom_range(M - 1));
      while (!done && lat < 1000) begin
        check(busy, "busy while evaluating");
        @(negedge clk);
        lat++;
      end
      check(lat == ZETA + 1, $sformatf("latency %0d expected %0d", lat, ZETA + 1));
      for (int c = 0; c < LEVELS; c++) begin
        check(h[c] == NODE_W'(a[c] % NODES),
              $sformatf("col %0d x=%0d h=%0d expected %0d", c, xs[c], h[c], a[c] % NODES));
        check(loc[c] == LOC_W'(a[c] / NODES),
              $sformatf("col %0d x=%0d loc=%0d expected %0d", c, xs[c], loc[c], a[c] / NODES));
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
