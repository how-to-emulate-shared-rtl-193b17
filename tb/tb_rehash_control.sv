// tb_rehash_control: the step timer and the drawing of new hash functions.
// Checks that host-loaded coefficients appear on `coef`; that a step whose
// `step_done` comes in time raises no overrun; that a step that runs past
// its limit raises `overrun` (registered) limit+1 cycles after `step_start`
// (never before ZETA+1 cycles, however small the limit); and that the new
// coefficients, ready `rehash_ready` ZETA cycles later, equal a reference
// LFSR sequence reduced mod P (computed here with a bit-serial shift
// register, not the unit's Galois form), are all below P, and that
// `rehash_count` counts the rehashes.
module tb_rehash_control;
  import emu_pkg::*;
  logic clk = 1'b0, rst_n;
  logic coef_load, seed_we, step_start, step_done;
  logic [P_W-1:0] coef_in [ZETA];
  logic [P_W-1:0] coef    [ZETA];
  logic [31:0] seed, step_limit, rehash_count;
  logic overrun, rehash_busy, rehash_ready;

  rehash_control dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_over = 0;
  always @(posedge clk) if (rst_n && overrun) n_over++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x^32 + x^22 + x^2 + x + 1, Galois form shifting right: bit i of the
  // next state is bit i+1, plus bit 0 where the polynomial has a term.
  function automatic logic [31:0] ref_next(logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 32; i++) begin
      n[i] = (i == 31) ? 1'b0 : s[i + 1];
      if (i == 31 || i == 21 || i == 1 || i == 0) n[i] = n[i] ^ s[0];
    end
    return n;
  endfunction

  task automatic run_step(int unsigned limit, int unsigned done_after, bit expect_over);
    int unsigned lat, eff;
    int n_before;
    eff = (limit > ZETA + 1) ? limit : ZETA + 1;
    n_before = n_over;
    step_limit = limit;
    @(negedge clk);
    step_start = 1;
    @(negedge clk);
    step_start = 0;
    lat = 1;
    while (!overrun && lat < done_after && lat < 5000) begin @(negedge clk); lat++; end
    if (expect_over) begin
      check(overrun, "overrun raised");
      check(lat == eff + 1, $sformatf("overrun after %0d cycles, expected %0d", lat, eff + 1));
    end else begin
      step_done = 1;
      @(negedge clk);
      step_done = 0;
      repeat (eff + 5) @(negedge clk);
      check(n_over == n_before, "no overrun for a step in time");
    end
  endtask

  initial begin
    logic [31:0] s;
    int unsigned cnt;
    rst_n = 0; coef_load = 0; seed_we = 0; step_start = 0; step_done = 0; seed = 0; step_limit = 100;
    for (int i = 0; i < ZETA; i++) coef_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cnt = 0;
    for (int t = 0; t < 30; t++) begin
      // host load
      for (int i = 0; i < ZETA; i++) coef_in[i] = P_W'($urandom_range(P - 1));
      @(negedge clk); coef_load = 1; @(negedge clk); coef_load = 0;
      for (int i = 0; i < ZETA; i++) check(coef[i] == coef_in[i], "host coefficient loaded");
      // a step that finishes in time
      run_step($urandom_range(30, 80), $urandom_range(1, 25), 1'b0);
      for (int i = 0; i < ZETA; i++) check(coef[i] == coef_in[i], "coefficients kept");
      // a step that overruns, sometimes with a fresh seed
      if (t % 2 == 0) begin
        seed = (t == 4) ? 32'h0 : $urandom;
        @(negedge clk); seed_we = 1; @(negedge clk); seed_we = 0;
        s = (seed == 0) ? 32'h1 : seed;
      end else begin
        // continue from where the last rehash left the register
      end
      run_step((t % 3 == 0) ? $urandom_range(1, ZETA) : $urandom_range(ZETA + 2, 60), 100000, 1'b1);
      begin
        int unsigned w;
        w = 0;
        while (!rehash_ready && w < 1000) begin @(negedge clk); w++; end
        check(w == ZETA, $sformatf("rehash ready %0d cycles after overrun, expected %0d", w, ZETA));
      end
      cnt++;
      check(rehash_count == cnt, "rehash counted");
      for (int i = 0; i < ZETA; i++) begin
        check(coef[i] == P_W'(s % P), $sformatf("new coef %0d = %0d expected %0d", i, coef[i], s % P));
        check(32'(coef[i]) < P, "new coefficient below P");
        s = ref_next(s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
