// tb_pram_emulator: end-to-end test of the emulator at its default size
// (n = 3: 24 processors, 8 rows, 19 logical columns, queues of 2 messages).
//
// A random hash function is chosen and every PRAM location x gets a random
// word. The memories are loaded the way a host would: each hash-table word
// points to its overflow group, and each location's (x, word) pair is put in
// the next free slot of its group along the row. Then a
// series of PRAM read steps is run: every processor reading a different
// random location, all processors reading one location (a hot spot), a few
// hot locations with some processors idle, and random mixes. For every step
// each active processor must get exactly one reply holding the word of the
// location it read (so locations that share a hash address are told apart),
// idle processors must get none, and the step must take
// at least the hash time plus the 6n+1 columns of the network and no more
// than a generous bound. Over the run, request combining, ghost messages,
// requests waiting for queue space and replicated replies must each happen.
// Permutation-routing steps (full random permutations, a partial one, and the
// identity) are interleaved with read steps: every addressed processor must
// receive exactly its sender's payload, naming the sender, so the network's
// switch between the two modes is exercised in both directions.
// Half way through the random mixes one step is given too little time: it
// must raise `overrun` (and no other step may), the emulator must draw a new
// hash function, and the host reloads the memories for it; the reads that
// follow then check that the hash rows use the new function.
module tb_pram_emulator;
  import emu_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [P_W-1:0]    coef [ZETA];
  logic [P_W-1:0]    hash_coef [ZETA];
  logic              coef_load, seed_we;
  logic [31:0]       seed, step_limit, rehash_count;
  logic              overrun, rehash_busy, rehash_ready;
  logic              mem_we;
  logic [NODE_W-1:0] mem_node;
  logic [LA_W-1:0]   mem_waddr;
  logic              mem_wvalid;
  logic [ADDR_W-1:0] mem_wkey;
  logic [DATA_W-1:0] mem_wdata;
  logic              step_start;
  logic              step_perm;
  logic [NODE_W-1:0] perm_dest    [NODES];
  logic [DATA_W-1:0] perm_payload [NODES];
  logic [ADDR_W-1:0] rsp_from     [NODES];
  logic [NODES-1:0]  req_active;
  logic [ADDR_W-1:0] req_addr [NODES];
  logic [NODES-1:0]  rsp_valid;
  logic [DATA_W-1:0] rsp_data [NODES];
  logic              step_done;
  logic [31:0]       step_cycles, perf_combine, perf_ghost, perf_blocked, perf_replicate;

  pram_emulator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_comb = 0, n_ghost = 0, n_blk = 0, n_repl = 0, n_idle = 0, n_steps = 0;
  int n_perm = 0, n_switch = 0;
  int n_over = 0, n_ready = 0;
  always @(posedge clk) if (rst_n && overrun) n_over++;
  always @(posedge clk) if (rst_n && rehash_ready) n_ready++;
  bit last_perm = 0;

  logic [DATA_W-1:0] value [M];   // the PRAM's shared memory
  int max_share = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference address map: y = sum a_i x^i mod P, computed term by term.
  function automatic int unsigned ref_y(int unsigned x);
    longint unsigned acc = 0, pw = 1;
    for (int i = 0; i < ZETA; i++) begin
      acc = (acc + longint'(coef[i]) * pw) % longint'(P);
      pw  = (pw * x) % longint'(P);
    end
    return int'(acc);
  endfunction

  int got [NODES];
  logic [DATA_W-1:0] got_data [NODES];
  logic [ADDR_W-1:0] got_from [NODES];

  always @(posedge clk) begin
    for (int i = 0; i < NODES; i++) begin
      if (rst_n && rsp_valid[i]) begin
        got[i]++;
        got_data[i] = rsp_data[i];
        got_from[i] = rsp_from[i];
      end
    end
  end

  task automatic start_and_wait(string name, bit perm);
    int cyc;
    for (int i = 0; i < NODES; i++) got[i] = 0;
    if (perm != last_perm) n_switch++;
    last_perm = perm;
    @(negedge clk);
    step_start = 1'b1;
    step_perm  = perm;
    @(negedge clk);
    step_start = 1'b0;
    step_perm  = 1'b0;
    cyc = 0;
    while (!step_done && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check(step_done, {name, ": step completes"});
  endtask

  // Permutation routing: sender i -> perm_dest[i] for active i.
  task automatic perm_step(string name);
    int src [NODES];
    for (int j = 0; j < NODES; j++) src[j] = -1;
    for (int i = 0; i < NODES; i++) begin
      perm_payload[i] = DATA_W'($urandom);
      if (req_active[i]) src[perm_dest[i]] = i;
    end
    start_and_wait(name, 1'b1);
    for (int j = 0; j < NODES; j++) begin
      if (src[j] >= 0) begin
        check(got[j] == 1, $sformatf("%s: processor %0d receives one message (got %0d)", name, j, got[j]));
        check(got_data[j] == perm_payload[src[j]] && got_from[j] == ADDR_W'(src[j]),
              $sformatf("%s: processor %0d got %h from %0d, expected %h from %0d", name, j,
                        got_data[j], got_from[j], perm_payload[src[j]], src[j]));
        n_perm++;
      end else begin
        check(got[j] == 0, $sformatf("%s: processor %0d receives nothing", name, j));
      end
    end
    $display("%-12s cycles=%0d blocked=%0d", name, step_cycles, perf_blocked);
    check(perf_combine == 0 && perf_replicate == 0, {name, ": distinct tags never combine"});
    n_blk += perf_blocked;
    n_steps++;
  endtask

  task automatic shuffle_dest();
    for (int i = 0; i < NODES; i++) perm_dest[i] = NODE_W'(i);
    for (int i = NODES - 1; i > 0; i--) begin
      int j;
      logic [NODE_W-1:0] t;
      j = $urandom_range(i);
      t = perm_dest[i]; perm_dest[i] = perm_dest[j]; perm_dest[j] = t;
    end
  endtask

  task automatic run_step(string name);
    start_and_wait(name, 1'b0);
    for (int i = 0; i < NODES; i++) begin
      if (req_active[i]) begin
        check(got[i] == 1, $sformatf("%s: processor %0d gets one reply (got %0d)", name, i, got[i]));
        check(got_data[i] == value[req_addr[i]],
              $sformatf("%s: processor %0d x=%0d data %h expected %h", name, i, req_addr[i],
                        got_data[i], value[req_addr[i]]));
      end else begin
        n_idle++;
        check(got[i] == 0, $sformatf("%s: idle processor %0d gets no reply", name, i));
      end
    end
    // At least: hash (ZETA+1, when anyone reads) and one cycle per logical column.
    check(step_cycles >= ((req_active != '0) ? ZETA + 1 : 0) + COLS, $sformatf("%s: %0d cycles not below path length", name, step_cycles));
    check(step_cycles <= ZETA + 40 * LEVELS + 4 * NODES,
          $sformatf("%s: %0d cycles within bound", name, step_cycles));
    $display("%-12s cycles=%0d combine=%0d ghost=%0d blocked=%0d replicate=%0d", name, step_cycles,
             perf_combine, perf_ghost, perf_blocked, perf_replicate);
    n_comb  += perf_combine;
    n_ghost += perf_ghost;
    n_blk   += perf_blocked;
    n_repl  += perf_replicate;
    n_steps++;
  endtask

  task automatic mem_write(int node, int addr, bit v, int key, logic [DATA_W-1:0] d);
    mem_we = 1'b1; mem_node = NODE_W'(node); mem_waddr = LA_W'(addr);
    mem_wvalid = v; mem_wkey = ADDR_W'(key); mem_wdata = d;
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  // Host-side loading for the current hash function.
  task automatic load_memory();
    int used [ROWS][GROUPS];
    for (int r = 0; r < ROWS; r++) for (int g = 0; g < GROUPS; g++) used[r][g] = 0;
    for (int h = 0; h < NODES; h++) begin
      for (int l = 0; l < WORDS_PER_MODULE; l++)
        mem_write(h, l, 1'b0, 0, DATA_W'(WORDS_PER_MODULE + SLOTS * ((h / ROWS) * WORDS_PER_MODULE + l)));
      for (int w = WORDS_PER_MODULE; w < LOCAL_WORDS; w++) mem_write(h, w, 1'b0, 0, '0);
    end
    for (int x = 0; x < M; x++) begin
      int unsigned a, h, r, g, k;
      a = ref_y(x) % M;
      h = a % NODES;
      r = h % ROWS;
      g = (h / ROWS) * WORDS_PER_MODULE + a / NODES;
      k = used[r][g]++;
      if (k + 1 > max_share) max_share = k + 1;
      check(k < SLOTS * LEVELS, "overflow group has room");
      // slot k of the group: module column k / SLOTS, word k % SLOTS
      mem_write((k / SLOTS) * ROWS + r, WORDS_PER_MODULE + SLOTS * g + k % SLOTS, 1'b1, x, value[x]);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    mem_we = 1'b0; mem_node = '0; mem_waddr = '0; mem_wdata = '0; mem_wvalid = 1'b0; mem_wkey = '0;
    step_start = 1'b0; step_perm = 1'b0; req_active = '0;
    for (int i = 0; i < NODES; i++) begin
      req_addr[i] = '0; perm_dest[i] = '0; perm_payload[i] = '0;
    end
    coef_load = 1'b0; seed_we = 1'b0; seed = '0; step_limit = 32'd1000;
    for (int i = 0; i < ZETA; i++) coef[i] = P_W'($urandom_range(P - 1));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    seed = $urandom;
    @(negedge clk); coef_load = 1'b1; seed_we = 1'b1;
    @(negedge clk); coef_load = 1'b0; seed_we = 1'b0;
    for (int i = 0; i < ZETA; i++) check(hash_coef[i] == coef[i], "hash function loaded");
    for (int x = 0; x < M; x++) value[x] = DATA_W'($urandom);
    load_memory();

    // 1: a permutation of locations (every processor a different word)
    req_active = '1;
    for (int i = 0; i < NODES; i++) req_addr[i] = ADDR_W'((i * 7 + 3) % M);
    run_step("distinct");

    // 2: hot spot, everyone reads one location
    for (int i = 0; i < NODES; i++) req_addr[i] = ADDR_W'(17);
    run_step("hotspot");

    // 3: a few hot locations, some processors idle
    for (int i = 0; i < NODES; i++) begin
      req_active[i] = (i % 5) != 2;
      req_addr[i]   = ADDR_W'($urandom_range(3) * 11);
    end
    run_step("fewhot");

    // 4: nobody reads
    req_active = '0;
    run_step("idle");

    // 5..: random mixes, with a new hash function half way
    for (int s = 0; s < 12; s++) begin
      if (s == 6) step_limit = 32'(ZETA + 10);   // shorter than any step
      if (s == 7) begin
        // the previous step overran: a new hash function was drawn, and
        // every location moves
        int w;
        bit differs;
        w = 0;
        while (n_ready == 0 && w < 1000) begin @(negedge clk); w++; end
        check(n_over == 1 && n_ready == 1 && rehash_count == 1, "one overrun, one rehash");
        differs = 0;
        for (int i = 0; i < ZETA; i++) begin
          check(32'(hash_coef[i]) < P, "new coefficient below P");
          if (hash_coef[i] != coef[i]) differs = 1;
          coef[i] = hash_coef[i];
        end
        check(differs, "new hash function differs");
        step_limit = 32'd1000;
        load_memory();
      end
      for (int i = 0; i < NODES; i++) begin
        req_active[i] = ($urandom_range(9) != 0);
        req_addr[i]   = (s % 2 == 0) ? ADDR_W'($urandom_range(M - 1)) : ADDR_W'($urandom_range(7));
      end
      run_step($sformatf("random%0d", s));
    end

    // permutation routing, interleaved with reads
    for (int s = 0; s < 6; s++) begin
      req_active = '1;
      if (s == 0) for (int i = 0; i < NODES; i++) perm_dest[i] = NODE_W'(i);
      else shuffle_dest();
      if (s == 3) for (int i = 0; i < NODES; i++) req_active[i] = (i % 3 != 0);
      perm_step($sformatf("perm%0d", s));
      for (int i = 0; i < NODES; i++) req_addr[i] = ADDR_W'($urandom_range(M - 1));
      run_step($sformatf("read%0d", s));
    end

    check(n_over == 1, $sformatf("overruns (%0d): only the starved step", n_over));
    check(n_perm > 0, $sformatf("permutation messages delivered (%0d)", n_perm));
    check(n_switch >= 2, $sformatf("mode switched (%0d)", n_switch));
    check(max_share > 1, $sformatf("locations shared a hash address (up to %0d)", max_share));
    check(n_comb > 0,  $sformatf("requests were combined (%0d)", n_comb));
    check(n_ghost > 0, $sformatf("ghosts were sent (%0d)", n_ghost));
    check(n_blk > 0,   $sformatf("requests waited for queue space (%0d)", n_blk));
    check(n_repl > 0,  $sformatf("replies were replicated (%0d)", n_repl));
    check(n_idle > 0,  $sformatf("idle processors occurred (%0d)", n_idle));
    $display("perm messages=%0d mode switches=%0d overruns=%0d rehashes=%0d", n_perm, n_switch, n_over, n_ready);
    $display("steps=%0d combine=%0d ghost=%0d blocked=%0d replicate=%0d idle=%0d",
             n_steps, n_comb, n_ghost, n_blk, n_repl, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
