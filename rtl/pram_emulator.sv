// pram_emulator: emulation of one read step of an N-processor CRCW PRAM on
// an n-level wrapped butterfly with N = n*2^n nodes (top level).
//
// Each PRAM location x lives in memory module h(x) = <c',r'>, chosen by a
// random polynomial hash, evaluated by the nodes of each butterfly row
// together (hash_row, ZETA+1 cycles). A read travels as a REQUEST through a logical
// network of 6n+1 columns of 2^n switches and back:
//   columns 0..n-1    phase 1: along the source row to butterfly column 0;
//                     each switch merges the row stream with its own
//                     processor's request;
//   columns n..2n-1   phase 2: butterfly stages, straight or cross on tag bit
//                     j of the destination row r';
//   columns 2n..3n-1  phase 3: along row r'; the switch of column 2n+c'
//                     reads the hash-table word of node <c',r'>, a pointer
//                     to the location's overflow group;
//   column  3n        turnaround;
//   columns 3n+1..6n  phases 4-6: the mirror image of phases 3, 2, 1. The
//                     return switch of column 6n-k undoes forward switch k.
//                     In phase 4 the reply passes every node of row r' and
//                     each searches its SLOTS-word part of the group for the
//                     (x, data) pair; the node that holds it writes the data
//                     into the reply.
// All streams are sorted by tag, so requests for the same location meet and
// combine at the first switch their paths share. Each forward switch with two
// inputs records two direction bits per REQUEST it sends; since replies come
// back in the same order, its return twin pops these bits to send each reply
// to one or both of its outputs, replicating the word for every combined
// requester. GHOST messages let a switch learn a lower bound on a quiet
// input, and end-of-stream (one per processor, after its request) closes the
// step. In the array indices below, F(k,r) is the forward switch of column k,
// T(r) the turnaround and R(k,r) the return switch of column 6n-k; the
// butterfly node <c,r> holds F/R(c), F/R(n+c), F/R(2n+c) and, for c = 0, T.
//
// Interface: load coefficients (`coef` with `coef_load`) and memory words
// (`mem_*`, see memory_module for the layout: hash-table pointers and
// overflow slots) first,
// then pulse `step_start` with each processor's `req_active`/`req_addr`.
// Each active processor gets one `rsp_valid` pulse with its word; `step_done`
// rises when every processor has its end-of-stream back, and `step_cycles`
// then holds the step's length. The perf_* counters count combining, ghosts
// sent with a request, cycles a request waited for queue space, and replies
// replicated, since the last `step_start`.
// Time guard (rehash_control): a step still running after `step_limit`
// cycles raises `overrun`; a new random hash function is then drawn into
// `hash_coef` (`rehash_busy`, then `rehash_ready`), and the host must reload
// the memories for it (from `hash_coef`) before the next step.
// The network, phases, tags, ghosts, end-of-stream and direction-bit queues
// follow the design. Queue size B, direction-queue depth, the handshakes and
// the counters are this implementation's choices.
//
// Permutation routing: with `step_perm` high at `step_start`, processor i
// sends `perm_payload[i]` to processor `perm_dest[i]` (a permutation, or a
// partial one with idle senders). The message is tagged <h(i), i> and takes
// the same first three phases as a read of location i; no memory is read and
// no direction bits are kept. In the last three phases the return switches
// route on the destination instead: phase-4/5 switches fix one row bit each,
// phase-6 switches hand the message to the processor of the destination
// column. The receiver sees the payload on `rsp_data` and the sender on
// `rsp_from`.
module pram_emulator
  import emu_pkg::*;
#(
  parameter int unsigned B         = 2,      // messages per switch input queue
  parameter int unsigned DIR_DEPTH = NODES   // direction-bit entries per switch
) (
  input  logic              clk,
  input  logic              rst_n,
  // hash function and memory loading
  input  logic              coef_load,
  input  logic [P_W-1:0]    coef      [ZETA],
  input  logic              seed_we,
  input  logic [31:0]       seed,
  output logic [P_W-1:0]    hash_coef [ZETA],
  input  logic              mem_we,
  input  logic [NODE_W-1:0] mem_node,
  input  logic [LA_W-1:0]   mem_waddr,
  input  logic              mem_wvalid,
  input  logic [ADDR_W-1:0] mem_wkey,
  input  logic [DATA_W-1:0] mem_wdata,
  // one PRAM step, processors indexed by node number c*2^n + r
  input  logic              step_start,
  input  logic              step_perm,
  input  logic [NODES-1:0]  req_active,
  input  logic [ADDR_W-1:0] req_addr  [NODES],
  input  logic [NODE_W-1:0] perm_dest    [NODES],
  input  logic [DATA_W-1:0] perm_payload [NODES],
  output logic [NODES-1:0]  rsp_valid,
  output logic [DATA_W-1:0] rsp_data  [NODES],
  output logic [ADDR_W-1:0] rsp_from  [NODES],
  output logic              step_done,
  output logic [31:0]       step_cycles,
  // step time guard and rehashing
  input  logic [31:0]       step_limit,
  output logic              overrun,
  output logic              rehash_busy,
  output logic              rehash_ready,
  output logic [31:0]       rehash_count,
  output logic [31:0]       perf_combine,
  output logic [31:0]       perf_ghost,
  output logic [31:0]       perf_blocked,
  output logic [31:0]       perf_replicate
);
  localparam int unsigned N  = LEVELS;
  localparam int unsigned FC = 3 * LEVELS;   // forward (and return) columns

  function automatic int unsigned fwd_in(int unsigned k);
    return ((k >= 1 && k <= N - 1) || (k >= N + 1 && k <= 2 * N)) ? 2 : 1;
  endfunction
  function automatic int unsigned fwd_out(int unsigned k);
    return (k >= N && k <= 2 * N - 1) ? 2 : 1;
  endfunction

  // permutation routing during the current step
  logic perm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          perm_q <= 1'b0;
    else if (step_start) perm_q <= step_perm;
  end

  // ---- links ----
  msg_t       f_omsg [FC][ROWS][2];
  logic [1:0] f_oval [FC][ROWS];
  logic [1:0] f_ifull[FC][ROWS];
  msg_t       r_omsg [FC][ROWS][2];
  logic [1:0] r_oval [FC][ROWS];
  logic [1:0] r_ifull[FC][ROWS];
  msg_t       t_omsg [ROWS][2];
  logic [1:0] t_oval [ROWS];
  logic [1:0] t_ifull[ROWS];

  msg_t       p_msg  [NODES];   // processor -> network
  logic       p_val  [NODES];
  logic       p_full [NODES];
  msg_t       p_rmsg [NODES];   // network -> processor
  logic       p_rval [NODES];
  logic       p_done [NODES];

  logic [LOC_W-1:0]  ht_addr [NODES];   // phase-3 hash-table read
  logic [DATA_W-1:0] ht_ptr  [NODES];
  logic [DATA_W-1:0] ov_ptr  [NODES];   // phase-4 overflow search
  logic [ADDR_W-1:0] ov_key  [NODES];
  logic              ov_hit  [NODES];
  logic [DATA_W-1:0] ov_data [NODES];

  // event pulses per switch
  logic f_comb [FC][ROWS], f_ghost [FC][ROWS], f_blk [FC][ROWS];
  logic r_comb [FC][ROWS], r_ghost [FC][ROWS], r_blk [FC][ROWS], r_repl [FC][ROWS];
  logic t_comb [ROWS],     t_ghost [ROWS],     t_blk [ROWS];

  // ---- hash function: host load, step timer, rehashing ----
  rehash_control u_rehash (
    .clk, .rst_n,
    .coef_load,
    .coef_in     (coef),
    .seed_we,
    .seed,
    .coef        (hash_coef),
    .step_start,
    .step_done,
    .step_limit,
    .overrun,
    .rehash_busy,
    .rehash_ready,
    .rehash_count
  );

  // ---- hash pipelines, one per butterfly row ----
  logic [ADDR_W-1:0] hx    [NODES];
  logic              hdone [ROWS];
  logic [NODE_W-1:0] hh    [NODES];
  logic [LOC_W-1:0]  hloc  [NODES];

  for (genvar r = 0; r < ROWS; r++) begin : g_hash
    logic [ADDR_W-1:0] row_x   [N];
    logic [NODE_W-1:0] row_h   [N];
    logic [LOC_W-1:0]  row_loc [N];
    for (genvar c = 0; c < N; c++) begin : g_col
      assign row_x[c]          = hx[c * ROWS + r];
      assign hh[c * ROWS + r]   = row_h[c];
      assign hloc[c * ROWS + r] = row_loc[c];
    end
    hash_row u_hash (
      .clk, .rst_n,
      .coef (hash_coef),
      .start(step_start),
      .x    (row_x),
      .busy (),
      .done (hdone[r]),
      .h    (row_h),
      .loc  (row_loc)
    );
  end

  // ---- processors and memory modules, one per node <c,r> ----
  for (genvar c = 0; c < N; c++) begin : g_pc
    for (genvar r = 0; r < ROWS; r++) begin : g_pr
      localparam int unsigned ID = c * ROWS + r;

      proc_port #(.MY_ID(ID)) u_port (
        .clk, .rst_n,
        .start    (step_start),
        .active   (req_active[ID]),
        .addr     (req_addr[ID]),
        .perm     (step_perm),
        .dest     (perm_dest[ID]),
        .payload  (perm_payload[ID]),
        .busy     (),
        .rsp_valid(rsp_valid[ID]),
        .rsp_data (rsp_data[ID]),
        .rsp_from (rsp_from[ID]),
        .done     (p_done[ID]),
        .hash_x   (hx[ID]),
        .hash_done(hdone[r]),
        .hash_h   (hh[ID]),
        .hash_loc (hloc[ID]),
        .net_msg  (p_msg[ID]),
        .net_valid(p_val[ID]),
        .net_full (p_full[ID]),
        .ret_msg  (p_rmsg[ID]),
        .ret_valid(p_rval[ID])
      );

      memory_module u_mem (
        .clk, .rst_n,
        .we     (mem_we && mem_node == NODE_W'(ID)),
        .waddr  (mem_waddr),
        .wvalid (mem_wvalid),
        .wkey   (mem_wkey),
        .wdata  (mem_wdata),
        .ht_addr(ht_addr[ID]),
        .ht_ptr (ht_ptr[ID]),
        .ov_ptr (ov_ptr[ID]),
        .ov_key (ov_key[ID]),
        .ov_hit (ov_hit[ID]),
        .ov_data(ov_data[ID])
      );

      // Processor <c,r> enters at F(c,r) and leaves at R(c,r): port 0 for
      // column 0, else port 1.
      localparam int unsigned PP = (c == 0) ? 0 : 1;
      assign p_full[ID] = f_ifull[c][r][PP];
      assign p_rmsg[ID] = r_omsg[c][r][PP];
      assign p_rval[ID] = r_oval[c][r][PP];
    end
  end

  // ---- forward switches F(k,r), columns 0 .. 3n-1 ----
  for (genvar k = 0; k < FC; k++) begin : g_fk
    for (genvar r = 0; r < ROWS; r++) begin : g_fr
      localparam int unsigned NI = fwd_in(k);
      localparam int unsigned NO = fwd_out(k);

      msg_t              in_msg [2];
      logic [1:0]        in_val;
      logic [1:0]        out_full;
      msg_t              sel;
      logic              sel_req, fire;
      logic [1:0]        src, route;
      logic              hold;
      logic              rewrite;
      msg_t              new_msg;

      // inputs
      if (k == 0) begin : g_in_p
        assign in_msg[0] = p_msg[r];
        assign in_val[0] = p_val[r];
      end else begin : g_in_s
        assign in_msg[0] = f_omsg[k-1][r][0];
        assign in_val[0] = f_oval[k-1][r][0];
      end
      if (k >= 1 && k <= N - 1) begin : g_in1_p
        assign in_msg[1] = p_msg[k * ROWS + r];
        assign in_val[1] = p_val[k * ROWS + r];
      end else if (k >= N + 1 && k <= 2 * N) begin : g_in1_x
        localparam int unsigned RX = r ^ (1 << (k - 1 - N));
        assign in_msg[1] = f_omsg[k-1][RX][1];
        assign in_val[1] = f_oval[k-1][RX][1];
      end else begin : g_in1_n
        assign in_msg[1] = '0;
        assign in_val[1] = 1'b0;
      end

      // downstream space
      if (k == FC - 1) begin : g_of_t
        assign out_full[0] = t_ifull[r][0];
      end else begin : g_of_s
        assign out_full[0] = f_ifull[k+1][r][0];
      end
      if (NO == 2) begin : g_of_x
        assign out_full[1] = f_ifull[k+1][r ^ (1 << (k - N))][1];
      end else begin : g_of_n
        assign out_full[1] = 1'b1;
      end

      // routing: phase 2 uses bit (k-n) of the destination row
      if (NO == 2) begin : g_rt2
        assign route = (node_row(sel.tag.node)[k-N] != 1'(r >> (k - N)))
                     ? 2'b10 : 2'b01;
      end else begin : g_rt1
        assign route = 2'b01;
      end

      // phase 3: the hash table of node <k-2n, r> gives the overflow pointer
      if (k >= 2 * N) begin : g_mem
        localparam int unsigned MID = (k - 2 * N) * ROWS + r;
        assign ht_addr[MID] = LOC_W'(sel.data);
        assign rewrite = sel_req && !perm_q && (sel.tag.node == NODE_W'(MID));
        always_comb begin
          new_msg      = sel;
          new_msg.data = ht_ptr[MID];
        end
      end else begin : g_nomem
        assign rewrite = 1'b0;
        assign new_msg = sel;
      end

      // direction bits for the return twin
      if (NI == 2) begin : g_dir
        logic [1:0] dhead;
        logic       dempty, dfull;
        sync_fifo #(.T(logic [1:0]), .DEPTH(DIR_DEPTH)) u_dir (
          .clk, .rst_n,
          .push (fire && !perm_q),
          .din  (src),
          .pop  (g_rk[k].g_rr[r].fire && !perm_q),
          .head (dhead),
          .empty(dempty),
          .full (dfull),
          .count()
        );
        assign hold = dfull;
      end else begin : g_nodir
        assign hold = 1'b0;
      end

      merge_switch #(.NUM_IN(NI), .NUM_OUT(NO), .B(B)) u_sw (
        .clk, .rst_n,
        .in_msg    (in_msg),
        .in_valid  (in_val),
        .in_full   (f_ifull[k][r]),
        .out_msg   (f_omsg[k][r]),
        .out_valid (f_oval[k][r]),
        .out_full  (out_full),
        .sel_msg   (sel),
        .sel_is_req(sel_req),
        .req_route (route),
        .req_hold  (hold),
        .req_rewrite(rewrite),
        .req_new    (new_msg),
        .req_fire  (fire),
        .req_src   (src),
        .ev_combine(f_comb[k][r]),
        .ev_ghost  (f_ghost[k][r]),
        .ev_blocked(f_blk[k][r])
      );
    end
  end

  // ---- turnaround switches T(r), column 3n ----
  for (genvar r = 0; r < ROWS; r++) begin : g_t
    msg_t t_in [2];
    assign t_in[0] = f_omsg[FC-1][r][0];
    assign t_in[1] = '0;

    merge_switch #(.NUM_IN(1), .NUM_OUT(1), .B(B)) u_sw (
      .clk, .rst_n,
      .in_msg    (t_in),
      .in_valid  ({1'b0, f_oval[FC-1][r][0]}),
      .in_full   (t_ifull[r]),
      .out_msg   (t_omsg[r]),
      .out_valid (t_oval[r]),
      .out_full  ({1'b1, r_ifull[FC-1][r][0]}),
      .sel_msg   (),
      .sel_is_req(),
      .req_route (2'b01),
      .req_hold  (1'b0),
      .req_rewrite(1'b0),
      .req_new    ('0),
      .req_fire  (),
      .req_src   (),
      .ev_combine(t_comb[r]),
      .ev_ghost  (t_ghost[r]),
      .ev_blocked(t_blk[r])
    );
  end

  // ---- return switches R(k,r), column 6n-k ----
  for (genvar k = 0; k < FC; k++) begin : g_rk
    for (genvar r = 0; r < ROWS; r++) begin : g_rr
      localparam int unsigned NI = fwd_out(k);
      localparam int unsigned NO = fwd_in(k);

      msg_t       in_msg [2];
      logic [1:0] in_val;
      logic [1:0] out_full;
      logic [1:0] route;
      logic       hold;
      logic       is_req;
      logic       fire;
      msg_t       sel;
      logic [1:0] perm_route;
      logic       rewrite;
      msg_t       new_msg;

      // phase 4: search this node's part of the overflow group
      if (k >= 2 * N) begin : g_ovf
        localparam int unsigned MID = (k - 2 * N) * ROWS + r;
        assign ov_ptr[MID] = sel.data;
        assign ov_key[MID] = sel.tag.addr;
        assign rewrite = !perm_q && sel.mtype == MSG_REQ && !sel.found && ov_hit[MID];
        always_comb begin
          new_msg       = sel;
          new_msg.found = 1'b1;
          new_msg.data  = ov_data[MID];
        end
      end else begin : g_noovf
        assign rewrite = 1'b0;
        assign new_msg = sel;
      end

      // destination routing for permutations
      if (k >= 1 && k <= N - 1) begin : g_pr6
        assign perm_route = (sel.dest == NODE_W'(k * ROWS + r)) ? 2'b10 : 2'b01;
      end else if (k >= N + 1 && k <= 2 * N) begin : g_pr5
        assign perm_route = (node_row(sel.dest)[k-1-N] != 1'(r >> (k - 1 - N)))
                          ? 2'b10 : 2'b01;
      end else begin : g_pr1
        assign perm_route = 2'b01;
      end

      if (k == FC - 1) begin : g_in_t
        assign in_msg[0] = t_omsg[r][0];
        assign in_val[0] = t_oval[r][0];
      end else begin : g_in_s
        assign in_msg[0] = r_omsg[k+1][r][0];
        assign in_val[0] = r_oval[k+1][r][0];
      end
      if (NI == 2) begin : g_in1_x
        localparam int unsigned RX = r ^ (1 << (k - N));
        assign in_msg[1] = r_omsg[k+1][RX][1];
        assign in_val[1] = r_oval[k+1][RX][1];
      end else begin : g_in1_n
        assign in_msg[1] = '0;
        assign in_val[1] = 1'b0;
      end

      // downstream: processors always accept
      if (k == 0) begin : g_of_p
        assign out_full[0] = 1'b0;
      end else begin : g_of_s
        assign out_full[0] = r_ifull[k-1][r][0];
      end
      if (k >= 1 && k <= N - 1) begin : g_of1_p
        assign out_full[1] = 1'b0;
      end else if (k >= N + 1 && k <= 2 * N) begin : g_of1_x
        assign out_full[1] = r_ifull[k-1][r ^ (1 << (k - 1 - N))][1];
      end else begin : g_of1_n
        assign out_full[1] = 1'b1;
      end

      if (NO == 2) begin : g_dir
        assign route = perm_q ? perm_route : g_fk[k].g_fr[r].g_dir.dhead;
        assign hold  = !perm_q && g_fk[k].g_fr[r].g_dir.dempty;
        // Replies reach this switch in the order its twin sent the
        // requests, so the direction bits are always there, and name at
        // least one output.
        a_dir_present: assert property (@(posedge clk) disable iff (!rst_n)
          (is_req && !perm_q) |-> !g_fk[k].g_fr[r].g_dir.dempty);
        a_dir_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
          (fire && !perm_q) |-> (g_fk[k].g_fr[r].g_dir.dhead != 2'b00));
      end else begin : g_nodir
        assign route = 2'b01;
        assign hold  = 1'b0;
      end
      assign r_repl[k][r] = fire && (route == 2'b11);

      merge_switch #(.NUM_IN(NI), .NUM_OUT(NO), .B(B)) u_sw (
        .clk, .rst_n,
        .in_msg    (in_msg),
        .in_valid  (in_val),
        .in_full   (r_ifull[k][r]),
        .out_msg   (r_omsg[k][r]),
        .out_valid (r_oval[k][r]),
        .out_full  (out_full),
        .sel_msg   (sel),
        .sel_is_req(is_req),
        .req_route (route),
        .req_hold  (hold),
        .req_rewrite(rewrite),
        .req_new    (new_msg),
        .req_fire  (fire),
        .req_src   (),
        .ev_combine(r_comb[k][r]),
        .ev_ghost  (r_ghost[k][r]),
        .ev_blocked(r_blk[k][r])
      );
    end
  end

  // ---- step completion and counters ----
  logic running;
  logic all_done;
  logic [31:0] n_comb, n_ghost, n_blk, n_repl;

  always_comb begin
    all_done = 1'b1;
    for (int i = 0; i < NODES; i++) all_done &= p_done[i];
    n_comb = '0; n_ghost = '0; n_blk = '0; n_repl = '0;
    for (int k = 0; k < FC; k++) begin
      for (int r = 0; r < ROWS; r++) begin
        n_comb  += 32'(f_comb[k][r])  + 32'(r_comb[k][r]);
        n_ghost += 32'(f_ghost[k][r]) + 32'(r_ghost[k][r]);
        n_blk   += 32'(f_blk[k][r])   + 32'(r_blk[k][r]);
        n_repl  += 32'(r_repl[k][r]);
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      n_comb  += 32'(t_comb[r]);
      n_ghost += 32'(t_ghost[r]);
      n_blk   += 32'(t_blk[r]);
    end
  end

  assign step_done = all_done && !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running        <= 1'b0;
      step_cycles    <= '0;
      perf_combine   <= '0;
      perf_ghost     <= '0;
      perf_blocked   <= '0;
      perf_replicate <= '0;
    end else if (step_start) begin
      running        <= 1'b1;
      step_cycles    <= '0;
      perf_combine   <= '0;
      perf_ghost     <= '0;
      perf_blocked   <= '0;
      perf_replicate <= '0;
    end else if (running) begin
      step_cycles    <= step_cycles + 1;
      perf_combine   <= perf_combine + n_comb;
      perf_ghost     <= perf_ghost + n_ghost;
      perf_blocked   <= perf_blocked + n_blk;
      perf_replicate <= perf_replicate + n_repl;
      if (all_done) running <= 1'b0;
    end
  end
endmodule
