// merge_switch: one switch of the logical network, with up to two inputs and
// two outputs and a FIFO queue of B messages on each input.
//
// Every stream entering and leaving a switch is sorted by tag. Each cycle the
// switch looks at the heads of its input queues and selects the one with the
// smaller tag (end-of-stream counts as infinity). With two inputs it selects
// nothing unless both queues hold a message, because the empty side could
// still deliver a smaller tag. Equal tags are taken together: two REQUESTs
// with one tag are combined into one, and a GHOST equal to a REQUEST is
// absorbed by it.
//   * REQUEST: goes to the outputs in `req_route` (set by the enclosing logic:
//     the routing bit of the tag in a forward switch, the stored direction
//     bits in a return switch), rewritten as `req_new` when `req_rewrite`
//     is high (memory access). It leaves only if every routed output has
//     space and `req_hold` is low; otherwise it waits (a buffer delay). When
//     it leaves, every other output with space gets a GHOST with the same tag.
//     `req_fire` and `req_src` (which inputs the REQUEST came from) tell the
//     enclosing logic to push or pop direction bits.
//   * GHOST: forwarded to every output with space, then dropped. A ghost never
//     waits. A ghost at a queue head that has a newer message behind it is
//     also dropped, since the newer message bounds the tag at least as well.
//   * end-of-stream: leaves when both inputs show end-of-stream and every
//     output has space; it goes out on every output.
// Flow control: a sender sends only when the receiving queue's registered
// `in_full` is low, so one message per cycle per link and no combinational
// path between switches. Unused inputs report full, unused outputs stay idle.
// The merging rule, the ghosts and the end-of-stream follow the design; the
// rule for discarding superseded ghosts and the exact tie handling are this
// implementation's reading of it.
module merge_switch
  import emu_pkg::*;
#(
  parameter int unsigned NUM_IN  = 2,
  parameter int unsigned NUM_OUT = 2,
  parameter int unsigned B       = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream links
  input  msg_t              in_msg   [2],
  input  logic [1:0]        in_valid,
  output logic [1:0]        in_full,
  // downstream links
  output msg_t              out_msg  [2],
  output logic [1:0]        out_valid,
  input  logic [1:0]        out_full,
  // decision interface to the enclosing logic
  output msg_t              sel_msg,
  output logic              sel_is_req,
  input  logic [1:0]        req_route,
  input  logic              req_hold,
  input  logic              req_rewrite,
  input  msg_t              req_new,
  output logic              req_fire,
  output logic [1:0]        req_src,
  // event pulses for performance counting
  output logic              ev_combine,
  output logic              ev_ghost,
  output logic              ev_blocked
);
  localparam int unsigned CW = $clog2(B + 1);
  localparam logic [1:0] OMASK = (NUM_OUT > 1) ? 2'b11 : 2'b01;

  msg_t          head  [2];
  logic [1:0]    empty;
  logic [1:0]    pop;
  logic [CW-1:0] cnt   [2];

  for (genvar i = 0; i < 2; i++) begin : g_q
    if (i < NUM_IN) begin : g_used
      logic full_i;
      sync_fifo #(.T(msg_t), .DEPTH(B)) u_q (
        .clk, .rst_n,
        .push (in_valid[i]),
        .din  (in_msg[i]),
        .pop  (pop[i]),
        .head (head[i]),
        .empty(empty[i]),
        .full (full_i),
        .count(cnt[i])
      );
      assign in_full[i] = full_i;
    end else begin : g_unused
      assign head[i]    = '0;
      assign empty[i]   = 1'b1;
      assign cnt[i]     = '0;
      assign in_full[i] = 1'b1;
    end
  end

  // ---- selection ----
  logic       have;
  logic [1:0] take;
  msg_t       sel;

  always_comb begin
    if (NUM_IN == 1) begin
      have = !empty[0];
      take = 2'b01;
      sel  = head[0];
    end else begin
      have = !empty[0] && !empty[1];
      if (sort_key(head[0]) < sort_key(head[1])) begin
        take = 2'b01;
        sel  = head[0];
      end else if (sort_key(head[1]) < sort_key(head[0])) begin
        take = 2'b10;
        sel  = head[1];
      end else begin
        take = 2'b11;
        sel  = (head[0].mtype == MSG_REQ) ? head[0] : head[1];
      end
    end
  end

  assign sel_msg    = sel;
  assign sel_is_req = have && (sel.mtype == MSG_REQ);
  assign req_src    = {take[1] && head[1].mtype == MSG_REQ,
                       take[0] && head[0].mtype == MSG_REQ};

  // ---- transmission ----
  logic [1:0] route;
  logic [1:0] take_pop;
  msg_t       ghost;

  always_comb begin
    ghost       = '0;
    ghost.mtype = MSG_GHOST;
    ghost.tag   = sel.tag;
    route       = req_route & OMASK;
    req_fire    = 1'b0;
    out_valid   = 2'b00;
    take_pop    = 2'b00;
    ev_blocked  = 1'b0;
    ev_ghost    = 1'b0;
    for (int o = 0; o < 2; o++) out_msg[o] = '0;

    if (have) begin
      unique case (sel.mtype)
        MSG_REQ: begin
          if (!req_hold && ((route & out_full) == 2'b00) && (route != 2'b00)) begin
            req_fire = 1'b1;
            take_pop = take;
            for (int o = 0; o < 2; o++) begin
              if (route[o]) begin
                out_valid[o] = 1'b1;
                out_msg[o]   = req_rewrite ? req_new : sel;
              end else if (OMASK[o] && !out_full[o]) begin
                out_valid[o] = 1'b1;
                out_msg[o]   = ghost;
                ev_ghost     = 1'b1;
              end
            end
          end else begin
            ev_blocked = 1'b1;
          end
        end
        MSG_GHOST: begin
          take_pop = take;
          for (int o = 0; o < 2; o++) begin
            if (OMASK[o] && !out_full[o]) begin
              out_valid[o] = 1'b1;
              out_msg[o]   = ghost;
            end
          end
        end
        MSG_EOS: begin
          if ((OMASK & out_full) == 2'b00) begin
            take_pop = take;
            for (int o = 0; o < 2; o++) begin
              if (OMASK[o]) begin
                out_valid[o] = 1'b1;
                out_msg[o]   = '0;
                out_msg[o].mtype = MSG_EOS;
              end
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign ev_combine = req_fire && (req_src == 2'b11);

  // A ghost with a newer message queued behind it carries no information.
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      pop[i] = take_pop[i] ||
               (!empty[i] && head[i].mtype == MSG_GHOST && cnt[i] >= CW'(2));
    end
  end

  // ---- rules of the stream protocol ----
  // An end-of-stream closes the stream of one emulated step; the next
  // step's stream starts from the smallest tag again.
  logic [NODE_W+ADDR_W:0] last_key [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < 2; o++) last_key[o] <= '0;
    end else begin
      for (int o = 0; o < 2; o++) begin
        if (out_valid[o])
          last_key[o] <= (out_msg[o].mtype == MSG_EOS) ? '0 : sort_key(out_msg[o]);
      end
    end
  end

  for (genvar o = 0; o < 2; o++) begin : g_chk
    // Output streams stay sorted and nothing is sent into a full queue.
    a_sorted: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> (sort_key(out_msg[o]) >= last_key[o]));
    a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> !out_full[o]);
  end
endmodule
