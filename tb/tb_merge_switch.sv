// tb_merge_switch: a 2-input, 2-output switch with queues of 2 messages.
// Each round both inputs receive a sorted stream of REQUESTs (random tags from
// a small range so that the two streams share tags), with GHOSTs mixed in,
// closed by end-of-stream. Senders and receivers stall at random, and
// req_hold is raised at random. The route of a REQUEST is bit 0 of its
// location; tags with bit 1 set get their data replaced through req_rewrite.
// Checked: each output carries exactly the REQUESTs of the merged streams
// routed to it, once each and in tag order (equal tags combined), with the
// expected data; req_src names the inputs that held the tag; the number of
// combine events equals the number of shared tags; every ghost's tag is no
// larger than the next message on that output; each output ends with one
// end-of-stream.
module tb_merge_switch;
  import emu_pkg::*;
  localparam int unsigned TW = NODE_W + ADDR_W;

  logic clk = 1'b0, rst_n;
  msg_t in_msg [2];
  logic [1:0] in_valid, in_full;
  msg_t out_msg [2];
  logic [1:0] out_valid, out_full;
  msg_t sel_msg;
  logic sel_is_req, req_hold, req_rewrite, req_fire;
  logic [1:0] req_route, req_src;
  msg_t req_new;
  logic ev_combine, ev_ghost, ev_blocked;

  merge_switch #(.NUM_IN(2), .NUM_OUT(2), .B(2)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DATA_W-1:0] orig_data(int t);
    return DATA_W'(t * 3 + 1);
  endfunction
  function automatic logic [DATA_W-1:0] load_data(int t);
    return DATA_W'(16'hA000 + t);
  endfunction

  // decision logic of the enclosing network, as the test defines it
  always_comb begin
    req_route  = sel_msg.tag.addr[0] ? 2'b10 : 2'b01;
    req_rewrite  = sel_msg.tag.addr[1];
    req_new      = sel_msg;
    req_new.data = load_data(int'(sel_msg.tag));
  end

  msg_t stim [2][$];
  int   exp_out [2][$];
  int   got_out [2][$];
  logic [DATA_W-1:0] got_data [2][$];
  int   eos_cnt [2];
  int   last_ghost [2];
  bit   ghost_pending [2];
  int   n_combine, exp_combine, n_blocked;
  bit   inA [int], inB [int];

  // senders
  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) begin
      in_valid[i] = 1'b0;
      in_msg[i]   = '0;
      if (rst_n && !in_full[i] && stim[i].size() > 0 && $urandom_range(3) != 0) begin
        in_valid[i] = 1'b1;
        in_msg[i]   = stim[i].pop_front();
      end
    end
    out_full = 2'($urandom_range(3)) & ($urandom_range(2) == 0 ? 2'b11 : 2'b00);
    req_hold = ($urandom_range(7) == 0);
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_combine) n_combine++;
      if (ev_blocked) n_blocked++;
      if (req_fire) begin
        int t;
        t = int'(sel_msg.tag);
        check(req_src == {1'(inB.exists(t)), 1'(inA.exists(t))},
              $sformatf("req_src %b for tag %0d", req_src, t));
      end
      for (int o = 0; o < 2; o++) begin
        if (out_valid[o]) begin
          check(!out_full[o], "no send into a full queue");
          if (ghost_pending[o] && out_msg[o].mtype != MSG_EOS)
            check(int'(out_msg[o].tag) >= last_ghost[o], "ghost is a lower bound");
          ghost_pending[o] = 1'b0;
          case (out_msg[o].mtype)
            MSG_REQ: begin
              got_out[o].push_back(int'(out_msg[o].tag));
              got_data[o].push_back(out_msg[o].data);
            end
            MSG_GHOST: begin
              ghost_pending[o] = 1'b1;
              last_ghost[o] = int'(out_msg[o].tag);
            end
            MSG_EOS: eos_cnt[o]++;
            default: check(1'b0, "bad message type");
          endcase
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total_blocked;
    total_blocked = 0;
    rst_n = 1'b0;
    in_valid = '0; out_full = '0; req_hold = 0;
    for (int i = 0; i < 2; i++) in_msg[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int round = 0; round < 40; round++) begin
      int tags [2][$];
      tags[0].delete(); tags[1].delete();
      inA.delete(); inB.delete();
      exp_combine = 0; n_combine = 0;
      for (int o = 0; o < 2; o++) begin
        exp_out[o].delete(); got_out[o].delete(); got_data[o].delete();
        eos_cnt[o] = 0; ghost_pending[o] = 0;
      end
      // random sorted, distinct tag sets; round 0 leaves input 1 silent
      for (int t = 0; t < 48; t++) begin
        if (round > 0 && $urandom_range(3) == 0) begin tags[0].push_back(t); inA[t] = 1; end
        if (round > 0 && $urandom_range(3) == 0) begin tags[1].push_back(t); inB[t] = 1; end
      end
      for (int i = 0; i < 2; i++) begin
        int prev;
        prev = 0;
        foreach (tags[i][j]) begin
          msg_t m;
          // a ghost promises that later tags are greater than its own
          if ($urandom_range(2) == 0 && tags[i][j] > prev) begin
            m = '0; m.mtype = MSG_GHOST;
            m.tag = tag_t'(TW'($urandom_range(tags[i][j] - 1, prev)));
            stim[i].push_back(m);
          end
          m = '0; m.mtype = MSG_REQ; m.tag = tag_t'(TW'(tags[i][j])); m.data = orig_data(tags[i][j]);
          stim[i].push_back(m);
          prev = tags[i][j];
        end
        begin
          msg_t m;
          m = '0;
          m.mtype = MSG_EOS;
          stim[i].push_back(m);
        end
      end
      for (int t = 0; t < 48; t++) begin
        if (inA.exists(t) || inB.exists(t)) begin
          exp_out[t % 2].push_back(t);
          if (inA.exists(t) && inB.exists(t)) exp_combine++;
        end
      end
      while (!(eos_cnt[0] == 1 && eos_cnt[1] == 1)) @(negedge clk);
      repeat (3) @(negedge clk);
      for (int o = 0; o < 2; o++) begin
        check(got_out[o].size() == exp_out[o].size(),
              $sformatf("round %0d out %0d: %0d requests, expected %0d", round, o,
                        got_out[o].size(), exp_out[o].size()));
        foreach (exp_out[o][j]) begin
          if (j < got_out[o].size()) begin
            int t;
            t = exp_out[o][j];
            check(got_out[o][j] == t, $sformatf("round %0d out %0d #%0d tag %0d expected %0d",
                                                round, o, j, got_out[o][j], t));
            check(got_data[o][j] == (((t >> 1) & 1) != 0 ? load_data(t) : orig_data(t)),
                  $sformatf("round %0d tag %0d data", round, t));
          end
        end
        check(eos_cnt[o] == 1, "one end-of-stream per output");
      end
      check(n_combine == exp_combine, $sformatf("round %0d combine %0d expected %0d",
                                                round, n_combine, exp_combine));
      total_blocked += n_blocked;
      n_blocked = 0;
    end
    check(total_blocked > 0, "requests waited for space at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
