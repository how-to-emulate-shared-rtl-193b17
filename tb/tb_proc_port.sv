// tb_proc_port: one processor's network interface on its own.
// Active steps: after `start` the port must offer, ZETA+2 cycles later when
// the network has space, a REQUEST tagged <h(x), x> with the word address in
// its data field (both computed here by summing the hash polynomial term by
// term), and then an end-of-stream; while `net_full` is high nothing may be
// offered. The test then returns a ghost, the reply and an end-of-stream:
// `rsp_valid` must pulse once with the reply's word and `done` must rise.
// The row hash pipeline is modelled here: it takes `hash_x` at `start`,
// answers with `hash_done` ZETA+1 cycles later, and shows random values on
// `hash_h`/`hash_loc` in every other cycle, so the port must take them in
// the `hash_done` cycle.
// Idle steps: only an end-of-stream is sent and no reply is reported.
// Permutation steps: the port must send its payload and destination under
// the tag of its own number MY_ID, and report an incoming message's payload
// and sender.
module tb_proc_port;
  import emu_pkg::*;
  logic clk = 1'b0, rst_n;
  logic [P_W-1:0] coef [ZETA];
  logic start, active, busy, rsp_valid, done;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] rsp_data, payload;
  logic [ADDR_W-1:0] rsp_from;
  logic [NODE_W-1:0] dest;
  logic perm;
  msg_t net_msg, ret_msg;
  logic net_valid, net_full, ret_valid;
  logic [ADDR_W-1:0] hash_x;
  logic hash_done;
  logic [NODE_W-1:0] hash_h;
  logic [LOC_W-1:0] hash_loc;

  localparam int unsigned MY_ID = 5;
  proc_port #(.MY_ID(MY_ID)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // model of the row hash pipeline (a new start restarts it)
  int unsigned hm_cnt = 0, hm_a = 0;
  always @(posedge clk) begin
    hash_done <= 1'b0;
    hash_h    <= NODE_W'($urandom);
    hash_loc  <= LOC_W'($urandom);
    if (start) begin
      hm_a   <= ref_a(hash_x);
      hm_cnt <= ZETA;
    end else if (hm_cnt != 0) begin
      hm_cnt <= hm_cnt - 1;
      if (hm_cnt == 1) begin
        hash_done <= 1'b1;
        hash_h    <= NODE_W'(hm_a % NODES);
        hash_loc  <= LOC_W'(hm_a / NODES);
      end
    end
  end

  int n_rsp;
  always @(posedge clk) if (rst_n && rsp_valid) n_rsp++;
  always @(posedge clk) if (rst_n && net_valid) check(!net_full, "nothing offered while full");

  task automatic send_ret(msg_type_e t, tag_t tag, logic [DATA_W-1:0] d);
    @(negedge clk);
    ret_valid = 1'b1;
    ret_msg = '0; ret_msg.mtype = t; ret_msg.tag = tag; ret_msg.data = d;
    ret_msg.dest = NODE_W'(MY_ID);
    ret_msg.found = (t == MSG_REQ);
    @(negedge clk);
    ret_valid = 1'b0;
  endtask

  task automatic step(bit act, logic [ADDR_W-1:0] x_in, bit stall, bit pm);
    logic [ADDR_W-1:0] x;
    logic [NODE_W-1:0] d_exp;
    logic [DATA_W-1:0] pay;
    longint unsigned acc, pw;
    int unsigned a, cyc;
    tag_t exp_tag;
    logic [DATA_W-1:0] word;
    x = pm ? ADDR_W'(MY_ID) : x_in;
    d_exp = NODE_W'($urandom_range(NODES - 1));
    pay = DATA_W'($urandom);
    acc = 0; pw = 1;
    for (int i = 0; i < ZETA; i++) begin
      acc = (acc + longint'(coef[i]) * pw) % longint'(P);
      pw  = (pw * x) % longint'(P);
    end
    a = int'(acc) % M;
    exp_tag.node = NODE_W'(a % NODES);
    exp_tag.addr = x;
    n_rsp = 0;
    @(negedge clk);
    start = 1; active = act; addr = x_in; perm = pm; dest = d_exp; payload = pay;
    @(negedge clk);
    start = 0; addr = '0; perm = 0; dest = '0; payload = '0;
    cyc = 1;
    if (act) begin
      forever begin
        net_full = stall && (cyc >= ZETA + 2) && (cyc < ZETA + 6);
        #1;
        if (net_valid || cyc >= 200) break;
        @(negedge clk);
        cyc++;
      end
      check(cyc == (stall ? ZETA + 6 : ZETA + 2), $sformatf("request offered after %0d cycles", cyc));
      check(net_msg.mtype == MSG_REQ, "request type");
      check(net_msg.tag == exp_tag, $sformatf("tag %h expected %h", net_msg.tag, exp_tag));
      if (pm) begin
        check(net_msg.data == pay, "payload in data field");
        check(net_msg.dest == d_exp, "destination");
      end else begin
        check(net_msg.data == DATA_W'(a / NODES), "local address in data field");
      end
      @(negedge clk);
      #1;
    end else begin
      #1;
    end
    check(net_valid && net_msg.mtype == MSG_EOS, "end-of-stream follows");
    net_full = 0;
    @(negedge clk);
    check(!net_valid, "nothing after end-of-stream");
    word = DATA_W'($urandom);
    send_ret(MSG_GHOST, tag_t'(0), '0);
    if (pm) begin
      exp_tag.addr = ADDR_W'($urandom_range(NODES - 1));   // some sender
      exp_tag.node = NODE_W'($urandom_range(NODES - 1));
    end
    if (act) send_ret(MSG_REQ, exp_tag, word);
    check(!done, "not done before end-of-stream returns");
    send_ret(MSG_EOS, tag_t'(0), '0);
    check(done, "done after end-of-stream");
    check(n_rsp == (act ? 1 : 0), $sformatf("%0d replies reported", n_rsp));
    if (act) check(rsp_data == word, "reply word");
    if (act && pm) check(rsp_from == exp_tag.addr, "sender reported");
  endtask

  initial begin
    rst_n = 0; start = 0; active = 0; addr = 0; perm = 0; dest = 0; payload = 0; net_full = 0; ret_valid = 0; ret_msg = '0;
    for (int i = 0; i < ZETA; i++) coef[i] = P_W'($urandom_range(P - 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      step(s % 4 != 3, ADDR_W'($urandom_range(M - 1)), s % 3 == 1, s % 5 >= 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
