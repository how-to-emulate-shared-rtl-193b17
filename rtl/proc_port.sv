// proc_port: network interface of one processor <c,r>.
//
// For one emulated PRAM step the processor raises `start` with the location
// `addr` it reads and `active` (low if it makes no access this step). The
// location goes out on `hash_x` to the row's hash pipeline (hash_row, which
// starts on the same `start`); when `hash_done` comes (ZETA+1 cycles later)
// the port takes `hash_h` and `hash_loc` and injects a REQUEST
// with tag <h(x), x> into its phase-1 switch, and in the next cycle (space
// permitting) an end-of-stream message. The REQUEST's data field carries the
// word address inside the destination module, which the memory uses when
// the request passes it. An idle processor sends only the end-of-stream.
// The reply comes back through the return half of the network as a REQUEST
// message with the word in its data field: `rsp_valid` pulses and `rsp_data`
// holds the word (0 for a location that was never loaded). When the end-of-stream returns, `done` rises and stays high
// until the next `start`. Ghosts arriving here are ignored.
// Permutation routing (`perm` high at `start`): the port sends `payload` to
// processor `dest`, tagged with its own location <h(i), i> where i = MY_ID;
// whatever message reaches this port is reported on `rsp_valid`/`rsp_data`
// with its sender in `rsp_from`.
// The `found` bit of the messages this port sends is always 0: only a
// memory module sets it, on the way back.
// REQUEST followed by end-of-stream follows the design; carrying the local
// address in the data field and the start/done handshake are this
// implementation's choices.
module proc_port
  import emu_pkg::*;
#(
  parameter int unsigned MY_ID = 0   // node number c*2^n + r of this processor
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              start,
  input  logic              active,
  input  logic [ADDR_W-1:0] addr,
  input  logic              perm,
  input  logic [NODE_W-1:0] dest,
  input  logic [DATA_W-1:0] payload,
  output logic              busy,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_data,
  output logic [ADDR_W-1:0] rsp_from,
  output logic              done,
  // row hash pipeline
  output logic [ADDR_W-1:0] hash_x,
  input  logic              hash_done,
  input  logic [NODE_W-1:0] hash_h,
  input  logic [LOC_W-1:0]  hash_loc,
  // into the network (phase-1 switch input queue)
  output msg_t              net_msg,
  output logic              net_valid,
  input  logic              net_full,
  // out of the network (return switch)
  input  msg_t              ret_msg,
  input  logic              ret_valid
);
  typedef enum logic [2:0] {S_IDLE, S_HASH, S_REQ, S_EOS, S_WAIT} state_e;

  state_e            state;
  logic              active_q;
  logic              perm_q;
  logic [ADDR_W-1:0] addr_q;
  logic [NODE_W-1:0] dest_q;
  logic [DATA_W-1:0] payload_q;
  logic [ADDR_W-1:0] loc_x;
  logic [NODE_W-1:0] h;
  logic [LOC_W-1:0]  loc;
  tag_t              my_tag;

  assign loc_x  = perm ? ADDR_W'(MY_ID) : addr;
  assign hash_x = loc_x;

  assign my_tag = '{node: h, addr: addr_q};

  always_comb begin
    net_msg   = '0;
    net_valid = 1'b0;
    if (state == S_REQ && !net_full) begin
      net_valid     = 1'b1;
      net_msg.mtype = MSG_REQ;
      net_msg.tag   = my_tag;
      net_msg.dest  = dest_q;
      net_msg.data  = perm_q ? payload_q : DATA_W'(loc);
    end else if (state == S_EOS && !net_full) begin
      net_valid     = 1'b1;
      net_msg.mtype = MSG_EOS;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      active_q  <= 1'b0;
      perm_q    <= 1'b0;
      addr_q    <= '0;
      dest_q    <= '0;
      payload_q <= '0;
      rsp_from  <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      done      <= 1'b0;
      h         <= '0;
      loc       <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          active_q  <= active;
          perm_q    <= perm;
          addr_q    <= loc_x;
          dest_q    <= dest;
          payload_q <= payload;
          done     <= 1'b0;
          state    <= active ? S_HASH : S_EOS;
        end
        S_HASH: if (hash_done) begin
          h     <= hash_h;
          loc   <= hash_loc;
          state <= S_REQ;
        end
        S_REQ:  if (!net_full) state <= S_EOS;
        S_EOS:  if (!net_full) state <= S_WAIT;
        S_WAIT: if (ret_valid) begin
          if (ret_msg.mtype == MSG_REQ) begin
            rsp_valid <= 1'b1;
            rsp_data  <= (perm_q || ret_msg.found) ? ret_msg.data : '0;
            rsp_from  <= ret_msg.tag.addr;
          end else if (ret_msg.mtype == MSG_EOS) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A read reply is addressed to this port's own location, and an idle port
  // gets none; a permuted message names this port as its destination.
  a_reply_tag: assert property (@(posedge clk) disable iff (!rst_n)
    (ret_valid && ret_msg.mtype == MSG_REQ && !perm_q) |-> (active_q && ret_msg.tag == my_tag));
  a_perm_dest: assert property (@(posedge clk) disable iff (!rst_n)
    (ret_valid && ret_msg.mtype == MSG_REQ && perm_q) |-> (ret_msg.dest == NODE_W'(MY_ID)));
endmodule
