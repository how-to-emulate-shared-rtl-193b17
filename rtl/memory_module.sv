// memory_module: the memory of one butterfly node.
//
// Layout (LOCAL_WORDS words, local addresses): words 0 .. WORDS_PER_MODULE-1
// form the hash-table area; word l of module <c,r> is hash address
// a = (l*N + c*2^n + r) and holds a pointer p. The overflow area above holds
// (x, data) pairs. Each hash address owns the SLOTS words p .. p+SLOTS-1 in
// every module of its butterfly row, so the up to SLOTS*n PRAM locations that
// share a hash address are spread over the row.
// Two read ports serve the two passes of a read request through the node:
//   * hash-table port (phase 3, at the module h(x)): `ht_addr` -> `ht_ptr`,
//     the overflow pointer stored for the requested hash address;
//   * overflow search (phase 4, at every module of the row): `ov_ptr`,
//     `ov_key` -> `ov_hit`, `ov_data`. The SLOTS words of the group are read
//     side by side and compared with x in one cycle.
// Both are combinational, so the switch rewrites the message in the cycle it
// leaves. A synchronous write port loads the memory: `waddr` below
// WORDS_PER_MODULE writes a pointer (`wdata`), above it writes an overflow
// slot (`wvalid`, `wkey` = x, `wdata`). Reset empties the overflow area.
// The layout and the search of SLOTS locations per module in phase 4 follow
// the design's preliminary local-addressing scheme; the single-cycle,
// side-by-side search of a group and the load port are this implementation's
// choices.
module memory_module
  import emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              we,
  input  logic [LA_W-1:0]   waddr,
  input  logic              wvalid,
  input  logic [ADDR_W-1:0] wkey,
  input  logic [DATA_W-1:0] wdata,
  // hash-table read
  input  logic [LOC_W-1:0]  ht_addr,
  output logic [DATA_W-1:0] ht_ptr,
  // overflow search
  input  logic [DATA_W-1:0] ov_ptr,
  input  logic [ADDR_W-1:0] ov_key,
  output logic              ov_hit,
  output logic [DATA_W-1:0] ov_data
);
  typedef struct packed {
    logic [ADDR_W-1:0] key;
    logic [DATA_W-1:0] data;
  } slot_t;

  logic [DATA_W-1:0]    table_q [WORDS_PER_MODULE];
  slot_t                ovf_q   [OVF_WORDS];
  logic [OVF_WORDS-1:0] valid_q;
  logic                 w_table, w_ovf;
  int unsigned          w_slot;

  assign w_table = we && (32'(waddr) < WORDS_PER_MODULE);
  assign w_ovf   = we && !w_table && (32'(waddr) < LOCAL_WORDS);
  assign w_slot  = 32'(waddr) - WORDS_PER_MODULE;

  always_ff @(posedge clk) begin
    if (w_table) table_q[LOC_W'(waddr)] <= wdata;
    if (w_ovf)   ovf_q[w_slot] <= '{key: wkey, data: wdata};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (w_ovf) valid_q[w_slot] <= wvalid;
  end

  assign ht_ptr = (32'(ht_addr) < WORDS_PER_MODULE) ? table_q[ht_addr] : '0;

  always_comb begin
    ov_hit  = 1'b0;
    ov_data = '0;
    for (int j = 0; j < SLOTS; j++) begin
      int unsigned a;
      a = 32'(ov_ptr) + 32'(j);
      if (a >= WORDS_PER_MODULE && a < LOCAL_WORDS) begin
        if (!ov_hit && valid_q[a - WORDS_PER_MODULE] &&
            ovf_q[a - WORDS_PER_MODULE].key == ov_key) begin
          ov_hit  = 1'b1;
          ov_data = ovf_q[a - WORDS_PER_MODULE].data;
        end
      end
    end
  end
endmodule
