// hash_row: address map of the emulator, evaluated by the n nodes of one
// butterfly row together. For the location x of the processor in column c
// it computes
//   y = (sum_{i<ZETA} a_i x^i) mod P,   a(x) = y mod M,
//   h(x) = a(x) mod N  (the memory module, node <c',r'>),
//   loc(x) = a(x) div N (the word inside that module's hash-table area).
// Node k holds only the 8 coefficients a_{8k} .. a_{8k+7}. Each node has one
// token register {x, origin column, L, pw, H}. In one block of 8 cycles a
// node folds its 8 coefficients into the token it holds, one per cycle, by
// Horner's rule over Z_P, highest coefficient first. At the end of the block
// every token moves one node down the row (k -> k-1, node 0 -> node n-1,
// the wrap-around edge of the row). So the token that starts at column c
// visits c, c-1, .., 0 and then n-1, .., c+1, and is back home after n
// blocks:
//   on nodes k <= c it builds L = sum_{i<8(c+1)} a_i x^i and pw = x^{8(c+1)};
//   on nodes k >  c it builds H = sum_{i>=8(c+1)} a_i x^{i-8(c+1)};
// and y = (L + pw*H) mod P.
// Interface: `start` latches all n locations `x`. `done` pulses ZETA+1
// cycles after `start` (8n Horner cycles). From then on `h` and `loc` of
// every column are valid, computed from the home token, and they hold
// until the next start. A `start` while busy abandons the evaluation in
// progress and begins a new one (a step without accesses can end before
// the hash would).
// The hash class, ZETA = 8n and the split of 8 coefficients per column with
// a pipelined evaluation follow the design. The ring schedule, the L/H split
// that lets every column start at once, and the mod-M step for the
// module-local word are this implementation's choices.
module hash_row
  import emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [P_W-1:0]    coef [ZETA],    // a_0 .. a_{ZETA-1}, each < P; node k uses 8k..8k+7
  input  logic              start,
  input  logic [ADDR_W-1:0] x    [LEVELS],  // location of the processor in each column
  output logic              busy,
  output logic              done,
  output logic [NODE_W-1:0] h    [LEVELS],
  output logic [LOC_W-1:0]  loc  [LEVELS]
);
  localparam int unsigned CPN = ZETA / LEVELS;            // coefficients per node (8)
  localparam int unsigned MW  = 2 * P_W + 1;
  localparam int unsigned BW  = (LEVELS > 1) ? $clog2(LEVELS) : 1;
  localparam int unsigned JW  = $clog2(CPN);

  typedef struct packed {
    logic [ADDR_W-1:0] x;
    logic [BW-1:0]     home;   // column the token started in
    logic [P_W-1:0]    lo;     // L
    logic [P_W-1:0]    pw;     // x^(number of coefficients folded into L)
    logic [P_W-1:0]    hi;     // H
  } token_t;

  token_t         tok  [LEVELS];
  token_t         step [LEVELS];   // token after this cycle's Horner step
  logic [JW-1:0]  j;               // position inside the block
  logic [BW-1:0]  blk;             // blocks completed

  function automatic logic [P_W-1:0] mulmod(logic [P_W-1:0] a, logic [P_W-1:0] b,
                                            logic [P_W-1:0] c);
    logic [MW-1:0] s;
    s = MW'(a) * MW'(b) + MW'(c);
    return P_W'(s % MW'(P));
  endfunction

  // Horner step of node k with its coefficient a_{8k + 7 - j}
  for (genvar k = 0; k < LEVELS; k++) begin : g_node
    logic [P_W-1:0] a;
    logic [P_W-1:0] xp;
    logic           low;   // this node's coefficients belong to the low part
    if (k == 0) begin : g_first
      assign low = 1'b1;
    end else begin : g_rest
      assign low = (BW'(k) <= tok[k].home);
    end
    assign a  = coef[k * CPN + (CPN - 1) - int'(j)];
    assign xp = P_W'(32'(tok[k].x) % P);
    always_comb begin
      step[k] = tok[k];
      if (low) begin
        step[k].lo = mulmod(tok[k].lo, xp, a);
        step[k].pw = mulmod(tok[k].pw, xp, '0);
      end else begin
        step[k].hi = mulmod(tok[k].hi, xp, a);
      end
    end

    // result for the processor of column k, from the token that is home
    logic [P_W-1:0] y;
    logic [P_W-1:0] a_x;
    assign y      = mulmod(tok[k].pw, tok[k].hi, tok[k].lo);
    assign a_x    = P_W'(32'(y) % M);
    assign h[k]   = NODE_W'(32'(a_x) % NODES);
    assign loc[k] = LOC_W'(32'(a_x) / NODES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LEVELS; k++) tok[k] <= '0;
      j    <= '0;
      blk  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int k = 0; k < LEVELS; k++) begin
          tok[k]      <= '0;
          tok[k].x    <= x[k];
          tok[k].home <= BW'(k);
          tok[k].pw   <= P_W'(1);
        end
        j    <= '0;
        blk  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        j <= j + 1'b1;
        if (j == JW'(CPN - 1)) begin
          // pass every token to the next node down the row
          for (int k = 0; k < LEVELS; k++)
            tok[k] <= step[(k + 1) % LEVELS];
          blk <= blk + 1'b1;
          if (blk == BW'(LEVELS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          for (int k = 0; k < LEVELS; k++) tok[k] <= step[k];
        end
      end
    end
  end

  a_coef_split: assert property (@(posedge clk) ZETA == CPN * LEVELS && CPN == (1 << JW));
  a_coef_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (32'(g_node[0].a) < P));
endmodule
