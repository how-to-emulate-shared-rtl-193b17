// emu_pkg: configuration and message format shared by the shared-memory
// emulator.
//
// The emulator runs an N = n*2^n processor CRCW PRAM read step on an n-level
// wrapped butterfly. Every message carries a type (REQUEST, GHOST or
// end-of-stream), a tag <h(x), x> made by concatenating the number of the
// memory module that holds PRAM location x with x itself, and a data field.
// Streams are kept sorted by tag; end-of-stream counts as a tag of infinity.
// In permutation routing a message also names the processor it is going to.
//
// The sizes follow the small example the design uses for its memory layout
// (n = 3 levels, two PRAM words per module). The prime P, the data width and
// the field encodings are this design's own choices. To change the size,
// edit LEVELS, WORDS_PER_MODULE and P here; everything else is derived.
package emu_pkg;

  // ---- configuration ----
  parameter int unsigned LEVELS           = 3;   // n, butterfly levels
  parameter int unsigned WORDS_PER_MODULE = 2;   // M/N
  parameter int unsigned P                = 53;  // prime >= M
  parameter int unsigned DATA_W           = 16;  // data field width

  // ---- derived sizes ----
  parameter int unsigned ROWS   = 1 << LEVELS;            // 2^n
  parameter int unsigned NODES  = LEVELS * ROWS;          // N
  parameter int unsigned M      = NODES * WORDS_PER_MODULE; // PRAM words
  parameter int unsigned ZETA   = 8 * LEVELS;             // hash coefficients
  parameter int unsigned COLS   = 6 * LEVELS + 1;         // logical columns
  parameter int unsigned COL_W  = $clog2(LEVELS);
  parameter int unsigned NODE_W = COL_W + LEVELS;         // width of <c,r>
  parameter int unsigned ADDR_W = $clog2(M);              // width of x
  parameter int unsigned P_W    = $clog2(P);
  parameter int unsigned LOC_W  = (WORDS_PER_MODULE > 1) ? $clog2(WORDS_PER_MODULE) : 1;

  // Memory layout of a module: words 0 .. WORDS_PER_MODULE-1 are the hash
  // table; above them lies the overflow area. Every hash-table word of a row
  // owns SLOTS consecutive overflow words in each module of that row, so a
  // module has GROUPS = n*WORDS_PER_MODULE groups of SLOTS words.
  parameter int unsigned SLOTS       = 8;
  parameter int unsigned GROUPS      = LEVELS * WORDS_PER_MODULE;
  parameter int unsigned OVF_WORDS   = GROUPS * SLOTS;
  parameter int unsigned LOCAL_WORDS = WORDS_PER_MODULE + OVF_WORDS;
  parameter int unsigned LA_W        = $clog2(LOCAL_WORDS);

  typedef enum logic [1:0] {
    MSG_REQ   = 2'd0,
    MSG_GHOST = 2'd1,
    MSG_EOS   = 2'd2
  } msg_type_e;

  typedef struct packed {
    logic [NODE_W-1:0] node;   // h(x) = <c', r'>
    logic [ADDR_W-1:0] addr;   // x
  } tag_t;

  typedef struct packed {
    msg_type_e         mtype;
    tag_t              tag;
    logic [NODE_W-1:0] dest;   // permutation routing only: the receiving processor
    logic              found;  // read: the location's word is in `data`
    logic [DATA_W-1:0] data;   // read: hash-table word index going out, then the
                               // overflow pointer, then the word; permutation: payload
  } msg_t;

  // Sort key: end-of-stream sorts after every tag.
  function automatic logic [NODE_W+ADDR_W:0] sort_key(msg_t m);
    return {m.mtype == MSG_EOS, m.tag};
  endfunction

  function automatic logic [LEVELS-1:0] node_row(logic [NODE_W-1:0] h);
    return h[LEVELS-1:0];
  endfunction

endpackage
