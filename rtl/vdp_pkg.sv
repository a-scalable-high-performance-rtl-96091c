// vdp_pkg: types and constants shared by the virus detection processor.
//
// The processor scans a byte stream in two phases. A filtering engine looks
// up a 2-character "bad character" in an on-chip shift-signature table; each
// 4-bit table entry is {S-flag, carry}. With the S-flag set the carry is a
// shift value, with it clear the carry is a 3-bit Bloom-style signature.
// Candidate positions are handed to an exact-matching engine that walks a
// compact trie held in external memory, four characters per node.
//
// From the source design: 32 kB table = 2^16 entries of 4 bits, 2-character
// bad character, 4-character search window and trie node content, the
// trie-skip fields (skip value, jump enable, jump node, suffix offset). Own
// choices: the 128-bit node layout below, field widths (20-bit node pointers
// address 16 MB of nodes, room for an 8 MB trie with its empty root slots;
// a 6-bit skip value, where a longer safe skip is stored as 63, and a 7-bit
// suffix offset), the
// external-memory word of 16 bytes and the result record layout.
package vdp_pkg;

  // ---------------- filtering engine ----------------
  localparam int unsigned TBL_IDX_W  = 16;  // bad character = 2 bytes
  localparam int unsigned CARRY_W    = 3;   // 4-bit entry = S-flag + carry
  localparam int unsigned WIN_CHARS  = 4;   // search window width

  typedef struct packed {
    logic               sflag;  // 1: carry is a shift value, 0: a signature
    logic [CARRY_W-1:0] carry;
  } ss_entry_t;

  // ---------------- external memory ----------------
  localparam int unsigned MEM_AW    = 24;   // word address (16-byte words)
  localparam int unsigned MEM_DW    = 128;  // one trie node or 16 text bytes
  localparam int unsigned LINE_BYTES = MEM_DW / 8;

  // ---------------- trie ----------------
  localparam int unsigned NODE_AW   = 20;   // 2^20 nodes of 16 B (16 MB)
  localparam int unsigned PID_W     = 16;
  localparam int unsigned SKIP_W    = 6;
  localparam int unsigned SOFF_W    = 7;
  localparam int unsigned POS_W     = 32;   // byte position in the text

  typedef logic [NODE_AW-1:0] node_addr_t;
  typedef logic [POS_W-1:0]   pos_t;

  // One trie node per 128-bit memory word. content[31:24] is the first
  // character. len_m1 = number of valid content characters minus one.
  typedef struct packed {
    logic [31:0]       content;
    logic [1:0]        len_m1;
    logic              valid;       // 0: empty root slot
    logic              has_child;
    node_addr_t        child;
    logic              has_sib;
    node_addr_t        sibling;
    logic              is_match;    // a pattern ends at this node
    logic [PID_W-1:0]  pid;
    logic [SKIP_W-1:0] skip;        // trie-skip: pointer advance on exit
    logic              jump_en;     // trie-skip: continue at jump node
    node_addr_t        jump_node;
    logic [SOFF_W-1:0] suffix_off;  // text offset of the jump node's slice
  } trie_node_t;

  // Result record written to the output area (one per memory word).
  typedef struct packed {
    logic [MEM_DW-PID_W-POS_W-1:0] rsvd;
    logic [PID_W-1:0]              pid;
    pos_t                          pos;
  } result_t;

  // Address-generator selection.
  typedef enum logic [1:0] {
    AG_ROOT    = 2'd0,
    AG_CHILD   = 2'd1,
    AG_SIBLING = 2'd2,
    AG_JUMP    = 2'd3
  } ag_sel_e;

  // Event counters of one scan (cleared by start), as evaluated in the
  // source design: filter events, exact-match events, skip/jump events,
  // memory accesses, prefetch and cache hits.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] fe_checks;          // table lookups
    logic [31:0] fe_shifts;          // lookups answered by a shift value
    logic [31:0] fe_sig_filtered;    // lookups removed by the signature
    logic [31:0] alarms;             // candidate positions sent to the EME
    logic [31:0] fe_text_stalls;     // cycles the FE waited for text
    logic [31:0] node_cmps;          // trie nodes compared
    logic [31:0] sibling_steps;      // sibling pointers followed
    logic [31:0] pattern_hits;           // patterns reported
    logic [31:0] skip_events;        // trie-skip advances of more than 1
    logic [31:0] skipped_bytes;      // sum of trie-skip advances
    logic [31:0] jump_events;        // jump-node continuations
    logic [31:0] mem_stall_cycles;   // cycles the EME waited for a node
    logic [31:0] trie_demand_reads;  // external trie reads on demand
    logic [31:0] trie_prefetch_reads;// external trie reads by prefetch
    logic [31:0] prefetch_hits;      // nodes served by the prefetch buffer
    logic [31:0] cache_hits;         // nodes served by the trie cache
    logic [31:0] text_reads;         // external text reads
    logic [31:0] result_writes;      // result records written
    logic [31:0] result_full_stalls; // cycles a report waited on a full queue
  } vdp_stats_t;

endpackage
