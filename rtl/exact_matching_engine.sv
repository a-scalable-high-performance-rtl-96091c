// exact_matching_engine: second phase of the virus detection processor.
//
// Verifies an alarm raised by the filtering engine at candidate position P
// by walking a compact trie stored in external memory, four text characters
// per node:
//   1. read the 4-byte text slice at the current text position
//   2. address: on the first read of an alarm, the one-step hash of the
//      slice (root of a lightweight trie); afterwards the child, sibling or
//      jump-node pointer of the node read last (address_generator)
//   3. read the node through the trie cache / prefetch path
//   4. compare node content with the slice; on a mismatch follow the
//      sibling pointer, if any, and compare again with the same slice
//   5. on a match, report the pattern ID if the node ends a pattern, else
//      advance the text position by four and read the child
//   6. trie-skip check, on leaving the trie (mismatch without sibling or a
//      reported pattern): P += skip value of the last node. If the node's
//      jump enable is set the walk goes on at its jump node with the text
//      position fixed at P + suffix offset (a failure-state jump, so a
//      pattern whose prefix ends the examined text is found without going
//      back to the filtering engine); otherwise P is handed back to the
//      filtering engine as its new pattern pointer.
// With skip_en low the engine behaves like a plain compact-trie matcher:
// it ignores the trie-skip fields and always hands back P + 1.
//
// The flow, the node fields and the skip/jump semantics follow the source
// design. The node registers hold both the compare part of the node ("prefix
// node": content, pointers, pattern ID) and its trie-skip part ("suffix
// node"). Own choices: a skip value of 0 acts as 1, so P always moves;
// characters past the end of the text never match; jumps stop once P reaches
// the end of the text; the handshakes are described at each port group.
//
// Timing: an alarm is taken in the cycle after alarm_valid is seen while
// idle; `done` is a one-cycle pulse with resume_ptr. Each node costs at
// least four cycles plus the memory latency.
module exact_matching_engine
  import vdp_pkg::*;
#(
  parameter int unsigned ROOT_BITS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              skip_en,
  input  pos_t              text_len,
  input  logic [MEM_AW-1:0] trie_base,
  // from / to the filtering engine
  input  logic              alarm_valid,
  input  pos_t              alarm_pos,
  output logic              done,
  output pos_t              resume_ptr,
  // text buffer read port (combinational)
  output pos_t              tb_addr,
  input  logic [31:0]       tb_data,
  input  logic              tb_avail,
  // trie node port (to trie_cache): pulse req, one outstanding
  output logic              n_req,
  output logic [MEM_AW-1:0] n_addr,
  input  logic              n_valid,
  input  trie_node_t        n_data,
  // matched-ID output (to result_queue)
  output logic              r_valid,
  output logic [PID_W-1:0]  r_pid,
  output pos_t              r_pos,
  input  logic              r_ready,
  // status
  output logic              busy,
  output pos_t              cur_ptr,
  // event pulses for the statistics counters
  output logic              ev_node_cmp,
  output logic              ev_sibling,
  output logic              ev_match,
  output logic              ev_skip,
  output logic [SKIP_W-1:0] skip_bytes,
  output logic              ev_jump,
  output logic              ev_mem_stall
);

  typedef enum logic [2:0] {
    E_IDLE, E_RD_TEXT, E_FETCH, E_WAIT, E_CMP, E_REPORT, E_SKIPCHK, E_RESUME
  } estate_e;

  estate_e           st;
  pos_t              p_q;        // candidate position (pattern pointer)
  pos_t              pos_q;      // text position of the current slice
  logic              first_q;
  logic [31:0]       slice_q;
  logic [MEM_AW-1:0] addr_q;
  trie_node_t        node_q;
  pos_t              resume_q;

  ag_sel_e           ag_sel;
  node_addr_t        root_addr;
  node_addr_t        ag_node_addr;
  logic [MEM_AW-1:0] ag_mem_addr;
  logic              node_match;
  logic [2:0]        node_len;
  logic [SKIP_W-1:0] skip_amt;
  pos_t              p_new;

  one_step_hash #(.ROOT_BITS(ROOT_BITS)) u_hash (
    .slice    (tb_data),
    .root_addr(root_addr)
  );

  address_generator u_ag (
    .sel      (ag_sel),
    .root_addr(root_addr),
    .node     (node_q),
    .trie_base(trie_base),
    .node_addr(ag_node_addr),
    .mem_addr (ag_mem_addr)
  );

  always_comb begin
    // node comparator ("=?")
    node_len   = {1'b0, node_q.len_m1} + 3'd1;
    node_match = node_q.valid && ((33'(pos_q) + 33'(node_len)) <= 33'(text_len));
    for (int i = 0; i < 4; i++)
      if (i < int'(node_len) && node_q.content[31-8*i -: 8] != slice_q[31-8*i -: 8])
        node_match = 1'b0;

    unique case (st)
      E_CMP:     ag_sel = node_match ? AG_CHILD : AG_SIBLING;
      E_SKIPCHK: ag_sel = AG_JUMP;
      default:   ag_sel = AG_ROOT;
    endcase

    skip_amt = (!skip_en) ? SKIP_W'(1)
             : (node_q.skip == '0) ? SKIP_W'(1) : node_q.skip;
    p_new    = p_q + pos_t'(skip_amt);

    tb_addr    = pos_q;
    n_req      = (st == E_FETCH);
    n_addr     = addr_q;
    r_valid    = (st == E_REPORT);
    r_pid      = node_q.pid;
    r_pos      = p_q;
    done       = (st == E_RESUME);
    resume_ptr = resume_q;
    busy       = (st != E_IDLE);
    cur_ptr    = p_q;

    ev_node_cmp  = (st == E_CMP);
    ev_sibling   = (st == E_CMP) && !node_match && node_q.has_sib;
    ev_match     = (st == E_REPORT) && r_ready;
    ev_jump      = (st == E_SKIPCHK) && skip_en && node_q.jump_en && (p_new < text_len);
    ev_skip      = (st == E_SKIPCHK) && skip_en && (skip_amt > SKIP_W'(1));
    skip_bytes   = skip_amt;
    ev_mem_stall = (st == E_WAIT) && !n_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= E_IDLE;
      p_q      <= '0;
      pos_q    <= '0;
      first_q  <= 1'b0;
      slice_q  <= '0;
      addr_q   <= '0;
      node_q   <= '0;
      resume_q <= '0;
    end else begin
      unique case (st)
        E_IDLE: if (alarm_valid) begin
          p_q     <= alarm_pos;
          pos_q   <= alarm_pos;
          first_q <= 1'b1;
          st      <= E_RD_TEXT;
        end
        E_RD_TEXT: if (tb_avail) begin
          slice_q <= tb_data;
          if (first_q) addr_q <= ag_mem_addr;
          first_q <= 1'b0;
          st      <= E_FETCH;
        end
        E_FETCH: st <= E_WAIT;
        E_WAIT: if (n_valid) begin
          node_q <= n_data;
          st     <= E_CMP;
        end
        E_CMP: begin
          if (node_match && node_q.is_match) begin
            st <= E_REPORT;
          end else if (node_match && node_q.has_child) begin
            pos_q  <= pos_q + pos_t'(4);
            addr_q <= ag_mem_addr;
            st     <= E_RD_TEXT;
          end else if (!node_match && node_q.has_sib) begin
            addr_q <= ag_mem_addr;
            st     <= E_FETCH;
          end else begin
            st <= E_SKIPCHK;
          end
        end
        E_REPORT: if (r_ready) st <= E_SKIPCHK;
        E_SKIPCHK: begin
          if (ev_jump) begin
            p_q    <= p_new;
            pos_q  <= p_new + pos_t'(node_q.suffix_off);
            addr_q <= ag_mem_addr;
            st     <= E_RD_TEXT;
          end else begin
            resume_q <= p_new;
            st       <= E_RESUME;
          end
        end
        E_RESUME: st <= E_IDLE;
        default:  st <= E_IDLE;
      endcase
    end
  end

endmodule
