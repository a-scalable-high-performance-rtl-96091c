// prefix_addr_ctrl: pattern-pointer control of the filtering engine.
//
// Holds the pattern pointer (the candidate position now examined) and works
// out where it goes next, following the filtering flow of the shift-signature
// algorithm:
//   * entry with S-flag set    -> pointer + shift value (carry)
//   * S-flag clear, no sig hit -> pointer + 1
//   * S-flag clear, sig hit    -> alarm; pointer held for the exact matcher
//   * resume from the exact matcher -> pointer = resume_ptr
// It also forms the text address of the search window, which ends at the
// tail of the shortest pattern: window = pointer + MIN_LEN - 4. The bad
// character, the last two window characters, is the table index.
// A zero shift value with the S-flag set cannot be produced by the table
// builder; it is treated as a shift of one so that the pointer always moves.
//
// Timing: ptr is a register; ptr_next, win_addr_next and alarm are
// combinational from the current lookup result and take effect at the clock
// edge when `advance` is high.
module prefix_addr_ctrl
  import vdp_pkg::*;
#(
  parameter int unsigned MIN_LEN = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,          // load start position
  input  pos_t      load_ptr,
  input  logic      lookup_valid,  // entry/sig_hit below are for ptr
  input  ss_entry_t entry,
  input  logic      sig_hit,
  input  logic      resume,        // exact matcher hands control back
  input  pos_t      resume_ptr,
  input  logic      advance,       // commit ptr_next
  output pos_t      ptr,
  output pos_t      ptr_next,
  output pos_t      win_addr_next, // search window of ptr_next
  output logic      alarm,
  output logic      shifted,       // lookup moved the pointer by a shift value
  output logic      sig_filtered   // lookup removed by the signature
);

  logic [CARRY_W-1:0] shift_amt;

  always_comb begin
    shift_amt    = (entry.carry == '0) ? CARRY_W'(1) : entry.carry;
    alarm        = lookup_valid && !entry.sflag && sig_hit;
    shifted      = lookup_valid && entry.sflag;
    sig_filtered = lookup_valid && !entry.sflag && !sig_hit;
    ptr_next     = ptr;
    if (resume)            ptr_next = resume_ptr;
    else if (shifted)      ptr_next = ptr + pos_t'(shift_amt);
    else if (sig_filtered) ptr_next = ptr + pos_t'(1);
    win_addr_next = ptr_next + pos_t'(MIN_LEN - WIN_CHARS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ptr <= '0;
    else if (load)    ptr <= load_ptr;
    else if (advance) ptr <= ptr_next;
  end

endmodule
