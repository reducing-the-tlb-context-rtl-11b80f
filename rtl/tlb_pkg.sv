// tlb_pkg: constants and types shared by the banked, prefetching TLB.
//
// The banked TLB splits 1024 translation entries into 32 banks of 32 entries.
// Each bank belongs to one task (address space); a context switch only moves
// the "current" mark to another bank instead of flushing the whole TLB.
// The numbers below are the defaults of every module: 32 KB pages on a 32-bit
// virtual address (VPN = VA[31:15]), 32 banks of 32 entries, and a sequential
// prefetcher that fetches the pages at VPN-8 .. VPN-1 and VPN+1 .. VPN+9
// (17 entries) into a 17-entry prefetch buffer. The 32-bit physical address
// (and therefore the 17-bit PPN and the 17-bit task tag) is this design's own
// choice; the source architecture leaves the physical width open.
package tlb_pkg;

  // Address geometry
  localparam int unsigned VA_WIDTH_DEF      = 32;
  localparam int unsigned PA_WIDTH_DEF      = 32;
  localparam int unsigned PAGE_BITS_DEF     = 15;  // 32 KB page
  // Bank organisation
  localparam int unsigned NUM_BANKS_DEF     = 32;
  localparam int unsigned BANK_ENTRIES_DEF  = 32;
  // Sequential prefetching: pages VPN-SP_BEHIND .. VPN+SP_AHEAD, VPN itself excluded
  localparam int unsigned SP_BEHIND_DEF     = 8;
  localparam int unsigned SP_AHEAD_DEF      = 9;
  localparam int unsigned PB_ENTRIES_DEF    = SP_BEHIND_DEF + SP_AHEAD_DEF;  // 17
  // Task tag: the PPN of the instruction that opens a task (x86-style) or an ASID
  localparam int unsigned TASK_TAG_WIDTH_DEF = PA_WIDTH_DEF - PAGE_BITS_DEF;

  // Where a translation came from
  typedef enum logic [1:0] {
    SRC_BANK   = 2'd0,  // hit in the current TLB bank
    SRC_PB     = 2'd1,  // hit in the prefetch buffer
    SRC_WALK   = 2'd2,  // produced by the page-table walk of the memory system
    SRC_BYPASS = 2'd3   // walked while no bank was current; not stored in a bank
  } tlb_src_e;

endpackage
