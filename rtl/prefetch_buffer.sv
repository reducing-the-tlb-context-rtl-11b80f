// prefetch_buffer: small fully associative buffer of prefetched translations.
//
// The sequential prefetcher fills one slot per prefetched page: slot k holds
// the page at a fixed distance k from the page that started the prefetch
// (the slot order is the controller's). A lookup compares the VPN with every
// valid slot in parallel, in the same cycle as the TLB banks, and returns hit
// and the PPN. A slot write either stores a translation (wr_valid = 1) or
// marks the slot empty (wr_valid = 0, for a page with no mapping). flush
// empties the whole buffer, as a context switch or the OS "clear TLB" signal
// requires. If two slots hold the same page, the lowest slot answers.
// Size: 17 slots by default, matching the 17 pages the sequential prefetcher
// fetches. Updates take effect on the rising edge; reset empties the buffer.
module prefetch_buffer #(
  parameter int unsigned ENTRIES   = tlb_pkg::PB_ENTRIES_DEF,
  parameter int unsigned VPN_WIDTH = tlb_pkg::VA_WIDTH_DEF - tlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned PPN_WIDTH = tlb_pkg::PA_WIDTH_DEF - tlb_pkg::PAGE_BITS_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [VPN_WIDTH-1:0]         lk_vpn,
  output logic                         lk_hit,
  output logic [PPN_WIDTH-1:0]         lk_ppn,
  input  logic                         wr_en,
  input  logic [$clog2(ENTRIES)-1:0]   wr_slot,
  input  logic                         wr_valid,
  input  logic [VPN_WIDTH-1:0]         wr_vpn,
  input  logic [PPN_WIDTH-1:0]         wr_ppn,
  input  logic                         flush
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]   valid_q;
  logic [VPN_WIDTH-1:0] vpn_q [ENTRIES];
  logic [PPN_WIDTH-1:0] ppn_q [ENTRIES];
  logic [IW-1:0]        hit_idx;

  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && vpn_q[i] == lk_vpn && !lk_hit) begin
        lk_hit  = 1'b1;
        hit_idx = IW'(i);
      end
    end
    lk_ppn = ppn_q[hit_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      valid_q <= '0;
    else if (flush)  valid_q <= '0;
    else if (wr_en)  valid_q[wr_slot] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en && !flush) begin
      vpn_q[wr_slot] <= wr_vpn;
      ppn_q[wr_slot] <= wr_ppn;
    end
  end

endmodule
