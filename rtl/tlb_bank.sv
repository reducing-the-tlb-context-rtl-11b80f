// tlb_bank: one bank of the banked TLB, a fully associative translation CAM.
//
// The bank holds ENTRIES (default 32) translations VPN -> PPN. A lookup
// compares the VPN with every valid entry in parallel and returns hit, the
// PPN and the index of the matching entry, combinationally, as a CAM does.
// Replacement is LRU over the entries, as the source architecture asks for
// each bank; an invalid entry is always filled before a valid one is evicted.
// A touch marks the looked-up entry as most recently used. A write stores a
// new translation into the victim entry and makes it most recently used; the
// controller only writes a VPN that missed in this bank, so no duplicate
// entry is created. flush clears every valid bit in one cycle (a bank is
// flushed when it is given to a new task, or on the OS "clear TLB" signal).
// If write and flush come in the same cycle, flush wins.
// Interface: lookup (lk_vpn -> lk_hit, lk_ppn), touch (lk_touch), write
// (wr_en, wr_vpn, wr_ppn), flush. All updates take effect at the next rising
// edge; reset clears all valid bits.
module tlb_bank #(
  parameter int unsigned ENTRIES   = tlb_pkg::BANK_ENTRIES_DEF,
  parameter int unsigned VPN_WIDTH = tlb_pkg::VA_WIDTH_DEF - tlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned PPN_WIDTH = tlb_pkg::PA_WIDTH_DEF - tlb_pkg::PAGE_BITS_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic [VPN_WIDTH-1:0] lk_vpn,
  output logic                 lk_hit,
  output logic [PPN_WIDTH-1:0] lk_ppn,
  input  logic                 lk_touch,   // mark the hit entry as most recently used
  // insertion
  input  logic                 wr_en,
  input  logic [VPN_WIDTH-1:0] wr_vpn,
  input  logic [PPN_WIDTH-1:0] wr_ppn,
  // flash invalidate
  input  logic                 flush
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]   valid_q;
  logic [VPN_WIDTH-1:0] vpn_q [ENTRIES];
  logic [PPN_WIDTH-1:0] ppn_q [ENTRIES];

  logic [IW-1:0] hit_idx, lru_idx, victim_idx;
  logic          any_invalid;
  logic [IW-1:0] first_invalid;

  // CAM match
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

  // Victim: lowest-numbered invalid entry, else the LRU entry
  always_comb begin
    any_invalid   = 1'b0;
    first_invalid = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!valid_q[i] && !any_invalid) begin
        any_invalid   = 1'b1;
        first_invalid = IW'(i);
      end
    end
    victim_idx = any_invalid ? first_invalid : lru_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (flush) begin
      valid_q <= '0;
    end else if (wr_en) begin
      valid_q[victim_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !flush) begin
      vpn_q[victim_idx] <= wr_vpn;
      ppn_q[victim_idx] <= wr_ppn;
    end
  end

  lru_rank #(.N(ENTRIES)) u_lru (
    .clk       (clk),
    .rst_n     (rst_n),
    .touch     ((wr_en && !flush) || (lk_touch && lk_hit)),
    .touch_idx (wr_en ? victim_idx : hit_idx),
    .lru_idx   (lru_idx)
  );

endmodule
