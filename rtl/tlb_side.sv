// tlb_side: one translation side of the banked TLB (the ITLB or the DTLB).
//
// A side holds NUM_BANKS banks (default 32) of BANK_ENTRIES fully associative
// entries (default 32, 1024 in all), one prefetch buffer, the selection
// multiplexer and its own prefetch & control logic. The VPN of a lookup goes
// to every bank and to the prefetch buffer in parallel; the bank whose current
// bit is set and which hits supplies the PPN, else a prefetch-buffer hit does,
// and the PA is that PPN joined with the page offset. Which bank is current,
// and which bank is flushed when given to a new task, is decided by the
// bank-tag unit shared by both sides (inputs cur_onehot, flush_vec); this
// side only asks for an activation (act_valid, act_tag) when its controller
// has ACTIVATE set. A context switch or clear TLB (pf_flush) empties the
// prefetch buffer and stops a prefetch round.
// Timing: hits answer combinationally in the cycle of the lookup (lk_valid,
// lk_ready, rsp_*); misses answer when the memory system has returned the
// page, see tlb_ctrl. The structure follows the source architecture; port
// widths and the handshakes are this design's own.
module tlb_side
  import tlb_pkg::*;
#(
  parameter int unsigned VA_WIDTH     = VA_WIDTH_DEF,
  parameter int unsigned PA_WIDTH     = PA_WIDTH_DEF,
  parameter int unsigned PAGE_BITS    = PAGE_BITS_DEF,
  parameter int unsigned NUM_BANKS    = NUM_BANKS_DEF,
  parameter int unsigned BANK_ENTRIES = BANK_ENTRIES_DEF,
  parameter int unsigned SP_BEHIND    = SP_BEHIND_DEF,
  parameter int unsigned SP_AHEAD     = SP_AHEAD_DEF,
  parameter int unsigned TAG_WIDTH    = TASK_TAG_WIDTH_DEF,
  parameter bit          ACTIVATE     = 1'b1,
  parameter bit          USE_ASID     = 1'b0,
  localparam int unsigned VPN_WIDTH   = VA_WIDTH - PAGE_BITS,
  localparam int unsigned PPN_WIDTH   = PA_WIDTH - PAGE_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic                 lk_valid,
  output logic                 lk_ready,
  input  logic [VA_WIDTH-1:0]  lk_va,
  output logic                 rsp_valid,
  output logic [PA_WIDTH-1:0]  rsp_pa,
  output logic                 rsp_fault,
  output tlb_src_e             rsp_src,
  // shared bank tags
  input  logic [NUM_BANKS-1:0] cur_onehot,
  input  logic [NUM_BANKS-1:0] flush_vec,
  output logic                 act_valid,
  output logic [TAG_WIDTH-1:0] act_tag,
  input  logic [TAG_WIDTH-1:0] asid,
  input  logic                 pf_flush,
  // memory system
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic [VPN_WIDTH-1:0] mem_req_vpn,
  output logic                 mem_req_prefetch,
  input  logic                 mem_rsp_valid,
  input  logic [PPN_WIDTH-1:0] mem_rsp_ppn,
  input  logic                 mem_rsp_fault,
  // status
  output logic                 prefetching
);
  localparam int unsigned PB_ENTRIES = SP_BEHIND + SP_AHEAD;
  localparam int unsigned SW         = $clog2(PB_ENTRIES);

  logic [VPN_WIDTH-1:0] dp_vpn;
  logic [NUM_BANKS-1:0] bank_hit_vec;
  logic [PPN_WIDTH-1:0] bank_ppn [NUM_BANKS];
  logic                 pb_raw_hit, bank_hit, pb_hit;
  logic [PPN_WIDTH-1:0] pb_ppn, hit_ppn, rsp_ppn;
  logic [PA_WIDTH-1:0]  mux_pa;

  logic                 bank_touch, bank_wr_en;
  logic [VPN_WIDTH-1:0] bank_wr_vpn;
  logic [PPN_WIDTH-1:0] bank_wr_ppn;
  logic                 pb_wr_en, pb_wr_valid;
  logic [SW-1:0]        pb_wr_slot;
  logic [VPN_WIDTH-1:0] pb_wr_vpn;
  logic [PPN_WIDTH-1:0] pb_wr_ppn;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    tlb_bank #(
      .ENTRIES   (BANK_ENTRIES),
      .VPN_WIDTH (VPN_WIDTH),
      .PPN_WIDTH (PPN_WIDTH)
    ) u_bank (
      .clk      (clk),
      .rst_n    (rst_n),
      .lk_vpn   (dp_vpn),
      .lk_hit   (bank_hit_vec[b]),
      .lk_ppn   (bank_ppn[b]),
      .lk_touch (bank_touch && cur_onehot[b]),
      .wr_en    (bank_wr_en && cur_onehot[b]),
      .wr_vpn   (bank_wr_vpn),
      .wr_ppn   (bank_wr_ppn),
      .flush    (flush_vec[b])
    );
  end

  prefetch_buffer #(
    .ENTRIES   (PB_ENTRIES),
    .VPN_WIDTH (VPN_WIDTH),
    .PPN_WIDTH (PPN_WIDTH)
  ) u_pb (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_vpn   (dp_vpn),
    .lk_hit   (pb_raw_hit),
    .lk_ppn   (pb_ppn),
    .wr_en    (pb_wr_en),
    .wr_slot  (pb_wr_slot),
    .wr_valid (pb_wr_valid),
    .wr_vpn   (pb_wr_vpn),
    .wr_ppn   (pb_wr_ppn),
    .flush    (pf_flush)
  );

  translation_mux #(
    .NUM_BANKS (NUM_BANKS),
    .PPN_WIDTH (PPN_WIDTH),
    .PAGE_BITS (PAGE_BITS)
  ) u_mux (
    .bank_current (cur_onehot),
    .bank_hit_vec (bank_hit_vec),
    .bank_ppn     (bank_ppn),
    .pb_hit_in    (pb_raw_hit),
    .pb_ppn       (pb_ppn),
    .page_offset  (lk_va[PAGE_BITS-1:0]),
    .bank_hit     (bank_hit),
    .pb_hit       (pb_hit),
    .ppn          (hit_ppn),
    .pa           (mux_pa)
  );

  tlb_ctrl #(
    .VPN_WIDTH (VPN_WIDTH),
    .PPN_WIDTH (PPN_WIDTH),
    .TAG_WIDTH (TAG_WIDTH),
    .SP_BEHIND (SP_BEHIND),
    .SP_AHEAD  (SP_AHEAD),
    .ACTIVATE  (ACTIVATE),
    .USE_ASID  (USE_ASID)
  ) u_ctrl (
    .clk              (clk),
    .rst_n            (rst_n),
    .lk_valid         (lk_valid),
    .lk_ready         (lk_ready),
    .lk_vpn           (lk_va[VA_WIDTH-1:PAGE_BITS]),
    .rsp_valid        (rsp_valid),
    .rsp_ppn          (rsp_ppn),
    .rsp_fault        (rsp_fault),
    .rsp_src          (rsp_src),
    .dp_vpn           (dp_vpn),
    .bank_hit         (bank_hit),
    .pb_hit           (pb_hit),
    .hit_ppn          (hit_ppn),
    .cur_valid        (|cur_onehot),
    .bank_touch       (bank_touch),
    .bank_wr_en       (bank_wr_en),
    .bank_wr_vpn      (bank_wr_vpn),
    .bank_wr_ppn      (bank_wr_ppn),
    .pb_wr_en         (pb_wr_en),
    .pb_wr_slot       (pb_wr_slot),
    .pb_wr_valid      (pb_wr_valid),
    .pb_wr_vpn        (pb_wr_vpn),
    .pb_wr_ppn        (pb_wr_ppn),
    .pf_abort         (pf_flush),
    .act_valid        (act_valid),
    .act_tag          (act_tag),
    .asid             (asid),
    .mem_req_valid    (mem_req_valid),
    .mem_req_ready    (mem_req_ready),
    .mem_req_vpn      (mem_req_vpn),
    .mem_req_prefetch (mem_req_prefetch),
    .mem_rsp_valid    (mem_rsp_valid),
    .mem_rsp_ppn      (mem_rsp_ppn),
    .mem_rsp_fault    (mem_rsp_fault),
    .prefetching      (prefetching)
  );

  // A translation answers with its PPN and the lookup's page offset. Hits
  // answer in the lookup cycle, so the offset comes straight from lk_va;
  // a walk answers later, when the held lookup's offset is used.
  logic [PAGE_BITS-1:0] off_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  off_q <= '0;
    else if (lk_valid && lk_ready) off_q <= lk_va[PAGE_BITS-1:0];
  end
  assign rsp_pa = (rsp_src == SRC_BANK || rsp_src == SRC_PB) ? mux_pa
                                                             : {rsp_ppn, off_q};

endmodule
