// tlb_ctrl: the prefetch & control logic of one side (ITLB or DTLB).
//
// The controller watches every lookup and decides what the TLB does:
//  * hit in the current bank: the translation is returned in the same cycle
//    and the entry becomes most recently used;
//  * miss in the current bank, hit in the prefetch buffer: the translation is
//    returned in the same cycle, copied into the current bank (LRU victim)
//    and a new prefetch round around this page starts;
//  * miss in both: the page is requested from the memory system (the
//    conventional page-table walk). A fault is returned as such. Otherwise
//    the translation is stored in the current bank and returned, and a new
//    prefetch round starts. If no bank is current (first instruction fetch
//    after a context switch) and ACTIVATE = 1, the controller first asks the
//    bank-tag unit to activate a bank for the task: the task tag is the
//    walked PPN (USE_ASID = 0, processors without ASIDs) or the asid input.
//    A side with ACTIVATE = 0 (the DTLB by default) cannot open a bank: while
//    no bank is current its walked translations are returned but not stored.
// Sequential prefetching: a round fetches the pages VPN-SP_BEHIND .. VPN-1
// and VPN+1 .. VPN+SP_AHEAD (8 and 9 by default, 17 pages) one after the
// other from the memory system, and writes page k of the round into
// prefetch-buffer slot k; a page outside the address range or without a
// mapping leaves its slot empty. During a round, lookups that hit the current
// bank are still served; any other lookup waits (lk_ready = 0) until the
// round ends. A context switch or clear TLB (pf_abort) ends the round: a request
// already presented is completed and its answer dropped.
// The sequence above follows the source architecture; the one-request-at-a-
// time memory port, the serving of bank hits during a round and the slot
// order are this design's own choices.
// Interfaces: lookup (lk_valid/lk_ready/lk_vpn, answered by rsp_valid with
// rsp_ppn, rsp_fault, rsp_src); memory (mem_req_valid/mem_req_ready with
// mem_req_vpn and mem_req_prefetch, answered later by mem_rsp_valid with
// mem_rsp_ppn and mem_rsp_fault, one request outstanding). Hits answer
// combinationally; a walk answers in the cycle its memory response arrives,
// or one cycle later when a bank had to be activated.
module tlb_ctrl
  import tlb_pkg::*;
#(
  parameter int unsigned VPN_WIDTH  = VA_WIDTH_DEF - PAGE_BITS_DEF,
  parameter int unsigned PPN_WIDTH  = PA_WIDTH_DEF - PAGE_BITS_DEF,
  parameter int unsigned TAG_WIDTH  = TASK_TAG_WIDTH_DEF,
  parameter int unsigned SP_BEHIND  = SP_BEHIND_DEF,
  parameter int unsigned SP_AHEAD   = SP_AHEAD_DEF,
  parameter bit          ACTIVATE   = 1'b1,
  parameter bit          USE_ASID   = 1'b0,
  localparam int unsigned PB_ENTRIES = SP_BEHIND + SP_AHEAD,
  localparam int unsigned SW         = $clog2(PB_ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup from the processor
  input  logic                 lk_valid,
  output logic                 lk_ready,
  input  logic [VPN_WIDTH-1:0] lk_vpn,
  output logic                 rsp_valid,
  output logic [PPN_WIDTH-1:0] rsp_ppn,
  output logic                 rsp_fault,
  output tlb_src_e             rsp_src,
  // datapath: the VPN the banks and prefetch buffer look up, and the result
  output logic [VPN_WIDTH-1:0] dp_vpn,
  input  logic                 bank_hit,   // (current AND hit) of some bank
  input  logic                 pb_hit,     // prefetch buffer hit, no bank hit
  input  logic [PPN_WIDTH-1:0] hit_ppn,
  input  logic                 cur_valid,
  // current bank control
  output logic                 bank_touch,
  output logic                 bank_wr_en,
  output logic [VPN_WIDTH-1:0] bank_wr_vpn,
  output logic [PPN_WIDTH-1:0] bank_wr_ppn,
  // prefetch buffer fill
  output logic                 pb_wr_en,
  output logic [SW-1:0]        pb_wr_slot,
  output logic                 pb_wr_valid,
  output logic [VPN_WIDTH-1:0] pb_wr_vpn,
  output logic [PPN_WIDTH-1:0] pb_wr_ppn,
  input  logic                 pf_abort,      // context switch or clear TLB
  // bank activation
  output logic                 act_valid,
  output logic [TAG_WIDTH-1:0] act_tag,
  input  logic [TAG_WIDTH-1:0] asid,
  // memory system (page-table walk and prefetch requests)
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
  typedef enum logic [2:0] {
    S_IDLE, S_WALK_REQ, S_WALK_WAIT, S_ACT, S_PF_REQ, S_PF_WAIT
  } state_e;

  state_e               state_q, state_d;
  logic [VPN_WIDTH-1:0] vpn_q, vpn_d;        // page being walked
  logic [PPN_WIDTH-1:0] ppn_q, ppn_d;        // walked PPN waiting for activation
  logic [VPN_WIDTH-1:0] center_q, center_d;  // centre page of the prefetch round
  logic [SW-1:0]        slot_q, slot_d;
  logic                 aborted_q, aborted_d;

  // Target page of prefetch slot k: centre-SP_BEHIND+k for k < SP_BEHIND,
  // centre+k-SP_BEHIND+1 otherwise.
  logic [VPN_WIDTH:0]   pf_target;
  logic                 pf_in_range;
  always_comb begin
    if (slot_q < SW'(SP_BEHIND)) begin
      pf_target   = {1'b0, center_q} - (VPN_WIDTH+1)'(SP_BEHIND - slot_q);
      pf_in_range = !pf_target[VPN_WIDTH];           // no borrow
    end else begin
      pf_target   = {1'b0, center_q} + (VPN_WIDTH+1)'(slot_q) - (VPN_WIDTH+1)'(SP_BEHIND) + 1'b1;
      pf_in_range = !pf_target[VPN_WIDTH];           // no carry
    end
  end

  logic last_slot;
  assign last_slot   = (slot_q == SW'(PB_ENTRIES - 1));
  assign prefetching = (state_q == S_PF_REQ) || (state_q == S_PF_WAIT);

  always_comb begin
    state_d   = state_q;
    vpn_d     = vpn_q;
    ppn_d     = ppn_q;
    center_d  = center_q;
    slot_d    = slot_q;
    aborted_d = aborted_q;

    lk_ready   = 1'b0;
    rsp_valid  = 1'b0;
    rsp_ppn    = hit_ppn;
    rsp_fault  = 1'b0;
    rsp_src    = SRC_BANK;
    dp_vpn     = lk_vpn;

    bank_touch  = 1'b0;
    bank_wr_en  = 1'b0;
    bank_wr_vpn = lk_vpn;
    bank_wr_ppn = hit_ppn;

    pb_wr_en    = 1'b0;
    pb_wr_slot  = slot_q;
    pb_wr_valid = 1'b0;
    pb_wr_vpn   = pf_target[VPN_WIDTH-1:0];
    pb_wr_ppn   = mem_rsp_ppn;

    act_valid = 1'b0;
    act_tag   = USE_ASID ? asid : TAG_WIDTH'(mem_rsp_ppn);

    mem_req_valid    = 1'b0;
    mem_req_vpn      = vpn_q;
    mem_req_prefetch = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        lk_ready = 1'b1;
        if (lk_valid) begin
          if (bank_hit) begin
            rsp_valid  = 1'b1;
            rsp_src    = SRC_BANK;
            bank_touch = 1'b1;
          end else if (pb_hit) begin
            rsp_valid  = 1'b1;
            rsp_src    = SRC_PB;
            bank_wr_en = cur_valid;
            center_d   = lk_vpn;
            slot_d     = '0;
            aborted_d  = 1'b0;
            state_d    = S_PF_REQ;
          end else begin
            vpn_d   = lk_vpn;
            state_d = S_WALK_REQ;
          end
        end
      end

      S_WALK_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_vpn   = vpn_q;
        if (mem_req_ready) state_d = S_WALK_WAIT;
      end

      S_WALK_WAIT: begin
        dp_vpn = vpn_q;
        if (mem_rsp_valid) begin
          center_d  = vpn_q;
          slot_d    = '0;
          aborted_d = 1'b0;
          if (mem_rsp_fault) begin
            rsp_valid = 1'b1;
            rsp_fault = 1'b1;
            rsp_ppn   = mem_rsp_ppn;
            rsp_src   = SRC_WALK;
            state_d   = S_IDLE;
          end else if (cur_valid) begin
            rsp_valid   = 1'b1;
            rsp_ppn     = mem_rsp_ppn;
            rsp_src     = SRC_WALK;
            bank_wr_en  = 1'b1;
            bank_wr_vpn = vpn_q;
            bank_wr_ppn = mem_rsp_ppn;
            state_d     = S_PF_REQ;
          end else if (ACTIVATE) begin
            act_valid = 1'b1;
            ppn_d     = mem_rsp_ppn;
            state_d   = S_ACT;
          end else begin
            rsp_valid = 1'b1;
            rsp_ppn   = mem_rsp_ppn;
            rsp_src   = SRC_BYPASS;
            state_d   = S_PF_REQ;
          end
        end
      end

      // The bank-tag unit has made a bank current. The bank may belong to a
      // task seen before and already hold the page: then it is only touched.
      S_ACT: begin
        dp_vpn    = vpn_q;
        rsp_valid = 1'b1;
        rsp_ppn   = ppn_q;
        rsp_src   = cur_valid ? SRC_WALK : SRC_BYPASS;
        if (cur_valid) begin
          if (bank_hit) begin
            bank_touch = 1'b1;
          end else begin
            bank_wr_en  = 1'b1;
            bank_wr_vpn = vpn_q;
            bank_wr_ppn = ppn_q;
          end
        end
        state_d = S_PF_REQ;
      end

      S_PF_REQ: begin
        // bank hits of new lookups are served during the round
        lk_ready = bank_hit;
        if (lk_valid && bank_hit) begin
          rsp_valid  = 1'b1;
          rsp_src    = SRC_BANK;
          bank_touch = 1'b1;
        end
        if (pf_abort) aborted_d = 1'b1;
        if (!pf_in_range) begin
          pb_wr_en    = !(pf_abort || aborted_q);
          pb_wr_valid = 1'b0;
          if (last_slot || pf_abort || aborted_q) state_d = S_IDLE;
          else                                 slot_d  = slot_q + 1'b1;
        end else begin
          mem_req_valid    = 1'b1;
          mem_req_vpn      = pf_target[VPN_WIDTH-1:0];
          mem_req_prefetch = 1'b1;
          if (mem_req_ready) state_d = S_PF_WAIT;
        end
      end

      S_PF_WAIT: begin
        lk_ready = bank_hit;
        if (lk_valid && bank_hit) begin
          rsp_valid  = 1'b1;
          rsp_src    = SRC_BANK;
          bank_touch = 1'b1;
        end
        if (pf_abort) aborted_d = 1'b1;
        if (mem_rsp_valid) begin
          pb_wr_en    = !(pf_abort || aborted_q);
          pb_wr_valid = !mem_rsp_fault;
          if (last_slot || pf_abort || aborted_q) state_d = S_IDLE;
          else begin
            slot_d  = slot_q + 1'b1;
            state_d = S_PF_REQ;
          end
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      vpn_q     <= '0;
      ppn_q     <= '0;
      center_q  <= '0;
      slot_q    <= '0;
      aborted_q <= 1'b0;
    end else begin
      state_q   <= state_d;
      vpn_q     <= vpn_d;
      ppn_q     <= ppn_d;
      center_q  <= center_d;
      slot_q    <= slot_d;
      aborted_q <= aborted_d;
    end
  end

  // Memory handshake: a presented request stays until accepted, and
  // responses only arrive while one is outstanding.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready) |=> mem_req_valid);
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> (state_q == S_WALK_WAIT || state_q == S_PF_WAIT));

endmodule
