// translation_mux: picks the translation and forms the physical address.
//
// Every bank reports a hit and a PPN for the looked-up VPN. The select of
// bank b is (current bit of bank b) AND (hit of bank b), so only the running
// task's bank can answer. When no bank select is active, the prefetch
// buffer's PPN is selected if the buffer hit. The physical address is the
// selected PPN joined with the untranslated page offset of the virtual
// address. bank_hit / pb_hit tell the controller which path answered; a
// lookup with neither is a TLB miss. Purely combinational.
module translation_mux #(
  parameter int unsigned NUM_BANKS = tlb_pkg::NUM_BANKS_DEF,
  parameter int unsigned PPN_WIDTH = tlb_pkg::PA_WIDTH_DEF - tlb_pkg::PAGE_BITS_DEF,
  parameter int unsigned PAGE_BITS = tlb_pkg::PAGE_BITS_DEF
) (
  input  logic [NUM_BANKS-1:0] bank_current,
  input  logic [NUM_BANKS-1:0] bank_hit_vec,
  input  logic [PPN_WIDTH-1:0] bank_ppn [NUM_BANKS],
  input  logic                 pb_hit_in,
  input  logic [PPN_WIDTH-1:0] pb_ppn,
  input  logic [PAGE_BITS-1:0] page_offset,
  output logic                 bank_hit,
  output logic                 pb_hit,
  output logic [PPN_WIDTH-1:0] ppn,
  output logic [PPN_WIDTH+PAGE_BITS-1:0] pa
);
  logic [NUM_BANKS-1:0] sel;
  logic [PPN_WIDTH-1:0] bank_sel_ppn;

  assign sel = bank_current & bank_hit_vec;

  // AND-OR selection: at most one bank is current, so at most one sel bit is set
  always_comb begin
    bank_sel_ppn = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++)
      bank_sel_ppn |= bank_ppn[b] & {PPN_WIDTH{sel[b]}};
  end

  assign bank_hit = |sel;
  assign pb_hit   = !bank_hit && pb_hit_in;
  assign ppn      = bank_hit ? bank_sel_ppn : pb_ppn;
  assign pa       = {ppn, page_offset};

endmodule
