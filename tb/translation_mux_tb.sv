// translation_mux_tb: self-checking test of the bank/prefetch-buffer select.
//
// Random current-bank choices, hit vectors (the current bank hitting or not,
// other banks hitting freely) and prefetch-buffer hits are applied; the
// expected bank_hit, pb_hit and PA are worked out from the rule "select bank
// b when it is current AND hits, else the prefetch buffer when it hits".
module translation_mux_tb;
  localparam int unsigned NB = 32, PW = 17, OB = 15;

  logic [NB-1:0] bank_current, bank_hit_vec;
  logic [PW-1:0] bank_ppn [NB];
  logic          pb_hit_in, bank_hit, pb_hit;
  logic [PW-1:0] pb_ppn, ppn;
  logic [OB-1:0] page_offset;
  logic [PW+OB-1:0] pa;
  int checks = 0, failures = 0;
  logic clk = 0;

  translation_mux #(.NUM_BANKS(NB), .PPN_WIDTH(PW), .PAGE_BITS(OB)) dut (.*);

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int cur;
      bit cur_on, exp_bh, exp_pb;
      logic [PW-1:0] exp_ppn;
      cur    = $urandom_range(0, NB - 1);
      cur_on = ($urandom_range(0, 7) != 0);
      bank_current = cur_on ? (NB'(1) << cur) : '0;
      bank_hit_vec = NB'({$urandom, $urandom});
      for (int b = 0; b < NB; b++) bank_ppn[b] = PW'($urandom);
      pb_hit_in   = $urandom_range(0, 1);
      pb_ppn      = PW'($urandom);
      page_offset = OB'($urandom);
      #1;
      exp_bh  = cur_on && bank_hit_vec[cur];
      exp_pb  = !exp_bh && pb_hit_in;
      exp_ppn = exp_bh ? bank_ppn[cur] : pb_ppn;
      checks++;
      if (bank_hit !== exp_bh || pb_hit !== exp_pb ||
          ((exp_bh || exp_pb) && pa !== {exp_ppn, page_offset})) begin
        failures++;
        $display("FAIL cur=%0d on=%0b bh=%0b pb=%0b pa=%h", cur, cur_on, bank_hit, pb_hit, pa);
      end
      clk = ~clk;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
