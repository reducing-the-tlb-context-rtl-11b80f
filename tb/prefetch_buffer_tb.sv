// prefetch_buffer_tb: self-checking test of the 17-slot prefetch buffer.
//
// Slots are written with random pages (some writes mark a slot empty), and
// random lookups are compared with a reference array of the slots, in which
// the lowest matching slot answers. Flushes empty the model as well.
module prefetch_buffer_tb;
  localparam int unsigned N = 17, VW = 17, PW = 17;
  localparam int unsigned SW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [VW-1:0] lk_vpn = '0, wr_vpn = '0;
  logic [PW-1:0] lk_ppn, wr_ppn = '0;
  logic lk_hit, wr_en = 0, wr_valid = 0, flush = 0;
  logic [SW-1:0] wr_slot = '0;
  int checks = 0, failures = 0;

  prefetch_buffer #(.ENTRIES(N), .VPN_WIDTH(VW), .PPN_WIDTH(PW)) dut (.*);
  always #5 clk = ~clk;

  logic [VW-1:0] m_vpn [N];
  logic [PW-1:0] m_ppn [N];
  bit            m_v   [N];

  task automatic check_lookup(logic [VW-1:0] v);
    int idx = -1;
    @(negedge clk); lk_vpn = v; wr_en = 0; flush = 0; #1;
    for (int i = N - 1; i >= 0; i--) if (m_v[i] && m_vpn[i] == v) idx = i;
    checks++;
    if (lk_hit !== (idx >= 0) || (idx >= 0 && lk_ppn !== m_ppn[idx])) begin
      failures++;
      $display("FAIL lookup %h hit=%0b ppn=%h", v, lk_hit, lk_ppn);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) m_v[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    check_lookup(17'h5);
    // one round: slot k holds page 0x40-8+k (k<8) or 0x40+k-7
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = SW'(k); wr_valid = 1;
      wr_vpn = (k < 8) ? VW'(17'h40 - 8 + k) : VW'(17'h40 + k - 7);
      wr_ppn = PW'(17'h9000 + k);
      m_vpn[k] = wr_vpn; m_ppn[k] = wr_ppn; m_v[k] = 1;
    end
    @(negedge clk) wr_en = 0;
    for (int v = 'h30; v < 'h50; v++) check_lookup(VW'(v));
    @(negedge clk) flush = 1;
    for (int i = 0; i < N; i++) m_v[i] = 0;
    @(negedge clk) flush = 0;
    for (int v = 'h30; v < 'h50; v++) check_lookup(VW'(v));
    for (int k = 0; k < 4000; k++) begin
      if ($urandom_range(0, 2) == 0) begin
        int s;
        s = $urandom_range(0, N - 1);
        @(negedge clk);
        wr_en = 1; wr_slot = SW'(s); wr_valid = ($urandom_range(0, 4) != 0);
        wr_vpn = VW'($urandom_range(0, 40)); wr_ppn = PW'($urandom);
        m_vpn[s] = wr_vpn; m_ppn[s] = wr_ppn; m_v[s] = wr_valid;
        if ($urandom_range(0, 50) == 0) begin
          flush = 1;
          for (int i = 0; i < N; i++) m_v[i] = 0;
        end
        @(posedge clk); #1 wr_en = 0; flush = 0;
      end else check_lookup(VW'($urandom_range(0, 40)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
