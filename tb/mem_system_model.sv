// mem_system_model: behavioural model of the memory system behind the TLB.
//
// It stands for the page-table walk of the operating system and MMU, which
// the TLB uses but does not contain. A request (valid/ready, one at a time)
// is answered LATENCY cycles after it was accepted with the PPN and fault bit
// of the page table of the task given by task_id (see tb_mem_pkg). It counts
// demand and prefetch requests. Not synthesizable: testbench use only.
module mem_system_model
  import tb_mem_pkg::*;
#(
  parameter int unsigned LATENCY = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  int unsigned         task_id,
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [TB_VPN_W-1:0] req_vpn,
  input  logic                req_prefetch,
  output logic                rsp_valid,
  output logic [TB_PPN_W-1:0] rsp_ppn,
  output logic                rsp_fault
);
  int unsigned n_demand = 0, n_prefetch = 0;
  int          cnt = 0;
  bit          busy = 0;
  logic [TB_VPN_W-1:0] vpn_q = '0;

  assign req_ready = !busy;

  always_ff @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (!rst_n) begin
      busy <= 0;
    end else if (!busy) begin
      if (req_valid) begin
        busy  <= 1;
        cnt   <= LATENCY - 1;
        vpn_q <= req_vpn;
        if (req_prefetch) n_prefetch <= n_prefetch + 1;
        else              n_demand   <= n_demand + 1;
      end
    end else if (cnt == 0) begin
      busy      <= 0;
      rsp_valid <= 1'b1;
      rsp_ppn   <= pt_ppn(task_id, vpn_q);
      rsp_fault <= pt_fault(task_id, vpn_q);
    end else begin
      cnt <= cnt - 1;
    end
  end

  initial begin
    rsp_valid = 0;
    rsp_ppn   = '0;
    rsp_fault = 0;
  end
endmodule
