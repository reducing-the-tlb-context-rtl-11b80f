// tb_mem_pkg: the page tables used by the testbenches.
//
// Every task has its own mapping VPN -> PPN, computed rather than stored:
// ppn = (vpn * 7 + task * 131 + 3) mod 2^17, and a page faults (has no
// mapping) when bits [3:0] of (vpn ^ task * 5) are all ones and the
// vpn is at least 0x40, so that one page in sixteen above 0x40 is unmapped.
package tb_mem_pkg;
  localparam int unsigned TB_VPN_W = 17;
  localparam int unsigned TB_PPN_W = 17;

  function automatic logic [TB_PPN_W-1:0] pt_ppn(int unsigned task_id, logic [TB_VPN_W-1:0] vpn);
    return TB_PPN_W'(int'(vpn) * 7 + task_id * 131 + 3);
  endfunction

  function automatic bit pt_fault(int unsigned task_id, logic [TB_VPN_W-1:0] vpn);
    logic [TB_VPN_W-1:0] h;
    h = vpn ^ TB_VPN_W'(task_id * 5);
    return (vpn >= 'h40) && (h[3:0] == 4'hf);
  endfunction
endpackage
