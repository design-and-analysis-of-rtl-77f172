// pid_addr_check: address decode of the PID controller's register window.
//
// The upper address bits ADR_I[15:6] are compared with those of BASE_ADDR ("address check
// higher bits"): only on a match does the controller take part in the transfer (hit). Within
// the 64-byte window, ADR_I[5:2] select one of the 32-bit registers (idx); valid is high when
// idx names an existing register and wr_ok when that register may be written (Kp, Ki, Kd, SP,
// PV). ADR_I[1:0] are ignored. Purely combinational.
// The block is named in the design's block diagram; the window size, the base-address
// parameter and the register map are this design's choice.
module pid_addr_check
  import pid_pkg::*;
#(
  parameter logic [15:0] BASE_ADDR = 16'h0000
) (
  input  logic [15:0] addr,
  output logic        hit,
  output reg_idx_e    idx,
  output logic        valid,
  output logic        wr_ok
);

  always_comb begin
    hit   = (addr[15:6] == BASE_ADDR[15:6]);
    idx   = reg_idx_e'(addr[5:2]);
    valid = hit && (addr[5:2] < 4'(NUM_REGS));
    wr_ok = hit && (addr[5:2] <= 4'(REG_PV));
  end

endmodule
