// pid_sm1: state machine 1, the write side of the controller, with register block 1.
//
// Register block 1 holds the four coefficients Kp, Ki, Kd, SP and the process value PV, all
// 16-bit two's-complement, reset to zero. A bus write (wr with hit) to one of them stores the
// low 16 bits of the write data and acknowledges the transfer; it also tells state machine 2
// what to recompute: a write to Kp or Kd pulses upd_kpd (Kpd = Kp + Kd is rebuilt), a write to
// PV pulses upd_pv (a new e(n), sigma and u(n) are computed).
// While state machine 2 is busy, or an update has just been signalled, writes to these five
// registers are held without acknowledge until the calculation has finished; the master simply
// keeps its strobe up. Writes to the read-only registers of block 2 and to unused offsets in
// the window are acknowledged and ignored.
//
// Timing: wr_ack is registered and high for one cycle, the cycle after the write is accepted;
// the register and upd_* change on the same clock edge. rst is synchronous, active high.
// Holding writes during a calculation, the Kpd update rule and the 16-bit signed registers
// follow the design description; the acknowledge timing and the handling of read-only offsets
// are this design's choice.
module pid_sm1
  import pid_pkg::*;
#(
  parameter int unsigned DW = 32   // Wishbone data width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr,        // write strobe from wb_rw_gen
  input  logic          hit,       // address within the controller's window
  input  reg_idx_e      idx,
  input  logic          wr_ok,     // idx is one of Kp, Ki, Kd, SP, PV
  input  logic [DW-1:0] wdata,
  input  logic          busy,      // state machine 2 is calculating
  output logic          wr_ack,
  output logic          upd_kpd,
  output logic          upd_pv,
  output regblk1_t      rb1
);

  typedef enum logic [1:0] {S_IDLE, S_ACK} state_e;
  state_e state;

  logic hold;     // writes to block 1 must wait
  logic accept;   // a write completes this cycle
  always_comb begin
    hold   = busy | upd_kpd | upd_pv;
    accept = (state == S_IDLE) && wr && hit && (!wr_ok || !hold);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      wr_ack  <= 1'b0;
      upd_kpd <= 1'b0;
      upd_pv  <= 1'b0;
      rb1     <= '0;
    end else begin
      upd_kpd <= 1'b0;
      upd_pv  <= 1'b0;
      wr_ack  <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          state  <= S_ACK;
          wr_ack <= 1'b1;
          if (wr_ok) begin
            unique case (idx)
              REG_KP:  begin rb1.kp <= coef_t'(wdata[COEF_W-1:0]); upd_kpd <= 1'b1; end
              REG_KI:  rb1.ki <= coef_t'(wdata[COEF_W-1:0]);
              REG_KD:  begin rb1.kd <= coef_t'(wdata[COEF_W-1:0]); upd_kpd <= 1'b1; end
              REG_SP:  rb1.sp <= coef_t'(wdata[COEF_W-1:0]);
              REG_PV:  begin rb1.pv <= coef_t'(wdata[COEF_W-1:0]); upd_pv <= 1'b1; end
              default: ;
            endcase
          end
        end
        S_ACK: state <= S_IDLE;   // one idle cycle so a held strobe is not acknowledged twice
        default: state <= S_IDLE;
      endcase
    end
  end

  // One acknowledge per accepted write; never an acknowledge without a strobe.
  a_ack_after_wr: assert property (@(posedge clk) disable iff (rst) wr_ack |-> $past(wr));

endmodule
