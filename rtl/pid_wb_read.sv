// pid_wb_read: Wishbone read and u(n) circuitry, and the u(n) output drive.
//
// On a read (rd with hit) the register that idx selects, from register block 1 or 2, is put on
// o_wb_data and the transfer is acknowledged. The 16-bit registers are sign-extended to the
// bus width, the overflow flags are zero-extended, and an unused offset reads as zero.
// o_wb_ack combines this read acknowledge with the write acknowledge of state machine 1.
// The same block drives the controller output: o_un carries u(n) and o_valid says that u(n) is
// the finished result of the latest PV update.
//
// Timing: read data and acknowledge are registered, one cycle after the strobe is seen, and
// the acknowledge lasts one cycle. As in a Wishbone classic cycle the master drops its strobe
// (or starts the next transfer) in the cycle after it sees the acknowledge. o_un and o_valid are registered copies of u(n) and its valid flag, so they follow the
// register by one clock. rst is synchronous, active high.
// The register set and the o_un/o_valid outputs follow the design description; the bus
// timing and the data extension are this design's choice.
module pid_wb_read
  import pid_pkg::*;
#(
  parameter int unsigned DW = 32   // Wishbone data width, at least 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rd,
  input  logic          hit,
  input  reg_idx_e      idx,
  input  logic          valid,
  input  regblk1_t      rb1,
  input  regblk2_t      rb2,
  input  logic          un_valid,
  input  logic          wr_ack,
  output logic          o_wb_ack,
  output logic [DW-1:0] o_wb_data,
  output acc_t          o_un,
  output logic          o_valid
);

  logic          rd_ack;
  logic [DW-1:0] rdata;

  always_comb begin
    rdata = '0;
    if (valid) begin
      unique case (idx)
        REG_KP:    rdata = DW'(rb1.kp);
        REG_KI:    rdata = DW'(rb1.ki);
        REG_KD:    rdata = DW'(rb1.kd);
        REG_SP:    rdata = DW'(rb1.sp);
        REG_PV:    rdata = DW'(rb1.pv);
        REG_KPD:   rdata = DW'(rb2.kpd);
        REG_ERR0:  rdata = DW'(rb2.err0);
        REG_ERR1:  rdata = DW'(rb2.err1);
        REG_UN:    rdata = DW'(rb2.un);
        REG_SIGMA: rdata = DW'(rb2.sigma);
        REG_OF:    rdata = DW'(rb2.of);
        default:   rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ack    <= 1'b0;
      o_wb_data <= '0;
      o_un      <= '0;
      o_valid   <= 1'b0;
    end else begin
      rd_ack  <= rd && hit && !rd_ack;
      if (rd && hit) o_wb_data <= rdata;
      o_un    <= rb2.un;
      o_valid <= un_valid;
    end
  end

  assign o_wb_ack = rd_ack | wr_ack;

  // A read acknowledge only answers a read strobe inside the window, and never twice in a row.
  a_rd_ack: assert property (@(posedge clk) disable iff (rst)
                             rd_ack |-> ($past(rd && hit) && !$past(rd_ack)));

  initial assert (DW >= ACC_W) else $error("pid_wb_read: DW must be at least %0d", ACC_W);

endmodule
