// pid_top: digital PID controller with a Wishbone slave interface.
//
// The controller computes, each time a new process value PV is written,
//     e(n) = SP - PV,   sigma = Ki * e(n) + sigma,   u(n) = (Kp + Kd) * e(n) + sigma - Kd * e(n-1)
// in hardware, and drives u(n) on o_un with o_valid. Kp, Ki, Kd, SP and PV are written, and
// every register (including Kpd, e(n), e(n-1), sigma, u(n) and the overflow flags) read, over
// a Wishbone classic slave port.
//
// Structure, as in the design's block diagram:
//   wb_rw_gen       read/write strobes from CYC_I, STB_I, WE_I
//   pid_addr_check  compares the upper address bits, decodes the register offset
//   pid_sm1         state machine 1 + register block 1 (Kp, Ki, Kd, SP, PV), write acknowledge
//   pid_sm2         state machine 2 + register block 2 (Kpd, e(n), e(n-1), sigma, u(n), flags)
//   booth_pipe_mult two-stage pipelined Booth multiplier, 16 x 16 -> 32, shared by the products
//   han_carlson_adder 32-bit prefix adder shared by every addition and subtraction
//   pid_wb_read     read multiplexer, acknowledge and the o_un / o_valid output drive
//
// Register map (32-bit words, byte address = BASE_ADDR + 4 * index, ADR_I[15:6] must match
// BASE_ADDR[15:6]): 0 Kp, 1 Ki, 2 Kd, 3 SP, 4 PV (read/write, 16-bit signed); 5 Kpd, 6 e(n),
// 7 e(n-1) (read, 16-bit signed); 8 u(n), 9 sigma (read, 32-bit signed); 10 overflow flags
// (read, bits 0..4: Kpd, e(n), sigma, first and second u(n) addition).
//
// Timing: a Wishbone access is acknowledged one cycle after the strobe is seen. A write to
// Kp/Ki/Kd/SP/PV arriving while a calculation runs is held (no ACK_O) until it ends. A PV
// write makes o_valid fall and, eight cycles after its acknowledge, rise again with the new
// u(n) on o_un. i_rst is synchronous, active high. The address map, bus timing and
// arithmetic details are this design's choice; the blocks, the registers and the algorithm
// follow the design description.
module pid_top
  import pid_pkg::*;
#(
  parameter int unsigned DW        = 32,       // Wishbone data width (32 or wider)
  parameter logic [15:0] BASE_ADDR = 16'h0000  // base of the 64-byte register window
) (
  input  logic          i_clk,
  input  logic          i_rst,
  input  logic          i_wb_cyc,
  input  logic          i_wb_stb,
  input  logic          i_wb_we,
  input  logic [15:0]   i_wb_addr,
  input  logic [DW-1:0] i_wb_data,
  output logic          o_wb_ack,
  output logic [DW-1:0] o_wb_data,
  output logic [31:0]   o_un,
  output logic          o_valid
);

  logic     rd, wr;
  logic     hit, valid, wr_ok;
  reg_idx_e idx;
  logic     wr_ack, upd_kpd, upd_pv, busy, un_valid;
  regblk1_t rb1;
  regblk2_t rb2;

  logic  mul_in_valid, mul_out_valid;
  coef_t mul_md, mul_mr;
  acc_t  mul_product;
  acc_t  add_a, add_b, add_sum;
  logic  add_cin, add_cout, add_ovf;
  acc_t  un;

  wb_rw_gen u_rw (
    .i_wb_cyc (i_wb_cyc),
    .i_wb_stb (i_wb_stb),
    .i_wb_we  (i_wb_we),
    .rd       (rd),
    .wr       (wr)
  );

  pid_addr_check #(.BASE_ADDR(BASE_ADDR)) u_addr (
    .addr  (i_wb_addr),
    .hit   (hit),
    .idx   (idx),
    .valid (valid),
    .wr_ok (wr_ok)
  );

  pid_sm1 #(.DW(DW)) u_sm1 (
    .clk     (i_clk),
    .rst     (i_rst),
    .wr      (wr),
    .hit     (hit),
    .idx     (idx),
    .wr_ok   (wr_ok),
    .wdata   (i_wb_data),
    .busy    (busy),
    .wr_ack  (wr_ack),
    .upd_kpd (upd_kpd),
    .upd_pv  (upd_pv),
    .rb1     (rb1)
  );

  pid_sm2 u_sm2 (
    .clk           (i_clk),
    .rst           (i_rst),
    .upd_kpd       (upd_kpd),
    .upd_pv        (upd_pv),
    .rb1           (rb1),
    .mul_in_valid  (mul_in_valid),
    .mul_md        (mul_md),
    .mul_mr        (mul_mr),
    .mul_out_valid (mul_out_valid),
    .mul_product   (mul_product),
    .add_a         (add_a),
    .add_b         (add_b),
    .add_cin       (add_cin),
    .add_sum       (add_sum),
    .add_ovf       (add_ovf),
    .rb2           (rb2),
    .busy          (busy),
    .un_valid      (un_valid)
  );

  booth_pipe_mult #(.W(COEF_W)) u_mult (
    .clk       (i_clk),
    .rst       (i_rst),
    .in_valid  (mul_in_valid),
    .md        (mul_md),
    .mr        (mul_mr),
    .out_valid (mul_out_valid),
    .product   (mul_product)
  );

  han_carlson_adder #(.W(ACC_W)) u_add (
    .a    (add_a),
    .b    (add_b),
    .cin  (add_cin),
    .sum  (add_sum),
    .cout (add_cout),
    .ovf  (add_ovf)
  );

  pid_wb_read #(.DW(DW)) u_rd (
    .clk       (i_clk),
    .rst       (i_rst),
    .rd        (rd),
    .hit       (hit),
    .idx       (idx),
    .valid     (valid),
    .rb1       (rb1),
    .rb2       (rb2),
    .un_valid  (un_valid),
    .wr_ack    (wr_ack),
    .o_wb_ack  (o_wb_ack),
    .o_wb_data (o_wb_data),
    .o_un      (un),
    .o_valid   (o_valid)
  );

  assign o_un = un;

endmodule
