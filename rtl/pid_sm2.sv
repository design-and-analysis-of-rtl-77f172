// pid_sm2: state machine 2, the calculation side of the controller, with register block 2.
//
// Register block 2 holds Kpd = Kp + Kd, e(n), e(n-1), the integral sum sigma, u(n) and five
// overflow flags. The controller evaluates the incremental form of the PID law
//     sigma = Ki * e(n) + sigma
//     u(n)  = (Kp + Kd) * e(n) + sigma - Kd * e(n-1)
// with one shared adder (a Han-Carlson prefix adder outside this module, driven through
// add_a/add_b/add_cin) and one shared pipelined multiplier (outside, driven through
// mul_md/mul_mr/mul_in_valid). The machine only sequences them:
//   upd_kpd: S_KPD   Kpd = Kp + Kd                                    (1 cycle)
//   upd_pv : S_ERR   e(n-1) = e(n), e(n) = SP - PV                     (1 cycle)
//            S_CALC  issue Ki*e(n), Kpd*e(n), Kd*e(n-1) on three consecutive cycles, and
//                    as each product comes out of the multiplier add it in:
//                    sigma += P1; u = sigma + P2; u = u - P3          (multiplier latency + 3)
// With the two-stage multiplier a PV update takes 7 clock edges from the upd_pv pulse to
// un_valid: one into S_ERR, one for e(n), then the first product needs two pipeline edges
// after its issue and the three additions one edge each. A Kpd update takes 2 edges.
// Subtraction uses the adder with the subtrahend inverted and a carry in of 1.
// e(n) and Kpd are kept to 16 bits and sigma and u(n) wrap at 32 bits; each of the five
// additions sets its own flag in `of` when its result did not fit (the flag shows the most
// recent result of that addition). busy is high from S_KPD/S_ERR until the sequence ends;
// un_valid goes low on the edge that takes upd_pv and high when u(n) is complete.
// rst is synchronous, active high, and clears every register.
// The equations, the register set and the shared pipelined multiplier and adder follow the
// design description; the schedule, the wrap-around arithmetic and the flag assignment are
// this design's choice.
module pid_sm2
  import pid_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            upd_kpd,
  input  logic            upd_pv,
  input  regblk1_t        rb1,
  // shared multiplier
  output logic            mul_in_valid,
  output coef_t           mul_md,
  output coef_t           mul_mr,
  input  logic            mul_out_valid,
  input  acc_t            mul_product,
  // shared adder
  output acc_t            add_a,
  output acc_t            add_b,
  output logic            add_cin,
  input  acc_t            add_sum,
  input  logic            add_ovf,
  // register block 2 and status
  output regblk2_t        rb2,
  output logic            busy,
  output logic            un_valid
);

  typedef enum logic [1:0] {S_IDLE, S_KPD, S_ERR, S_CALC} state_e;
  state_e     state;
  logic [1:0] issue_cnt;   // products issued to the multiplier
  logic [1:0] recv_cnt;    // products added in

  // A 32-bit sum of two sign-extended 16-bit values fits 16 bits when bits 31..15 agree.
  function automatic logic fits16(input acc_t s);
    return (s[ACC_W-1:COEF_W-1] == '0) || (s[ACC_W-1:COEF_W-1] == '1);
  endfunction

  assign busy = (state != S_IDLE);

  // Multiplier operands
  always_comb begin
    mul_in_valid = (state == S_CALC) && (issue_cnt < 2'd3);
    unique case (issue_cnt)
      2'd0:    begin mul_md = rb1.ki;  mul_mr = rb2.err0; end
      2'd1:    begin mul_md = rb2.kpd; mul_mr = rb2.err0; end
      default: begin mul_md = rb1.kd;  mul_mr = rb2.err1; end
    endcase
  end

  // Adder operands
  always_comb begin
    add_a   = '0;
    add_b   = '0;
    add_cin = 1'b0;
    unique case (state)
      S_KPD: begin
        add_a = acc_t'(rb1.kp);
        add_b = acc_t'(rb1.kd);
      end
      S_ERR: begin
        add_a   = acc_t'(rb1.sp);
        add_b   = ~acc_t'(rb1.pv);
        add_cin = 1'b1;
      end
      S_CALC: begin
        unique case (recv_cnt)
          2'd0:    begin add_a = rb2.sigma; add_b = mul_product; end
          2'd1:    begin add_a = rb2.sigma; add_b = mul_product; end
          default: begin add_a = rb2.un;    add_b = ~mul_product; add_cin = 1'b1; end
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      issue_cnt <= '0;
      recv_cnt  <= '0;
      rb2       <= '0;
      un_valid  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (upd_kpd) begin
            state <= S_KPD;
          end else if (upd_pv) begin
            state    <= S_ERR;
            un_valid <= 1'b0;
          end
        end
        S_KPD: begin
          rb2.kpd        <= coef_t'(add_sum[COEF_W-1:0]);
          rb2.of[OF_KPD] <= !fits16(add_sum);
          state          <= S_IDLE;
        end
        S_ERR: begin
          rb2.err1       <= rb2.err0;
          rb2.err0       <= coef_t'(add_sum[COEF_W-1:0]);
          rb2.of[OF_ERR] <= !fits16(add_sum);
          issue_cnt      <= '0;
          recv_cnt       <= '0;
          state          <= S_CALC;
        end
        S_CALC: begin
          if (mul_in_valid) issue_cnt <= issue_cnt + 2'd1;
          if (mul_out_valid) begin
            recv_cnt <= recv_cnt + 2'd1;
            unique case (recv_cnt)
              2'd0: begin
                rb2.sigma        <= add_sum;
                rb2.of[OF_SIGMA] <= add_ovf;
              end
              2'd1: begin
                rb2.un         <= add_sum;
                rb2.of[OF_UN1] <= add_ovf;
              end
              default: begin
                rb2.un         <= add_sum;
                rb2.of[OF_UN2] <= add_ovf;
                un_valid       <= 1'b1;
                state          <= S_IDLE;
              end
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The multiplier never returns more products than were issued.
  a_recv_le_issue: assert property (@(posedge clk) disable iff (rst)
                                    (state == S_CALC) |-> (recv_cnt <= issue_cnt));

endmodule
