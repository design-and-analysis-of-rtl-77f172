// pid_pkg: types and constants shared by the PID controller modules.
//
// Coefficients, set point and process value are 16-bit two's-complement numbers and the
// integral (sigma) and the controller output u(n) are 32 bits wide, as the design's register
// listing and waveforms show. The register map below (word offsets, one 32-bit word per
// register, reached through ADR_I[5:2]) is this design's own choice: the description lists the
// registers and their read/write rights but not their addresses.
package pid_pkg;

  localparam int unsigned COEF_W = 16;  // Kp, Ki, Kd, SP, PV, Kpd, e(n), e(n-1)
  localparam int unsigned ACC_W  = 32;  // sigma, u(n), products
  localparam int unsigned OF_W   = 5;   // one overflow flag per addition of the algorithm

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Register index, taken from ADR_I[5:2].
  typedef enum logic [3:0] {
    REG_KP    = 4'd0,   // R/W
    REG_KI    = 4'd1,   // R/W
    REG_KD    = 4'd2,   // R/W
    REG_SP    = 4'd3,   // R/W
    REG_PV    = 4'd4,   // R/W, a write starts a new u(n) calculation
    REG_KPD   = 4'd5,   // R   Kp + Kd
    REG_ERR0  = 4'd6,   // R   e(n)
    REG_ERR1  = 4'd7,   // R   e(n-1)
    REG_UN    = 4'd8,   // R   u(n)
    REG_SIGMA = 4'd9,   // R   integral sum
    REG_OF    = 4'd10   // R   overflow flags
  } reg_idx_e;

  localparam int unsigned NUM_REGS = 11;

  // Overflow flag positions in the OF register.
  localparam int unsigned OF_KPD   = 0;  // Kp + Kd does not fit 16 bits
  localparam int unsigned OF_ERR   = 1;  // SP - PV does not fit 16 bits
  localparam int unsigned OF_SIGMA = 2;  // sigma + Ki*e(n) overflowed 32 bits
  localparam int unsigned OF_UN1   = 3;  // Kpd*e(n) + sigma overflowed 32 bits
  localparam int unsigned OF_UN2   = 4;  // ... - Kd*e(n-1) overflowed 32 bits

  // Register block 1: the values written over the bus.
  typedef struct packed {
    coef_t kp;
    coef_t ki;
    coef_t kd;
    coef_t sp;
    coef_t pv;
  } regblk1_t;

  // Register block 2: the values the algorithm computes.
  typedef struct packed {
    coef_t           kpd;
    coef_t           err0;
    coef_t           err1;
    acc_t            sigma;
    acc_t            un;
    logic [OF_W-1:0] of;
  } regblk2_t;

endpackage
