// qrd2x2_complex: QR decomposition of a complex 2x2 channel matrix with two
// real QRD modules (qrd2x2_real) working in parallel, used twice.
//
// Step 1 makes column 1 real. A complex number a + jb is the 2-vector (a, b),
// so a real QRD of [Re h11 Re h12; Im h11 Im h12] turns h11 onto the real
// axis (r11 = |h11|) and multiplies h12 by the same phase factor
// p1 = exp(-j*arg h11): its "r12, r22" outputs are Re and Im of p1*h12, and
// the first column of its Q^T is (Re p1, Im p1). Module B does the same for
// row 2 (p2, p2*h22) at the same time.
// Step 2 is a real Givens rotation G2 of the now real column (|h11|, |h21|).
// Because G2 is real it acts on the real and imaginary parts of column 2
// separately: module A rotates the real parts, module B the imaginary parts,
// both with the same pivot column and therefore the same angle.
//
// Result: H = Q R with Q^H = G2 * diag(p1, p2). r11 is real and non-negative;
// r12 and r22 are complex (making r22 real would need a third pass). Q^H is
// delivered in that factored form, qh_rot = G2 (real 2x2) and
// qh_phase = {p1, p2}, so that a detector can apply it with CORDIC rotations
// and no complex multiplier. Complex values are vec_t with x = real part.
//
// Timing: step 2 starts in the cycle step 1 delivers its R, so R is valid
// (r_valid) 52 cycles after the input, as in the source; Q^H is valid
// (q_valid) two cycles later. One matrix is in flight at a time: in_ready is
// low from acceptance until q_valid.
module qrd2x2_complex
  import qrd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t h_re [2][2],
  input  data_t h_im [2][2],
  output logic  r_valid,
  output data_t r11,
  output vec_t  r12,
  output vec_t  r22,
  output logic  q_valid,
  output vec_t  qh_phase [2],
  output data_t qh_rot   [2][2]
);

  typedef enum logic [1:0] {IDLE, STEP1, STEP2} state_t;

  state_t state;
  logic   phase_seen;
  vec_t   phase_q [2];

  logic   a_in_valid, a_in_ready, a_r_valid, a_q_valid;
  logic   b_in_valid, b_in_ready, b_r_valid, b_q_valid;
  data_t  a_h [2][2];
  data_t  b_h [2][2];
  data_t  a_r11, a_r12, a_r22, b_r11, b_r12, b_r22;
  data_t  a_qt [2][2];
  data_t  b_qt [2][2];

  logic   accept, step2_go;

  assign in_ready = (state == IDLE) && a_in_ready && b_in_ready;
  assign accept   = in_valid && in_ready;
  assign step2_go = (state == STEP1) && a_r_valid;

  // operand selection for the two modules
  always_comb begin
    if (step2_go) begin
      a_h = '{'{a_r11, a_r12}, '{b_r11, b_r12}};   // real parts of column 2
      b_h = '{'{a_r11, a_r22}, '{b_r11, b_r22}};   // imaginary parts
    end else begin
      a_h = '{'{h_re[0][0], h_re[0][1]}, '{h_im[0][0], h_im[0][1]}};  // row 1
      b_h = '{'{h_re[1][0], h_re[1][1]}, '{h_im[1][0], h_im[1][1]}};  // row 2
    end
  end

  assign a_in_valid = accept || step2_go;
  assign b_in_valid = accept || step2_go;

  qrd2x2_real u_qrd_a (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .h(a_h),
    .r_valid(a_r_valid), .r11(a_r11), .r12(a_r12), .r22(a_r22),
    .q_valid(a_q_valid), .qt(a_qt)
  );

  qrd2x2_real u_qrd_b (
    .clk(clk), .rst_n(rst_n),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .h(b_h),
    .r_valid(b_r_valid), .r11(b_r11), .r12(b_r12), .r22(b_r22),
    .q_valid(b_q_valid), .qt(b_qt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      phase_seen <= 1'b0;
    end else begin
      case (state)
        IDLE:  if (accept) state <= STEP1;
        STEP1: if (a_r_valid) begin
                 state      <= STEP2;
                 phase_seen <= 1'b0;
               end
        STEP2: if (a_q_valid) begin
                 if (!phase_seen) phase_seen <= 1'b1;   // step-1 Q^T
                 else             state      <= IDLE;   // step-2 Q^T
               end
        default: state <= IDLE;
      endcase
    end
  end

  // phase factors: first column of each step-1 Q^T
  always_ff @(posedge clk) begin
    if (state == STEP2 && a_q_valid && !phase_seen) begin
      phase_q[0] <= '{x: a_qt[0][0], y: a_qt[1][0]};
      phase_q[1] <= '{x: b_qt[0][0], y: b_qt[1][0]};
    end
  end

  assign r_valid  = (state == STEP2) && a_r_valid;
  assign r11      = a_r11;
  assign r12      = '{x: a_r12, y: b_r12};
  assign r22      = '{x: a_r22, y: b_r22};
  assign q_valid  = (state == STEP2) && a_q_valid && phase_seen;
  assign qh_phase = phase_q;
  assign qh_rot   = a_qt;

  // the two modules run in lock step
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    (a_r_valid == b_r_valid) && (a_q_valid == b_q_valid));
  a_step2_ready : assert property (@(posedge clk) disable iff (!rst_n)
    step2_go |-> a_in_ready && b_in_ready);

endmodule
