// qrd_top: channel pre-processing for small MIMO detectors, built from
// CORDIC-based Givens rotations.
//
// Three independent QR decomposition engines stand side by side, each with
// its own handshake and result ports:
//   * real_*  - qrd2x2_real, a real 2x2 channel matrix: R after 26 cycles,
//               Q^T after 28, one new matrix every 3 cycles;
//   * cplx_*  - qrd2x2_complex, a complex 2x2 channel matrix built from two
//               real engines: R after 52 cycles, Q^H (factored as a real
//               rotation times a diagonal of phase factors) after 54;
//   * q4_*    - qrd4x4_real, a real 4x4 channel matrix built from four
//               Givens-rotation units: R after 108 cycles, Q^T after 112.
// Each engine is followed by a unit that applies its Q^H to the received
// vector (real_y, cplx_y, q4_y, taken together with the matrix in the cycle
// it is accepted): qrd_rx_rotate for the real engines returns y' = Q^T y one
// cycle after Q^T, at 29 and 113 cycles; qrd_rx_rotate_cplx applies the
// complex engine's factored Q^H and returns y' two cycles after it, at 56.
// All samples use the fixed-point format of qrd_pkg (16 bits, 13 fraction
// bits); angles never leave the engines. Reset is active low and
// asynchronous.
module qrd_top
  import qrd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // real 2x2
  input  logic  real_in_valid,
  output logic  real_in_ready,
  input  data_t real_h [2][2],
  output logic  real_r_valid,
  output data_t real_r11,
  output data_t real_r12,
  output data_t real_r22,
  output logic  real_q_valid,
  output data_t real_qt [2][2],
  input  data_t real_y [2],
  output logic  real_yr_valid,
  output data_t real_yr [2],
  // complex 2x2
  input  logic  cplx_in_valid,
  output logic  cplx_in_ready,
  input  data_t cplx_h_re [2][2],
  input  data_t cplx_h_im [2][2],
  output logic  cplx_r_valid,
  output data_t cplx_r11,
  output vec_t  cplx_r12,
  output vec_t  cplx_r22,
  output logic  cplx_q_valid,
  output vec_t  cplx_qh_phase [2],
  output data_t cplx_qh_rot [2][2],
  input  vec_t  cplx_y [2],
  output logic  cplx_yr_valid,
  output vec_t  cplx_yr [2],
  // real 4x4
  input  logic  q4_in_valid,
  output logic  q4_in_ready,
  input  data_t q4_h [4][4],
  output logic  q4_r_valid,
  output data_t q4_r [4][4],
  output logic  q4_q_valid,
  output data_t q4_qt [4][4],
  input  data_t q4_y [4],
  output logic  q4_yr_valid,
  output data_t q4_yr [4]
);

  qrd2x2_real u_real (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(real_in_valid),
    .in_ready(real_in_ready),
    .h       (real_h),
    .r_valid (real_r_valid),
    .r11     (real_r11),
    .r12     (real_r12),
    .r22     (real_r22),
    .q_valid (real_q_valid),
    .qt      (real_qt)
  );

  qrd_rx_rotate #(.N(2), .DEPTH(16)) u_real_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .y_valid  (real_in_valid && real_in_ready),
    .y        (real_y),
    .q_valid  (real_q_valid),
    .qt       (real_qt),
    .out_valid(real_yr_valid),
    .yr       (real_yr)
  );

  qrd2x2_complex u_cplx (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(cplx_in_valid),
    .in_ready(cplx_in_ready),
    .h_re    (cplx_h_re),
    .h_im    (cplx_h_im),
    .r_valid (cplx_r_valid),
    .r11     (cplx_r11),
    .r12     (cplx_r12),
    .r22     (cplx_r22),
    .q_valid (cplx_q_valid),
    .qh_phase(cplx_qh_phase),
    .qh_rot  (cplx_qh_rot)
  );

  qrd_rx_rotate_cplx #(.DEPTH(2)) u_cplx_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .y_valid  (cplx_in_valid && cplx_in_ready),
    .y        (cplx_y),
    .q_valid  (cplx_q_valid),
    .phase    (cplx_qh_phase),
    .rot      (cplx_qh_rot),
    .out_valid(cplx_yr_valid),
    .yr       (cplx_yr)
  );

  qrd4x4_real u_q4 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(q4_in_valid),
    .in_ready(q4_in_ready),
    .h       (q4_h),
    .r_valid (q4_r_valid),
    .r       (q4_r),
    .q_valid (q4_q_valid),
    .qt      (q4_qt)
  );

  qrd_rx_rotate #(.N(4), .DEPTH(2)) u_q4_rx (
    .clk      (clk),
    .rst_n    (rst_n),
    .y_valid  (q4_in_valid && q4_in_ready),
    .y        (q4_y),
    .q_valid  (q4_q_valid),
    .qt       (q4_qt),
    .out_valid(q4_yr_valid),
    .yr       (q4_yr)
  );

endmodule
