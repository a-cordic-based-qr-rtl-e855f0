// tb_qrd_top: end-to-end test of the three QR engines running at the same
// time, at the default parameters.
//
// The real 2x2 engine gets matrices back to back, so its input throttle
// engages; the complex 2x2 and real 4x4 engines get new matrices offered as
// soon as they finish. Results are checked against properties computed in
// real arithmetic: the 2x2 real R and Q^T against the Givens solution; for
// the complex engine r11, |r22| = |det H| / r11 and the column-2 norm; for
// the 4x4 engine Q^T H = R, Q^T Q = I and a zero lower triangle. Latencies
// are checked (26/28, 52/54, 108/112 cycles). Each real matrix comes with a
// received vector y = H s for a random s; the rotated y' must equal R s (the
// triangular system a detector solves) 29 or 113 cycles after the input.
// Complex matrices come with a complex y = H s, and y' = R s is checked 56
// cycles after the input. It also counts how often each
// mechanism of the design was exercised (input throttling of each engine,
// the quadrant pre-rotations of both CORDIC kinds, the second pass of the
// complex engine, reuse of 4x4 units, the row-4 buffer and the y FIFO
// holding several vectors) and fails if one
// never happened.
module tb_qrd_top;
  import qrd_pkg::*;

  localparam real SCALE = real'(1 << FRAC_W);
  localparam int  N_REAL = 60, N_CPLX = 12, N_Q4 = 6;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  real_in_valid = 0, real_in_ready, real_r_valid, real_q_valid;
  data_t real_h [2][2];
  data_t real_r11, real_r12, real_r22;
  data_t real_qt [2][2];
  data_t real_y [2];
  data_t real_yr [2];
  logic  real_yr_valid;
  logic  cplx_in_valid = 0, cplx_in_ready, cplx_r_valid, cplx_q_valid;
  data_t cplx_h_re [2][2];
  data_t cplx_h_im [2][2];
  data_t cplx_r11;
  vec_t  cplx_r12, cplx_r22;
  vec_t  cplx_qh_phase [2];
  data_t cplx_qh_rot [2][2];
  vec_t  cplx_y [2];
  vec_t  cplx_yr [2];
  logic  cplx_yr_valid;
  logic  q4_in_valid = 0, q4_in_ready, q4_r_valid, q4_q_valid;
  data_t q4_h [4][4];
  data_t q4_r [4][4];
  data_t q4_qt [4][4];
  data_t q4_y [4];
  data_t q4_yr [4];
  logic  q4_yr_valid;

  int checks = 0, failures = 0;
  longint cycle = 0;

  qrd_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rnd(real lim);
    int unsigned u;
    u = $urandom_range(0, 2000);
    return (real'(u) - 1000.0) / 1000.0 * lim;
  endfunction
  function automatic data_t fx(real v);
    return data_t'($rtoi(v * SCALE + (v >= 0 ? 0.5 : -0.5)));
  endfunction
  function automatic real rl(data_t v);
    return real'(v) / SCALE;
  endfunction
  function automatic real absr(real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(string what, real got, real want, real tol_rel, real tol_abs);
    checks++;
    if (absr(got - want) > tol_rel * absr(want) + tol_abs) begin
      failures++;
      $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  task automatic check_latency(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", what, got, want);
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_real_throttle = 0, n_cplx_throttle = 0, n_q4_throttle = 0;
  int n_vec_prerot = 0, n_rot_prerot = 0, n_cplx_step2 = 0;
  int n_q4_reuse = 0, n_q4_row4 = 0, n_y_fifo = 0;

  always @(posedge clk) if (rst_n) begin
    if (real_in_valid && !real_in_ready) n_real_throttle++;
    if (cplx_in_valid && !cplx_in_ready) n_cplx_throttle++;
    if (q4_in_valid && !q4_in_ready)     n_q4_throttle++;
    if (dut.u_real.u_vec.in_valid && dut.u_real.u_vec.in_x < 0) n_vec_prerot++;
    if (dut.u_real.u_rot.in_valid &&
        (dut.u_real.u_rot.in_angle[ANGLE_W-1] ^ dut.u_real.u_rot.in_angle[ANGLE_W-2])) n_rot_prerot++;
    if (dut.u_cplx.step2_go)            n_cplx_step2++;
    if (dut.u_q4.a_step3_out && dut.u_q4.a_otag.col == 3'd7) n_q4_reuse++;
    if (dut.u_q4.r4_valid[2*NUM_STAGES-1]) n_q4_row4++;
    if (dut.u_real_rx.count > 1)         n_y_fifo++;
  end

  // ------------------------------------------------------------ real 2x2
  real    re_exp [$][7];
  longint re_t   [$];
  real    re_yexp [$][2];
  longint re_yt   [$];
  real    re_y_cur [2];
  longint re_yt0;
  real    s_next [2];
  int     n_real = 0, n_real_in = 0, n_real_y = 0;

  always @(posedge clk) if (rst_n && real_in_valid && real_in_ready) begin
    real a, b, c, d, n, cs, sn;
    a = rl(real_h[0][0]); b = rl(real_h[0][1]); c = rl(real_h[1][0]); d = rl(real_h[1][1]);
    n = $sqrt(a * a + c * c); cs = a / n; sn = c / n;
    re_exp.push_back('{n, cs * b + sn * d, -sn * b + cs * d, cs, sn, -sn, cs});
    re_t.push_back(cycle);
    // y' = Q^T H s = R s with the exact R of this matrix
    re_yexp.push_back('{n * s_next[0] + (cs * b + sn * d) * s_next[1],
                        (-sn * b + cs * d) * s_next[1]});
    re_yt.push_back(cycle);
    n_real_in++;
  end

  real    re_cur [7];
  longint re_t0;
  always @(posedge clk) if (rst_n) begin
    if (real_r_valid) begin
      re_cur = re_exp[0];
      re_t0  = re_t[0];
      re_exp.delete(0);
      re_t.delete(0);
      check("real r11", rl(real_r11), re_cur[0], 0.004, 0.004);
      check("real r12", rl(real_r12), re_cur[1], 0.004, 0.004);
      check("real r22", rl(real_r22), re_cur[2], 0.004, 0.004);
      check_latency("real R", cycle - re_t0, 26);
    end
    if (real_q_valid) begin
      check("real q00", rl(real_qt[0][0]), re_cur[3], 0.004, 0.004);
      check("real q01", rl(real_qt[0][1]), re_cur[4], 0.004, 0.004);
      check("real q10", rl(real_qt[1][0]), re_cur[5], 0.004, 0.004);
      check("real q11", rl(real_qt[1][1]), re_cur[6], 0.004, 0.004);
      check_latency("real Q", cycle - re_t0, 28);
      n_real++;
    end
    if (real_yr_valid) begin
      re_y_cur = re_yexp[0];
      re_yt0   = re_yt[0];
      re_yexp.delete(0);
      re_yt.delete(0);
      check("real y'1", rl(real_yr[0]), re_y_cur[0], 0.006, 0.008);
      check("real y'2", rl(real_yr[1]), re_y_cur[1], 0.006, 0.008);
      check_latency("real y'", cycle - re_yt0, 29);
      n_real_y++;
    end
  end

  initial begin
    real_h = '{default: '0};
    real_y = '{default: '0};
    wait (rst_n);
    for (int i = 0; i < N_REAL; i++) begin
      int n_before;
      real a, b, c, d;
      a = rnd(1.5);
      c = rnd(1.5);
      if (a * a + c * c < 0.01) c = 0.9;
      b = rnd(1.5);
      d = rnd(1.5);
      real_h = '{'{fx(a), fx(b)}, '{fx(c), fx(d)}};
      s_next[0] = rnd(1.0);
      s_next[1] = rnd(1.0);
      real_y[0] = fx(rl(real_h[0][0]) * s_next[0] + rl(real_h[0][1]) * s_next[1]);
      real_y[1] = fx(rl(real_h[1][0]) * s_next[0] + rl(real_h[1][1]) * s_next[1]);
      real_in_valid = 1;
      n_before = n_real_in;
      while (n_real_in == n_before) @(negedge clk);
    end
    real_in_valid = 0;
  end

  // ------------------------------------------------------------ complex 2x2
  int     n_cplx = 0, n_cplx_in = 0, n_cplx_y = 0;
  real    cs_next [2][2];      // s, {re, im} per element
  real    cs_q    [$][2][2];
  real    cs_cur  [2][2];
  real    cr_r11;
  real    cr_r12 [2];
  real    cr_r22 [2];
  real    cx_exp [$][3];     // r11, |det H|, column-2 norm
  longint cx_t   [$];
  real    cx_cur [3];
  longint cx_t0;

  always @(posedge clk) if (rst_n && cplx_in_valid && cplx_in_ready) begin
    real ar [2][2], ai [2][2], dr, di;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        ar[r][c] = rl(cplx_h_re[r][c]);
        ai[r][c] = rl(cplx_h_im[r][c]);
      end
    dr = ar[0][0] * ar[1][1] - ai[0][0] * ai[1][1] - (ar[0][1] * ar[1][0] - ai[0][1] * ai[1][0]);
    di = ar[0][0] * ai[1][1] + ai[0][0] * ar[1][1] - (ar[0][1] * ai[1][0] + ai[0][1] * ar[1][0]);
    cx_exp.push_back('{$sqrt(ar[0][0] ** 2 + ai[0][0] ** 2 + ar[1][0] ** 2 + ai[1][0] ** 2),
                       $sqrt(dr * dr + di * di),
                       $sqrt(ar[0][1] ** 2 + ai[0][1] ** 2 + ar[1][1] ** 2 + ai[1][1] ** 2)});
    cx_t.push_back(cycle);
    cs_q.push_back(cs_next);
    n_cplx_in++;
  end

  // a new matrix is offered as soon as the previous one was taken
  initial begin
    cplx_h_re = '{default: '0};
    cplx_h_im = '{default: '0};
    cplx_y = '{default: '0};
    wait (rst_n);
    for (int i = 0; i < N_CPLX; i++) begin
      int n_before;
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++) begin
          cplx_h_re[r][c] = fx(rnd(1.0));
          cplx_h_im[r][c] = fx(rnd(1.0));
        end
      for (int c = 0; c < 2; c++) begin
        cs_next[c][0] = rnd(0.5);
        cs_next[c][1] = rnd(0.5);
      end
      for (int r = 0; r < 2; r++) begin
        real yre, yim;
        yre = 0.0;
        yim = 0.0;
        for (int c = 0; c < 2; c++) begin
          yre += rl(cplx_h_re[r][c]) * cs_next[c][0] - rl(cplx_h_im[r][c]) * cs_next[c][1];
          yim += rl(cplx_h_re[r][c]) * cs_next[c][1] + rl(cplx_h_im[r][c]) * cs_next[c][0];
        end
        cplx_y[r].x = fx(yre);
        cplx_y[r].y = fx(yim);
      end
      cplx_in_valid = 1;
      n_before = n_cplx_in;
      while (n_cplx_in == n_before) @(negedge clk);
    end
    cplx_in_valid = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (cplx_r_valid) begin
      real m12, m22;
      cx_cur = cx_exp[0];
      cx_t0  = cx_t[0];
      cx_exp.delete(0);
      cx_t.delete(0);
      m12 = $sqrt(rl(cplx_r12.x) ** 2 + rl(cplx_r12.y) ** 2);
      m22 = $sqrt(rl(cplx_r22.x) ** 2 + rl(cplx_r22.y) ** 2);
      check("cplx r11", rl(cplx_r11), cx_cur[0], 0.008, 0.006);
      check("cplx |r22|", m22, cx_cur[1] / cx_cur[0], 0.01, 0.01);
      check("cplx column-2 norm", $sqrt(m12 * m12 + m22 * m22), cx_cur[2], 0.01, 0.008);
      check_latency("cplx R", cycle - cx_t0, 52);
      cr_r11    = rl(cplx_r11);
      cr_r12[0] = rl(cplx_r12.x);
      cr_r12[1] = rl(cplx_r12.y);
      cr_r22[0] = rl(cplx_r22.x);
      cr_r22[1] = rl(cplx_r22.y);
    end
    if (cplx_q_valid) begin
      for (int k = 0; k < 2; k++)
        check("cplx |p|", $sqrt(rl(cplx_qh_phase[k].x) ** 2 + rl(cplx_qh_phase[k].y) ** 2), 1.0, 0.0, 0.008);
      check("cplx G2 rows", rl(cplx_qh_rot[0][0]) ** 2 + rl(cplx_qh_rot[0][1]) ** 2, 1.0, 0.0, 0.02);
      check_latency("cplx Q", cycle - cx_t0, 54);
      n_cplx++;
    end
    if (cplx_yr_valid) begin
      // y' = Q^H H s = R s, complex, with R of the same matrix
      cs_cur = cs_q[0];
      cs_q.delete(0);
      check("cplx y'1 re", rl(cplx_yr[0].x),
            cr_r11 * cs_cur[0][0] + cr_r12[0] * cs_cur[1][0] - cr_r12[1] * cs_cur[1][1], 0.015, 0.015);
      check("cplx y'1 im", rl(cplx_yr[0].y),
            cr_r11 * cs_cur[0][1] + cr_r12[0] * cs_cur[1][1] + cr_r12[1] * cs_cur[1][0], 0.015, 0.015);
      check("cplx y'2 re", rl(cplx_yr[1].x), cr_r22[0] * cs_cur[1][0] - cr_r22[1] * cs_cur[1][1], 0.015, 0.015);
      check("cplx y'2 im", rl(cplx_yr[1].y), cr_r22[0] * cs_cur[1][1] + cr_r22[1] * cs_cur[1][0], 0.015, 0.015);
      check_latency("cplx y'", cycle - cx_t0, 56);
      n_cplx_y++;
    end
  end

  // ------------------------------------------------------------ real 4x4
  int     n_q4 = 0, n_q4_in = 0;
  real    q4_queue [$][4][4];
  longint q4_tq [$];
  longint q4_t0;
  real    q4_hm [4][4];
  data_t  q4_rh [4][4];
  real    q4_sq [$][4];
  real    q4_s_next [4];
  real    q4_s_cur [4];
  int     n_q4_y = 0;

  always @(posedge clk) if (rst_n && q4_in_valid && q4_in_ready) begin
    real m [4][4];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) m[i][j] = rl(q4_h[i][j]);
    q4_queue.push_back(m);
    q4_tq.push_back(cycle);
    q4_sq.push_back(q4_s_next);
    n_q4_in++;
  end

  initial begin
    q4_h = '{default: '0};
    q4_y = '{default: '0};
    wait (rst_n);
    for (int n = 0; n < N_Q4; n++) begin
      int n_before;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) q4_h[i][j] = fx(rnd(1.0));
      for (int j = 0; j < 4; j++) q4_s_next[j] = rnd(0.5);
      for (int i = 0; i < 4; i++) begin
        real acc;
        acc = 0.0;
        for (int j = 0; j < 4; j++) acc += rl(q4_h[i][j]) * q4_s_next[j];
        q4_y[i] = fx(acc);
      end
      q4_in_valid = 1;
      n_before = n_q4_in;
      while (n_q4_in == n_before) @(negedge clk);
    end
    q4_in_valid = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (q4_r_valid) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < i; j++) check("q4 lower r", rl(q4_r[i][j]), 0.0, 0.0, 0.0);
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (q4_r[i][i] < 0) begin
          failures++;
          $display("FAIL q4 negative diagonal");
        end
      end
      q4_rh = q4_r;
      q4_hm = q4_queue[0];
      q4_t0 = q4_tq[0];
      q4_queue.delete(0);
      q4_tq.delete(0);
      check_latency("q4 R", cycle - q4_t0, 108);
    end
    if (q4_q_valid) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          real d, o;
          d = 0.0;
          o = 0.0;
          for (int k = 0; k < 4; k++) begin
            d += rl(q4_qt[i][k]) * q4_hm[k][j];
            o += rl(q4_qt[i][k]) * rl(q4_qt[j][k]);
          end
          check("q4 Q^T H", d, rl(q4_rh[i][j]), 0.01, 0.012);
          check("q4 Q^T Q", o, (i == j) ? 1.0 : 0.0, 0.04, 0.01);
        end
      check_latency("q4 Q", cycle - q4_t0, 112);
      n_q4++;
    end
    if (q4_yr_valid) begin
      q4_s_cur = q4_sq[0];
      q4_sq.delete(0);
      for (int i = 0; i < 4; i++) begin
        real want;
        want = 0.0;
        for (int j = i; j < 4; j++) want += rl(q4_rh[i][j]) * q4_s_cur[j];
        check("q4 y' = R s", rl(q4_yr[i]), want, 0.01, 0.012);
      end
      check_latency("q4 y'", cycle - q4_t0, 113);
      n_q4_y++;
    end
  end

  // ------------------------------------------------------------ end
  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_real_y == N_REAL && n_cplx_y == N_CPLX && n_q4_y == N_Q4);
    repeat (5) @(negedge clk);
    need("real input throttle", n_real_throttle);
    need("complex input throttle", n_cplx_throttle);
    need("4x4 input throttle", n_q4_throttle);
    need("vectoring pre-rotation", n_vec_prerot);
    need("rotation pre-rotation", n_rot_prerot);
    need("complex second pass", n_cplx_step2);
    need("4x4 unit reuse", n_q4_reuse);
    need("4x4 row-4 buffer", n_q4_row4);
    need("y FIFO with several vectors", n_y_fifo);
    need("real y' rotations", n_real_y);
    need("complex y' rotations", n_cplx_y);
    need("4x4 y' rotations", n_q4_y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog: real %0d complex %0d 4x4 %0d", n_real, n_cplx, n_q4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
