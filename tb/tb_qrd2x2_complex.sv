// tb_qrd2x2_complex: self-checking testbench for the complex 2x2 QR
// decomposition.
//
// For random complex matrices (and a few corner cases) the expected result
// is built with real arithmetic: phase factors p_k = conj(h_k1)/|h_k1|, a
// real Givens rotation of (|h11|, |h21|), R = G2 diag(p1, p2) H. The outputs
// are compared within a tolerance that covers two CORDIC passes. Also checks
// R latency (52 cycles), Q^H latency (54 cycles) and that Q^H H rebuilt from
// the hardware outputs equals the hardware R.
module tb_qrd2x2_complex;
  import qrd_pkg::*;

  localparam int  N_MAT = 60;
  localparam real SCALE = real'(1 << FRAC_W);

  logic  clk = 0;
  logic  rst_n = 0;
  logic  in_valid = 0;
  logic  in_ready;
  data_t h_re [2][2];
  data_t h_im [2][2];
  logic  r_valid, q_valid;
  data_t r11;
  vec_t  r12, r22;
  vec_t  qh_phase [2];
  data_t qh_rot [2][2];

  int checks = 0, failures = 0;
  longint cycle = 0, t_acc = 0;
  int n_done = 0;

  // expected: r11, r12 re/im, r22 re/im, p1 re/im, p2 re/im, c, s
  real e [11];
  real hr [2][2], hi [2][2];
  real got_r [5];

  qrd2x2_complex dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // uniform random value in [-lim, lim] with a step of lim / 1000
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

  task automatic check(string what, real got, real want, real tol_rel);
    real tol = tol_rel * (want < 0 ? -want : want) + tol_rel;
    checks++;
    if ((got - want > tol) || (want - got > tol)) begin
      failures++;
      $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  task automatic run(real a0, real b0, real a1, real b1, real a2, real b2, real a3, real b3);
    real m1, m2, p1r, p1i, p2r, p2i, x12r, x12i, x22r, x22i, n, c, s;
    h_re[0][0] = fx(a0); h_im[0][0] = fx(b0);
    h_re[0][1] = fx(a1); h_im[0][1] = fx(b1);
    h_re[1][0] = fx(a2); h_im[1][0] = fx(b2);
    h_re[1][1] = fx(a3); h_im[1][1] = fx(b3);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        hr[i][j] = rl(h_re[i][j]);
        hi[i][j] = rl(h_im[i][j]);
      end
    m1  = $sqrt(hr[0][0] ** 2 + hi[0][0] ** 2);
    m2  = $sqrt(hr[1][0] ** 2 + hi[1][0] ** 2);
    p1r = hr[0][0] / m1;  p1i = -hi[0][0] / m1;
    p2r = hr[1][0] / m2;  p2i = -hi[1][0] / m2;
    x12r = p1r * hr[0][1] - p1i * hi[0][1];
    x12i = p1r * hi[0][1] + p1i * hr[0][1];
    x22r = p2r * hr[1][1] - p2i * hi[1][1];
    x22i = p2r * hi[1][1] + p2i * hr[1][1];
    n = $sqrt(m1 * m1 + m2 * m2);
    c = m1 / n;
    s = m2 / n;
    e = '{n, c * x12r + s * x22r, c * x12i + s * x22i,
          -s * x12r + c * x22r, -s * x12i + c * x22i,
          p1r, p1i, p2r, p2i, c, s};
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1;
    @(posedge clk);
    t_acc = cycle;
    @(negedge clk);
    in_valid = 0;
    h_re = '{default: '0};   // inputs need not be held
    h_im = '{default: '0};
    @(posedge clk);
    while (!q_valid) @(posedge clk);
    @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && r_valid) begin
      check("r11",    rl(r11),   e[0], 0.008);
      check("r12.re", rl(r12.x), e[1], 0.008);
      check("r12.im", rl(r12.y), e[2], 0.008);
      check("r22.re", rl(r22.x), e[3], 0.008);
      check("r22.im", rl(r22.y), e[4], 0.008);
      got_r = '{rl(r11), rl(r12.x), rl(r12.y), rl(r22.x), rl(r22.y)};
      checks++;
      if (cycle - t_acc != 52) begin
        failures++;
        $display("FAIL R latency %0d", cycle - t_acc);
      end
    end
    if (rst_n && q_valid) begin
      real qr [2][2], qi [2][2], g [2][2];
      check("p1.re", rl(qh_phase[0].x), e[5], 0.008);
      check("p1.im", rl(qh_phase[0].y), e[6], 0.008);
      check("p2.re", rl(qh_phase[1].x), e[7], 0.008);
      check("p2.im", rl(qh_phase[1].y), e[8], 0.008);
      check("g00", rl(qh_rot[0][0]),  e[9],  0.008);
      check("g01", rl(qh_rot[0][1]),  e[10], 0.008);
      check("g10", rl(qh_rot[1][0]), -e[10], 0.008);
      check("g11", rl(qh_rot[1][1]),  e[9],  0.008);
      // rebuild Q^H = G2 diag(p1, p2) from the outputs and apply it to H
      for (int i = 0; i < 2; i++)
        for (int k = 0; k < 2; k++) begin
          g[i][k]  = rl(qh_rot[i][k]);
          qr[i][k] = g[i][k] * rl(qh_phase[k].x);
          qi[i][k] = g[i][k] * rl(qh_phase[k].y);
        end
      begin
        real y10r, y10i, y11r, y11i;
        y10r = qr[1][0] * hr[0][0] - qi[1][0] * hi[0][0] + qr[1][1] * hr[1][0] - qi[1][1] * hi[1][0];
        y10i = qr[1][0] * hi[0][0] + qi[1][0] * hr[0][0] + qr[1][1] * hi[1][0] + qi[1][1] * hr[1][0];
        y11r = qr[1][0] * hr[0][1] - qi[1][0] * hi[0][1] + qr[1][1] * hr[1][1] - qi[1][1] * hi[1][1];
        y11i = qr[1][0] * hi[0][1] + qi[1][0] * hr[0][1] + qr[1][1] * hi[1][1] + qi[1][1] * hr[1][1];
        check("(Q^H H)21.re", y10r, 0.0, 0.02);
        check("(Q^H H)21.im", y10i, 0.0, 0.02);
        check("(Q^H H)22.re", y11r, got_r[3], 0.02);
        check("(Q^H H)22.im", y11i, got_r[4], 0.02);
      end
      checks++;
      if (cycle - t_acc != 54) begin
        failures++;
        $display("FAIL Q latency %0d", cycle - t_acc);
      end
      n_done++;
    end
  end

  initial begin
    h_re = '{default: '0};
    h_im = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run( 1.0, 0.0,  0.5, 0.5,  0.0, 1.0, -0.5, 0.25);
    run(-1.0, 0.0,  0.3, -0.2, -0.2, -0.9, 0.7, 0.1);
    run( 0.0, -1.0, 1.0, 1.0,   0.5, 0.0, 0.0, -1.0);
    for (int i = 0; i < N_MAT; i++) begin
      real v [8];
      foreach (v[k]) v[k] = rnd(1.0);
      if (v[0] * v[0] + v[1] * v[1] < 0.01) v[0] = 0.7;
      if (v[4] * v[4] + v[5] * v[5] < 0.01) v[5] = -0.6;
      run(v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]);
    end
    checks++;
    if (n_done != N_MAT + 3) begin
      failures++;
      $display("FAIL result count %0d", n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
