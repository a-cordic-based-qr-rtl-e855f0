// tb_qrd4x4_real: self-checking testbench for the real 4x4 QR decomposition.
//
// For random matrices (and the identity and a permutation as corner cases)
// the expected R comes from a modified Gram-Schmidt QR in real arithmetic,
// with r11..r33 >= 0 like the hardware; the sign of the last row is taken
// from the hardware r44. Also checks that the hardware Q^T is orthonormal
// and that Q^T H equals the hardware R, that the lower triangle is zero, and
// the latencies of R (108 cycles) and Q^T (112 cycles).
module tb_qrd4x4_real;
  import qrd_pkg::*;

  localparam int  N_MAT = 40;
  localparam real SCALE = real'(1 << FRAC_W);

  logic  clk = 0;
  logic  rst_n = 0;
  logic  in_valid = 0;
  logic  in_ready;
  data_t h  [4][4];
  logic  r_valid, q_valid;
  data_t r  [4][4];
  data_t qt [4][4];

  int checks = 0, failures = 0, n_done = 0;
  longint cycle = 0, t_acc = 0;
  real hm [4][4];
  real re [4][4];     // reference R

  qrd4x4_real dut (.*);

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
  function automatic real absr(real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(string what, real got, real want, real tol_rel, real tol_abs);
    checks++;
    if (absr(got - want) > tol_rel * absr(want) + tol_abs) begin
      failures++;
      $display("FAIL %s: got %f want %f", what, got, want);
      for (int i = 0; i < 4; i++)
        $display("  H %f %f %f %f   R %f %f %f %f", hm[i][0], hm[i][1], hm[i][2], hm[i][3],
                 rl(r[i][0]), rl(r[i][1]), rl(r[i][2]), rl(r[i][3]));
    end
  endtask

  // modified Gram-Schmidt, columns of hm
  task automatic reference();
    real v [4][4];
    v  = hm;
    re = '{default: 0.0};
    for (int k = 0; k < 4; k++) begin
      real n = 0.0;
      for (int i = 0; i < 4; i++) n += v[i][k] * v[i][k];
      n = $sqrt(n);
      re[k][k] = n;
      for (int i = 0; i < 4; i++) v[i][k] = v[i][k] / n;
      for (int j = k + 1; j < 4; j++) begin
        real d = 0.0;
        for (int i = 0; i < 4; i++) d += v[i][k] * v[i][j];
        re[k][j] = d;
        for (int i = 0; i < 4; i++) v[i][j] -= d * v[i][k];
      end
    end
  endtask

  task automatic run(real m [4][4]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        h[i][j]  = fx(m[i][j]);
        hm[i][j] = rl(h[i][j]);
      end
    reference();
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1;
    @(posedge clk);
    t_acc = cycle;
    @(negedge clk);
    in_valid = 0;
    h = '{default: '0};
    while (!q_valid) @(negedge clk);
    @(negedge clk);
  endtask

  data_t r_hold [4][4];

  always @(posedge clk) begin
    if (rst_n && r_valid) begin
      real sgn;
      sgn = (r[3][3] < 0) ? -1.0 : 1.0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (j < i) begin
            checks++;
            if (r[i][j] != '0) begin
              failures++;
              $display("FAIL r[%0d][%0d] below the diagonal is %0d", i, j, r[i][j]);
            end
          end else begin
            check($sformatf("r[%0d][%0d]", i, j), rl(r[i][j]),
                  (i == 3 ? sgn : 1.0) * re[i][j], 0.03, 0.012);
          end
      r_hold = r;
      checks++;
      if (cycle - t_acc != 108) begin
        failures++;
        $display("FAIL R latency %0d", cycle - t_acc);
      end
    end
    if (rst_n && q_valid) begin
      // orthonormal rows
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 4; k++) begin
          real d;
          d = 0.0;
          for (int j = 0; j < 4; j++) d += rl(qt[i][j]) * rl(qt[k][j]);
          check($sformatf("QQ^T[%0d][%0d]", i, k), d, (i == k) ? 1.0 : 0.0, 0.04, 0.01);
        end
      // Q^T H = R
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          real d;
          d = 0.0;
          for (int k = 0; k < 4; k++) d += rl(qt[i][k]) * hm[k][j];
          check($sformatf("(Q^T H)[%0d][%0d]", i, j), d, rl(r_hold[i][j]), 0.01, 0.012);
        end
      checks++;
      if (cycle - t_acc != 112) begin
        failures++;
        $display("FAIL Q latency %0d", cycle - t_acc);
      end
      n_done++;
    end
  end

  initial begin
    real m [4][4];
    h = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    m = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.0}, '{0.0, 0.0, 1.0, 0.0}, '{0.0, 0.0, 0.0, 1.0}};
    run(m);
    m = '{'{0.0, 0.0, 0.0, -1.0}, '{0.0, 0.0, 1.0, 0.0}, '{0.0, -1.0, 0.0, 0.0}, '{1.0, 0.0, 0.0, 0.0}};
    run(m);
    for (int n = 0; n < N_MAT; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          m[i][j] = rnd(1.0);
      run(m);
    end
    checks++;
    if (n_done != N_MAT + 2) begin
      failures++;
      $display("FAIL result count %0d", n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
