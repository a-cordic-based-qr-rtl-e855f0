// tb_qrd2x2_real: self-checking testbench for the real 2x2 QR decomposition.
//
// Feeds random matrices back to back (whenever in_ready allows) plus a few
// corner cases (negative h11, h21 = 0, a column on the negative x axis),
// computes R and Q^T with real arithmetic, and compares within a tolerance
// that covers the CORDIC angle error, fixed-point rounding and the 0.35 %
// gain error of the shift-and-add scale correction. Checks the latency of R
// (26 cycles) and of Q^T (28 cycles) and the input rate of one matrix per
// three cycles.
module tb_qrd2x2_real;
  import qrd_pkg::*;

  localparam int  N_MAT = 200;
  localparam real SCALE = real'(1 << FRAC_W);

  logic  clk = 0;
  logic  rst_n = 0;
  logic  in_valid = 0;
  logic  in_ready;
  data_t h [2][2];
  logic  r_valid, q_valid;
  data_t r11, r12, r22;
  data_t qt [2][2];

  int checks = 0, failures = 0;
  longint cycle = 0;

  qrd2x2_real dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected values, queued in input order
  real    exp_r [$][3];
  real    exp_q [$][4];
  longint t_in  [$];
  longint t_in_q[$];
  int     n_r = 0, n_q = 0;
  int     accepted = 0;
  longint last_acc = -100;

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

  task automatic check(string what, real got, real want);
    real tol = 0.004 * (want < 0 ? -want : want) + 0.004;
    checks++;
    if ((got - want > tol) || (want - got > tol)) begin
      failures++;
      $display("FAIL %s: got %f want %f", what, got, want);
    end
  endtask

  task automatic push(real a, real b, real c, real d);
    real hr [2][2];
    real n, cs, sn;
    h[0][0] = fx(a); h[0][1] = fx(b); h[1][0] = fx(c); h[1][1] = fx(d);
    // reference from the quantised inputs
    hr[0][0] = rl(h[0][0]); hr[0][1] = rl(h[0][1]);
    hr[1][0] = rl(h[1][0]); hr[1][1] = rl(h[1][1]);
    n  = $sqrt(hr[0][0] * hr[0][0] + hr[1][0] * hr[1][0]);
    cs = hr[0][0] / n;
    sn = hr[1][0] / n;
    exp_r.push_back('{n, cs * hr[0][1] + sn * hr[1][1], -sn * hr[0][1] + cs * hr[1][1]});
    exp_q.push_back('{cs, sn, -sn, cs});
    begin
      int n_before = accepted;
      in_valid = 1;
      while (accepted == n_before) @(negedge clk);   // wait for acceptance
      in_valid = 0;
    end
  endtask

  // result checker
  always @(posedge clk) begin
    if (rst_n && r_valid) begin
      real e [3];
      longint t0;
      e  = exp_r[0];
      t0 = t_in[0];
      exp_r.delete(0);
      t_in.delete(0);
      check("r11", rl(r11), e[0]);
      check("r12", rl(r12), e[1]);
      check("r22", rl(r22), e[2]);
      checks++;
      if (cycle - t0 != 26) begin
        failures++;
        $display("FAIL R latency");
      end
      n_r++;
    end
    if (rst_n && q_valid) begin
      real e [4];
      longint t0;
      e  = exp_q[0];
      t0 = t_in_q[0];
      exp_q.delete(0);
      t_in_q.delete(0);
      check("q00", rl(qt[0][0]), e[0]);
      check("q01", rl(qt[0][1]), e[1]);
      check("q10", rl(qt[1][0]), e[2]);
      check("q11", rl(qt[1][1]), e[3]);
      checks++;
      if (cycle - t0 != 28) begin
        failures++;
        $display("FAIL Q latency");
      end
      n_q++;
    end
  end

  // input rate: once every three cycles when offered back to back
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (cycle - last_acc < 3) begin
        failures++;
        $display("FAIL accepted two matrices %0d cycles apart", cycle - last_acc);
      end
      last_acc <= cycle;
      t_in.push_back(cycle);
      t_in_q.push_back(cycle);
      accepted++;
    end
  end

  initial begin
    h = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // corner cases
    push( 1.0,  0.5,  0.0, -0.25);
    push(-1.0,  0.5,  0.0,  0.75);
    push(-0.6,  1.2,  0.8, -0.3);
    push( 0.0,  1.0,  1.0,  0.0);
    push( 0.0,  0.3, -1.5,  0.9);
    push(-1.5, -1.5, -0.01, 1.5);
    for (int i = 0; i < N_MAT; i++) begin
      real a, b, c, d;
      a = rnd(1.5);
      b = rnd(1.5);
      c = rnd(1.5);
      d = rnd(1.5);
      if (a * a + c * c < 0.01) a = 0.5;
      push(a, b, c, d);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (n_r != N_MAT + 6 || n_q != N_MAT + 6) begin
      failures++;
      $display("FAIL result count R=%0d Q=%0d", n_r, n_q);
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
