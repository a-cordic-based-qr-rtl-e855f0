// tb_qrd_rx_rotate_cplx: pushes complex received vectors and presents the
// factored Q^H (two unit phases and a real rotation) a fixed 6 cycles after
// each push, with pushes spaced so that up to two vectors wait, as behind the
// complex engine. The result is compared with an integer model of the two
// steps (complex phase product rounded half-up, then the real rotation of
// the real and imaginary parts, rounded again), and out_valid must follow
// q_valid by exactly two cycles.
module tb_qrd_rx_rotate_cplx;
  import qrd_pkg::*;

  localparam int LAT  = 6;
  localparam int NCYC = 4000;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  y_valid = 0;
  logic  q_valid = 0;
  vec_t  y     [2];
  vec_t  phase [2];
  data_t rot   [2][2];
  logic  out_valid;
  vec_t  yr    [2];

  int checks = 0, failures = 0, n_out = 0, n_two = 0;

  qrd_rx_rotate_cplx dut (.*);

  always #5 clk = ~clk;

  function automatic int unsigned rnd(int unsigned lo, int unsigned hi);
    return lo + ($urandom % (hi - lo + 1));
  endfunction

  function automatic data_t fx(real v);
    return data_t'($rtoi(v * real'(1 << FRAC_W) + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic longint rs(longint acc);
    longint r;
    r = (acc + (longint'(1) <<< (FRAC_W - 1))) >>> FRAC_W;
    if (r > 32767)  return 32767;
    if (r < -32768) return -32768;
    return r;
  endfunction

  vec_t   q_y [$][2];
  int     due [$];
  vec_t   expv [2];
  int     exp_at = -1;
  int     cyc;
  int     last_push = -100;

  initial begin
    y = '{default: '0};
    phase = '{default: '0};
    rot = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      bit do_pop, do_push;
      checks++;
      if (out_valid != (cyc == exp_at)) begin
        failures++;
        $display("FAIL cycle %0d: out_valid %b", cyc, out_valid);
      end
      if (cyc == exp_at) begin
        n_out++;
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (yr[k] != expv[k]) begin
            failures++;
            $display("FAIL y'[%0d] = (%0d, %0d), expected (%0d, %0d)",
                     k, int'(yr[k].x), int'(yr[k].y), int'(expv[k].x), int'(expv[k].y));
          end
        end
      end

      do_pop = (due.size() > 0) && (due[0] == cyc);
      q_valid = do_pop;
      if (do_pop) begin
        longint ux [2], uy [2];
        real a;
        for (int k = 0; k < 2; k++) begin
          a = real'(rnd(0, 6283)) / 1000.0;
          phase[k].x = fx($cos(a));
          phase[k].y = fx($sin(a));
          ux[k] = rs(longint'(phase[k].x) * longint'(q_y[0][k].x) - longint'(phase[k].y) * longint'(q_y[0][k].y));
          uy[k] = rs(longint'(phase[k].x) * longint'(q_y[0][k].y) + longint'(phase[k].y) * longint'(q_y[0][k].x));
        end
        a = real'(rnd(0, 6283)) / 1000.0;
        rot[0][0] = fx($cos(a));  rot[0][1] = fx($sin(a));
        rot[1][0] = fx(-$sin(a)); rot[1][1] = fx($cos(a));
        for (int i = 0; i < 2; i++) begin
          expv[i].x = data_t'(rs(longint'(rot[i][0]) * ux[0] + longint'(rot[i][1]) * ux[1]));
          expv[i].y = data_t'(rs(longint'(rot[i][0]) * uy[0] + longint'(rot[i][1]) * uy[1]));
        end
        exp_at = cyc + 2;
        q_y.delete(0);
        due.delete(0);
      end else begin
        phase = '{default: '0};
        rot = '{default: '0};
      end

      // at most two vectors waiting: pushes at least LAT/2 cycles apart
      do_push = (cyc - last_push >= LAT / 2) && (rnd(0, 2) == 0) && (cyc < NCYC - LAT - 4);
      y_valid = do_push;
      if (do_push) begin
        vec_t v [2];
        for (int k = 0; k < 2; k++) begin
          v[k].x = data_t'(int'(rnd(0, 2 * 24000)) - 24000);
          v[k].y = data_t'(int'(rnd(0, 2 * 24000)) - 24000);
          y[k] = v[k];
        end
        q_y.push_back(v);
        due.push_back(cyc + LAT);
        last_push = cyc;
      end
      if (due.size() >= 2) n_two++;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);

    checks++;
    if (n_out < 500 || n_two == 0) begin
      failures++;
      $display("FAIL only %0d outputs, %0d cycles with two waiting", n_out, n_two);
    end
    $display("outputs %0d, cycles with two vectors waiting %0d", n_out, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 100) * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
