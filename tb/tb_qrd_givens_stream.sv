// tb_qrd_givens_stream: sends streams of 2..8 column vectors, pivot first,
// back to back and with gaps, and checks each output element 26 cycles after
// its input: the pivot as (sqrt(x^2+y^2), 0), every other element turned by
// minus the pivot angle, all with the 0.35 % scale-correction gain, tags
// preserved.
module tb_qrd_givens_stream;
  import qrd_pkg::*;

  localparam real SCALE = real'(1 << FRAC_W);
  localparam real GAIN  = 0.609375 / 0.6072529;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       in_valid = 0;
  logic       in_first = 0;
  vec_t       in_vec;
  logic [3:0] in_tag;
  logic       out_valid, out_first;
  vec_t       out_vec;
  logic [3:0] out_tag;

  int checks = 0, failures = 0, n_out = 0, n_in = 0;
  longint cycle = 0;
  real    cs, sn;            // rotation of the current input stream
  real    e_x [$], e_y [$];
  logic   e_f [$];
  logic [3:0] e_tag [$];
  longint e_t [$];

  qrd_givens_stream #(.TAG_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rnd(real lim);
    int unsigned u;
    u = $urandom_range(0, 2000);
    return (real'(u) - 1000.0) / 1000.0 * lim;
  endfunction
  function automatic real rl(data_t v);
    return real'(v) / SCALE;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (e_t.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        real dx, dy;
        dx = rl(out_vec.x) - e_x[0];
        dy = rl(out_vec.y) - e_y[0];
        if (dx > 0.002 || dx < -0.002 || dy > 0.002 || dy < -0.002 ||
            out_first != e_f[0] || out_tag != e_tag[0] || cycle != e_t[0]) begin
          failures++;
          $display("FAIL got (%f,%f) want (%f,%f) at %0d/%0d", rl(out_vec.x), rl(out_vec.y),
                   e_x[0], e_y[0], cycle, e_t[0]);
        end
        e_x.delete(0); e_y.delete(0); e_f.delete(0); e_tag.delete(0); e_t.delete(0);
      end
      n_out++;
    end
  end

  task automatic put(logic first, real x, real y);
    in_valid = 1;
    in_first = first;
    in_vec.x = data_t'($rtoi(x * SCALE));
    in_vec.y = data_t'($rtoi(y * SCALE));
    in_tag   = 4'($urandom);
    x = rl(in_vec.x);
    y = rl(in_vec.y);
    if (first) begin
      real n;
      n  = $sqrt(x * x + y * y);
      cs = x / n;
      sn = y / n;
      e_x.push_back(n * GAIN);
      e_y.push_back(0.0);
    end else begin
      e_x.push_back(( cs * x + sn * y) * GAIN);
      e_y.push_back((-sn * x + cs * y) * GAIN);
    end
    e_f.push_back(first);
    e_tag.push_back(in_tag);
    @(posedge clk);
    e_t.push_back(cycle + 26);
    n_in++;
    @(negedge clk);
  endtask

  initial begin
    in_vec = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 60; s++) begin
      int len;
      len = 2 + (s % 7);
      begin
        real px, py;
        px = rnd(1.5);
        py = rnd(1.5);
        if (px * px + py * py < 0.01) py = -0.8;
        if (s == 1) begin px = -1.0; py = 0.0; end
        put(1'b1, px, py);
      end
      for (int k = 1; k < len; k++) put(1'b0, rnd(1.0), rnd(1.0));
      in_valid = 0;
      if (s % 3 == 0) repeat (s % 5) @(negedge clk);
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("FAIL count %0d of %0d", n_out, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
