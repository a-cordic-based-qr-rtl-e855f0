// tb_cordic_rotation: rotates random vectors by random angles over the full
// circle (plus +-pi/2 and pi) on consecutive cycles and compares with the
// rotation computed in real arithmetic, including the 0.35 % gain of the
// shift-and-add scale correction. Checks the 13-cycle latency and the tag.
module tb_cordic_rotation;
  import qrd_pkg::*;

  localparam real SCALE = real'(1 << FRAC_W);
  localparam real PI    = 3.14159265358979;
  localparam real GAIN  = 0.609375 / 0.6072529;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       in_valid = 0;
  data_t      in_x, in_y;
  angle_t     in_angle;
  logic [7:0] in_tag;
  logic       out_valid;
  data_t      out_x, out_y;
  logic [7:0] out_tag;

  int checks = 0, failures = 0, n_out = 0;
  longint cycle = 0;
  real    e_x [$];
  real    e_y [$];
  longint e_t [$];

  cordic_rotation #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rnd(real lim);
    int unsigned u;
    u = $urandom_range(0, 2000);
    return (real'(u) - 1000.0) / 1000.0 * lim;
  endfunction

  function automatic logic close(real got, real want);
    real d = got - want;
    return (d < 0.002 && d > -0.002);
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      real x, y, a;
      x = real'(in_x) / SCALE;
      y = real'(in_y) / SCALE;
      a = real'(in_angle) / real'(1 << (ANGLE_W - 1)) * PI;
      e_x.push_back((x * $cos(a) - y * $sin(a)) * GAIN);
      e_y.push_back((x * $sin(a) + y * $cos(a)) * GAIN);
      e_t.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      real ex, ey;
      longint t0;
      ex = e_x[0]; ey = e_y[0]; t0 = e_t[0];
      e_x.delete(0); e_y.delete(0); e_t.delete(0);
      checks += 3;
      if (!close(real'(out_x) / SCALE, ex) || !close(real'(out_y) / SCALE, ey)) begin
        failures++;
        $display("FAIL got (%f,%f) want (%f,%f)", real'(out_x) / SCALE, real'(out_y) / SCALE, ex, ey);
      end
      if (cycle - t0 != 13) begin
        failures++;
        $display("FAIL latency %0d", cycle - t0);
      end
      if (out_tag != 8'(n_out)) begin
        failures++;
        $display("FAIL tag");
      end
      n_out++;
    end
  end

  task automatic put(real x, real y, angle_t a);
    in_x = data_t'($rtoi(x * SCALE));
    in_y = data_t'($rtoi(y * SCALE));
    in_angle = a;
    in_valid = 1;
    @(negedge clk);
    in_tag = in_tag + 8'd1;
  endtask

  initial begin
    in_x = '0; in_y = '0; in_angle = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    put(1.0, 0.0, 16'sh4000);  put(1.0, 0.0, -16'sh4000);
    put(1.0, 0.5, 16'sh8000);  put(0.0, 1.0, 16'sh3fff);
    put(0.7, -0.2, 16'shc000); put(0.7, -0.2, 16'sh0000);
    for (int i = 0; i < 400; i++) put(rnd(1.4), rnd(1.4), angle_t'($urandom));
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != 406) begin
      failures++;
      $display("FAIL count %0d", n_out);
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
