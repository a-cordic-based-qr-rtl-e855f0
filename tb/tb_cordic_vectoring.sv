// tb_cordic_vectoring: feeds random vectors in all four quadrants on
// consecutive cycles (plus the axes) and compares the length and angle with
// sqrt(x^2+y^2) and atan2(y, x) computed in real arithmetic. The length is
// expected with the 0.35 % gain of the shift-and-add scale correction.
// Checks the 13-cycle latency, that a vector is accepted every cycle, and
// the tag.
module tb_cordic_vectoring;
  import qrd_pkg::*;

  localparam real SCALE = real'(1 << FRAC_W);
  localparam real PI    = 3.14159265358979;
  localparam real GAIN  = 0.609375 / 0.6072529;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       in_valid = 0;
  data_t      in_x, in_y;
  logic [7:0] in_tag;
  logic       out_valid;
  data_t      out_mag;
  angle_t     out_angle;
  logic [7:0] out_tag;

  int checks = 0, failures = 0, n_out = 0;
  longint cycle = 0;
  real    e_mag [$];
  real    e_ang [$];
  longint e_t   [$];

  cordic_vectoring #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real rnd(real lim);
    int unsigned u;
    u = $urandom_range(0, 2000);
    return (real'(u) - 1000.0) / 1000.0 * lim;
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      real x, y;
      x = real'(in_x) / SCALE;
      y = real'(in_y) / SCALE;
      e_mag.push_back($sqrt(x * x + y * y) * GAIN);
      e_ang.push_back($atan2(y, x));
      e_t.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      real m, a, da;
      longint t0;
      m  = e_mag[0];
      a  = e_ang[0];
      t0 = e_t[0];
      e_mag.delete(0); e_ang.delete(0); e_t.delete(0);
      da = real'(out_angle) / real'(1 << (ANGLE_W - 1)) * PI - a;
      if (da > PI)  da -= 2.0 * PI;
      if (da < -PI) da += 2.0 * PI;
      checks += 4;
      if ((real'(out_mag) / SCALE - m) > 0.001 * m + 0.001 || (m - real'(out_mag) / SCALE) > 0.001 * m + 0.001) begin
        failures++;
        $display("FAIL mag got %f want %f", real'(out_mag) / SCALE, m);
      end
      if (da > 0.0015 || da < -0.0015) begin
        failures++;
        $display("FAIL angle got %f want %f", real'(out_angle) / 32768.0 * PI, a);
      end
      if (cycle - t0 != 13) begin
        failures++;
        $display("FAIL latency %0d", cycle - t0);
      end
      if (out_tag != 8'(n_out)) begin
        failures++;
        $display("FAIL tag %0d want %0d", out_tag, 8'(n_out));
      end
      n_out++;
    end
  end

  task automatic put(real x, real y);
    in_x = data_t'($rtoi(x * SCALE));
    in_y = data_t'($rtoi(y * SCALE));
    in_valid = 1;
    @(negedge clk);
    in_tag = in_tag + 8'd1;
  endtask

  initial begin
    in_x = '0; in_y = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    put(1.0, 0.0);  put(0.0, 1.0);  put(-1.0, 0.0);  put(0.0, -1.0);
    put(-1.0, 1e-3); put(-1.0, -1e-3); put(-2.0, 2.0); put(0.5, -0.5);
    for (int i = 0; i < 400; i++) begin
      real x, y;
      x = rnd(2.0);
      y = rnd(2.0);
      if (x * x + y * y < 0.01) x = 0.3;
      put(x, y);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != 408) begin
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
