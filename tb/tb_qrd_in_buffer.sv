// tb_qrd_in_buffer: drives sets of three vectors with an angle that arrives
// DELAY cycles later (as from the vectoring CORDIC) and checks that the three
// vectors leave on consecutive cycles, the first in the angle's own cycle,
// each with the negated angle, its index and the column norm. Sets follow
// each other as closely as allowed (every third cycle) and with gaps.
module tb_qrd_in_buffer;
  import qrd_pkg::*;

  localparam int NV = 3;
  localparam int DELAY = NUM_STAGES;

  logic     clk = 0;
  logic     rst_n = 0;
  vec_t     in_vecs [NV];
  logic     vec_valid;
  data_t    vec_mag;
  angle_t   vec_angle;
  logic     out_valid;
  vec_t     out_vec;
  angle_t   out_angle;
  rot_tag_t out_tag;

  int checks = 0, failures = 0, n_out = 0;
  longint cycle = 0;

  // what the testbench sent: vectors per set, and at which cycle
  vec_t   sent_v [$][NV];
  longint sent_t [$];
  // angles/norms scheduled for the vectoring side
  angle_t sch_a [$];
  data_t  sch_m [$];
  longint sch_t [$];
  // expected outputs
  vec_t   exp_v [$];
  angle_t exp_a [$];
  data_t  exp_m [$];
  int     exp_i [$];
  longint exp_t [$];

  qrd_in_buffer #(.NV(NV), .DELAY(DELAY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // emulate the vectoring CORDIC: angle DELAY cycles after the vectors
  always_comb begin
    vec_valid = (sch_t.size() > 0) && (sch_t[0] == cycle);
    vec_angle = (sch_t.size() > 0) ? sch_a[0] : '0;
    vec_mag   = (sch_t.size() > 0) ? sch_m[0] : '0;
  end

  always @(posedge clk) begin
    if (rst_n && vec_valid) begin
      sch_t.delete(0); sch_a.delete(0); sch_m.delete(0);
    end
    if (rst_n && out_valid) begin
      checks++;
      if (exp_v.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        if (out_vec != exp_v[0] || out_angle != exp_a[0] || out_tag.mag != exp_m[0] ||
            out_tag.idx != IDX_W'(exp_i[0]) || cycle != exp_t[0]) begin
          failures++;
          $display("FAIL out idx %0d at %0d: vec %h/%h angle %0d/%0d", out_tag.idx, cycle,
                   out_vec, exp_v[0], out_angle, exp_a[0]);
        end
        exp_v.delete(0); exp_a.delete(0); exp_m.delete(0); exp_i.delete(0); exp_t.delete(0);
      end
      n_out++;
    end
  end

  task automatic send(int gap);
    vec_t   v [NV];
    angle_t a;
    data_t  m;
    for (int k = 0; k < NV; k++) v[k] = vec_t'($urandom);
    a = angle_t'($urandom);
    m = data_t'($urandom);
    in_vecs = v;
    @(posedge clk);
    sch_t.push_back(cycle + DELAY);
    sch_a.push_back(a);
    sch_m.push_back(m);
    for (int k = 0; k < NV; k++) begin
      exp_v.push_back(v[k]);
      exp_a.push_back(-a);
      exp_m.push_back(m);
      exp_i.push_back(k);
      exp_t.push_back(cycle + DELAY + k);
    end
    @(negedge clk);
    for (int k = 0; k < NV; k++) in_vecs[k] = vec_t'($urandom);   // junk in between
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < NV; k++) in_vecs[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 60; i++) send((i % 4 == 0) ? 5 : NV - 1);
    repeat (DELAY + NV + 4) @(negedge clk);
    checks++;
    if (n_out != 60 * NV || exp_v.size() != 0) begin
      failures++;
      $display("FAIL output count %0d", n_out);
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
