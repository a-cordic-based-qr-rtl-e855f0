// qrd_rx_rotate_cplx: rotation of the received vector, y' = Q^H y, for the
// complex 2x2 decomposition.
//
// The complex engine returns Q^H in factored form, Q^H = G2 diag(p1, p2):
// two unit phase factors p_k and one real 2x2 rotation G2. This block applies
// it in that order. First each element is turned by its phase, u_k = p_k y_k
// (a complex product). Then G2 acts on the real parts (u1.x, u2.x) and on the
// imaginary parts (u1.y, u2.y) separately, since it is real. Complex numbers
// are vec_t with x = real part and y = imaginary part.
//
// As in qrd_rx_rotate, y is written into a FIFO in the cycle the engine
// accepts its matrix (y_valid), and q_valid pops the oldest one. The phase
// step is registered in the q_valid cycle together with G2; the G2 step is
// registered one cycle later. So y' is valid (out_valid) two cycles after
// q_valid. Both steps round half-up to the matrix format and saturate.
//
// The source gives only the function, y' = Q^H y; the FIFO, the two-step
// order and the multipliers are this design's choice.
module qrd_rx_rotate_cplx
  import qrd_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  y_valid,
  input  vec_t  y      [2],
  input  logic  q_valid,
  input  vec_t  phase  [2],
  input  data_t rot    [2][2],
  output logic  out_valid,
  output vec_t  yr     [2]
);

  localparam int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned SUM_W  = PROD_W + 2;

  typedef logic signed [SUM_W-1:0]  acc_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  vec_t             fifo [DEPTH][2];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             push, pop;
  vec_t             y_head [2];

  assign push = y_valid;
  assign pop  = q_valid && (count != '0);

  function automatic logic [PTR_W-1:0] ptr_next(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= ptr_next(wr_ptr);
      if (pop)  rd_ptr <= ptr_next(rd_ptr);
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push)
      for (int k = 0; k < 2; k++) fifo[wr_ptr][k] <= y[k];
  end

  always_comb begin
    for (int k = 0; k < 2; k++) y_head[k] = fifo[rd_ptr][k];
  end

  // Round half-up from 2*FRAC_W to FRAC_W fraction bits and saturate.
  function automatic data_t round_sat(acc_t a);
    acc_t r;
    r = (a + acc_t'(1 <<< (FRAC_W - 1))) >>> FRAC_W;
    if (r > acc_t'(2 ** (DATA_W - 1) - 1))   return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -acc_t'(2 ** (DATA_W - 1))) return {1'b1, {(DATA_W-1){1'b0}}};
    else                                     return r[DATA_W-1:0];
  endfunction

  // a*b + c*d, full precision, then rounded
  function automatic data_t dot2(data_t a, data_t b, data_t c, data_t d);
    prod_t p1, p2;
    p1 = a * b;
    p2 = c * d;
    return round_sat(acc_t'(p1) + acc_t'(p2));
  endfunction

  // step 1: u_k = p_k y_k
  vec_t  u_next [2];
  vec_t  u_q    [2];
  data_t rot_q  [2][2];
  logic  step1_valid;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      u_next[k].x = dot2(phase[k].x, y_head[k].x, -phase[k].y, y_head[k].y);
      u_next[k].y = dot2(phase[k].x, y_head[k].y,  phase[k].y, y_head[k].x);
    end
  end

  always_ff @(posedge clk) begin
    if (pop) begin
      u_q   <= u_next;
      rot_q <= rot;
    end
  end

  // step 2: y' = G2 u, on the real and the imaginary parts
  vec_t yr_next [2];

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      yr_next[i].x = dot2(rot_q[i][0], u_q[0].x, rot_q[i][1], u_q[1].x);
      yr_next[i].y = dot2(rot_q[i][0], u_q[0].y, rot_q[i][1], u_q[1].y);
    end
  end

  always_ff @(posedge clk) begin
    if (step1_valid) yr <= yr_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step1_valid <= 1'b0;
      out_valid   <= 1'b0;
    end else begin
      step1_valid <= pop;
      out_valid   <= step1_valid;
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    push && !pop |-> count < (PTR_W+1)'(DEPTH));
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    q_valid |-> count != '0);

endmodule
