// qrd_rx_rotate: rotation of the received vector, y' = Q^T y, for a real
// N x N decomposition.
//
// The pre-processing unit of the detector does more than factor H: once Q is
// known the received vector is brought into the triangular coordinate system
// of R, so that the detector can solve R s = y'. The QR engines deliver G =
// Q^T (the rotated identity columns) some fixed number of cycles after they
// accept a matrix, and they may hold several matrices in flight. This block
// therefore takes the received vector y together with its matrix (y_valid in
// the cycle the engine accepts H) and keeps it in a small FIFO. When the
// engine presents qt (q_valid) the oldest y is popped and y' = qt * y is
// formed with N x N products and an adder tree, rounded half-up back to the
// matrix format and saturated.
//
// Timing: y' is registered and valid (out_valid) one cycle after q_valid.
// DEPTH must cover the matrices an engine can hold: ceil(latency / interval)
// is 10 for qrd2x2_real and 1 for qrd4x4_real. A push into a full FIFO, or a
// q_valid with no vector waiting, is a usage error caught by the assertions.
//
// The source states only the function, y' = Q^H y, and gives no structure;
// the FIFO and the direct multiply-accumulate are this design's choice (the
// CORDIC engines stay free of multipliers). Only real decompositions are
// handled: the complex engine's Q^H is output in factored form.
module qrd_rx_rotate
  import qrd_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  y_valid,
  input  data_t y      [N],
  input  logic  q_valid,
  input  data_t qt     [N][N],
  output logic  out_valid,
  output data_t yr     [N]
);

  localparam int unsigned PTR_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned SUM_W  = PROD_W + $clog2(N) + 1;

  typedef logic signed [SUM_W-1:0] acc_t;

  data_t              fifo [DEPTH][N];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;
  logic [PTR_W:0]     count;
  logic               push, pop;
  data_t              y_head [N];

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
      for (int k = 0; k < N; k++) fifo[wr_ptr][k] <= y[k];
  end

  always_comb begin
    for (int k = 0; k < N; k++) y_head[k] = fifo[rd_ptr][k];
  end

  // Round half-up from 2*FRAC_W to FRAC_W fraction bits and saturate.
  function automatic data_t round_sat(acc_t a);
    acc_t r;
    r = (a + acc_t'(1 <<< (FRAC_W - 1))) >>> FRAC_W;
    if (r > acc_t'(2 ** (DATA_W - 1) - 1))   return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -acc_t'(2 ** (DATA_W - 1))) return {1'b1, {(DATA_W-1){1'b0}}};
    else                                     return r[DATA_W-1:0];
  endfunction

  data_t yr_next [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      acc_t acc;
      logic signed [PROD_W-1:0] prod;
      acc = '0;
      for (int j = 0; j < N; j++) begin
        prod = qt[i][j] * y_head[j];
        acc  = acc + acc_t'(prod);
      end
      yr_next[i] = round_sat(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= pop;
  end

  always_ff @(posedge clk) begin
    if (pop) yr <= yr_next;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    push && !pop |-> count < (PTR_W+1)'(DEPTH));
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    q_valid |-> count != '0);

endmodule
