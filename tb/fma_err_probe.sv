// Error probe for the error-characterisation testbench: one matrix_fma_pe of a given data
// width W and matrix size N, driven with uniformly random operands in [-1, 1).
//
// It runs ITER operations (each a fresh random A, B, C, standing for one seed), checks every
// element of D' bit-exactly against a real-arithmetic reference floor((A*B + C)/(2N) * 2^(W-1)),
// and accumulates the normalised error of the rescaled output 2N*D' against the exact A*B + C:
// mean xi = sum|y - y^| / (alpha * K) and sigma = sqrt(sum (|y - y^| - mean|y - y^|)^2 / K) /
// alpha, with alpha = 2 for the range (-1, 1) and K = ITER * N * N elements. When finished it
// raises done and holds the results on its outputs.
module fma_err_probe #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 8,
  parameter int unsigned ITER = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output real  xi,
  output real  sigma,
  output int   checks,
  output int   failures
);
  localparam real LSB = 1.0 / real'(longint'(1) << (W - 1));

  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [W-1:0] a [N][N];
  logic signed [W-1:0] b [N][N];
  logic signed [W-1:0] c [N][N];
  logic signed [W-1:0] d [N][N];

  matrix_fma_pe #(.W(W), .N(N)) u_pe (.*);

  real y [N][N];
  real errs [$];

  initial begin
    real s, e, sum_e, sum_sq;
    done = 1'b0; xi = 0.0; sigma = 0.0; checks = 0; failures = 0;
    in_valid = 1'b0; out_ready = 1'b0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      a[i][j] = '0; b[i][j] = '0; c[i][j] = '0;
    end
    @(posedge rst_n);
    for (int it = 0; it < int'(ITER); it++) begin
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        a[i][j] = W'($urandom); b[i][j] = W'($urandom); c[i][j] = W'($urandom);
      end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        s = real'(c[i][j]) * LSB;
        for (int k = 0; k < N; k++) s += (real'(a[i][k]) * LSB) * (real'(b[k][j]) * LSB);
        y[i][j] = s;
      end
      in_valid = 1'b1;
      #1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      in_valid = 1'b0;
      while (!out_valid) begin @(posedge clk); #1; end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        checks++;
        if (longint'(d[i][j]) != longint'($floor(y[i][j] / real'(2 * N) / LSB))) failures++;
        e = real'(2 * N) * real'(d[i][j]) * LSB - y[i][j];
        errs.push_back(e < 0.0 ? -e : e);
      end
      out_ready = 1'b1;
      @(posedge clk); #1;
      out_ready = 1'b0;
    end
    sum_e = 0.0;
    foreach (errs[k]) sum_e += errs[k];
    sum_e = sum_e / real'(errs.size());
    sum_sq = 0.0;
    foreach (errs[k]) sum_sq += (errs[k] - sum_e) * (errs[k] - sum_e);
    xi = sum_e / 2.0;
    sigma = $sqrt(sum_sq / real'(errs.size())) / 2.0;
    done = 1'b1;
  end
endmodule
