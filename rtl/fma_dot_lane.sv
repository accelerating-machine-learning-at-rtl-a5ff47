// One output lane of the matrix FMA: d' = (sum_k a[k]*b[k] + c) / (2N), registered.
//
// The lane takes a row of A, a column of B and one element of C, all W-bit signed fixed point
// in [-1, 1) (1 sign bit, W-1 fraction bits). The N products are formed at full precision
// (2W bits, 2(W-1) fraction bits), summed exactly in an adder tree together with c aligned to
// the same binary point, and the exact sum is then divided by 2N (N a power of two, so an
// arithmetic right shift) and cut back to W-1 fraction bits by truncation (rounding toward
// minus infinity, the default quantisation of a fixed-point type in C++ HLS libraries). The
// scaling by 1/(2N) and the W-bit output follow the described operator; exact accumulation
// with a single truncation at the end is this design's choice. The scaled result always lies
// in [-1, 1), so the top bits that are dropped are plain sign extension.
//
// Interface: in_valid qualifies a_row/b_col/c_in; out_valid and d_out follow one clock later
// (one register stage, the "FMA with registers" arrangement). Reset is active-low and
// synchronous and clears out_valid and d_out.
module fma_dot_lane
  import fma_pkg::*;
#(
  parameter int unsigned W = 8,  // data width in bits
  parameter int unsigned N = 8   // matrix size (dot-product length), a power of two
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] a_row [N],
  input  logic signed [W-1:0] b_col [N],
  input  logic signed [W-1:0] c_in,
  output logic                out_valid,
  output logic signed [W-1:0] d_out
);

  localparam int unsigned AW = acc_bits(W, N);       // exact sum width
  localparam int unsigned SH = (W - 1) + scale_shift(N);  // back to W-1 fraction bits, / 2N

  if ((1 << $clog2(N)) != N) begin : g_bad_n
    $error("fma_dot_lane: N must be a power of two");
  end

  logic signed [AW-1:0] prod [N];
  logic signed [AW-1:0] sum;
  logic signed [AW-1:0] scaled;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      prod[k] = AW'(a_row[k] * b_col[k]);
    end
    sum = AW'(c_in) <<< (W - 1);
    for (int k = 0; k < N; k++) begin
      sum = sum + prod[k];
    end
    scaled = sum >>> SH;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) d_out <= scaled[W-1:0];
    end
  end

  // The scaled sum must fit the output width: the dropped bits are sign copies.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (scaled == AW'(signed'(scaled[W-1:0]))));

endmodule
