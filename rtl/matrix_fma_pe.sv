// Matrix fused multiply-add processing element for fixed-point NxN matrices.
//
// It computes D' = (A*B + C) / (2N) where A, B, C are square NxN matrices of W-bit signed
// fixed-point numbers in [-1, 1) (1 sign bit, W-1 fraction bits). The output keeps the input
// width W; the true result is D = 2N * D'. Dividing by 2N keeps every output element inside
// [-1, 1) whatever the operands, so the element cannot overflow, at the cost of 1+log2(N)
// fraction bits of precision: the approximation error grows with N and shrinks with W.
// This scaled, width-preserving operator, with the data width and matrix size as parameters
// (defaults 8 bits and 8x8), follows the described design.
//
// Structure (this design's choice of schedule): operand registers hold A, B and C once
// accepted; N dot-product lanes (N*N multipliers in all) compute one row of D' per clock;
// a result register collects the rows. A small controller (fma_ctrl) sequences the rows and
// runs the valid/ready handshakes.
//
// Interface: a, b, c are taken when in_valid && in_ready; d is valid while out_valid is high
// and is held until out_valid && out_ready. Latency from the accepting clock to out_valid is
// N+2 clocks; a new operation can be accepted in the clock after the result is taken.
// Reset is active-low and synchronous.
module matrix_fma_pe
  import fma_pkg::*;
#(
  parameter int unsigned W = 8,  // data width in bits
  parameter int unsigned N = 8   // matrix size, a power of two
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] a [N][N],
  input  logic signed [W-1:0] b [N][N],
  input  logic signed [W-1:0] c [N][N],
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] d [N][N]
);

  localparam int unsigned RW = idx_bits(N);

  logic          load, issue, wb;
  logic [RW-1:0] issue_row, wb_row;

  logic signed [W-1:0] a_q [N][N];
  logic signed [W-1:0] b_q [N][N];
  logic signed [W-1:0] c_q [N][N];
  logic signed [W-1:0] d_q [N][N];

  logic signed [W-1:0] a_sel [N];
  logic signed [W-1:0] b_sel [N][N];
  logic signed [W-1:0] c_sel [N];
  logic signed [W-1:0] lane_d [N];
  logic                lane_v [N];

  fma_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .out_valid, .out_ready,
    .load, .issue, .issue_row, .wb, .wb_row
  );

  // Operand registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a_q[i][j] <= '0;
          b_q[i][j] <= '0;
          c_q[i][j] <= '0;
        end
    end else if (load) begin
      a_q <= a;
      b_q <= b;
      c_q <= c;
    end
  end

  // Row i of A is shared by all lanes; lane j takes column j of B and element (i, j) of C.
  always_comb begin
    for (int k = 0; k < N; k++) begin
      a_sel[k] = a_q[issue_row][k];
      c_sel[k] = c_q[issue_row][k];
      for (int j = 0; j < N; j++) b_sel[j][k] = b_q[k][j];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_lane
    fma_dot_lane #(.W(W), .N(N)) u_lane (
      .clk, .rst_n,
      .in_valid (issue),
      .a_row    (a_sel),
      .b_col    (b_sel[j]),
      .c_in     (c_sel[j]),
      .out_valid(lane_v[j]),
      .d_out    (lane_d[j])
    );
  end

  // Result register: one row per write-back.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) d_q[i][j] <= '0;
    end else if (wb) begin
      d_q[wb_row] <= lane_d;
    end
  end

  assign d = d_q;

  // The lanes' valid must line up with the controller's write-back.
  a_wb_align : assert property (@(posedge clk) disable iff (!rst_n) lane_v[0] == wb);

endmodule
