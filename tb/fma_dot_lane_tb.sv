// Self-checking testbench for fma_dot_lane at its default size (W = 8, N = 8).
//
// Drives corner vectors (all operands at -1 so every product is +1, mixed signs reaching the
// most negative sum, zeros, smallest steps) and random vectors, one per clock with random
// gaps. Each expected value is computed in real arithmetic: x = (sum a*b + c) / (2N), then
// floor(x * 2^(W-1)) as the W-bit code. The result must appear exactly one clock after the
// input, with out_valid high only then.
module fma_dot_lane_tb;
  localparam int unsigned W = 8;
  localparam int unsigned N = 8;
  localparam real LSB = 1.0 / real'(1 << (W - 1));

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] a_row [N];
  logic signed [W-1:0] b_col [N];
  logic signed [W-1:0] c_in;
  logic out_valid;
  logic signed [W-1:0] d_out;

  int checks = 0;
  int failures = 0;

  fma_dot_lane #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input logic signed [W-1:0] av [N],
                                  input logic signed [W-1:0] bv [N],
                                  input logic signed [W-1:0] cv);
    real s;
    s = real'(cv) * LSB;
    for (int k = 0; k < N; k++) s += (real'(av[k]) * LSB) * (real'(bv[k]) * LSB);
    s = s / real'(2 * N);
    return int'($floor(s / LSB));
  endfunction

  task automatic apply(input int mode);
    int exp_v;
    for (int k = 0; k < N; k++) begin
      case (mode)
        0: begin a_row[k] = {1'b1, {(W-1){1'b0}}}; b_col[k] = {1'b1, {(W-1){1'b0}}}; end
        1: begin a_row[k] = {1'b1, {(W-1){1'b0}}}; b_col[k] = {1'b0, {(W-1){1'b1}}}; end
        2: begin a_row[k] = '0; b_col[k] = '0; end
        3: begin a_row[k] = W'(1); b_col[k] = -W'(1); end
        default: begin a_row[k] = W'($urandom); b_col[k] = W'($urandom); end
      endcase
    end
    case (mode)
      0: c_in = {1'b0, {(W-1){1'b1}}};
      1: c_in = {1'b1, {(W-1){1'b0}}};
      2: c_in = -W'(1);
      3: c_in = '0;
      default: c_in = W'($urandom);
    endcase
    exp_v = expected(a_row, b_col, c_in);
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL mode %0d: out_valid not high one clock after input", mode);
    end
    checks++;
    if (int'(d_out) != exp_v) begin
      failures++;
      $display("FAIL mode %0d: d_out=%0d expected %0d", mode, d_out, exp_v);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin a_row[k] = '0; b_col[k] = '0; end
    c_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid high after reset"); end
    for (int m = 0; m < 4; m++) apply(m);
    for (int t = 0; t < 2000; t++) begin
      apply(4);
      if ($urandom_range(3) == 0) begin
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL: out_valid without input"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
