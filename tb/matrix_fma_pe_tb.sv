// End-to-end testbench for matrix_fma_pe at its default size (W = 8, N = 8).
//
// Sends a stream of operations: corner matrices (every product +1 with the largest C, which
// gives the largest possible output; mixed signs with the most negative C, which gives the
// smallest; all zero) followed by random matrices. The producer offers new operands at random
// times, including while the element is busy, and the consumer drops out_ready at random, so
// back-pressure and input waits both happen. Every element of D' is compared with a
// reference computed in real arithmetic, floor((A*B + C)/(2N) * 2^(W-1)), and the latency from
// acceptance to out_valid must be N+2 clocks. The normalised mean error of the rescaled result
// 2N*D' against the exact A*B + C is reported and must stay under the truncation bound
// N * 2^-(W-1) (error per element below 2N LSBs, normalised by alpha = 2).
// Mechanism counters: output stalls, input waits, largest-output and smallest-output corners.
module matrix_fma_pe_tb;
  localparam int unsigned W = 8;
  localparam int unsigned N = 8;
  localparam real LSB = 1.0 / real'(1 << (W - 1));
  localparam int NOPS = 60;

  typedef logic signed [W-1:0] mat_t [N][N];

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  mat_t a, b, c, d;
  logic out_valid;
  logic out_ready = 1'b0;

  int checks = 0;
  int failures = 0;
  int n_out_stall = 0, n_in_wait = 0, n_max_corner = 0, n_min_corner = 0;
  real err_sum = 0.0;
  int err_cnt = 0;

  matrix_fma_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected queue filled by the producer, drained by the consumer.
  int   exp_q [$];  // expected D' codes, row-major, N*N per operation
  real  ref_q [$];  // exact (A*B + C) values, row-major, N*N per operation
  int   acc_t [$];
  int   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic signed [W-1:0] pick(input int mode, input int which);
    case (mode)
      0: return (which == 2) ? {1'b0, {(W-1){1'b1}}} : {1'b1, {(W-1){1'b0}}};
      1: return (which == 0) ? {1'b1, {(W-1){1'b0}}} :
                (which == 1) ? {1'b0, {(W-1){1'b1}}} : {1'b1, {(W-1){1'b0}}};
      2: return '0;
      default: return W'($urandom);
    endcase
  endfunction

  // Producer.
  initial begin
    real s;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      a[i][j] = '0; b[i][j] = '0; c[i][j] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      int mode;
      mode = (op < 3) ? op : 3;
      repeat ($urandom_range(4) == 0 ? $urandom_range(12) : 0) @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        a[i][j] = pick(mode, 0); b[i][j] = pick(mode, 1); c[i][j] = pick(mode, 2);
      end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        s = real'(c[i][j]) * LSB;
        for (int k = 0; k < N; k++) s += (real'(a[i][k]) * LSB) * (real'(b[k][j]) * LSB);
        ref_q.push_back(s);
        exp_q.push_back(int'($floor(s / real'(2 * N) / LSB)));
      end
      if (mode == 0) n_max_corner++;
      if (mode == 1) n_min_corner++;
      in_valid = 1'b1;
      #1;
      while (!in_ready) begin
        n_in_wait++;
        @(posedge clk); #1;
      end
      acc_t.push_back(cycle);
      @(posedge clk); #1;
      in_valid = 1'b0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        a[i][j] = W'($urandom); b[i][j] = W'($urandom); c[i][j] = W'($urandom);
      end
    end
  end

  // Consumer.
  initial begin
    int t0, first_valid, ev;
    real y, yh;
    @(posedge rst_n);
    for (int op = 0; op < NOPS; op++) begin
      first_valid = -1;
      while (!(out_valid && out_ready)) begin
        @(posedge clk); #2;
        if (out_valid && first_valid < 0) first_valid = cycle;
        out_ready = ($urandom_range(2) != 0);
        #1;
        if (out_valid && !out_ready) n_out_stall++;
      end
      t0 = acc_t.pop_front();
      checks++;
      if (first_valid - t0 != int'(N) + 2) begin
        failures++;
        $display("FAIL op %0d: latency %0d, expected %0d", op, first_valid - t0, N + 2);
      end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        ev = exp_q.pop_front();
        checks++;
        if (int'(d[i][j]) != ev) begin
          failures++;
          if (failures < 20)
            $display("FAIL op %0d d[%0d][%0d]=%0d expected %0d", op, i, j, d[i][j], ev);
        end
        y  = ref_q.pop_front();
        yh = real'(2 * N) * real'(d[i][j]) * LSB;
        err_sum += (y > yh) ? y - yh : yh - y;
        err_cnt++;
      end
      @(posedge clk); #2;
      out_ready = 1'b0;
    end
    begin
      real xi;
      xi = err_sum / (2.0 * real'(err_cnt));
      $display("normalised mean error %f (bound %f) over %0d elements", xi,
               real'(N) * LSB, err_cnt);
      checks++;
      if (xi > real'(N) * LSB) begin failures++; $display("FAIL: error above bound"); end
    end
    $display("mechanisms: out_stall=%0d in_wait=%0d max_corner=%0d min_corner=%0d",
             n_out_stall, n_in_wait, n_max_corner, n_min_corner);
    checks += 4;
    if (n_out_stall == 0) begin failures++; $display("FAIL: no output stall"); end
    if (n_in_wait == 0) begin failures++; $display("FAIL: no input wait"); end
    if (n_max_corner == 0) begin failures++; $display("FAIL: no largest-output case"); end
    if (n_min_corner == 0) begin failures++; $display("FAIL: no smallest-output case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
