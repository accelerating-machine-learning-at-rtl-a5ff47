// Error characterisation of the matrix FMA element over data width and matrix size.
//
// Instantiates one fma_err_probe for every pair of W in {4, 6, 8, 10, 12, 14, 16} and N in
// {2, 4, 8, 16}, each running 10 random operations. Checks: every output element is bit-exact
// against the real-arithmetic reference; each normalised mean error stays under the
// truncation bound N * 2^-(W-1); for every N the error falls as W grows; at W = 8 the error
// grows with N. Prints the table of mean error and standard deviation.
module fma_error_sweep_tb;
  localparam int NW = 7;
  localparam int NN = 4;
  localparam int unsigned WS [NW] = '{4, 6, 8, 10, 12, 14, 16};
  localparam int unsigned NS [NN] = '{2, 4, 8, 16};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done   [NW][NN];
  real  xi     [NW][NN];
  real  sigma  [NW][NN];
  int   pchk   [NW][NN];
  int   pfail  [NW][NN];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar wi = 0; wi < NW; wi++) begin : g_w
    for (genvar ni = 0; ni < NN; ni++) begin : g_n
      fma_err_probe #(.W(WS[wi]), .N(NS[ni]), .ITER(10)) u_probe (
        .clk, .rst_n,
        .done(done[wi][ni]), .xi(xi[wi][ni]), .sigma(sigma[wi][ni]),
        .checks(pchk[wi][ni]), .failures(pfail[wi][ni])
      );
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int wi = 0; wi < NW; wi++)
      for (int ni = 0; ni < NN; ni++) if (!done[wi][ni]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real bound;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    $display("   W   N   mean_err    sigma      bound");
    for (int wi = 0; wi < NW; wi++)
      for (int ni = 0; ni < NN; ni++) begin
        bound = real'(NS[ni]) / real'(longint'(1) << (WS[wi] - 1));
        $display("%4d%4d   %f   %f   %f", WS[wi], NS[ni], xi[wi][ni], sigma[wi][ni], bound);
        checks += pchk[wi][ni];
        failures += pfail[wi][ni];
        checks++;
        if (xi[wi][ni] > bound) begin
          failures++;
          $display("FAIL W=%0d N=%0d: error above truncation bound", WS[wi], NS[ni]);
        end
      end
    for (int ni = 0; ni < NN; ni++)
      for (int wi = 1; wi < NW; wi++) begin
        checks++;
        if (!(xi[wi][ni] < xi[wi-1][ni])) begin
          failures++;
          $display("FAIL N=%0d: error does not fall from W=%0d to W=%0d", NS[ni], WS[wi-1], WS[wi]);
        end
      end
    for (int ni = 1; ni < NN; ni++) begin
      checks++;
      if (!(xi[2][ni] > xi[2][ni-1])) begin
        failures++;
        $display("FAIL W=8: error does not grow from N=%0d to N=%0d", NS[ni-1], NS[ni]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
