// Self-checking testbench for fma_ctrl (N = 8).
//
// Runs a series of operations with random input delays and random out_ready stalls. For each
// accepted input in clock t it checks, clock by clock, that load pulses only at t, that
// rows 0 .. N-1 are issued in clocks t+1 .. t+N, that each row is written back one clock after
// its issue, that out_valid rises at t+N+2 and stays high until out_ready, and that in_ready is
// low from acceptance until the result is taken.
module fma_ctrl_tb;
  localparam int unsigned N = 8;
  localparam int unsigned RW = fma_pkg::idx_bits(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic out_valid;
  logic out_ready = 1'b0;
  logic load, issue, wb;
  logic [RW-1:0] issue_row, wb_row;

  int checks = 0;
  int failures = 0;
  int stalls = 0;

  fma_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    check(in_ready && !out_valid && !issue && !load, "idle after reset");
    for (int op = 0; op < 200; op++) begin
      // idle gap: nothing moves while in_valid is low
      repeat ($urandom_range(3)) begin
        check(in_ready && !load && !issue && !out_valid, $sformatf("idle while no input r%0d l%0d i%0d o%0d", in_ready, load, issue, out_valid));
        @(posedge clk); #1;
      end
      in_valid = 1'b1;
      #1;
      check(in_ready && load, "operands accepted when offered in idle");
      @(posedge clk); #1;
      in_valid = 1'($urandom_range(1));  // a waiting next input must not be taken
      for (int r = 0; r < N; r++) begin
        check(issue && issue_row == RW'(r), $sformatf("row %0d issued", r));
        check(!in_ready && !load && !out_valid, "busy while issuing");
        if (r > 0) check(wb && wb_row == RW'(r - 1), $sformatf("row %0d written back", r - 1));
        else check(!wb, "no write-back before first row");
        @(posedge clk); #1;
      end
      check(!issue && wb && wb_row == RW'(N - 1), "last row written back");
      check(!out_valid && !in_ready, "not done while draining");
      @(posedge clk); #1;
      // result offered; random stall
      repeat ($urandom_range(2)) begin
        out_ready = 1'b0;
        #1;
        check(out_valid && !in_ready && !issue && !wb, "result held during stall");
        stalls++;
        @(posedge clk); #1;
      end
      out_ready = 1'b1;
      #1;
      check(out_valid, "result offered");
      @(posedge clk); #1;
      out_ready = 1'b0;
      in_valid = 1'b0;
      #1;
      check(!out_valid && in_ready, "back to idle after result taken");
    end
    check(stalls > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
