// Sequencer of the matrix FMA processing element.
//
// One operation: in IDLE the controller offers in_ready; on an accepted input (in_valid &&
// in_ready) it pulses load so the operand registers capture A, B and C. In RUN it issues the
// rows of D one per clock (issue, issue_row = 0 .. N-1) to the N dot-product lanes. Each lane
// registers its result, so a row is written back one clock after it was issued (wb, wb_row).
// DRAIN covers that clock for the last row. In DONE the finished matrix is offered with
// out_valid until out_ready takes it; the controller then returns to IDLE.
//
// Timing: with the accept in clock t, rows are issued in clocks t+1 .. t+N, written back in
// t+2 .. t+N+1, and out_valid is high from clock t+N+2. out_ready low in DONE stalls the
// element, which holds its result and refuses new operands. Only one operation is in flight.
// The row-serial schedule and the valid/ready handshake are this design's choices; the
// described element is an HLS operator whose schedule is not spelled out. Reset is active-low
// and synchronous.
module fma_ctrl
  import fma_pkg::*;
#(
  parameter int unsigned N = 8  // matrix size: number of rows to issue
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic                      load,
  output logic                      issue,
  output logic [idx_bits(N)-1:0]    issue_row,
  output logic                      wb,
  output logic [idx_bits(N)-1:0]    wb_row
);

  localparam int unsigned RW = idx_bits(N);
  localparam logic [RW-1:0] LAST = RW'(N - 1);

  fma_state_e state;
  logic [RW-1:0] row;

  assign in_ready  = (state == ST_IDLE);
  assign out_valid = (state == ST_DONE);
  assign load      = in_valid && in_ready;
  assign issue     = (state == ST_RUN);
  assign issue_row = row;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      row    <= '0;
      wb     <= 1'b0;
      wb_row <= '0;
    end else begin
      wb     <= issue;
      wb_row <= row;
      unique case (state)
        ST_IDLE: begin
          row <= '0;
          if (in_valid) state <= ST_RUN;
        end
        ST_RUN: begin
          if (row == LAST) begin
            row   <= '0;
            state <= ST_DRAIN;
          end else begin
            row <= row + 1'b1;
          end
        end
        ST_DRAIN: state <= ST_DONE;
        ST_DONE:  if (out_ready) state <= ST_IDLE;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  // Handshake rules: the result is held stable until taken, and operands are never taken
  // while an operation is in flight.
  a_out_hold : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n)
    in_ready |-> !out_valid && !issue);

endmodule
