// error_monitor: soft-error monitor of the self-adaptive data cache.
//
// Counts the parity failures detected by the cache (`err_pulse`, one per
// detected error) during a fixed monitoring window of WINDOW cycles. In the
// last cycle of every window it presents the window's total on `win_errs`
// together with a one-cycle `win_done` strobe (an error arriving in that very
// cycle is included), then starts the next window from zero. The count
// saturates at its maximum.
//
// The error counter, the per-window reset and the 100K-cycle window follow the
// described design; the counter width and the saturation are choices of this
// implementation.
module error_monitor #(
  parameter int unsigned WINDOW = 100_000,  // cycles per monitoring window
  parameter int unsigned CNT_W  = 16,       // error counter width
  localparam int unsigned WIN_W = $clog2(WINDOW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             err_pulse,
  output logic             win_done,
  output logic [CNT_W-1:0] win_errs
);

  logic [WIN_W-1:0] cyc;
  logic [CNT_W-1:0] errs;

  assign win_done = (cyc == WIN_W'(WINDOW - 1));
  assign win_errs = (err_pulse && errs != '1) ? errs + 1'b1 : errs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc  <= '0;
      errs <= '0;
    end else if (win_done) begin
      cyc  <= '0;
      errs <= '0;
    end else begin
      cyc  <= cyc + 1'b1;
      errs <= win_errs;
    end
  end

endmodule
