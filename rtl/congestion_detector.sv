// congestion_detector: raises the congestion flag (CF) of one input buffer.
//
// Each rising clock edge the buffer occupancy n_new is compared with the
// occupancy one edge earlier (n_old, held in a register). A larger n_new is a
// positive fill rate (the buffer is filling), a smaller one a negative rate
// (it is draining). W_Full warns that the buffer is almost full: it is high
// when at least FULL_THRESH slots are occupied, FULL_THRESH defaulting to 60 %
// of the 10-flit buffer. CF is high when W_Full and a positive rate coincide.
//
// Design choices: when the occupancy does not change the last seen rate sign
// is kept, so a buffer that filled up and then stalls stays flagged until it
// starts to drain; CF is registered, so it follows its inputs by one cycle.
module congestion_detector
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH       = BUF_DEPTH,
  parameter int unsigned FULL_THRESH = FULL_THRESH_DEF,
  parameter int unsigned CNT_W       = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] n_new,
  output logic             w_full,
  output logic             rate_pos,
  output logic             cf
);

  logic [CNT_W-1:0] n_old;
  logic             sign_q;   // 1: last change was a fill, 0: a drain

  assign w_full   = (n_new >= CNT_W'(FULL_THRESH));
  assign rate_pos = (n_new > n_old) || ((n_new == n_old) && sign_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_old  <= '0;
      sign_q <= 1'b0;
      cf     <= 1'b0;
    end else begin
      n_old  <= n_new;
      sign_q <= rate_pos;
      cf     <= w_full && rate_pos;
    end
  end

endmodule
