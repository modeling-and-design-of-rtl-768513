// Link-state monitor of one point-to-point transceiver port.
//
// Separates short disturbances from a link that is really gone, so that the
// operating system reroutes only on the latter and learns of it quickly. The
// transceiver reports each received symbol (rx_symbol) and whether it was bad
// (rx_error). An isolated bad symbol (a bit flip) changes nothing. The link is
// declared down after TIMEOUT clock cycles without a good symbol or after ERR_LIMIT
// bad symbols in a row, and up again after UP_COUNT good symbols in a row.
// went_down / went_up pulse for one cycle on each change. After reset the link is
// down. The detection rule and all three thresholds are this design's choice.
module link_monitor #(
  parameter int unsigned TIMEOUT   = 64,
  parameter int unsigned UP_COUNT  = 8,
  parameter int unsigned ERR_LIMIT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx_symbol,
  input  logic rx_error,
  output logic link_up,
  output logic went_down,
  output logic went_up
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  localparam int unsigned UW = $clog2(UP_COUNT + 1);
  localparam int unsigned EW = $clog2(ERR_LIMIT + 1);

  logic [TW-1:0] idle_cnt;  // cycles since last good symbol
  logic [UW-1:0] good_run;  // consecutive good symbols while down
  logic [EW-1:0] err_run;   // consecutive bad symbols while up

  logic good, bad;
  assign good = rx_symbol && !rx_error;
  assign bad  = rx_symbol &&  rx_error;

  always_ff @(posedge clk) begin
    went_down <= 1'b0;
    went_up   <= 1'b0;
    if (!rst_n) begin
      link_up  <= 1'b0;
      idle_cnt <= '0;
      good_run <= '0;
      err_run  <= '0;
    end else if (link_up) begin
      good_run <= '0;
      if (good) begin
        idle_cnt <= '0;
        err_run  <= '0;
      end else begin
        if (idle_cnt != TW'(TIMEOUT)) idle_cnt <= idle_cnt + 1'b1;
        if (bad) err_run <= err_run + 1'b1;
        if ((idle_cnt + 1'b1 >= TW'(TIMEOUT)) ||
            (bad && (err_run + 1'b1 >= EW'(ERR_LIMIT)))) begin
          link_up   <= 1'b0;
          went_down <= 1'b1;
          err_run   <= '0;
          idle_cnt  <= '0;
        end
      end
    end else begin
      idle_cnt <= '0;
      err_run  <= '0;
      if (good) begin
        good_run <= good_run + 1'b1;
        if (good_run + 1'b1 >= UW'(UP_COUNT)) begin
          link_up  <= 1'b1;
          went_up  <= 1'b1;
          good_run <= '0;
        end
      end else if (bad) begin
        good_run <= '0;
      end
    end
  end

endmodule
