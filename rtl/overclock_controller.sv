// overclock_controller: error-rate driven clock period selection.
//
// Counts generator cycles and recoveries (one `recovery` cycle per event)
// over a sampling interval of INTERVAL_CYCLES cycles. At the end of each
// interval it compares the recovery rate with the target: below
// TARGET_PERCENT % the clock is made one step faster, otherwise one step
// slower (the document's linear control). The period range T_Max..T_Min
// is divided into STEPS steps; `step` = 0 selects T_Max and `step` = STEPS
// selects T_Min, so the clock generator runs at
//   T = T_Max - step * (T_Max - T_Min) / STEPS.
// Modes: NOOC holds step 0, MAXOC holds step STEPS, DYNOC adapts; a mode
// change takes effect at once. `last_errors` is the recovery count of the
// interval just ended, `interval_done` pulses for one cycle with it.
// Steps, target, linear rule and modes follow the document; the interval
// length of 10000 cycles is read from the document's "error rate target of
// 1% over 10000 cycles"; the start in step 0 after reset is this design's
// choice. Clocked on the rising edge of the ungated CLK1; rst_n is
// asynchronous, active low.
module overclock_controller
  import sem_pkg::*;
#(
  parameter int unsigned INTERVAL_CYCLES = 10000,
  parameter int unsigned TARGET_PERCENT  = 1,
  parameter int unsigned STEPS           = OC_STEPS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  oc_mode_e                     mode,
  input  logic                         recovery,
  output logic [$clog2(STEPS+1)-1:0]   step,
  output logic [$clog2(INTERVAL_CYCLES+1)-1:0] last_errors,
  output logic                         interval_done
);

  localparam int unsigned CW = $clog2(INTERVAL_CYCLES + 1);
  localparam int unsigned SW = $clog2(STEPS + 1);

  logic [CW-1:0] cyc_cnt, err_cnt, err_total;
  logic          rate_ok;

  // Recoveries of the whole interval, including one in its last cycle.
  assign err_total = err_cnt + CW'(recovery);
  // error rate < TARGET_PERCENT %  <=>  100 * errors < TARGET * cycles
  assign rate_ok = (64'(err_total) * 64'd100) <
                   (64'(TARGET_PERCENT) * 64'(INTERVAL_CYCLES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_cnt       <= '0;
      err_cnt       <= '0;
      step          <= '0;
      last_errors   <= '0;
      interval_done <= 1'b0;
    end else begin
      interval_done <= 1'b0;
      if (cyc_cnt == CW'(INTERVAL_CYCLES - 1)) begin
        cyc_cnt       <= '0;
        err_cnt       <= '0;
        last_errors   <= err_total;
        interval_done <= 1'b1;
        if (mode == OC_DYNOC) begin
          if (rate_ok && step != SW'(STEPS)) step <= step + 1'b1;
          else if (!rate_ok && step != '0)   step <= step - 1'b1;
        end
      end else begin
        cyc_cnt <= cyc_cnt + 1'b1;
        err_cnt <= err_total;
      end
      if (mode == OC_NOOC)  step <= '0;
      if (mode == OC_MAXOC) step <= SW'(STEPS);
    end
  end

endmodule
