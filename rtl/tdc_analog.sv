// tdc_analog: behavioural model (not synthesizable logic) of one low-power TDC based on
// analogue interpolation. While en is high the model waits for the chosen edge of its
// trigger line (fall selects the falling edge). At the edge, time T0, a fast current starts
// charging a capacitor; the ramp stops at T1, the first rising clock edge if the trigger came
// while the clock was high, otherwise the second one, so T1-T0 lies between half and one and
// a half clock periods. From T1 a slow ramp, IF times slower, runs until it meets the fast
// ramp; the comparator output cmp then goes high for one clock cycle, aligned to the clock,
// after N = round(IF*(T1-T0)/Tclk) clock periods. IF is 64 (i_ratio = 0) or 128 (i_ratio =
// 1), the two current ratios the document gives. clr discharges the capacitors and returns
// the model to idle; the control logic pulses it after every conversion. cmp_fail models a
// slow ramp that never reaches the fast one, so cmp never rises.
// The ramps, the T1 rule and the interpolation factors follow the document; the
// clock-period measurement and the one-cycle cmp pulse are modelling choices. The DAC
// settings of PCR0/PCR1 are not modelled: IF depends only on i_ratio.
module tdc_analog (
  input  logic clk,
  input  logic en,
  input  logic trg,
  input  logic fall,
  input  logic i_ratio,
  input  logic clr,
  input  logic cmp_fail,
  output logic cmp,
  output logic busy
);
  realtime t_rise, t_prev, t0, tclk;
  int      n_cnt, edges_to_t1, clk_cnt;
  logic    armed_edge, trg_q;

  initial begin
    cmp    = 1'b0;
    busy   = 1'b0;
    t_rise = 0.0;
    t_prev = 0.0;
    tclk   = 1.0;
    n_cnt  = 0;
    clk_cnt = 0;
    edges_to_t1 = 0;
    trg_q  = 1'b0;
  end

  // period measurement from the last two rising edges
  always @(posedge clk) begin
    t_prev = t_rise;
    t_rise = $realtime;
    if (t_prev > 0.0) tclk = t_rise - t_prev;
  end

  // trigger edge: start the fast ramp
  always @(trg) begin
    armed_edge = fall ? (trg_q && !trg) : (!trg_q && trg);
    trg_q = trg;
    if (en && !busy && armed_edge) begin
      busy = 1'b1;
      t0   = $realtime;
      edges_to_t1 = clk ? 1 : 2;
      clk_cnt = 0;
      n_cnt = -1;
    end
  end

  // ramps and comparator, counted in rising clock edges
  always @(posedge clk) begin
    #1ps;
    cmp = 1'b0;
    if (clr) begin
      busy = 1'b0;
      n_cnt = -1;
    end else if (busy) begin
      if (n_cnt < 0) begin
        clk_cnt++;
        if (clk_cnt == edges_to_t1) begin
          // T1: fast ramp stops, slow ramp starts
          n_cnt = int'(((i_ratio ? 128.0 : 64.0) * (t_rise - t0)) / tclk);
          clk_cnt = 0;
        end
      end else begin
        clk_cnt++;
        if (clk_cnt == n_cnt && !cmp_fail) cmp = 1'b1;
      end
    end
  end
endmodule
