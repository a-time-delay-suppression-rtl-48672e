// tb_dpwm_controller_top: closed-loop, end-to-end test of the ADC-less DPWM
// controller at its default parameters, with behavioural models of the DAC
// (8 bits over 0..1.7 V), the comparator and a 3.3 V to 1.2 V synchronous
// buck stage (4.7 uH, 100 uF). The plant model takes f_S = 25 MHz and
// f_S' = 50 MHz, so one switching period is 256 x 40 ns = 10.24 us.
//
// Run, in switching periods:
//   0..249    soft start from 0 V at 0.5 A load
//   250..449  load step 0.5 A -> 2.5 A
//   450..649  load step 2.5 A -> 0.5 A
//   650..653  sensed voltage forced above the DAC range (2.0 V), then recovery
//   750..753  sensed voltage forced to 0 V, below the DAC range, then recovery
//   to period 900
// Checks: the sampled code against the actual output voltage; the output
// settles to the reference code (181, i.e. 1.2 V) after start-up, after each
// load step and after the two forced phases; each PWM on-time equals u(k);
// the sample is taken inside the PWM on-time in steady state. Counts how
// often each mechanism happened (crossing capture, capture saturated low and
// high, integrator saturation, duty word updated during the on-time, load
// steps recovered) and fails if one never did.
module tb_dpwm_controller_top;
  logic clk_s = 0, clk_sp = 0, rst_n = 0;
  logic [7:0] dac_code, y2;
  logic vcomp, pwm;
  logic [8:0] u;
  logic signed [7:0] n_i;
  logic capture, sat_high, sat_low, int_sat, pc_clamp, frame_start;
  real v_dac, e_o, i_l, i_o, r_load, v_sense;
  bit force_high = 0, force_low = 0;
  int checks = 0, failures = 0;

  dpwm_controller_top dut (
    .clk_s, .clk_sp, .rst_n, .dac_code, .vcomp, .pwm, .y2, .u, .n_i, .capture,
    .sat_high, .sat_low, .int_sat, .pc_clamp, .frame_start
  );

  dac_model #(.W(8), .V_PLUS(1.7), .V_MINUS(0.0)) u_dac (.code(dac_code), .vout(v_dac));
  always_comb v_sense = force_high ? 2.0 : (force_low ? 0.0 : e_o);
  comparator_model u_cmp (.vp(v_sense), .vn(v_dac), .out(vcomp));
  buck_stage_model #(.DT(20.0e-9)) u_buck (.clk(clk_sp), .pwm, .r_load, .e_o, .i_l, .i_o);

  // f_S' = 50 MHz, f_S = 25 MHz, rising edges of f_S on rising edges of f_S'.
  always #10 clk_sp = ~clk_sp;
  initial begin
    #10;
    forever begin
      clk_s = ~clk_s;
      #20;
    end
  end

  int n_cross = 0, n_sat_low = 0, n_sat_high = 0, n_int_sat = 0, n_frames = 0;
  int n_in_on = 0, n_steady = 0, n_u_mid = 0, n_ontime = 0;
  int period = 0;
  int cap_pos = -1;
  bit cap_in_on = 0;
  int on_cnt = 0, pos = 0;
  bit fs_prev = 0;
  logic [8:0] u_at_start;
  int u_begin = 0;
  int worst_dev [5];
  int recovered_at [5];
  int run_ok [5];

  function automatic int phase_of(int p);
    if (p < 250) return 0;
    if (p < 450) return 1;
    if (p < 650) return 2;
    if (p < 750) return 3;
    return 4;
  endfunction

  initial begin
    repeat (1000 * 256) @(posedge clk_s);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Period bookkeeping and PWM on-time measurement on the f_S' clock.
  always @(negedge clk_sp) begin
    if (rst_n && frame_start && !fs_prev) begin
      if (period > 2) begin
        // On-time of the period that just ended.
        if (cap_in_on && int'(u) > cap_pos + 4 && u_begin > cap_pos + 4) begin
          checks++;
          n_ontime++;
          if (on_cnt != int'(u)) begin
            failures++;
            $display("period %0d on-time %0d, u %0d", period, on_cnt, u);
          end
        end
        if (period > 100 && period < 650 || period > 700 && period < 750 || period > 800) begin
          n_steady++;
          if (cap_in_on) n_in_on++;
        end
      end
      period++;
      n_frames++;
      on_cnt = 0;
      pos = 0;
      cap_pos = -1;
      cap_in_on = 0;
      u_at_start = u;
      u_begin = int'(u);
    end
    fs_prev = frame_start;
    if (pwm) on_cnt++;
    pos++;
  end

  // Sample checks and mechanism counts on the f_S clock. The latched code
  // y2 is compared, one clock after the capture, with the output voltage
  // seen at the capture. The sample belongs to the staircase step LAG clocks
  // back, so the periods in which the forced sensing input has just been
  // switched are not compared.
  int pending_code = -1;
  always @(negedge clk_s) begin
    if (pending_code >= 0) begin
      checks++;
      if ((int'(y2) - pending_code) > 2 || (pending_code - int'(y2)) > 2) begin
        failures++;
        $display("period %0d sampled %0d, output voltage is code %0d", period, y2, pending_code);
      end
      pending_code = -1;
    end
    if (rst_n && capture) begin
      int vcode;
      vcode = $rtoi(v_sense / 1.7 * 256.0);
      if (vcode > 255) vcode = 255;
      if (vcode < 0) vcode = 0;
      cap_pos = pos;
      cap_in_on = pwm;
      if (sat_high) n_sat_high++;
      else if (sat_low) n_sat_low++;
      else n_cross++;
      if (int_sat) n_int_sat++;
      if (period != 650 && period != 654 && period != 750 && period != 754)
        pending_code = vcode;
    end
  end

  // Duty word updated while the PWM pulse is on (the real-time update).
  always @(negedge clk_s) begin
    if (rst_n && pwm && u != u_at_start && cap_pos >= 0) begin
      n_u_mid++;
      u_at_start = u;
    end
  end

  // Settling per phase: track the worst deviation of y2 from r and the first
  // period from which y2 stays within +-3 codes for 20 periods.
  int last_period = -1;
  always @(negedge clk_s) begin
    if (rst_n && period != last_period && period > 1) begin
      int ph, dev, start;
      last_period = period;
      ph = phase_of(period - 1);
      start = (ph == 0) ? 0 : ((ph == 1) ? 250 : ((ph == 2) ? 450 : ((ph == 3) ? 650 : 750)));
      dev = int'(y2) - 181;
      if (dev < 0) dev = -dev;
      if (period - 1 > start + 2 && dev > worst_dev[ph]) worst_dev[ph] = dev;
      if (dev <= 3) begin
        run_ok[ph]++;
        if (run_ok[ph] == 20 && recovered_at[ph] < 0) recovered_at[ph] = period - 20 - start;
      end else begin
        run_ok[ph] = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      worst_dev[i] = 0;
      recovered_at[i] = -1;
      run_ok[i] = 0;
    end
    u_at_start = '0;
    r_load = 2.4;
    repeat (2) @(posedge clk_s);
    @(negedge clk_s);
    #2;
    rst_n = 1;
    wait (period == 250);
    r_load = 0.48;
    wait (period == 450);
    r_load = 2.4;
    wait (period == 650);
    force_high = 1;
    wait (period == 654);
    force_high = 0;
    wait (period == 750);
    force_low = 1;
    wait (period == 754);
    force_low = 0;
    wait (period == 900);

    $display("captures: crossing %0d, saturated low %0d, saturated high %0d; integrator saturated %0d",
             n_cross, n_sat_low, n_sat_high, n_int_sat);
    $display("sampled inside the on-time in %0d of %0d steady periods; u updated during on-time %0d times",
             n_in_on, n_steady, n_u_mid);
    for (int i = 0; i < 5; i++)
      $display("phase %0d: worst deviation %0d codes, settled %0d periods after its start",
               i, worst_dev[i], recovered_at[i]);

    // Every mechanism must have happened.
    checks += 6;
    if (n_cross == 0)    failures++;
    if (n_sat_low == 0)  failures++;
    if (n_sat_high == 0) failures++;
    if (n_int_sat == 0)  failures++;
    if (n_u_mid == 0)    failures++;
    if (n_ontime < 100)  failures++;
    // Settling after start-up, both load steps and the forced phases.
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (recovered_at[i] < 0 || recovered_at[i] > 120) begin
        failures++;
        $display("phase %0d did not settle", i);
      end
    end
    // Sampling inside the on-time in steady state.
    checks++;
    if (n_in_on * 10 < n_steady * 9) failures++;
    // One PC preset per period.
    checks++;
    if (n_frames != period) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
