// tb_pid_lut_controller: feeds the PID look-up controller with one sample
// per 256-clock period (the capture strobe comes at step 255 - y2, as the
// ATC would give it) and checks, one clock after each capture:
//   - u(k) against a floating-point model of the same look-up scheme
//     (a and b rounded, preset 512 - (a - b), reversed Memory2),
//   - u(k) against the plain PID law
//     u = u_Ref + K_P e + K_I n_I + K_D (e(k) - e(k-1)), e = y2 - r,
//     within the table's quantisation, wherever no clamp is active,
//   - the integrator n_I (with saturation) and the stored previous sample.
// It also checks that u is held between captures and that the integrator
// saturation strobe fires.
module tb_pid_lut_controller;
  logic clk = 0, rst_n = 0;
  logic [7:0] addr_d, y2_next, y2_prev;
  logic capture;
  logic [8:0] u;
  logic signed [7:0] n_i;
  logic [9:0] pc;
  logic int_sat, pc_clamp;
  logic [7:0] y2_cur, y2_pending;
  int checks = 0, failures = 0;
  int n_intsat = 0, n_ideal = 0, n_caps = 0;

  pid_lut_controller dut (
    .clk, .rst_n, .addr_d, .capture, .y2_next, .u, .n_i, .y2_prev, .pc, .int_sat, .pc_clamp
  );

  always #5 clk = ~clk;

  // Delayed staircase address and the sample chosen for each period.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_d <= '0;
      y2_cur <= 8'd181;
    end else begin
      addr_d <= addr_d + 1'b1;
      if (addr_d == 8'd255) y2_cur <= y2_pending;
    end
  end
  assign capture = rst_n && (addr_d == ~y2_cur);
  assign y2_next = ~addr_d;

  function automatic int rnd(real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction
  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kp, ki, kd, aa;
    int m_ni, m_yprev, exp_u, held_u;
    kp = -0.5; ki = -0.1875; kd = -0.25; aa = kp + ki + kd;
    m_ni = 0;
    m_yprev = 181;
    held_u = 0;
    y2_pending = 8'd181;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (n_caps < 300) begin
      @(negedge clk);
      if (addr_d == 8'd200) begin
        case (n_caps % 25)
          0: y2_pending = 8'd255;
          1: y2_pending = 8'd0;
          2, 3, 4, 5, 6, 7: y2_pending = 8'd250;
          8, 9, 10, 11, 12, 13, 14, 15: y2_pending = 8'd100;
          default: y2_pending = 8'(181 + int'($urandom_range(0, 40)) - 20);
        endcase
      end
      if (capture) begin
        int y, e, a, b, init, p, ni_new;
        real u_id;
        y = int'(y2_next);
        e = y - 181;
        a = rnd(ki / aa * m_ni);
        b = rnd(kd / aa * m_yprev);
        init = clip(512 - (a - b), 0, 1023);
        p = clip(init + (255 - y), 0, 1023);
        exp_u = clip(rnd(186.0 + aa * (767 - p) - (kp + ki) * 181.0), 0, 511);
        ni_new = m_ni + e;
        u_id = 186.0 + kp * e + ki * (m_ni + e) + kd * (e - (m_yprev - 181));
        checks++;
        if (int_sat !== (ni_new > 127 || ni_new < -128)) failures++;
        if (int_sat) n_intsat++;
        m_ni = clip(ni_new, -128, 127);
        m_yprev = y;
        @(negedge clk);
        checks++;
        if (u !== 9'(exp_u)) begin
          failures++;
          $display("cap %0d y2=%0d u=%0d exp %0d", n_caps, y, u, exp_u);
        end
        if (u_id > 2.0 && u_id < 509.0) begin
          n_ideal++;
          checks++;
          if ((real'(u) - u_id) > 2.0 || (u_id - real'(u)) > 2.0) begin
            failures++;
            $display("cap %0d u=%0d ideal PID %f", n_caps, u, u_id);
          end
        end
        checks += 2;
        if (n_i !== 8'(m_ni)) begin failures++; $display("n_i %0d exp %0d", n_i, m_ni); end
        if (y2_prev !== 8'(m_yprev)) failures++;
        held_u = int'(u);
        n_caps++;
      end else if (n_caps > 0) begin
        checks++;
        if (u !== 9'(held_u)) failures++;
      end
    end
    checks += 2;
    if (n_intsat == 0) failures++;
    if (n_ideal < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
