// tb_glitch_free_clk_mux: end-to-end test of the two-clock glitch-free switch.
//
// Two free-running clocks with unrelated, non-integer periods feed the
// switch. select is toggled at random times, always held until the new
// clock has started (the documented usage rule). The testbench checks,
// independently of the design's structure:
//   * every high pulse of out_clk is exactly one complete high pulse of
//     clk0 or clk1 (same rising and falling time), and every low phase is at
//     least as long as the shorter low phase of the two clocks: no glitch;
//   * at most one clock is forwarded at a time, and the old one stops
//     before the new one starts (break before make, a low gap on out_clk);
//   * a switch from clock A to clock B completes between (PA + PB)/2 and
//     3 (PA + PB)/2 after select changes;
//   * once select has been stable for a while, out_clk follows the
//     selected clock at every edge of either clock;
//   * an asynchronous reset stops out_clk at once, and the selected clock
//     restarts within 3/2 of its period after release.
// It runs three clock configurations (CLK1 faster, CLK1 slower, nearly
// equal) and counts each mechanism; one that never happened is a failure.
`timescale 1ns / 1ps

module tb_glitch_free_clk_mux;

  logic clk0 = 1'b0;
  logic clk1 = 1'b0;
  logic rst_n = 1'b0;
  logic select = 1'b0;
  logic out_clk, clk0_active, clk1_active;

  int checks = 0;
  int failures = 0;

  glitch_free_clk_mux dut (
    .clk0(clk0), .clk1(clk1), .rst_n(rst_n), .select(select),
    .out_clk(out_clk), .clk0_active(clk0_active), .clk1_active(clk1_active)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- clocks
  realtime h0 = 15.0, h1 = 4.3;        // current half periods
  realtime rise0, fall0, rise1, fall1; // last edge times of each clock

  initial forever begin
    #(h0); rise0 = $realtime; clk0 = 1'b1;
    #(h0); fall0 = $realtime; clk0 = 1'b0;
  end
  initial begin
    #(0.71);
    forever begin
      #(h1); rise1 = $realtime; clk1 = 1'b1;
      #(h1); fall1 = $realtime; clk1 = 1'b0;
    end
  end

  // --------------------------------------------------------- glitch checks
  realtime out_rise = 0.0, out_fall = 0.0;
  int pulses = 0;
  int gaps = 0;
  int steady_checks = 0;
  realtime min_low;

  always @(posedge out_clk) begin
    out_rise = $realtime;
    if (rst_n && pulses > 0) begin
      min_low = (h0 < h1) ? h0 : h1;
      check(($realtime - out_fall) >= min_low - 0.01,
            $sformatf("short low phase of %0.3f ns on out_clk", $realtime - out_fall));
    end
  end

  always @(negedge out_clk) begin
    out_fall = $realtime;
    if (rst_n) begin
      pulses++;
      check((fall0 == $realtime && rise0 == out_rise) ||
            (fall1 == $realtime && rise1 == out_rise),
            $sformatf("out_clk pulse %0.3f..%0.3f is not a whole source pulse",
                      out_rise, $realtime));
    end
  end

  // ----------------------------------------------------- exclusivity check
  always @(clk0_active or clk1_active) begin
    if (rst_n) check(!(clk0_active && clk1_active), "both clocks forwarded together");
  end

  // ------------------------------------------------- switch latency checks
  realtime sel_t = 0.0;
  realtime pa, pb;               // periods of old and new clock
  realtime old_off_t;
  bit      switching = 1'b0;
  int      sw_0to1 = 0, sw_1to0 = 0;

  always @(negedge clk0_active or negedge clk1_active) begin
    if (switching) old_off_t = $realtime;
  end

  always @(posedge clk0_active or posedge clk1_active) begin
    if (switching && rst_n) begin
      realtime lat;
      lat = $realtime - sel_t;
      check(lat >= (pa + pb) / 2.0 - 0.01 && lat <= 1.5 * (pa + pb) + 0.01,
            $sformatf("switch took %0.3f ns (periods %0.2f -> %0.2f)", lat, pa, pb));
      check(select ? clk1_active : clk0_active, "the wrong clock was started");
      check(old_off_t > sel_t && old_off_t < $realtime, "old clock not stopped before new one started");
      if (old_off_t < $realtime) gaps++;
      if (select) sw_0to1++; else sw_1to0++;
      switching = 1'b0;
    end
  end

  // ----------------------------------------------------- steady-state check
  bit steady = 1'b0;
  always @(clk0 or clk1) begin
    if (steady && rst_n) begin
      #0.05;
      if (steady && rst_n) begin
        steady_checks++;
        check(out_clk == (select ? clk1 : clk0), "out_clk does not follow the selected clock");
        check(clk1_active == select && clk0_active == !select, "active flags wrong in steady state");
      end
    end
  end

  task automatic do_switch();
    // change select off any clock edge, then hold it until the switch is done
    #(0.37 + real'($urandom % 50) / 10.0);
    steady = 1'b0;
    pa = select ? 2.0 * h1 : 2.0 * h0;
    pb = select ? 2.0 * h0 : 2.0 * h1;
    sel_t = $realtime;
    switching = 1'b1;
    select = ~select;
    wait (!switching);
    // a while later the output is in steady state
    #(pb * 2.0);
    steady = 1'b1;
    #(pb * real'(2 + $urandom % 8));
  endtask

  // -------------------------------------------------------------- watchdog
  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- stimulus
  int cfg_fast1 = 0, cfg_slow1 = 0, cfg_equal = 0, resets = 0;

  initial begin
    #(100.0);
    rst_n = 1'b1;
    check(out_clk == 1'b0 && !clk0_active && !clk1_active, "out_clk not stopped by reset");
    // after reset the selected clock (CLK0) starts within 3/2 of its period
    #(3.0 * h0 + 0.1);
    check(clk0_active && !clk1_active, "CLK0 not started after reset");
    steady = 1'b1;
    #(100.0);

    for (int cfg = 0; cfg < 3; cfg++) begin
      case (cfg)
        0: begin h0 = 15.0; h1 = 4.3;  cfg_fast1++; end  // CLK1 faster
        1: begin h0 = 3.7;  h1 = 11.9; cfg_slow1++; end  // CLK1 slower
        default: begin h0 = 6.1; h1 = 6.45; cfg_equal++; end  // close periods
      endcase
      steady = 1'b0;
      #(200.0);
      steady = 1'b1;
      for (int i = 0; i < 30; i++) do_switch();

      // asynchronous reset in the middle of operation
      #(1.3);
      steady = 1'b0;
      rst_n = 1'b0;
      #0.01;
      check(out_clk == 1'b0 && !clk0_active && !clk1_active, "reset did not stop out_clk at once");
      #(20.0);
      rst_n = 1'b1;
      sel_t = $realtime;
      wait (select ? clk1_active : clk0_active);
      check(($realtime - sel_t) <= 3.0 * (select ? h1 : h0) + 0.01,
            $sformatf("restart after reset took %0.3f ns", $realtime - sel_t));
      resets++;
      #(3.0 * h0 + 3.0 * h1);
      steady = 1'b1;
      #(100.0);
    end

    check(sw_0to1 > 0, "no switch from CLK0 to CLK1 happened");
    check(sw_1to0 > 0, "no switch from CLK1 to CLK0 happened");
    check(gaps > 0, "no break-before-make gap observed");
    check(cfg_fast1 > 0 && cfg_slow1 > 0 && cfg_equal > 0, "a clock configuration was not run");
    check(resets > 0, "no reset during operation");
    check(steady_checks > 100, "too few steady-state comparisons");
    check(pulses > 500, "too few output pulses");
    $display("mechanisms: switch0to1=%0d switch1to0=%0d gaps=%0d resets=%0d configs=%0d/%0d/%0d pulses=%0d steady=%0d",
             sw_0to1, sw_1to0, gaps, resets, cfg_fast1, cfg_slow1, cfg_equal, pulses, steady_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
