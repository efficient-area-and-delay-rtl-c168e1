// tb_clk_sync_branch: self-checking test of one half of the clock switch.
//
// Drives the half with a 10 ns clock and changes sel_this and other_off at
// random times that never coincide with a clock edge. A reference model in
// the testbench samples the request on every rising edge and moves it to
// the enable on every falling edge; after each edge the outputs are
// compared with it. The testbench also checks that the gated clock only
// ever carries whole 5 ns high pulses, that a request reaches en_q within
// 1/2 to 3/2 clock periods, and that the asynchronous reset clears the
// half at once.
`timescale 1ns / 1ps

module tb_clk_sync_branch;

  localparam realtime PERIOD = 10.0;
  localparam realtime HALF   = PERIOD / 2.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sel_this = 1'b0;
  logic other_off = 1'b0;
  logic en_q, off_qn, clk_gated;

  int checks = 0;
  int failures = 0;

  clk_sync_branch dut (
    .clk(clk), .rst_n(rst_n), .sel_this(sel_this), .other_off(other_off),
    .en_q(en_q), .off_qn(off_qn), .clk_gated(clk_gated)
  );

  always #(HALF) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Reference model of the two flip-flops.
  logic exp_sync = 1'b0;
  logic exp_en   = 1'b0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) exp_sync <= 1'b0;
    else        exp_sync <= sel_this & other_off;
  end
  always @(negedge clk or negedge rst_n) begin
    if (!rst_n) exp_en <= 1'b0;
    else        exp_en <= exp_sync;
  end

  // Compare shortly after every clock edge.
  always @(clk) begin
    #1;
    if (rst_n) begin
      check(en_q == exp_en, $sformatf("en_q=%0b expected %0b", en_q, exp_en));
      check(off_qn == !exp_en, "off_qn is not the inverse of the enable");
      check(clk_gated == (clk && exp_en), "clk_gated is not clk AND enable");
    end
  end

  // en_q may only change on a falling clock edge (or on reset).
  always @(en_q) begin
    if (rst_n && $time > 0)
      check(clk == 1'b0, "en_q changed while the clock was high");
  end

  // Whole high pulses only on the gated clock.
  realtime rise_t;
  int pulses = 0;
  always @(posedge clk_gated) rise_t = $realtime;
  always @(negedge clk_gated) begin
    if (rst_n) begin
      pulses++;
      check(($realtime - rise_t) > HALF - 0.01 && ($realtime - rise_t) < HALF + 0.01,
            $sformatf("gated clock high pulse of %0.3f ns", $realtime - rise_t));
    end
  end

  // Latency from a rising request to en_q.
  realtime req_t;
  bit      req_pending = 1'b0;
  int      latencies = 0;
  always @(posedge (sel_this & other_off)) begin
    req_t = $realtime;
    req_pending = 1'b1;
  end
  always @(negedge (sel_this & other_off)) req_pending = 1'b0;
  always @(posedge en_q) begin
    if (req_pending && rst_n) begin
      latencies++;
      check(($realtime - req_t) >= HALF && ($realtime - req_t) <= 3.0 * HALF,
            $sformatf("request to enable took %0.3f ns", $realtime - req_t));
      req_pending = 1'b0;
    end
  end

  // Watchdog
  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3.3 * PERIOD);
    rst_n = 1'b1;
    check(en_q == 1'b0 && clk_gated == 1'b0, "half not cleared by reset");
    for (int i = 0; i < 400; i++) begin
      // change an input 1.0 to 3.9 ns after one of the next few clock edges
      repeat (1 + $urandom % 6) @(clk);
      #(1.0 + real'($urandom % 30) / 10.0);
      if ($urandom % 2 == 1) sel_this = ~sel_this;
      else              other_off = ~other_off;
      // hold long enough to see the result now and then
      if ($urandom % 4 == 0) #(2.0 * PERIOD);
      if (i == 200) begin
        sel_this = 1'b1; other_off = 1'b1;
        #(3.0 * PERIOD);
        check(en_q == 1'b1, "half not enabled by a steady request");
        #(0.3);
        rst_n = 1'b0;
        #0.1;
        check(en_q == 1'b0 && clk_gated == 1'b0 && off_qn == 1'b1, "asynchronous reset did not clear the half");
        #(2.0 * PERIOD);
        rst_n = 1'b1;
      end
    end
    #(3.0 * PERIOD);
    check(pulses > 50, $sformatf("only %0d gated pulses seen", pulses));
    check(latencies > 20, $sformatf("only %0d request latencies measured", latencies));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
