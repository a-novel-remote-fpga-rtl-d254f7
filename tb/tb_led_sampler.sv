// tb_led_sampler: self-checking test of led_sampler.
//
// For every sampling period and LED it picks a number of "on" clocks k
// (including 0, the whole period and values right at the threshold) and
// drives exactly k on-clocks at random positions in the period, like a PWM
// or a glitchy signal would. After the period the sampled value must be
// 1 exactly when k is at least 50 % of the period. Periods are aligned with
// the sampler's tick, which must come every CLK_HZ/SAMPLE_HZ clocks.
module tb_led_sampler;
  localparam int unsigned CLK_HZ = 50_000;
  localparam int unsigned HZ     = 500;
  localparam int unsigned PERIOD = CLK_HZ / HZ;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] led = '0, sampled;
  logic tick;
  int checks = 0, failures = 0;

  led_sampler #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(HZ), .THRESHOLD_PCT(50)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k [8];
    logic on [8][PERIOD];
    logic [7:0] expected;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (!tick) @(posedge clk);
    for (int p = 0; p < 200; p++) begin
      for (int i = 0; i < 8; i++) begin
        case ($urandom_range(0, 5))
          0: k[i] = 0;
          1: k[i] = PERIOD;
          2: k[i] = PERIOD / 2;
          3: k[i] = PERIOD / 2 - 1;
          default: k[i] = $urandom_range(0, PERIOD);
        endcase
        for (int c = 0; c < PERIOD; c++) on[i][c] = (c < k[i]);
        // shuffle the on-clocks across the period
        for (int c = PERIOD - 1; c > 0; c--) begin
          automatic int j = $urandom_range(0, c);
          automatic logic t = on[i][c];
          on[i][c] = on[i][j];
          on[i][j] = t;
        end
        expected[i] = (k[i] * 2 >= PERIOD);
      end
      for (int c = 0; c < PERIOD; c++) begin
        #1;
        for (int i = 0; i < 8; i++) led[i] = on[i][c];
        @(posedge clk);
        if (c == PERIOD - 1) check(tick, "tick at the end of the period");
      end
      #1 check(sampled == expected, $sformatf("period %0d: %02h vs %02h", p, sampled, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
