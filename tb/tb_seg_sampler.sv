// tb_seg_sampler: self-checking test of seg_sampler.
//
// Emulates a user circuit that scans a 4-digit display (active-low anodes
// and segments), 40 clocks per digit. Each sampling period it picks new
// random patterns and a random subset of digits to scan, aligned to the
// period. After each period's update the picture must equal the chosen
// patterns, with unscanned digits blank; it must not move inside a period,
// and periods must be CLK_HZ/SAMPLE_HZ clocks long.
module tb_seg_sampler;
  import io_pkg::*;
  localparam int unsigned CLK_HZ = 100_000;
  localparam int unsigned HZ     = 100;
  localparam int unsigned PERIOD = CLK_HZ / HZ;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] an = '1;
  logic [7:0] seg = '1;
  logic [3:0][7:0] picture;
  logic tick;
  int checks = 0, failures = 0;

  seg_sampler #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(HZ), .ACTIVE_LOW(1'b1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][7:0] pat, expected, held;
    logic [3:0] scan;
    int d, len;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // align to the sampler's period
    while (!tick) @(posedge clk);
    for (int p = 0; p < 60; p++) begin
      pat  = {$urandom, $urandom};
      scan = (p % 7 == 3) ? 4'($urandom) : 4'hF;
      if (p % 5 == 2) pat = expected;      // unchanged picture now and then
      // one period of scanning
      d = 0;
      len = 0;
      held = picture;
      for (int c = 0; c < PERIOD; c++) begin
        #1;
        an  = scan[d] ? ~(4'b1 << d) : 4'hF;
        seg = ~pat[d];
        @(posedge clk);
        if (c > 0 && picture != held) begin
          check(0, $sformatf("picture moved inside period %0d", p));
          held = picture;
        end
        if (c == PERIOD - 1) check(tick, $sformatf("tick at the end of period %0d", p));
        else if (tick) check(0, $sformatf("early tick in period %0d at %0d", p, c));
        if (++len == 40) begin
          len = 0;
          d = (d + 1) % 4;
        end
      end
      for (int i = 0; i < 4; i++) expected[i] = scan[i] ? pat[i] : 8'h00;
      #1 check(picture == expected, $sformatf("period %0d: %08h vs %08h", p, picture, expected));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
