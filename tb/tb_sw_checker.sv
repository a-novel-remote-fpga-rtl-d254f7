// tb_sw_checker: self-checking test of the checker (module sw_checker).
//
// Feeds random command streams built from the switch commands ('I'..'P',
// 'Q'..'S', 'U', 'u'), the requests "VZ" and "VX" and noise characters, and
// compares the switch state after every character with a reference model
// written here. Also checks that nothing is read while disabled and that
// resend pulses exactly once per "VZ".
module tb_sw_checker;
  import io_pkg::*;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0;
  logic [7:0] rx_data;
  logic rx_empty, rx_read, resend;
  logic [7:0] sw_state;
  logic [2:0] btn_state;
  int checks = 0, failures = 0;
  logic [7:0] rxq [$];
  int resends = 0;

  sw_checker dut (.*);

  assign rx_empty = (rxq.size() == 0);
  assign rx_data  = rx_empty ? 8'h00 : rxq[0];

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (rx_read && !rx_empty) void'(rxq.pop_front());
    if (resend) resends++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [10:0] model = '0;
    automatic int sel = -1;
    automatic bit after_v = 0;
    automatic int vz = 0;
    logic [7:0] c;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    rxq.push_back("I");
    rxq.push_back("U");
    repeat (5) @(posedge clk);
    check(rxq.size() == 2 && sw_state == 0, "nothing read while disabled");
    rxq.delete();
    #1 enable = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(0, 9))
        0, 1, 2: c = 8'("I" + $urandom_range(0, 7));
        3:       c = 8'("Q" + $urandom_range(0, 2));
        4, 5:    c = "U";
        6:       c = "u";
        7:       c = "V";
        8:       c = $urandom_range(0, 1) ? "Z" : "X";
        default: c = 8'($urandom_range(32, 126));
      endcase
      // reference model
      if (after_v) begin
        after_v = 0;
        if (c == "Z") vz++;
      end else if (c == "V") after_v = 1;
      else if (c >= "I" && c <= "P") sel = c - "I";
      else if (c >= "Q" && c <= "S") sel = 8 + c - "Q";
      else if ((c == "U" || c == "u") && sel >= 0) model[sel] = (c == "U");
      rxq.push_back(c);
      @(posedge clk);
      #1;
      check(sw_state == model[7:0] && btn_state == model[10:8],
            $sformatf("after '%c': %03h vs %03h", c, {btn_state, sw_state}, model));
    end
    @(posedge clk);
    check(resends == vz, $sformatf("resend pulses %0d vs %0d", resends, vz));
    check(vz > 0, "VZ occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
