// board_model: testbench model of the controller board on the far end of the
// UART link, including the relay software between it and the FPGA.
//
// send_str() types characters onto the line. Every received two-character
// command ('0'..'4' then 'A'..'H' / 'a'..'h') updates the model's display:
// segs[d][s] for digit d, leds[i] for the LED array; a command's arrival
// clock goes to last_cmd. Characters that do not parse as a command pair go
// to `other` (the board-specific response, for instance).
module board_model #(
  parameter int unsigned DIV = 16
) (
  input  logic clk,
  output logic tx,
  input  logic rx
);
  uart_line #(.DIV(DIV)) line (.clk(clk), .tx(tx), .rx(rx));

  logic [3:0][7:0] segs = '0;
  logic [7:0]      leds = '0;
  int              cmds = 0, seg_cmds = 0, led_cmds = 0;
  longint          last_cmd = 0;
  logic [7:0]      other [$];

  task automatic send_str(input string s);
    line.send_str(s);
  endtask

  initial begin
    automatic logic [7:0] c, sel = 0;
    automatic bit have_sel = 0;
    forever begin
      wait (line.got.size() > 0);
      c = line.got.pop_front();
      if (!have_sel && c >= "0" && c <= "4") begin
        sel = c;
        have_sel = 1;
      end else if (have_sel && ((c >= "A" && c <= "H") || (c >= "a" && c <= "h"))) begin
        have_sel = 0;
        cmds++;
        last_cmd = line.cycle;
        if (sel == "4") begin
          leds[(c >= "a") ? c - "a" : c - "A"] = (c < "a");
          led_cmds++;
        end else begin
          segs[sel - "0"][(c >= "a") ? c - "a" : c - "A"] = (c < "a");
          seg_cmds++;
        end
      end else begin
        if (have_sel) other.push_back(sel);
        have_sel = 0;
        other.push_back(c);
      end
    end
  end
endmodule
