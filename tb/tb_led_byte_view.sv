// tb_led_byte_view: self-check of the LED byte viewer on a 256-bit word.
// It shows the ASCII word "TMU@TMU@ComputerTMU@TMU@Computer" byte by byte
// and compares every byte with the character taken from a string in the
// testbench, then does the same for random words.
module tb_led_byte_view;
  logic [255:0] data;
  logic [4:0]   byte_sel;
  logic [7:0]   led;
  int checks = 0, failures = 0;
  string text = "TMU@TMU@ComputerTMU@TMU@Computer";

  led_byte_view #(.DATA_W(256)) dut (.data(data), .byte_sel(byte_sel), .led(led));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = "TMU@TMU@ComputerTMU@TMU@Computer";
    for (int k = 0; k < 32; k++) begin
      byte_sel = 5'(k);
      #1;
      checks++;
      if (led !== 8'(text[k])) begin
        failures++;
        $display("FAIL byte %0d: led=%h expected '%s'", k, led, text.substr(k, k));
      end
    end
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < 8; w++) data[w*32 +: 32] = $urandom;
      for (int k = 0; k < 32; k++) begin
        byte_sel = 5'(k);
        #1;
        checks++;
        if (led !== data[255 - 8*k -: 8]) begin
          failures++;
          $display("FAIL random word byte %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
