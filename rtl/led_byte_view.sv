// led_byte_view: shows a wide data word one byte at a time on 8 LEDs.
//
// On the board the delivered word is checked by eye on eight LEDs, one byte
// at a time, with switches choosing the byte. `byte_sel` picks one of the
// DATA_W/8 bytes of `data`; byte 0 is the most significant byte, so for a
// word that holds an ASCII string, byte k is the string's k-th character
// (for "TMU@..." byte 0 shows 'T' = 8'h54). A `byte_sel` beyond the last
// byte shows 0. A LED is lit for a 1 bit; led[7] shows the byte's most
// significant bit. Purely combinational.
// Checking the delivered word byte by byte on LEDs follows the described
// design; the byte order and the select input are this design's choice.
module led_byte_view #(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned SEL_W  = (DATA_W > 8) ? $clog2(DATA_W / 8) : 1
) (
  input  logic [DATA_W-1:0] data,
  input  logic [SEL_W-1:0]  byte_sel,
  output logic [7:0]        led
);

  localparam int unsigned BYTES = DATA_W / 8;

  always_comb begin
    led = '0;
    for (int unsigned k = 0; k < BYTES; k++) begin
      if (byte_sel == SEL_W'(k)) led = data[DATA_W - 8 * (k + 1) +: 8];
    end
  end

endmodule
