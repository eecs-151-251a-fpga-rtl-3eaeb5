// piano_scale_rom_tb: reads all 256 addresses and compares each word with a
// period computed here in floating point: f = 440 * 2^((n - 69) / 12) for
// the key's note number n, period = CLOCK_FREQ / (2 f), allowing one count of
// rounding difference. Keys outside the two keyboard rows must read 0.
module piano_scale_rom_tb;
  localparam int unsigned CLK = 125_000_000;
  logic [7:0]  address;
  logic [23:0] data;
  int          checks = 0, failures = 0;
  int          note [256];

  piano_scale_rom #(.CLOCK_FREQ(CLK)) dut (.*);

  initial begin
    string lower  = "zsxdcvgbhnjm";
    string lowerS = "ZSXDCVGBHNJM";
    string upper  = "q2w3er5t6y7ui";
    string upperS = "Q@W#ER%T^Y&UI";
    foreach (note[i]) note[i] = -1;
    for (int k = 0; k < 12; k++) begin
      note[lower[k]]  = 48 + k;
      note[lowerS[k]] = 36 + k;
    end
    for (int k = 0; k < 13; k++) begin
      note[upper[k]]  = 60 + k;
      note[upperS[k]] = 72 + k;
    end
    note[","] = 60;
    note["<"] = 60;
    for (int a = 0; a < 256; a++) begin
      longint expected;
      address = 8'(a);
      #1;
      if (note[a] < 0) expected = 0;
      else expected = longint'($rtoi(real'(CLK) / (2.0 * 440.0 * $pow(2.0, (note[a] - 69) / 12.0)) + 0.5));
      checks++;
      if (longint'(data) > expected + 1 || longint'(data) + 1 < expected) begin
        failures++;
        $display("FAIL: address %0d ('%s') data %0d expected %0d", a, a, data, expected);
      end
    end
    // spot value: A4 ('y') at 125 MHz is 142045.45 cycles per half period
    address = "y";
    #1 checks++;
    if (data != 24'd142045) begin failures++; $display("FAIL: A4 period %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
