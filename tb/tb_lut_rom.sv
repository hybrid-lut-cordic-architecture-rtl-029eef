// tb_lut_rom: reads all four words of the correction ROM and compares each
// with the two LSBs of the published 10-bit values 0x3FC, 0x3FD, 0x3FE, 0x3FF.
module tb_lut_rom;
  logic [1:0] addr, data;
  int checks = 0, failures = 0;
  localparam logic [9:0] FULL [4] = '{10'h3FC, 10'h3FD, 10'h3FE, 10'h3FF};

  lut_rom dut (.addr(addr), .data(data));

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int a = 3; a >= 0; a--) begin
        addr = 2'(a);
        #1;
        checks++;
        if (data !== FULL[a][1:0]) begin
          failures++;
          $display("FAIL addr %0d: got %b expected %b", a, data, FULL[a][1:0]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
