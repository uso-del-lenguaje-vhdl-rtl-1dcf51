// Self-checking test of sector_decoder: every 12-bit angle is converted to
// degrees in the testbench and the expected 60-degree sector compared with
// the one-hot output.
module tb_sector_decoder;
  logic [11:0] angle;
  logic [5:0]  sector;
  int checks = 0, failures = 0;
  int hits [6];

  sector_decoder dut (.angle_i(angle), .sector_o(sector));

  initial begin
    for (int i = 0; i < 6; i++) hits[i] = 0;
    for (int a = 0; a < 4096; a++) begin
      real deg;
      int  k;
      angle = 12'(a);
      #1;
      deg = real'(a) * 360.0 / 4096.0;
      k   = int'($floor(deg / 60.0));          // 0..5
      checks++;
      if (sector != (6'b1 << k)) begin
        failures++;
        $display("FAIL: angle %0d (%f deg): sector %b expected A%0d", a, deg, sector, k + 1);
      end else hits[k]++;
    end
    // each sector covers 4096/6 angles, 682 or 683
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (hits[i] < 682 || hits[i] > 683) begin
        failures++; $display("FAIL: sector %0d width %0d", i + 1, hits[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
