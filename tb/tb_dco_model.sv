// tb_dco_model: measures the oscillator model's period for every control
// code of its table (0x38 .. 0x3F, 0x00 .. 0x1F) and compares it, within
// 0.5 percent, with the measured frequency listed for that code, written
// out here as a plain list rather than computed, so that the model's
// formula is checked against the table.
module tb_dco_model;
  logic [15:0] cw = 16'h0038;
  logic HFCLK;
  int checks = 0, failures = 0;
  real table_mhz [40] = '{325.0, 300.0, 280.0, 260.0, 240.0, 220.0, 200.0, 180.0,
                          162.5, 150.0, 140.0, 130.0, 120.0, 110.0, 100.0, 90.0,
                          81.25, 75.0, 70.0, 65.0, 60.0, 55.0, 50.0, 45.0,
                          40.625, 37.5, 35.0, 32.5, 30.0, 27.5, 25.0, 22.5,
                          20.3125, 18.75, 17.5, 16.25, 15.0, 13.75, 12.5, 11.25};

  dco_model dut (.cw, .HFCLK);

  initial begin
    #50ms;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int idx = 0; idx < 40; idx++) begin
      realtime t0, t1;
      real f_exp, f_got;
      cw = 16'(6'(idx + 'h38));
      repeat (3) @(posedge HFCLK);
      t0 = $realtime;
      repeat (10) @(posedge HFCLK);
      t1 = $realtime;
      f_got = 10.0 / ((t1 - t0) / 1us);
      f_exp = table_mhz[idx];
      checks++;
      if (f_got < f_exp * 0.995 || f_got > f_exp * 1.005) begin
        failures++; $display("FAIL: code %h: %f MHz, expected %f", cw[5:0], f_got, f_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
